// tb_eroc_block_sizes: the allocation block sizes k = 64, 128, 256 and
// 512 bytes that E-RoC's next-fit allocator may use. One small manager per
// size (two masters, two 4KB DSPAMs) runs the same sequence: an E-RAID 1 of
// 3 blocks and an E-RAID 1+P of 2 blocks, checking region length, the range
// check at the region's end, the block each copy lands on, and the limit of
// one DSPAM per region. The four cases run side by side.
module tb_eroc_block_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NK = 4;
  int   c [NK], f [NK];
  logic d [NK];

  eroc_blk_case #(.K(64))  u_k64  (.clk_i (clk), .checks_o (c[0]), .failures_o (f[0]), .done_o (d[0]));
  eroc_blk_case #(.K(128)) u_k128 (.clk_i (clk), .checks_o (c[1]), .failures_o (f[1]), .done_o (d[1]));
  eroc_blk_case #(.K(256)) u_k256 (.clk_i (clk), .checks_o (c[2]), .failures_o (f[2]), .done_o (d[2]));
  eroc_blk_case #(.K(512)) u_k512 (.clk_i (clk), .checks_o (c[3]), .failures_o (f[3]), .done_o (d[3]));

  initial begin
    int checks, failures;
    wait (d[0] && d[1] && d[2] && d[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < NK; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int checks;
    repeat (500_000) @(posedge clk);
    checks = c[0] + c[1] + c[2] + c[3];
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end
endmodule
