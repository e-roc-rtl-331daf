// tb_dspam: checks the DSPAM SRAM model - writes random words to random
// addresses, reads them back one cycle later, and checks that a write does
// not disturb rdata and that a read holds its value while idle.
module tb_dspam;
  import eroc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  dspam_req_t req = '0;
  logic [31:0] rdata;
  logic [31:0] model [1024];
  logic [1023:0] written = '0;
  int checks = 0, failures = 0;

  dspam #(.WORDS(1024)) dut (.clk_i(clk), .req_i(req), .rdata_o(rdata));

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int a;
      logic [31:0] v;
      a = $urandom_range(0, 1023);
      v = $urandom;
      @(negedge clk);
      req = '{req: 1'b1, we: 1'b1, addr: 16'(a), wdata: v};
      model[a] = v; written[a] = 1'b1;
    end
    for (int i = 0; i < 1024; i++) begin
      if (!written[i]) continue;
      @(negedge clk);
      req = '{req: 1'b1, we: 1'b0, addr: 16'(i), wdata: '0};
      @(negedge clk);
      req = '{req: 1'b1, we: 1'b1, addr: 16'((i + 1) % 1024), wdata: model[(i + 1) % 1024]};
      check(rdata == model[i], $sformatf("word %0d", i));
      @(negedge clk);
      req = '0;
      check(rdata == model[i], "rdata held over write and idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
