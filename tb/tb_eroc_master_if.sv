// tb_eroc_master_if: random read and write request sets (never both on one
// DSPAM in a cycle); each DSPAM port must carry the write, else the read,
// else nothing, and read data must come back from the same DSPAM.
module tb_eroc_master_if;
  import eroc_pkg::*;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  dspam_req_t [N-1:0] rdq, wrq, dq;
  logic [N-1:0][31:0] rrd, drd;
  int checks = 0, failures = 0;

  eroc_master_if #(.NUM_DSPAM(N)) dut (
    .clk_i(clk), .rst_ni(rst_n), .rd_req_i(rdq), .wr_req_i(wrq), .rd_rdata_o(rrd),
    .dsp_req_o(dq), .dsp_rdata_i(drd));

  initial begin
    rdq = '0; wrq = '0; drd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      for (int d = 0; d < N; d++) begin
        int k;
        k = $urandom_range(0, 2);
        rdq[d] = '{req: k == 1, we: 1'b0, addr: 16'($urandom), wdata: $urandom};
        wrq[d] = '{req: k == 2, we: 1'b1, addr: 16'($urandom), wdata: $urandom};
        drd[d] = $urandom;
      end
      #1;
      for (int d = 0; d < N; d++) begin
        dspam_req_t e;
        e = wrq[d].req ? wrq[d] : (rdq[d].req ? rdq[d] : '0);
        checks++;
        if (dq[d] != e || rrd[d] != drd[d]) begin failures++; $display("FAIL: dspam %0d", d); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
