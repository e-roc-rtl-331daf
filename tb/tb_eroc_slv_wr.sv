// tb_eroc_slv_wr: random write sets of 0..3 words over 4 DSPAMs with
// distinct addresses. Checks that every word lands where it should and the
// cycle count: done in the cycle after the start edge when the busiest
// DSPAM takes one write, one cycle more per extra write there, and 2 cycles
// for an empty set. A second instance with DSPAM_BUS set takes the same
// sets: there every write waits for the one bus, so the count follows the
// number of writes.
module tb_eroc_slv_wr;
  import eroc_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, busy, done;
  logic [2:0] mask;
  phys_addr_t [2:0] pa;
  logic [2:0][31:0] wd;
  dspam_req_t [N-1:0] rq;
  logic [N-1:0][31:0] rdt;
  logic busy2, done2;
  dspam_req_t [N-1:0] rq2;
  logic [N-1:0][31:0] rdt2;
  int n_overlap = 0;
  int checks = 0, failures = 0;

  eroc_slv_wr #(.NUM_DSPAM(N)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .mask_i(mask), .pa_i(pa), .data_i(wd),
    .busy_o(busy), .done_o(done), .wr_req_o(rq));
  eroc_dspam_bank #(.N(N), .WORDS(256)) bank (.clk_i(clk), .req_i(rq), .rdata_o(rdt));
  eroc_slv_wr #(.NUM_DSPAM(N), .DSPAM_BUS(1'b1)) dut_bus (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .mask_i(mask), .pa_i(pa), .data_i(wd),
    .busy_o(busy2), .done_o(done2), .wr_req_o(rq2));
  eroc_dspam_bank #(.N(N), .WORDS(256)) bank2 (.clk_i(clk), .req_i(rq2), .rdata_o(rdt2));

  always @(posedge clk) begin
    int nw;
    nw = 0;
    for (int d = 0; d < N; d++) if (rq2[d].req) nw++;
    if (rst_n && nw > 1) n_overlap++;
  end

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    mask = '0; pa = '0; wd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      int cnt [N];
      int k, n, n1, n2, tot;
      @(negedge clk);
      mask = 3'($urandom);
      for (int c = 0; c < 3; c++) begin
        pa[c].dsp  = 4'($urandom_range(0, N - 1));
        pa[c].addr = 16'(c * 80 + $urandom_range(0, 79));
        wd[c]      = $urandom;
      end
      for (int d = 0; d < N; d++) cnt[d] = 0;
      for (int c = 0; c < 3; c++) if (mask[c]) cnt[pa[c].dsp]++;
      k = 0;
      for (int d = 0; d < N; d++) if (cnt[d] > k) k = cnt[d];
      tot = $countones(mask);
      start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      n = 1; n1 = 0; n2 = 0;
      while (n1 == 0 || n2 == 0) begin
        if (done && n1 == 0) n1 = n;
        if (done2 && n2 == 0) n2 = n;
        if (n1 == 0 || n2 == 0) begin @(posedge clk); #1; n++; end
        if (n > 20) break;
      end
      check(n1 == ((k == 0) ? 2 : k), $sformatf("cycles %0d for %0d writes on one DSPAM", n1, k));
      check(n2 == ((tot == 0) ? 2 : tot), $sformatf("DSPAM bus: cycles %0d for %0d writes", n2, tot));
      @(posedge clk); #1;
      for (int c = 0; c < 3; c++)
        if (mask[c]) begin
          check(bank.mem[pa[c].dsp][pa[c].addr] == wd[c], $sformatf("word %0d", c));
          check(bank2.mem[pa[c].dsp][pa[c].addr] == wd[c], $sformatf("DSPAM bus: word %0d", c));
        end
      check(!busy && !busy2, "idle after done");
    end
    check(n_overlap == 0, "DSPAM bus: one write per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
