// tb_eroc_idma: the iDMA against the main-memory model (which stalls every
// fourth cycle) and a testbench stand-in for the E-RAID engines. Random
// loads must copy main memory words base/4 .. base/4+n-1 into E-RAID words
// 0..n-1; random offloads the other way; an engine read error on any word
// must end the offload with err set while the word is still written.
module tb_eroc_idma;
  import eroc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, load = 1'b0, busy, done, err;
  logic [16:0] nwords = '0;
  logic [31:0] base = '0;
  logic rs, ws, rdone = 1'b0, rerr = 1'b0, wdone = 1'b0;
  logic [15:0] widx;
  logic [31:0] wdata, rdata = '0;
  logic mv, mr, mwe, mrv;
  logic [31:0] ma, mwd, mrd;
  logic [31:0] eraid [1024];
  int checks = 0, failures = 0;
  int bad_word = -1;

  eroc_idma dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .load_i(load), .nwords_i(nwords), .mem_base_i(base),
    .busy_o(busy), .done_o(done), .err_o(err),
    .eng_rd_start_o(rs), .eng_wr_start_o(ws), .eng_widx_o(widx), .eng_wdata_o(wdata),
    .eng_rd_done_i(rdone), .eng_rd_err_i(rerr), .eng_rdata_i(rdata), .eng_wr_done_i(wdone),
    .mem_req_valid_o(mv), .mem_req_ready_i(mr), .mem_req_we_o(mwe), .mem_req_addr_o(ma),
    .mem_req_wdata_o(mwd), .mem_rsp_valid_i(mrv), .mem_rsp_rdata_i(mrd));
  eroc_main_mem #(.WORDS(4096)) u_mem (
    .clk_i(clk), .req_valid_i(mv), .req_ready_o(mr), .req_we_i(mwe), .req_addr_i(ma),
    .req_wdata_i(mwd), .rsp_valid_o(mrv), .rsp_rdata_o(mrd));

  // engine stand-in: write done 2 cycles after start, read done 3 cycles after
  logic [15:0] e_idx;
  logic [31:0] e_data;
  int e_wcnt = 0, e_rcnt = 0;
  always @(posedge clk) begin
    rdone <= 1'b0; wdone <= 1'b0; rerr <= 1'b0;
    if (ws) begin e_idx <= widx; e_data <= wdata; e_wcnt <= 2; end
    if (rs) begin e_idx <= widx; e_rcnt <= 3; end
    if (e_wcnt > 0) begin
      e_wcnt <= e_wcnt - 1;
      if (e_wcnt == 1) begin eraid[e_idx] <= e_data; wdone <= 1'b1; end
    end
    if (e_rcnt > 0) begin
      e_rcnt <= e_rcnt - 1;
      if (e_rcnt == 1) begin
        rdata <= eraid[e_idx]; rdone <= 1'b1; rerr <= (int'(e_idx) == bad_word);
      end
    end
  end

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 40; it++) begin
      int n, b;
      n = $urandom_range(1, 64);
      b = $urandom_range(0, 2000);
      load = $urandom_range(0, 1);
      bad_word = (!load && $urandom_range(0, 1)) ? $urandom_range(0, n - 1) : -1;
      for (int w = 0; w < 1024; w++) eraid[w] = 32'hE000_0000 + it * 4096 + w;
      @(negedge clk);
      nwords = 17'(n); base = 32'(b * 4);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      check(err == (bad_word >= 0), "error flag");
      for (int w = 0; w < n; w++)
        if (load) check(eraid[w] == u_mem.mem[b + w], $sformatf("load word %0d", w));
        else      check(u_mem.mem[b + w] == 32'hE000_0000 + it * 4096 + w, $sformatf("offload word %0d", w));
      if (load) check(eraid[n] == 32'hE000_0000 + it * 4096 + n, "nothing past the end");
      @(negedge clk);
      check(!busy, "idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
