// tb_eroc_raid_write: the write engine with a real SLV WR unit and a
// behavioural bank of 4 DSPAMs. For each level, random words must land in
// copy x, copy y (E-RAID 1 and 1+P) and as A ^ R in the parity word
// (E-RAID 1+P) and nowhere else; done comes 1 cycle after the start edge
// with copies in different DSPAMs.
module tb_eroc_raid_write;
  import eroc_pkg::*;
  localparam int N = 4;
  localparam logic [31:0] R = 32'hFFFF_FFFB;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, busy, done;
  eraid_desc_t desc;
  logic [15:0] widx;
  logic [31:0] wdata;
  logic ws, wdn;
  logic [2:0] wm;
  phys_addr_t [2:0] wpa;
  logic [2:0][31:0] wdd;
  dspam_req_t [N-1:0] rq;
  logic [N-1:0][31:0] rdt;
  int checks = 0, failures = 0;

  eroc_raid_write #(.BLOCK_BYTES(64)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .desc_i(desc), .widx_i(widx), .wdata_i(wdata),
    .prime_i(R), .busy_o(busy), .done_o(done),
    .wr_start_o(ws), .wr_mask_o(wm), .wr_pa_o(wpa), .wr_data_o(wdd), .wr_done_i(wdn));
  eroc_slv_wr #(.NUM_DSPAM(N)) u_swr (
    .clk_i(clk), .rst_ni(rst_n), .start_i(ws), .mask_i(wm), .pa_i(wpa), .data_i(wdd),
    .busy_o(), .done_o(wdn), .wr_req_o(rq));
  eroc_dspam_bank #(.N(N), .WORDS(1024)) bank (.clk_i(clk), .req_i(rq), .rdata_o(rdt));

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    desc = '0; widx = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      int n, ax, ay, ap, w0;
      @(negedge clk);
      desc = '0;
      desc.valid = 1'b1;
      desc.level = level_e'($urandom_range(0, 2));
      desc.dsp[0] = 4'd0; desc.dsp[1] = 4'd1; desc.dsp[2] = 4'd2;
      for (int c = 0; c < 3; c++) desc.base[c] = 8'($urandom_range(0, 60));
      widx = 16'($urandom_range(0, 63));
      wdata = $urandom;
      ax = desc.base[0] * 16 + widx; ay = desc.base[1] * 16 + widx; ap = desc.base[2] * 16 + widx;
      bank.mem[0][ax] = 0; bank.mem[1][ay] = 0; bank.mem[2][ap] = 0;
      w0 = bank.writes;
      start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      n = 1;
      while (!done) begin @(posedge clk); #1; n++; end
      @(posedge clk); #1;
      check(n == 1, $sformatf("cycles %0d", n));
      check(bank.mem[0][ax] == wdata, "copy x");
      check(bank.mem[1][ay] == ((desc.level != LVL_NONE) ? wdata : 0), "copy y");
      check(bank.mem[2][ap] == ((desc.level == LVL_RAID1P) ? (wdata ^ R) : 0), "parity");
      check(int'(bank.writes) - w0 == int'(ncopies(desc.level)), "number of writes");
      check(!busy, "idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
