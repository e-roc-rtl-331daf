// tb_eroc_raid_read: the read engine with a real SLV RD unit in front of a
// behavioural bank of 4 DSPAMs. For random descriptors of each level the
// test stores A in the copies and A ^ R as parity, corrupts none, x, y or
// both copies, and checks data, SLV_ERR, the corrected flag and the cycle
// count (3 cycles, 6 with the parity step, copies in different DSPAMs).
module tb_eroc_raid_read;
  import eroc_pkg::*;
  localparam int N = 4;
  localparam logic [31:0] R = 32'hFFFF_FFFB;  // 4294967291, prime
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, busy, done, err, corr;
  eraid_desc_t desc;
  logic [15:0] widx;
  logic [31:0] rdata;
  logic rs, rdn;
  logic [2:0] rm;
  phys_addr_t [2:0] rpa;
  logic [2:0][31:0] rdd;
  dspam_req_t [N-1:0] rq;
  logic [N-1:0][31:0] rdt;
  int checks = 0, failures = 0;
  int n_corr = 0, n_err = 0;

  eroc_raid_read #(.BLOCK_BYTES(64)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .desc_i(desc), .widx_i(widx), .prime_i(R),
    .busy_o(busy), .done_o(done), .rdata_o(rdata), .err_o(err), .corrected_o(corr),
    .rd_start_o(rs), .rd_mask_o(rm), .rd_pa_o(rpa), .rd_done_i(rdn), .rd_data_i(rdd));
  eroc_slv_rd #(.NUM_DSPAM(N)) u_srd (
    .clk_i(clk), .rst_ni(rst_n), .start_i(rs), .mask_i(rm), .pa_i(rpa), .busy_o(),
    .done_o(rdn), .data_o(rdd), .rd_req_o(rq), .rd_rdata_i(rdt));
  eroc_dspam_bank #(.N(N), .WORDS(1024)) bank (.clk_i(clk), .req_i(rq), .rdata_o(rdt));

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    desc = '0; widx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      logic [31:0] a, got;
      int bad, n, ax, ay, ap;
      bit exp_err, exp_corr;
      @(negedge clk);
      desc = '0;
      desc.valid = 1'b1;
      desc.level = level_e'($urandom_range(0, 2));
      desc.nblk  = 8'd4;
      desc.dsp[0] = 4'd0; desc.dsp[1] = 4'd1; desc.dsp[2] = 4'd2 + 4'($urandom_range(0, 1));
      for (int c = 0; c < 3; c++) desc.base[c] = 8'($urandom_range(0, 60));
      widx = 16'($urandom_range(0, 63));
      ax = desc.base[0] * 16 + widx; ay = desc.base[1] * 16 + widx; ap = desc.base[2] * 16 + widx;
      a = $urandom;
      bank.mem[0][ax] = a; bank.mem[1][ay] = a; bank.mem[desc.dsp[2]][ap] = a ^ R;
      bad = $urandom_range(0, 3);          // bit0: x bad, bit1: y bad
      if (bad[0]) bank.mem[0][ax] = bank.mem[0][ax] ^ (32'(1) << $urandom_range(0, 15));
      if (bad[1]) bank.mem[1][ay] = bank.mem[1][ay] ^ (32'(1) << $urandom_range(16, 31));
      case (desc.level)
        LVL_NONE:  begin got = bank.mem[0][ax]; exp_err = 0; exp_corr = 0; end
        LVL_RAID1: begin got = a; exp_err = bad != 0; exp_corr = 0; end
        default:   begin got = a; exp_err = bad == 3; exp_corr = bad == 1 || bad == 2; end
      endcase
      start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      n = 1;
      while (!done) begin @(posedge clk); #1; n++; end
      check(err == exp_err, $sformatf("err level %0d bad %0d", desc.level, bad));
      if (!exp_err) check(rdata == got, $sformatf("data level %0d bad %0d", desc.level, bad));
      check(corr == exp_corr, "corrected flag");
      check(n == ((desc.level == LVL_RAID1P && bad != 0) ? 6 : 3), $sformatf("cycles %0d", n));
      if (corr) n_corr++;
      if (err) n_err++;
      @(posedge clk); #1;
      check(!busy, "idle after done");
    end
    check(n_corr > 0 && n_err > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
