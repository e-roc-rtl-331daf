// tb_eroc_16_eraids: sixteen E-RAID systems managed at once, on the E-RoC
// subsystem at its default size (8 masters, 8 DSPAMs of 4KB, 16
// descriptors). Every master creates two E-RAIDs of random level (NO
// E-RAID, E-RAID 1, E-RAID 1+P) and 4 to 8 blocks; a seventeenth create
// must fail for want of a descriptor. Then 4000 random reads and writes
// from all masters to their own E-RAIDs, with bit flips injected at a
// random rate into the stored cells of the word about to be read, stand
// in for the errors of a voltage-scaled DSPAM.
//
// The placement of each copy is taken from the manager's descriptors (only
// to know which cells to flip and inspect); the expected answer of every
// read is worked out here from the stored cells and the E-RAID rules, and a
// CHANNEL_OK answer from a checked level must carry the last value written.
// The testbench counts how many errors each level hid, detected or let
// through, and fails if E-RAID 1+P never corrected one or E-RAID 1 never
// detected one. The one case the E-RAID 1+P rule cannot catch - copy x and
// the parity word flipped in the same bit, so x ^ P still equals R - is
// counted apart rather than as a failure.
module tb_eroc_16_eraids;
  import eroc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        init_done;
  logic        req_valid = 1'b0, req_ready, req_we = 1'b0;
  logic [3:0]  req_mid = '0;
  logic [31:0] req_addr = '0, req_wdata = '0;
  logic        rsp_valid, rsp_err;
  logic [31:0] rsp_rdata;
  logic        m_valid, m_ready, m_we, m_rvalid;
  logic [31:0] m_addr, m_wdata, m_rdata;

  eroc_top dut (
    .clk_i (clk), .rst_ni (rst_n), .prime_seed_i (32'h7777_0001), .init_done_o (init_done),
    .dspam_retired_i ('0),
    .req_valid_i (req_valid), .req_ready_o (req_ready), .req_mid_i (req_mid), .req_we_i (req_we),
    .req_addr_i (req_addr), .req_wdata_i (req_wdata),
    .rsp_valid_o (rsp_valid), .rsp_rdata_o (rsp_rdata), .rsp_err_o (rsp_err),
    .mem_req_valid_o (m_valid), .mem_req_ready_i (m_ready), .mem_req_we_o (m_we),
    .mem_req_addr_o (m_addr), .mem_req_wdata_o (m_wdata),
    .mem_rsp_valid_i (m_rvalid), .mem_rsp_rdata_i (m_rdata)
  );

  eroc_main_mem #(.WORDS(1024)) u_mem (
    .clk_i (clk), .req_valid_i (m_valid), .req_ready_o (m_ready), .req_we_i (m_we),
    .req_addr_i (m_addr), .req_wdata_i (m_wdata), .rsp_valid_o (m_rvalid), .rsp_rdata_o (m_rdata)
  );

  int checks = 0, failures = 0;
  int n_hidden [3] = '{0, 0, 0};      // errors absorbed (E-RAID 1+P correction)
  int n_detect [3] = '{0, 0, 0};      // SLV_ERR answers
  int n_passed [3] = '{0, 0, 0};      // wrong data returned unchecked (NO E-RAID)
  int n_alias = 0;                    // E-RAID 1+P double errors that keep x ^ p == R

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] peek(input int d, input int a);
    case (d)
      0: return dut.g_dspam[0].u_dspam.mem[a];
      1: return dut.g_dspam[1].u_dspam.mem[a];
      2: return dut.g_dspam[2].u_dspam.mem[a];
      3: return dut.g_dspam[3].u_dspam.mem[a];
      4: return dut.g_dspam[4].u_dspam.mem[a];
      5: return dut.g_dspam[5].u_dspam.mem[a];
      6: return dut.g_dspam[6].u_dspam.mem[a];
      default: return dut.g_dspam[7].u_dspam.mem[a];
    endcase
  endfunction

  task automatic flip(input int d, input int a, input logic [31:0] m);
    case (d)
      0: dut.g_dspam[0].u_dspam.mem[a] = dut.g_dspam[0].u_dspam.mem[a] ^ m;
      1: dut.g_dspam[1].u_dspam.mem[a] = dut.g_dspam[1].u_dspam.mem[a] ^ m;
      2: dut.g_dspam[2].u_dspam.mem[a] = dut.g_dspam[2].u_dspam.mem[a] ^ m;
      3: dut.g_dspam[3].u_dspam.mem[a] = dut.g_dspam[3].u_dspam.mem[a] ^ m;
      4: dut.g_dspam[4].u_dspam.mem[a] = dut.g_dspam[4].u_dspam.mem[a] ^ m;
      5: dut.g_dspam[5].u_dspam.mem[a] = dut.g_dspam[5].u_dspam.mem[a] ^ m;
      6: dut.g_dspam[6].u_dspam.mem[a] = dut.g_dspam[6].u_dspam.mem[a] ^ m;
      default: dut.g_dspam[7].u_dspam.mem[a] = dut.g_dspam[7].u_dspam.mem[a] ^ m;
    endcase
  endtask

  logic [31:0] rd;
  bit          er;
  int          lat;

  task automatic bus(input int mid, input bit we, input logic [31:0] addr, input logic [31:0] wdata);
    @(negedge clk);
    req_valid = 1'b1; req_mid = 4'(mid); req_we = we; req_addr = addr; req_wdata = wdata;
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    #1 req_valid = 1'b0;
    lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!rsp_valid && lat < 100000);
    rd = rsp_rdata;
    er = rsp_err;
  endtask

  function automatic logic [31:0] daddr(input int lspm, input int widx);
    return {8'h00, 8'(lspm), 16'(widx * 4)};
  endfunction
  function automatic logic [31:0] caddr(input int win, input logic [1:0] r);
    return 32'h8000_0000 | (32'(win) << 8) | (32'(r) << 2);
  endfunction
  function automatic logic [31:0] mkcmd(input cfg_op_e op, input level_e lv, input int nblk);
    cfg_cmd_t c;
    c = '0; c.op = op; c.level = lv; c.nblk = 8'(nblk);
    return c;
  endfunction

  int          owner [16], lvl [16], nw [16];
  int          dsp [16][3], wbase [16][3];
  logic [31:0] ref_mem [16][128];
  logic [31:0] R;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    while (!init_done) @(posedge clk);
    R = dut.u_mgr.prime_r;

    // ------------------------------------------------ 16 E-RAIDs, two per master
    for (int i = 0; i < 16; i++) begin
      int nb;
      eraid_desc_t dd;
      owner[i] = i / 2;
      lvl[i] = $urandom_range(0, 2);
      nb = $urandom_range(4, 8);
      nw[i] = nb * 16;
      bus(owner[i], 1, caddr(owner[i], REG_CMD), mkcmd(OP_CREATE, level_e'(lvl[i]), nb));
      check(!er && rd == 32'(i), $sformatf("E-RAID %0d created", i));
      dd = dut.u_mgr.u_cfg.desc_q[i];
      for (int c = 0; c < 3; c++) begin
        dsp[i][c] = int'(dd.dsp[c]);
        wbase[i][c] = int'(dd.base[c]) * 16;
      end
      for (int w = 0; w < nw[i]; w++) begin
        ref_mem[i][w] = $urandom;
        bus(owner[i], 1, daddr(i, w), ref_mem[i][w]);
        check(!er, "initial write");
      end
    end
    bus(0, 1, caddr(0, REG_CMD), mkcmd(OP_CREATE, LVL_NONE, 1));
    check(er, "a seventeenth E-RAID finds no descriptor");

    // ------------------------------------------------ traffic with injected errors
    for (int it = 0; it < 4000; it++) begin
      int i, w;
      i = $urandom_range(0, 15);
      w = $urandom_range(0, nw[i] - 1);
      if ($urandom_range(0, 3) == 0) begin
        ref_mem[i][w] = $urandom;
        bus(owner[i], 1, daddr(i, w), ref_mem[i][w]);
        check(!er && lat == 3, "write");
      end else begin
        logic [31:0] x, y, p, exp;
        bit exp_err, need_par;
        if ($urandom_range(0, 2) == 0) flip(dsp[i][0], wbase[i][0] + w, 32'(1) << $urandom_range(0, 15));
        if (lvl[i] > 0 && $urandom_range(0, 3) == 0) flip(dsp[i][1], wbase[i][1] + w, 32'(1) << $urandom_range(16, 31));
        if (lvl[i] == 2 && $urandom_range(0, 3) == 0) flip(dsp[i][2], wbase[i][2] + w, 32'(1) << $urandom_range(0, 31));
        x = peek(dsp[i][0], wbase[i][0] + w);
        y = peek(dsp[i][1], wbase[i][1] + w);
        p = peek(dsp[i][2], wbase[i][2] + w);
        exp = x; exp_err = 0; need_par = 0;
        if (lvl[i] == 1) exp_err = x != y;
        if (lvl[i] == 2 && x != y) begin
          need_par = 1;
          if ((x ^ p) == R) exp = x;
          else if ((y ^ p) == R) exp = y;
          else exp_err = 1;
        end
        bus(owner[i], 0, daddr(i, w), 0);
        check(er == exp_err, $sformatf("E-RAID %0d (level %0d) w%0d status", i, lvl[i], w));
        check(lat == (need_par ? 8 : 5), $sformatf("read latency %0d", lat));
        if (!exp_err) begin
          check(rd == exp, "returned word");
          // E-RAID 1+P cannot see a copy and the parity word flipped in the
          // same bit: x ^ p is still R. Such double errors are counted.
          if (lvl[i] == 2 && need_par && exp != ref_mem[i][w]) n_alias++;
          else if (lvl[i] > 0) check(rd == ref_mem[i][w], "checked level returns the written value");
          if (lvl[i] == 0 && rd != ref_mem[i][w]) n_passed[0]++;
          if (need_par) n_hidden[2]++;
        end else n_detect[lvl[i]]++;
        // the master refetches and rewrites whatever was damaged
        if (exp_err || rd != ref_mem[i][w] || (lvl[i] == 2 && (x != y || (p ^ x) != R))) begin
          bus(owner[i], 1, daddr(i, w), ref_mem[i][w]);
          check(!er, "refresh write");
        end
      end
    end
    $display("NO E-RAID passed %0d bad words; E-RAID 1 detected %0d; E-RAID 1+P corrected %0d, detected %0d, aliased %0d",
             n_passed[0], n_detect[1], n_hidden[2], n_detect[2], n_alias);
    check(n_detect[1] > 0, "E-RAID 1 detection seen");
    check(n_hidden[2] > 0, "E-RAID 1+P correction seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
