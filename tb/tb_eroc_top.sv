// tb_eroc_top: end-to-end test of the E-RoC subsystem at its default size
// (8 masters, 8 DSPAMs of 4KB, 64-byte blocks, 16 E-RAIDs).
//
// Walks through the life of several logical SPMs the way masters use them:
// start-up prime, CREATE of E-RAID 1 (shared by two masters), E-RAID 1+P and
// NO E-RAID systems, data writes and reads with their latencies, bit flips in
// DSPAM cells standing in for voltage-scaling errors (detected, corrected by
// parity, or reported as SLV_ERR), ACL / window / range / owner refusals,
// iDMA load at create and offload at delete, allocation failure when space
// runs out, background re-mapping of a copy out of a retired DSPAM, and
// retired DSPAMs forcing two copies into one DSPAM.
// Expected values are computed here from the E-RAID rules, independently of
// the RTL; DSPAM contents are inspected through hierarchical references.
// Every mechanism is counted and one that never happened is a failure.
module tb_eroc_top;
  import eroc_pkg::*;

  localparam int ND = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [ND-1:0] retired = '0;
  logic        init_done;
  logic        req_valid = 1'b0, req_ready, req_we = 1'b0;
  logic [3:0]  req_mid = '0;
  logic [31:0] req_addr = '0, req_wdata = '0;
  logic        rsp_valid, rsp_err;
  logic [31:0] rsp_rdata;
  logic        m_valid, m_ready, m_we, m_rvalid;
  logic [31:0] m_addr, m_wdata, m_rdata;

  eroc_top dut (
    .clk_i (clk), .rst_ni (rst_n), .prime_seed_i (32'h1234_5679), .init_done_o (init_done),
    .dspam_retired_i (retired),
    .req_valid_i (req_valid), .req_ready_o (req_ready), .req_mid_i (req_mid), .req_we_i (req_we),
    .req_addr_i (req_addr), .req_wdata_i (req_wdata),
    .rsp_valid_o (rsp_valid), .rsp_rdata_o (rsp_rdata), .rsp_err_o (rsp_err),
    .mem_req_valid_o (m_valid), .mem_req_ready_i (m_ready), .mem_req_we_o (m_we),
    .mem_req_addr_o (m_addr), .mem_req_wdata_o (m_wdata),
    .mem_rsp_valid_i (m_rvalid), .mem_rsp_rdata_i (m_rdata)
  );

  eroc_main_mem #(.WORDS(4096)) u_mem (
    .clk_i (clk), .req_valid_i (m_valid), .req_ready_o (m_ready), .req_we_i (m_we),
    .req_addr_i (m_addr), .req_wdata_i (m_wdata), .rsp_valid_o (m_rvalid), .rsp_rdata_o (m_rdata)
  );

  int checks = 0, failures = 0;
  // mechanism counters
  int n_parallel_wr = 0, n_detect = 0, n_corr_x = 0, n_corr_y = 0, n_parity_fail = 0;
  int n_acl = 0, n_window = 0, n_range = 0, n_owner = 0, n_alloc_fail = 0;
  int n_load = 0, n_offload = 0, n_delete = 0, n_shared = 0, n_noraid = 0, n_share_acl = 0, n_remap = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ DSPAM peek / poke
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

  // ------------------------------------------------------------ bus access
  logic [31:0] rd;
  bit          er;
  int          lat;

  task automatic bus(input int mid, input bit we, input logic [31:0] addr, input logic [31:0] wdata);
    @(negedge clk);
    req_valid = 1'b1; req_mid = 4'(mid); req_we = we; req_addr = addr; req_wdata = wdata;
    while (!req_ready) @(negedge clk);
    @(posedge clk);                     // accepted at this edge
    #1 req_valid = 1'b0;
    lat = 0;
    do begin
      @(posedge clk); lat++; #1;
    end while (!rsp_valid);
    rd = rsp_rdata;
    er = rsp_err;
  endtask

  function automatic logic [31:0] daddr(input int lspm, input int widx);
    return {8'h00, 8'(lspm), 16'(widx * 4)};
  endfunction
  function automatic logic [31:0] caddr(input int win, input logic [1:0] r);
    return 32'h8000_0000 | (32'(win) << 8) | (32'(r) << 2);
  endfunction
  function automatic logic [31:0] mkcmd(input cfg_op_e op, input level_e lv, input bit dma,
                                        input logic [7:0] acl, input int lspm, input int nblk);
    cfg_cmd_t c;
    c = '0; c.op = op; c.level = lv; c.dma = dma; c.acl = acl; c.lspm = 8'(lspm); c.nblk = 8'(nblk);
    return c;
  endfunction

  function automatic bit is_prime(input logic [31:0] n);
    if (n < 2) return 0;
    if (n % 2 == 0) return n == 2;
    for (longint d = 3; d * d <= longint'(n); d += 2) if (n % 32'(d) == 0) return 0;
    return 1;
  endfunction

  // expected placement: copy c of an E-RAID at (dsp, base block); 16 words per block
  function automatic int pw(input int base_blk, input int w);
    return base_blk * 16 + w;
  endfunction

  logic [31:0] R;
  int e1, e1p, enr, el, eo, es;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    // ---------------------------------------------------------- start-up prime
    check(!req_ready, "requests refused before init");
    while (!init_done) @(posedge clk);
    R = dut.u_mgr.prime_r;
    check(is_prime(R) && R[31], $sformatf("R=%0d is a large prime", R));

    // ---------------------------------------------------------- create (Fig. 7 style)
    bus(0, 1, caddr(0, REG_CMD), mkcmd(OP_CREATE, LVL_RAID1, 0, 8'b0000_0010, 0, 16));   // 1K, shared with CPU1
    check(!er && rd == 0, "CPU0 E-RAID 1 1K created as #0"); e1 = rd;
    bus(2, 1, caddr(2, REG_CMD), mkcmd(OP_CREATE, LVL_RAID1P, 0, 8'b0, 0, 32));         // 2K E-RAID 1+P
    check(!er && rd == 1, "CPU2 E-RAID 1+P 2K created as #1"); e1p = rd;
    bus(3, 1, caddr(3, REG_CMD), mkcmd(OP_CREATE, LVL_NONE, 0, 8'b0, 0, 32));           // 2K NO E-RAID
    check(!er && rd == 2, "CPU3 NO E-RAID 2K created as #2"); enr = rd;
    bus(3, 0, caddr(3, REG_RESULT), 0);
    check(!er && rd == 32'd2, "RESULT register of CPU3");

    // ---------------------------------------------------------- E-RAID 1 data path
    // round robin: #0 copies in DSPAM 0 and 1, #1 in 2,3,4, #2 in 5, all at block 0
    for (int w = 0; w < 8; w++) begin
      bus(w % 2, 1, daddr(e1, w), 32'hC0DE_0000 + w);
      check(!er && lat == 3, $sformatf("E-RAID 1 write ok, latency %0d", lat));
      check(peek(0, pw(0, w)) == 32'hC0DE_0000 + w && peek(1, pw(0, w)) == 32'hC0DE_0000 + w,
            "both copies written");
      if (peek(0, pw(0, w)) == peek(1, pw(0, w))) n_parallel_wr++;
    end
    for (int w = 0; w < 8; w++) begin
      bus(1 - w % 2, 0, daddr(e1, w), 0);
      check(!er && rd == 32'hC0DE_0000 + w && lat == 5, $sformatf("E-RAID 1 read w%0d lat %0d", w, lat));
      if (w % 2 == 0) n_share_acl++;
    end
    flip(1, pw(0, 3), 32'h0000_0100);
    bus(0, 0, daddr(e1, 3), 0);
    check(er, "E-RAID 1 mismatch gives SLV_ERR"); if (er) n_detect++;
    bus(0, 1, daddr(e1, 3), 32'hC0DE_0003);                 // refresh after refetch
    bus(0, 0, daddr(e1, 3), 0);
    check(!er && rd == 32'hC0DE_0003, "E-RAID 1 refreshed word reads back");

    // ---------------------------------------------------------- E-RAID 1+P
    for (int w = 0; w < 4; w++) begin
      bus(2, 1, daddr(e1p, w), 32'hBEEF_0000 ^ (w * 32'h1111));
      check(!er && lat == 3, "E-RAID 1+P write");
      check(peek(2, pw(0, w)) == (32'hBEEF_0000 ^ (w * 32'h1111)) &&
            peek(3, pw(0, w)) == (32'hBEEF_0000 ^ (w * 32'h1111)) &&
            peek(4, pw(0, w)) == (32'hBEEF_0000 ^ (w * 32'h1111) ^ R), "copies and parity A^R stored");
    end
    bus(2, 0, daddr(e1p, 1), 0);
    check(!er && rd == (32'hBEEF_0000 ^ 32'h1111) && lat == 5, "E-RAID 1+P clean read");
    flip(2, pw(0, 1), 32'h8000_0001);                        // copy x bad
    bus(2, 0, daddr(e1p, 1), 0);
    check(!er && rd == (32'hBEEF_0000 ^ 32'h1111), "parity picks copy y");
    check(lat == 8, $sformatf("parity read latency %0d", lat));
    if (!er && rd == (32'hBEEF_0000 ^ 32'h1111)) n_corr_y++;
    flip(3, pw(0, 2), 32'h0001_0000);                        // copy y bad
    bus(2, 0, daddr(e1p, 2), 0);
    check(!er && rd == (32'hBEEF_0000 ^ 32'h2222), "parity picks copy x");
    if (!er && rd == (32'hBEEF_0000 ^ 32'h2222)) n_corr_x++;
    flip(2, pw(0, 3), 32'h0000_0004);
    flip(3, pw(0, 3), 32'h0000_0008);                        // both bad
    bus(2, 0, daddr(e1p, 3), 0);
    check(er, "both copies bad gives SLV_ERR"); if (er) n_parity_fail++;

    // ---------------------------------------------------------- NO E-RAID
    bus(3, 1, daddr(enr, 31), 32'h1234_ABCD);
    check(!er && peek(5, pw(0, 31)) == 32'h1234_ABCD, "NO E-RAID single copy");
    flip(5, pw(0, 31), 32'h1);
    bus(3, 0, daddr(enr, 31), 0);
    check(!er && rd == 32'h1234_ABCC, "NO E-RAID returns the stored word unchecked");
    if (!er) n_noraid++;

    // ---------------------------------------------------------- protection
    bus(2, 0, daddr(e1, 0), 0);
    check(er, "CPU2 not in ACL of #0"); if (er) n_acl++;
    bus(4, 1, caddr(0, REG_CMD), mkcmd(OP_DELETE, LVL_NONE, 0, 0, e1, 0));
    check(er, "CPU4 cannot write CPU0's window"); if (er) n_window++;
    bus(0, 0, daddr(e1, 256), 0);
    check(er, "offset past the 1K E-RAID"); if (er) n_range++;
    bus(1, 1, caddr(1, REG_CMD), mkcmd(OP_DELETE, LVL_NONE, 0, 0, e1, 0));
    check(er, "CPU1 shares #0 but does not own it"); if (er) n_owner++;
    bus(0, 0, daddr(e1, 0), 0);
    check(!er && rd == 32'hC0DE_0000, "#0 intact after refused delete");

    // ---------------------------------------------------------- iDMA load
    bus(4, 1, caddr(4, REG_MEMADDR), 32'h0000_0400);
    bus(4, 0, caddr(4, REG_MEMADDR), 0);
    check(!er && rd == 32'h400, "MEMADDR readback");
    bus(4, 1, caddr(4, REG_CMD), mkcmd(OP_CREATE, LVL_RAID1P, 1, 0, 0, 2));   // 128B, filled
    check(!er && rd == 3, "CPU4 E-RAID 1+P created with load"); el = rd;
    for (int w = 0; w < 32; w++) begin
      bus(4, 0, daddr(el, w), 0);
      check(!er && rd == (32'h5A00_0000 ^ ((256 + w) * 32'h0101_0103)), $sformatf("loaded word %0d", w));
    end
    n_load++;

    // ---------------------------------------------------------- iDMA offload and delete
    bus(5, 1, caddr(5, REG_CMD), mkcmd(OP_CREATE, LVL_RAID1, 0, 0, 0, 1));
    check(!er && rd == 4, "CPU5 E-RAID 1 created"); eo = rd;
    for (int w = 0; w < 16; w++) bus(5, 1, daddr(eo, w), 32'hF00D_0000 + w);
    bus(5, 1, caddr(5, REG_MEMADDR), 32'h0000_2000);
    bus(5, 1, caddr(5, REG_CMD), mkcmd(OP_DELETE, LVL_NONE, 1, 0, eo, 0));
    check(!er, "CPU5 delete with offload");
    for (int w = 0; w < 16; w++)
      check(u_mem.mem[2048 + w] == 32'hF00D_0000 + w, $sformatf("offloaded word %0d", w));
    n_offload++; n_delete++;
    bus(5, 0, daddr(eo, 0), 0);
    check(er, "deleted E-RAID no longer readable");

    // ---------------------------------------------------------- allocation failure
    begin
      int made = 0;
      bit failed = 0;
      for (int i = 0; i < 12 && !failed; i++) begin
        bus(6, 1, caddr(6, REG_CMD), mkcmd(OP_CREATE, LVL_RAID1, 0, 0, 0, 64));  // 4K x 2
        if (er) failed = 1; else made++;
      end
      check(failed, "space runs out"); if (failed) n_alloc_fail++;
      bus(6, 0, caddr(6, REG_RESULT), 0);
      check(rd[31], "RESULT shows the failed create");
      // free what CPU6 got
      for (int i = 0; i < made; i++) begin
        bus(6, 1, caddr(6, REG_CMD), mkcmd(OP_DELETE, LVL_NONE, 0, 0, 4 + i, 0));
        check(!er, "CPU6 delete"); if (!er) n_delete++;
      end
    end

    // ---------------------------------------------------------- background re-mapping
    // retire DSPAM 1, which holds copy y of #0: the manager moves that copy
    retired = 8'b0000_0010;
    begin
      int t = 0;
      while (!dut.u_mgr.rm_active && t < 40) begin @(posedge clk); t++; end   // one descriptor scanned per cycle
      check(dut.u_mgr.rm_active, "re-mapping starts after a DSPAM is retired");
    end
    while (dut.u_mgr.rm_active) @(posedge clk);
    flip(1, pw(0, 2), 32'hFFFF_FFFF);                        // old copy y is no longer read
    for (int w = 0; w < 8; w++) begin
      bus(0, 0, daddr(e1, w), 0);
      check(!er && rd == 32'hC0DE_0000 + w && lat == 5, $sformatf("#0 w%0d after re-mapping (lat %0d)", w, lat));
    end
    begin
      int hits = 0;
      for (int d = 2; d < ND; d++)
        for (int a = 0; a < 1024; a++) if (peek(d, a) == 32'hC0DE_0005) hits++;
      check(hits == 1 && peek(0, pw(0, 5)) == 32'hC0DE_0005, "copy y moved to a third DSPAM, copy x stays");
      if (hits == 1 && !er) n_remap++;
    end
    bus(1, 1, daddr(e1, 6), 32'h7777_0006);
    bus(0, 0, daddr(e1, 6), 0);
    check(!er && rd == 32'h7777_0006, "#0 writable after re-mapping");
    retired = '0;

    // ---------------------------------------------------------- retired DSPAMs: copies share one DSPAM
    retired = 8'b1011_1111;          // only DSPAM 6 left
    bus(7, 1, caddr(7, REG_CMD), mkcmd(OP_CREATE, LVL_RAID1P, 0, 0, 0, 4));
    check(!er, "E-RAID 1+P on a single DSPAM"); es = rd;
    bus(7, 1, daddr(es, 5), 32'h0BAD_CAFE);
    check(!er && lat == 5, $sformatf("serialised write latency %0d", lat));
    begin
      int hits = 0;
      for (int a = 0; a < 1024; a++) if (peek(6, a) == 32'h0BAD_CAFE) hits++;
      check(hits == 2, $sformatf("two copies in DSPAM 6 (%0d)", hits));
      if (hits == 2) n_shared++;
    end
    bus(7, 0, daddr(es, 5), 0);
    check(!er && rd == 32'h0BAD_CAFE && lat == 6, $sformatf("serialised read latency %0d", lat));
    bus(7, 1, caddr(7, REG_CMD), mkcmd(OP_CREATE, LVL_RAID1, 0, 0, 0, 64));
    check(er, "no room left in the one usable DSPAM"); if (er) n_alloc_fail++;
    retired = '0;

    // ---------------------------------------------------------- every mechanism seen
    $display("mechanisms: parallel_wr=%0d detect=%0d corr_x=%0d corr_y=%0d parity_fail=%0d noraid=%0d shared_acl=%0d",
             n_parallel_wr, n_detect, n_corr_x, n_corr_y, n_parity_fail, n_noraid, n_share_acl);
    $display("mechanisms: acl=%0d window=%0d range=%0d owner=%0d alloc_fail=%0d load=%0d offload=%0d delete=%0d shared_dspam=%0d remap=%0d",
             n_acl, n_window, n_range, n_owner, n_alloc_fail, n_load, n_offload, n_delete, n_shared, n_remap);
    check(n_parallel_wr > 0, "parallel write seen");
    check(n_detect > 0, "E-RAID 1 detection seen");
    check(n_corr_x > 0 && n_corr_y > 0, "parity correction seen");
    check(n_parity_fail > 0, "parity failure seen");
    check(n_noraid > 0, "NO E-RAID seen");
    check(n_share_acl > 0, "shared E-RAID seen");
    check(n_acl > 0 && n_window > 0 && n_range > 0 && n_owner > 0, "refusals seen");
    check(n_alloc_fail > 0, "allocation failure seen");
    check(n_load > 0 && n_offload > 0 && n_delete > 0, "iDMA and delete seen");
    check(n_shared > 0, "shared DSPAM seen");
    check(n_remap > 0, "background re-mapping seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
