// tb_eroc_manager: the manager on a small platform with 4 CPUs and 4 DSPAMs
// of 4KB (64-byte blocks), running the E-RoC sharing example:
//   CPU0 creates a 1K E-RAID 1 shared with CPU1,
//   CPU2 creates a 2K E-RAID 1+P,
//   CPU3 creates a 2K NO E-RAID, filled from main memory by the iDMA.
// Next-fit over the round robin gives #0 in DSPAMs 0,1 (block 0); #1 in
// DSPAMs 2,3 (block 0) and its parity in DSPAM 0 (block 16); #2 in DSPAM 1
// (block 16). The testbench checks that placement through the stored words.
//
// Then 3000 random requests from the four CPUs (reads, writes, and reads of
// E-RAIDs a CPU has no right to), with random bit flips injected into the
// DSPAM cells (one copy, the other copy, the parity word or both copies).
// A reference model holds the last value written to each logical word; the
// expected answer of a read is computed here from the cells actually stored
// and the E-RAID rules, and a CHANNEL_OK answer from E-RAID 1 / 1+P must carry
// the reference value. After an SLV_ERR the CPU refetches, i.e. rewrites
// the reference value. Write latency must be 3 cycles, read latency 5, or 8
// when the parity word was needed. Each mechanism is counted.
// Finally DSPAM 0 is retired while CPU1 writes: the copies it held (x of the
// E-RAID 1, parity of the E-RAID 1+P) must be moved and stay correct.
module tb_eroc_manager;
  import eroc_pkg::*;

  localparam int NM = 4, ND = 4, WORDS = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] retired = '0;
  always #5 clk = ~clk;

  logic        init_done;
  logic        req_valid = 1'b0, req_ready, req_we = 1'b0;
  logic [3:0]  req_mid = '0;
  logic [31:0] req_addr = '0, req_wdata = '0;
  logic        rsp_valid, rsp_err;
  logic [31:0] rsp_rdata;
  dspam_req_t [ND-1:0]        dreq;
  logic [ND-1:0][DATA_W-1:0]  drdata;
  logic        m_valid, m_ready, m_we, m_rvalid;
  logic [31:0] m_addr, m_wdata, m_rdata;

  eroc_manager #(.NUM_MASTERS(NM), .NUM_DSPAM(ND), .DSPAM_WORDS(WORDS), .BLOCK_BYTES(64), .NUM_ERAID(8)) dut (
    .clk_i (clk), .rst_ni (rst_n), .prime_seed_i (32'h0F1E_2D3C), .init_done_o (init_done),
    .dspam_retired_i (retired),
    .req_valid_i (req_valid), .req_ready_o (req_ready), .req_mid_i (req_mid), .req_we_i (req_we),
    .req_addr_i (req_addr), .req_wdata_i (req_wdata),
    .rsp_valid_o (rsp_valid), .rsp_rdata_o (rsp_rdata), .rsp_err_o (rsp_err),
    .dsp_req_o (dreq), .dsp_rdata_i (drdata),
    .mem_req_valid_o (m_valid), .mem_req_ready_i (m_ready), .mem_req_we_o (m_we),
    .mem_req_addr_o (m_addr), .mem_req_wdata_o (m_wdata),
    .mem_rsp_valid_i (m_rvalid), .mem_rsp_rdata_i (m_rdata)
  );

  eroc_dspam_bank #(.N(ND), .WORDS(WORDS)) u_bank (.clk_i (clk), .req_i (dreq), .rdata_o (drdata));

  eroc_main_mem #(.WORDS(4096)) u_mem (
    .clk_i (clk), .req_valid_i (m_valid), .req_ready_o (m_ready), .req_we_i (m_we),
    .req_addr_i (m_addr), .req_wdata_i (m_wdata), .rsp_valid_o (m_rvalid), .rsp_rdata_o (m_rdata)
  );

  int checks = 0, failures = 0;
  int n_wr = 0, n_rd_ok = 0, n_detect = 0, n_corr = 0, n_parity_fail = 0, n_noraid_flip = 0;
  int n_acl = 0, n_shared = 0, n_parity_only = 0, n_remap = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
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
  function automatic logic [31:0] mkcmd(input cfg_op_e op, input level_e lv, input bit dma,
                                        input logic [7:0] acl, input int lspm, input int nblk);
    cfg_cmd_t c;
    c = '0; c.op = op; c.level = lv; c.dma = dma; c.acl = acl; c.lspm = 8'(lspm); c.nblk = 8'(nblk);
    return c;
  endfunction

  // expected layout of the three E-RAIDs: copies x, y, parity as (DSPAM, first word)
  int lv_of [3] = '{1, 2, 0};            // 0 none, 1 E-RAID 1, 2 E-RAID 1+P
  int nw_of [3] = '{256, 512, 512};
  int dx [3] = '{0, 2, 1}, ax [3] = '{0, 0, 256};
  int dy [3] = '{1, 3, 0}, ay [3] = '{0, 0, 0};
  int dp [3] = '{0, 0, 0}, ap [3] = '{0, 256, 0};
  logic [31:0] ref_mem [3][512];
  logic [31:0] R;

  function automatic bit allowed(input int cpu, input int e);
    case (e)
      0: return cpu == 0 || cpu == 1;
      1: return cpu == 2;
      default: return cpu == 3;
    endcase
  endfunction

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    while (!init_done) @(posedge clk);
    R = dut.prime_r;

    // ------------------------------------------------ create the three E-RAIDs
    bus(0, 1, caddr(0, REG_CMD), mkcmd(OP_CREATE, LVL_RAID1, 0, 8'b0010, 0, 16));
    check(!er && rd == 0, "CPU0 E-RAID 1 1K is #0");
    bus(2, 1, caddr(2, REG_CMD), mkcmd(OP_CREATE, LVL_RAID1P, 0, 8'b0000, 0, 32));
    check(!er && rd == 1, "CPU2 E-RAID 1+P 2K is #1");
    bus(3, 1, caddr(3, REG_MEMADDR), 32'h0000_1000);
    bus(3, 1, caddr(3, REG_CMD), mkcmd(OP_CREATE, LVL_NONE, 1, 8'b0000, 0, 32));
    check(!er && rd == 2, "CPU3 NO E-RAID 2K is #2 (loaded)");
    for (int w = 0; w < 512; w++) begin
      logic [31:0] v;
      v = 32'h5A00_0000 ^ ((1024 + w) * 32'h0101_0103);
      check(u_bank.mem[dx[2]][ax[2] + w] == v, $sformatf("#2 word %0d loaded into DSPAM 1 block 16", w));
      ref_mem[2][w] = v;
    end

    // ------------------------------------------------ fill #0 and #1 and check placement
    for (int e = 0; e < 2; e++) begin
      for (int w = 0; w < nw_of[e]; w++) begin
        logic [31:0] v;
        v = $urandom;
        bus(e == 0 ? w % 2 : 2, 1, daddr(e, w), v);
        ref_mem[e][w] = v;
        check(!er && lat == 3, $sformatf("fill write #%0d w%0d lat %0d", e, w, lat));
        check(u_bank.mem[dx[e]][ax[e] + w] == v && u_bank.mem[dy[e]][ay[e] + w] == v,
              $sformatf("#%0d w%0d copies placed as expected", e, w));
        if (e == 1) check(u_bank.mem[dp[e]][ap[e] + w] == (v ^ R), "parity A^R placed in DSPAM 0 block 16");
      end
    end

    // ------------------------------------------------ random traffic with injected errors
    for (int it = 0; it < 3000; it++) begin
      int cpu, e, w, kind;
      cpu = $urandom_range(0, NM - 1);
      e = (cpu == 0 || cpu == 1) ? 0 : cpu - 1;
      if ($urandom_range(0, 9) == 0) e = $urandom_range(0, 2);   // sometimes someone else's
      w = $urandom_range(0, nw_of[e] - 1);
      kind = $urandom_range(0, 9);
      if (kind < 3) begin
        logic [31:0] v;
        v = $urandom;
        bus(cpu, 1, daddr(e, w), v);
        if (allowed(cpu, e)) begin
          check(!er && lat == 3, $sformatf("write ok, lat %0d", lat));
          ref_mem[e][w] = v;
          n_wr++;
        end else begin
          check(er, "write outside ACL refused");
          n_acl++;
        end
      end else begin
        logic [31:0] x, y, p, exp;
        bit exp_err, need_par;
        // inject
        if (kind >= 7 && allowed(cpu, e)) begin   // a refused read would leave the flip unrepaired
          int which;
          which = $urandom_range(0, lv_of[e] == 2 ? 3 : (lv_of[e] == 1 ? 2 : 0));
          case (which)
            0: u_bank.mem[dx[e]][ax[e] + w] ^= 32'(1) << $urandom_range(0, 15);
            1: u_bank.mem[dy[e]][ay[e] + w] ^= 32'(1) << $urandom_range(16, 31);
            2: begin
              u_bank.mem[dx[e]][ax[e] + w] ^= 32'(1) << $urandom_range(0, 15);
              u_bank.mem[dy[e]][ay[e] + w] ^= 32'(1) << $urandom_range(16, 31);
            end
            default: u_bank.mem[dp[e]][ap[e] + w] ^= 32'(1) << $urandom_range(0, 31);
          endcase
        end
        x = u_bank.mem[dx[e]][ax[e] + w];
        y = u_bank.mem[dy[e]][ay[e] + w];
        p = u_bank.mem[dp[e]][ap[e] + w];
        exp_err = 0; need_par = 0; exp = x;
        if (lv_of[e] == 1) exp_err = x != y;
        if (lv_of[e] == 2 && x != y) begin
          need_par = 1;
          if ((x ^ p) == R) exp = x;
          else if ((y ^ p) == R) exp = y;
          else exp_err = 1;
        end
        bus(cpu, 0, daddr(e, w), 0);
        if (!allowed(cpu, e)) begin
          check(er, "read outside ACL refused");
          n_acl++;
        end else begin
          check(er == exp_err, $sformatf("#%0d w%0d status (exp err %0d)", e, w, exp_err));
          check(lat == (need_par ? 8 : 5), $sformatf("read latency %0d (parity %0d)", lat, need_par));
          if (!exp_err) begin
            check(rd == exp, $sformatf("#%0d w%0d data %h exp %h", e, w, rd, exp));
            if (lv_of[e] != 0) check(rd == ref_mem[e][w], "checked read returns the written value");
            if (lv_of[e] == 0 && rd != ref_mem[e][w]) n_noraid_flip++;
            if (need_par) n_corr++; else n_rd_ok++;
            if (lv_of[e] == 2 && !need_par && ((p ^ x) != R)) n_parity_only++;
            if (e == 0 && cpu == 1) n_shared++;
          end else begin
            if (lv_of[e] == 1) n_detect++; else n_parity_fail++;
          end
          // refetch after an error, and repair flipped NO E-RAID words the same way
          if (exp_err || (lv_of[e] == 0 && rd != ref_mem[e][w]) || (lv_of[e] == 2 && (need_par || (p ^ x) != R))) begin
            bus(cpu, 1, daddr(e, w), ref_mem[e][w]);
            check(!er, "refetch write");
          end
        end
      end
    end


    check(n_wr > 0 && n_rd_ok > 0, "plain writes and reads seen");
    check(n_detect > 0, "E-RAID 1 detection seen");
    check(n_corr > 0, "parity correction seen");
    check(n_parity_fail > 0, "parity failure seen");
    check(n_noraid_flip > 0, "NO E-RAID passes a flipped word unchecked");
    check(n_acl > 0, "ACL refusal seen");
    check(n_shared > 0, "CPU1 reads the shared E-RAID");
    check(n_parity_only > 0, "a bad parity word alone does not disturb reads");

    // ------------------------------------------------ retire DSPAM 0 under traffic
    // DSPAM 0 holds copy x of #0 and the parity copy of #1. Both are moved in
    // the background while CPU1 keeps writing #0; afterwards every word of
    // #0 and #1 must read back, the old cells must no longer matter, and the
    // moved parity (A ^ R) must still correct a bad copy x of #1.
    retired = 4'b0001;
    for (int it = 0; it < 200; it++) begin
      int w;
      logic [31:0] v;
      w = $urandom_range(0, 255);
      v = $urandom;
      bus(1, 1, daddr(0, w), v);
      check(!er, "write during re-mapping");
      ref_mem[0][w] = v;
    end
    begin
      int quiet = 0;                          // idle for longer than a full descriptor scan
      while (quiet < 64) begin @(posedge clk); quiet = dut.rm_active ? 0 : quiet + 1; end
    end
    for (int a = 0; a < WORDS; a++) u_bank.mem[0][a] = ~u_bank.mem[0][a];   // old cells now garbage
    for (int e = 0; e < 2; e++)
      for (int w = 0; w < nw_of[e]; w++) begin
        bus(e == 0 ? 0 : 2, 0, daddr(e, w), 0);
        check(!er && rd == ref_mem[e][w], $sformatf("#%0d w%0d after re-mapping", e, w));
        check(lat == 5, $sformatf("re-mapped copies in distinct DSPAMs or parity unused (lat %0d)", lat));
      end
    u_bank.mem[dx[1]][ax[1] + 9] ^= 32'h0000_0400;
    bus(2, 0, daddr(1, 9), 0);
    check(!er && rd == ref_mem[1][9] && lat == 8, "moved parity corrects copy x");
    if (!er && rd == ref_mem[1][9]) n_remap++;
    $display("mechanisms: writes=%0d reads=%0d detect=%0d corrected=%0d parity_fail=%0d noraid_flip=%0d acl=%0d shared=%0d parity_only=%0d remap=%0d",
             n_wr, n_rd_ok, n_detect, n_corr, n_parity_fail, n_noraid_flip, n_acl, n_shared, n_parity_only, n_remap);
    check(n_remap > 0, "background re-mapping seen");
    retired = '0;

    // ------------------------------------------------ delete everything, space comes back
    bus(3, 1, caddr(3, REG_CMD), mkcmd(OP_DELETE, LVL_NONE, 0, 0, 2, 0));
    check(!er, "CPU3 deletes #2");
    bus(2, 1, caddr(2, REG_CMD), mkcmd(OP_DELETE, LVL_NONE, 0, 0, 1, 0));
    check(!er, "CPU2 deletes #1");
    bus(0, 1, caddr(0, REG_CMD), mkcmd(OP_DELETE, LVL_NONE, 0, 0, 0, 0));
    check(!er, "CPU0 deletes #0");
    bus(1, 1, caddr(1, REG_CMD), mkcmd(OP_CREATE, LVL_RAID1P, 0, 0, 0, 64));
    check(!er, "4K E-RAID 1+P fits after all deletes");

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
