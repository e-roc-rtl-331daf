// tb_eroc_dspam_bus: the E-RoC subsystem on the platform with a dedicated
// DSPAM bus (DSPAM_BUS = 1), other parameters at their defaults. Three
// E-RAIDs are created (E-RAID 1, E-RAID 1+P, NO E-RAID) and every word is
// written and read back. A monitor counts a failure in any cycle with more
// than one DSPAM access. Latencies on this platform are the point-to-point
// ones plus one cycle for each access that waits for the bus: write 4 / 5 /
// 3, read 6 / 6 / 5, and 9 for an E-RAID 1+P read that needs the parity
// word. Bit flips are injected into stored copies to check that correction
// (E-RAID 1+P) and detection (E-RAID 1) still work with serialised
// accesses. The expected values are computed here from what was written.
module tb_eroc_dspam_bus;
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

  eroc_top #(.DSPAM_BUS(1'b1)) dut (
    .clk_i (clk), .rst_ni (rst_n), .prime_seed_i (32'h2468_ace1), .init_done_o (init_done),
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
  int n_busy_cycles = 0, n_overlap = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // the bus carries one DSPAM access per cycle (state before reset is random)
  always @(posedge clk) begin
    int n;
    n = 0;
    for (int d = 0; d < 8; d++) if (dut.dsp_req[d].req) n++;
    if (n > 0) n_busy_cycles++;
    if (n > 1 && rst_n) n_overlap++;
  end

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
  function automatic logic [31:0] mkcmd(input level_e lv, input int nblk);
    cfg_cmd_t c;
    c = '0; c.op = OP_CREATE; c.level = lv; c.nblk = 8'(nblk);
    return c;
  endfunction

  localparam int NW = 64;                         // 4 blocks of 16 words
  localparam int WR_LAT [3] = '{3, 4, 5};         // by level
  localparam int RD_LAT [3] = '{5, 6, 6};
  int          dsp [3][3], wbase [3][3];
  logic [31:0] ref_mem [3][NW];
  int          n_corr = 0, n_det = 0;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    while (!init_done) @(posedge clk);

    // E-RAID i has level i: 0 NO E-RAID, 1 E-RAID 1, 2 E-RAID 1+P
    for (int i = 0; i < 3; i++) begin
      eraid_desc_t dd;
      bus(i, 1, caddr(i, REG_CMD), mkcmd(level_e'(i), 4));
      check(!er && rd == 32'(i), $sformatf("E-RAID %0d created", i));
      dd = dut.u_mgr.u_cfg.desc_q[i];
      for (int c = 0; c < 3; c++) begin
        dsp[i][c] = int'(dd.dsp[c]);
        wbase[i][c] = int'(dd.base[c]) * 16;
      end
    end
    for (int i = 0; i < 3; i++)
      for (int w = 0; w < NW; w++) begin
        ref_mem[i][w] = $urandom;
        bus(i, 1, daddr(i, w), ref_mem[i][w]);
        check(!er && lat == WR_LAT[i], $sformatf("level %0d write latency %0d", i, lat));
      end
    for (int i = 0; i < 3; i++)
      for (int w = 0; w < NW; w++) begin
        bus(i, 0, daddr(i, w), 0);
        check(!er && rd == ref_mem[i][w] && lat == RD_LAT[i],
              $sformatf("level %0d read w%0d latency %0d", i, w, lat));
      end

    // injected errors
    for (int it = 0; it < 400; it++) begin
      int i, w, c;
      i = $urandom_range(1, 2);
      w = $urandom_range(0, NW - 1);
      c = $urandom_range(0, 1);
      flip(dsp[i][c], wbase[i][c] + w, 32'(1) << $urandom_range(0, 31));
      bus(i, 0, daddr(i, w), 0);
      if (i == 2) begin
        check(!er && rd == ref_mem[i][w] && lat == 9, $sformatf("E-RAID 1+P corrected (latency %0d)", lat));
        n_corr++;
      end else begin
        check(er && lat == 6, $sformatf("E-RAID 1 mismatch detected (latency %0d)", lat));
        n_det++;
      end
      bus(i, 1, daddr(i, w), ref_mem[i][w]);
      check(!er && peek(dsp[i][c], wbase[i][c] + w) == ((i == 2 && c == 2) ? 32'h0 : ref_mem[i][w]),
            "rewrite repairs the copy");
    end

    check(n_overlap == 0, $sformatf("%0d cycles with more than one DSPAM access", n_overlap));
    check(n_busy_cycles > 0 && n_corr > 0 && n_det > 0, "bus, correction and detection seen");
    $display("DSPAM bus busy %0d cycles, corrected %0d, detected %0d", n_busy_cycles, n_corr, n_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
