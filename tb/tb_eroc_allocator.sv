// tb_eroc_allocator: the next-fit allocator on three platforms of 4KB
// DSPAMs with 64-byte blocks (1K = 16 blocks), as in the allocation example
// of E-RoC: CPU0 asks for a 1K E-RAID 1, CPU2 for a 1K E-RAID 1+P.
//   4 DSPAMs: E-RAID 1 in DSPAMs 0,1; E-RAID 1+P in 2,3 and back to 0.
//   2 DSPAMs: E-RAID 1 in 0,1; E-RAID 1+P in 0,1,0 (copies share).
//   1 DSPAM : E-RAID 1 fits (both copies), E-RAID 1+P is refused, and the
//             refused request gives its partial regions back.
// Then the avoid mask used when a single copy is moved, and a random run on the 4-DSPAM instance: allocations and frees of
// random size and level with random retired DSPAMs; a shadow occupancy map
// here checks that regions stay inside a DSPAM, never overlap a live
// region, avoid retired DSPAMs, use distinct DSPAMs when enough usable ones
// have room, and that a refused request changes nothing.
module tb_eroc_allocator;
  import eroc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // per-instance signals, instance i has ND[i] DSPAMs
  localparam int ND [3] = '{4, 2, 1};
  logic [3:0]            retired [3], avoid [3];
  logic                  a_start [3], a_done [3], a_ok [3], f_start [3], f_done [3], busy [3];
  logic [1:0]            a_nc [3];
  logic [7:0]            a_nblk [3];
  logic [2:0][3:0]       a_dsp [3];
  logic [2:0][7:0]       a_base [3];
  logic [3:0]            f_dsp [3];
  logic [7:0]            f_base [3], f_nblk [3];

  for (genvar i = 0; i < 3; i++) begin : g_inst
    eroc_allocator #(.NUM_DSPAM(ND[i]), .DSPAM_WORDS(1024), .BLOCK_BYTES(64)) dut (
      .clk_i(clk), .rst_ni(rst_n), .retired_i(retired[i][ND[i]-1:0]),
      .alloc_start_i(a_start[i]), .alloc_ncopies_i(a_nc[i]), .alloc_nblk_i(a_nblk[i]),
      .alloc_avoid_i(avoid[i][ND[i]-1:0]),
      .alloc_done_o(a_done[i]), .alloc_ok_o(a_ok[i]), .alloc_dsp_o(a_dsp[i]), .alloc_base_o(a_base[i]),
      .free_start_i(f_start[i]), .free_dsp_i(f_dsp[i]), .free_base_i(f_base[i]), .free_nblk_i(f_nblk[i]),
      .free_done_o(f_done[i]), .busy_o(busy[i]));
  end

  task automatic alloc(input int i, input int nc, input int nblk);
    @(negedge clk);
    a_start[i] = 1'b1; a_nc[i] = 2'(nc); a_nblk[i] = 8'(nblk);
    @(negedge clk);
    a_start[i] = 1'b0;
    while (!a_done[i]) @(negedge clk);
  endtask

  task automatic free(input int i, input int d, input int b, input int n);
    @(negedge clk);
    f_start[i] = 1'b1; f_dsp[i] = 4'(d); f_base[i] = 8'(b); f_nblk[i] = 8'(n);
    @(negedge clk);
    f_start[i] = 1'b0;
    check(f_done[i], "free done");
  endtask

  function automatic bit placed(input int i, input int c, input int d, input int b);
    return a_dsp[i][c] == 4'(d) && a_base[i][c] == 8'(b);
  endfunction

  // shadow model for the random run (instance 0)
  bit occ [4][64];
  typedef struct { int nc; int nblk; int d [3]; int b [3]; } reg_t;
  reg_t live [$];

  initial begin
    for (int i = 0; i < 3; i++) begin
      retired[i] = '0; avoid[i] = '0; a_start[i] = 0; a_nc[i] = 0; a_nblk[i] = 0;
      f_start[i] = 0; f_dsp[i] = 0; f_base[i] = 0; f_nblk[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // (a) four DSPAMs
    alloc(0, 2, 16);
    check(a_ok[0] && placed(0, 0, 0, 0) && placed(0, 1, 1, 0), "4 DSPAMs: E-RAID 1 in 0,1");
    alloc(0, 3, 16);
    check(a_ok[0] && placed(0, 0, 2, 0) && placed(0, 1, 3, 0) && placed(0, 2, 0, 16),
          "4 DSPAMs: E-RAID 1+P in 2,3,0");
    // (b) two DSPAMs
    alloc(1, 2, 16);
    check(a_ok[1] && placed(1, 0, 0, 0) && placed(1, 1, 1, 0), "2 DSPAMs: E-RAID 1 in 0,1");
    alloc(1, 3, 16);
    check(a_ok[1] && placed(1, 0, 0, 16) && placed(1, 1, 1, 16) && placed(1, 2, 0, 32),
          "2 DSPAMs: E-RAID 1+P in 0,1,0");
    // (c) one DSPAM
    alloc(2, 2, 16);
    check(a_ok[2] && placed(2, 0, 0, 0) && placed(2, 1, 0, 16), "1 DSPAM: E-RAID 1 both copies");
    alloc(2, 3, 16);
    check(!a_ok[2], "1 DSPAM: E-RAID 1+P refused");
    alloc(2, 3, 8);
    check(a_ok[2] && placed(2, 0, 0, 32) && placed(2, 1, 0, 40) && placed(2, 2, 0, 48),
          "1 DSPAM: refused request gave its blocks back");
    alloc(2, 1, 9);
    check(!a_ok[2], "1 DSPAM: 9 blocks do not fit in the 8 left");
    alloc(2, 1, 8);
    check(a_ok[2] && placed(2, 0, 0, 56), "1 DSPAM: last 8 blocks");
    alloc(2, 0, 8);
    check(!a_ok[2], "zero copies refused");
    alloc(2, 1, 65);
    check(!a_ok[2], "larger than a DSPAM refused");

    // moving one copy: DSPAMs named in avoid are only used when nothing else has room
    rst_n = 1'b0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    avoid[0] = 4'b0011;
    alloc(0, 1, 8);
    check(a_ok[0] && placed(0, 0, 2, 0), "avoid 0,1: region goes to DSPAM 2");
    avoid[0] = 4'b1101;
    alloc(0, 1, 8);
    check(a_ok[0] && placed(0, 0, 1, 0), "avoid 0,2,3: region goes to DSPAM 1");
    avoid[0] = 4'b1111;
    alloc(0, 1, 8);
    check(a_ok[0], "all avoided: second pass still places the region");
    avoid[0] = 4'b0111;
    retired[0] = 4'b1000;
    alloc(0, 2, 8);
    check(a_ok[0] && a_dsp[0][0] != 3 && a_dsp[0][1] != 3, "avoid never overrides retirement");
    avoid[0] = '0;
    retired[0] = '0;

    // random run on instance 0: reset its state first
    rst_n = 1'b0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    foreach (occ[d, b]) occ[d][b] = 0;
    for (int it = 0; it < 400; it++) begin
      if (live.size() > 0 && $urandom_range(0, 2) == 0) begin
        int k;
        reg_t r;
        k = $urandom_range(0, live.size() - 1);
        r = live[k];
        live.delete(k);
        for (int c = 0; c < r.nc; c++) begin
          free(0, r.d[c], r.b[c], r.nblk);
          for (int b = r.b[c]; b < r.b[c] + r.nblk; b++) occ[r.d[c]][b] = 0;
        end
      end else begin
        int nc, nblk, nusable, nfit;
        bit occ_prev [4][64];
        nc = $urandom_range(1, 3);
        nblk = $urandom_range(1, 24);
        retired[0] = ($urandom_range(0, 3) == 0) ? 4'(1 << $urandom_range(0, 3)) : 4'b0;
        occ_prev = occ;
        // DSPAMs with a free run of nblk
        nfit = 0;
        for (int d = 0; d < 4; d++) begin
          int run, best;
          run = 0; best = 0;
          for (int b = 0; b < 64; b++) begin
            run = occ[d][b] ? 0 : run + 1;
            if (run > best) best = run;
          end
          if (!retired[0][d] && best >= nblk) nfit++;
        end
        alloc(0, nc, nblk);
        if (a_ok[0]) begin
          reg_t r;
          bit distinct;
          r.nc = nc; r.nblk = nblk;
          distinct = 1;
          for (int c = 0; c < nc; c++) begin
            r.d[c] = int'(a_dsp[0][c]); r.b[c] = int'(a_base[0][c]);
            check(r.d[c] < 4 && !retired[0][r.d[c]], "usable DSPAM");
            check(r.b[c] + nblk <= 64, "region inside DSPAM");
            for (int b = r.b[c]; b < r.b[c] + nblk && b < 64; b++) begin
              check(!occ[r.d[c]][b], "no overlap");
              occ[r.d[c]][b] = 1;
            end
            for (int p = 0; p < c; p++) if (r.d[p] == r.d[c]) distinct = 0;
          end
          if (nfit >= nc) check(distinct, "copies in distinct DSPAMs when room allows");
          live.push_back(r);
        end else begin
          check(occ_prev == occ, "refusal changes nothing");
          // a refusal is only allowed if not even one copy per usable DSPAM fits
          check(nfit < nc, $sformatf("refused with %0d DSPAMs having room for %0d copies", nfit, nc));
        end
        retired[0] = '0;
      end
    end
    // everything freed must be reusable: free all, then a full-DSPAM region fits in every DSPAM
    while (live.size() > 0) begin
      reg_t r;
      r = live.pop_front();
      for (int c = 0; c < r.nc; c++) free(0, r.d[c], r.b[c], r.nblk);
    end
    alloc(0, 3, 64);
    check(a_ok[0], "all space back after frees");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
