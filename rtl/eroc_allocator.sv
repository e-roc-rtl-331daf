// eroc_allocator: next-fit DSPAM block allocator of the E-RoC manager.
//
// Each DSPAM is cut into blocks of BLOCK_BYTES. The allocator keeps one free
// bit per block (1 = free) and, per DSPAM, a next-fit pointer: the block
// after the last region it handed out there. An allocation asks for
// ncopies regions (1 for NO E-RAID, 2 for E-RAID 1, 3 for E-RAID 1+P) of
// nblk contiguous blocks each. Regions are placed one after another:
//   * DSPAMs are tried round robin from a global pointer that advances past
//     each DSPAM that receives a region, so data spreads evenly;
//   * a first pass only considers DSPAMs that hold no region of this E-RAID
//     yet (copies in different memories); if none has room, a second pass
//     allows sharing, so a platform with few DSPAMs still gets its E-RAID;
//   * inside a DSPAM the free bits are scanned circularly from the next-fit
//     pointer, one block per cycle, for a run of nblk free blocks that does
//     not cross the end of the DSPAM;
//   * retired DSPAMs (retired_i) are never used;
//   * DSPAMs in alloc_avoid_i count as already holding a copy (used when a
//     single copy of an existing E-RAID is moved: its other copies' DSPAMs).
// If some region cannot be placed, the regions already taken are returned
// and alloc_ok_o is low (the manager answers SLV_ERR).
// A free request returns one region in one cycle.
//
// Interface: alloc_start_i / free_start_i are accepted while busy_o is low
// (alloc wins if both). alloc_done_o pulses with alloc_ok_o, alloc_dsp_o and
// alloc_base_o (DSPAM and first block of copy x, y, p). free_done_o pulses
// the cycle after free_start_i.
// Timing: one cycle per DSPAM tried plus one per block scanned.
//
// Block-granular next-fit allocation with one free bit per block and
// round-robin DSPAM selection follows the E-RoC allocation policy;
// the two-pass sharing rule, contiguous regions and the scan timing are this
// design's. Moving the data out of a retired DSPAM is done by the manager,
// which asks here for one region per moved copy (see alloc_avoid_i).
module eroc_allocator
  import eroc_pkg::*;
#(
  parameter int NUM_DSPAM   = 8,
  parameter int DSPAM_WORDS = 1024,
  parameter int BLOCK_BYTES = 64
) (
  input  logic                              clk_i,
  input  logic                              rst_ni,
  input  logic [NUM_DSPAM-1:0]              retired_i,
  // allocation
  input  logic                              alloc_start_i,
  input  logic [1:0]                        alloc_ncopies_i,
  input  logic [BLK_W-1:0]                  alloc_nblk_i,
  input  logic [NUM_DSPAM-1:0]              alloc_avoid_i,
  output logic                              alloc_done_o,
  output logic                              alloc_ok_o,
  output logic [NCOPY-1:0][DSP_ID_W-1:0]    alloc_dsp_o,
  output logic [NCOPY-1:0][BLK_W-1:0]       alloc_base_o,
  // free
  input  logic                              free_start_i,
  input  logic [DSP_ID_W-1:0]               free_dsp_i,
  input  logic [BLK_W-1:0]                  free_base_i,
  input  logic [BLK_W-1:0]                  free_nblk_i,
  output logic                              free_done_o,
  output logic                              busy_o
);

  localparam int NBLK = DSPAM_WORDS * (DATA_W / 8) / BLOCK_BYTES;  // blocks per DSPAM
  localparam int BW   = $clog2(NBLK + 1);
  localparam int DW   = (NUM_DSPAM > 1) ? $clog2(NUM_DSPAM) : 1;
  localparam int PW   = (NBLK > 1) ? $clog2(NBLK) : 1;                // block index bits

  typedef enum logic [2:0] {S_IDLE, S_PICK, S_SCAN, S_ROLLBACK, S_DONE} state_e;

  state_e                           state_q;
  logic [NUM_DSPAM-1:0][NBLK-1:0]   free_q;      // 1 = block free
  logic [NUM_DSPAM-1:0][BW-1:0]     nf_q;        // next-fit pointers
  logic [DW-1:0]                    rr_q, rr_save_q;
  logic [DW-1:0]                    cand_q;
  logic [DW:0]                      tried_q;
  logic                             pass_q;
  logic [NUM_DSPAM-1:0]             used_q;
  logic [1:0]                       copy_q, ncopies_q;
  logic [BW-1:0]                    need_q, pos_q, run_q, start_q;
  logic [BW:0]                      step_q;
  logic                             ok_q;

  // contiguous mask of n blocks starting at block s
  function automatic logic [NBLK-1:0] run_mask(input logic [BW-1:0] s, input logic [BW-1:0] n);
    logic [NBLK-1:0] m;
    for (int b = 0; b < NBLK; b++) m[b] = (b >= int'(s)) && (b < int'(s) + int'(n));
    return m;
  endfunction

  function automatic logic [DW-1:0] next_dsp(input logic [DW-1:0] d);
    return (int'(d) == NUM_DSPAM - 1) ? '0 : d + 1'b1;
  endfunction

  // candidate DSPAM acceptable in this pass?
  logic cand_ok;
  assign cand_ok = !retired_i[cand_q] && (pass_q || !used_q[cand_q]);

  // scan step
  logic          blk_free;
  logic [BW-1:0] run_eff, run_new, start_new;
  always_comb begin
    blk_free  = free_q[cand_q][pos_q[PW-1:0]];
    run_eff   = (pos_q == '0) ? '0 : run_q;          // runs never wrap
    run_new   = blk_free ? run_eff + 1'b1 : '0;
    start_new = (run_eff == '0) ? pos_q : start_q;
  end

  // regions to hand back when an allocation fails part way
  logic [NUM_DSPAM-1:0][NBLK-1:0] rollback;
  always_comb begin
    rollback = '0;
    for (int c = 0; c < NCOPY; c++)
      if (c < int'(copy_q))
        rollback[alloc_dsp_o[c][DW-1:0]] = rollback[alloc_dsp_o[c][DW-1:0]] |
            run_mask(BW'(alloc_base_o[c]), need_q);
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state_q      <= S_IDLE;
      free_q       <= '1;
      nf_q         <= '0;
      rr_q         <= '0;
      rr_save_q    <= '0;
      cand_q       <= '0;
      tried_q      <= '0;
      pass_q       <= 1'b0;
      used_q       <= '0;
      copy_q       <= '0;
      ncopies_q    <= '0;
      need_q       <= '0;
      pos_q        <= '0;
      run_q        <= '0;
      start_q      <= '0;
      step_q       <= '0;
      ok_q         <= 1'b0;
      alloc_dsp_o  <= '0;
      alloc_base_o <= '0;
      free_done_o  <= 1'b0;
    end else begin
      free_done_o <= 1'b0;
      case (state_q)
        S_IDLE: begin
          if (alloc_start_i) begin
            alloc_dsp_o  <= '0;
            alloc_base_o <= '0;
            used_q       <= alloc_avoid_i;
            copy_q       <= '0;
            ncopies_q    <= alloc_ncopies_i;
            need_q       <= BW'(alloc_nblk_i);
            cand_q       <= rr_q;
            rr_save_q    <= rr_q;
            tried_q      <= '0;
            pass_q       <= 1'b0;
            if (alloc_nblk_i == '0 || int'(alloc_nblk_i) > NBLK || alloc_ncopies_i == '0) begin
              ok_q    <= 1'b0;
              state_q <= S_DONE;
            end else begin
              state_q <= S_PICK;
            end
          end else if (free_start_i) begin
            if (int'(free_dsp_i) < NUM_DSPAM)
              free_q[free_dsp_i[DW-1:0]] <= free_q[free_dsp_i[DW-1:0]] |
                  run_mask(BW'(free_base_i), BW'(free_nblk_i));
            free_done_o <= 1'b1;
          end
        end
        S_PICK: begin
          if (int'(tried_q) == NUM_DSPAM) begin
            tried_q <= '0;
            cand_q  <= rr_q;
            if (!pass_q) pass_q <= 1'b1;
            else         state_q <= S_ROLLBACK;       // no DSPAM has room
          end else if (cand_ok) begin
            pos_q   <= nf_q[cand_q];
            run_q   <= '0;
            start_q <= '0;
            step_q  <= '0;
            state_q <= S_SCAN;
          end else begin
            cand_q  <= next_dsp(cand_q);
            tried_q <= tried_q + 1'b1;
          end
        end
        S_SCAN: begin
          run_q   <= run_new;
          start_q <= start_new;
          pos_q   <= (int'(pos_q) == NBLK - 1) ? '0 : pos_q + 1'b1;
          step_q  <= step_q + 1'b1;
          if (blk_free && run_new == need_q) begin
            // region found: take it
            free_q[cand_q] <= free_q[cand_q] & ~run_mask(start_new, need_q);
            nf_q[cand_q]   <= (int'(start_new) + int'(need_q) >= NBLK) ? '0
                                : start_new + need_q;
            alloc_dsp_o[copy_q]  <= DSP_ID_W'(cand_q);
            alloc_base_o[copy_q] <= BLK_W'(start_new);
            used_q[cand_q] <= 1'b1;
            rr_q           <= next_dsp(cand_q);
            cand_q         <= next_dsp(cand_q);
            tried_q        <= '0;
            pass_q         <= 1'b0;
            copy_q         <= copy_q + 1'b1;
            if (copy_q + 1'b1 == ncopies_q) begin
              ok_q    <= 1'b1;
              state_q <= S_DONE;
            end else begin
              state_q <= S_PICK;
            end
          end else if (int'(step_q) == NBLK + int'(need_q) - 2) begin
            // whole DSPAM scanned without a fit
            cand_q  <= next_dsp(cand_q);
            tried_q <= tried_q + 1'b1;
            state_q <= S_PICK;
          end
        end
        S_ROLLBACK: begin
          free_q <= free_q | rollback;
          rr_q    <= rr_save_q;
          ok_q    <= 1'b0;
          state_q <= S_DONE;
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign alloc_done_o = state_q == S_DONE;
  assign alloc_ok_o   = ok_q;
  assign busy_o       = state_q != S_IDLE;

endmodule
