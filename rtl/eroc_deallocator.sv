// eroc_deallocator: tears down an E-RAID system ("De-allocator").
//
// On a delete request it first, if asked (offload_i), has the iDMA copy the
// E-RAID's contents out to main memory; it then returns the region of every
// copy (x, y and parity, as many as the level uses) to the allocator, one
// region per free request, and finally invalidates the descriptor in the
// configuration memory so the logical SPM number can be reused.
//
// Interface: start_i (one cycle, while idle) with desc_i, idx_i, offload_i.
// dma_start_o / dma_done_i / dma_err_i drive the iDMA (which reads the same
// descriptor through the manager); free_* drive the allocator's free port;
// inv_en_o pulses with inv_idx_o. done_o pulses at the end with err_o set
// when an offloaded word failed its E-RAID check.
// Timing without offload: 2 cycles per copy plus 2.
//
// "Offload to main memory when desired, then free the blocks" follows the
// E-RoC manager description; the sequencing and handshakes are this design's.
module eroc_deallocator
  import eroc_pkg::*;
(
  input  logic                  clk_i,
  input  logic                  rst_ni,
  input  logic                  start_i,
  input  eraid_desc_t           desc_i,
  input  logic [IDX_W-1:0]      idx_i,
  input  logic                  offload_i,
  output logic                  busy_o,
  output logic                  done_o,
  output logic                  err_o,
  // iDMA
  output logic                  dma_start_o,
  input  logic                  dma_done_i,
  input  logic                  dma_err_i,
  // allocator free port
  output logic                  free_start_o,
  output logic [DSP_ID_W-1:0]   free_dsp_o,
  output logic [BLK_W-1:0]      free_base_o,
  output logic [BLK_W-1:0]      free_nblk_o,
  input  logic                  free_done_i,
  // configuration memory
  output logic                  inv_en_o,
  output logic [IDX_W-1:0]      inv_idx_o
);

  typedef enum logic [2:0] {S_IDLE, S_DMA, S_FREE, S_FREE_WAIT, S_INV, S_DONE} state_e;

  state_e       state_q;
  eraid_desc_t  desc_q;
  logic [IDX_W-1:0] idx_q;
  logic [1:0]   copy_q;
  logic         err_q;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      desc_q  <= '0;
      idx_q   <= '0;
      copy_q  <= '0;
      err_q   <= 1'b0;
    end else begin
      case (state_q)
        S_IDLE: if (start_i) begin
          desc_q  <= desc_i;
          idx_q   <= idx_i;
          copy_q  <= '0;
          err_q   <= 1'b0;
          state_q <= offload_i ? S_DMA : S_FREE;
        end
        S_DMA: if (dma_done_i) begin
          err_q   <= dma_err_i;
          state_q <= S_FREE;
        end
        S_FREE: state_q <= S_FREE_WAIT;
        S_FREE_WAIT: if (free_done_i) begin
          copy_q  <= copy_q + 1'b1;
          state_q <= (copy_q + 1'b1 == ncopies(desc_q.level)) ? S_INV : S_FREE;
        end
        S_INV:  state_q <= S_DONE;
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign dma_start_o  = state_q == S_IDLE && start_i && offload_i;
  assign free_start_o = state_q == S_FREE;
  assign free_dsp_o   = desc_q.dsp[copy_q];
  assign free_base_o  = desc_q.base[copy_q];
  assign free_nblk_o  = desc_q.nblk;
  assign inv_en_o     = state_q == S_INV;
  assign inv_idx_o    = idx_q;
  assign done_o       = state_q == S_DONE;
  assign err_o        = err_q;
  assign busy_o       = state_q != S_IDLE;

endmodule
