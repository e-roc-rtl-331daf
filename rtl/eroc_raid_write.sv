// eroc_raid_write: E-RAID write policy engine ("ERAID Write").
//
// Writes one 32-bit word A of a logical SPM according to its E-RAID level:
//   NO E-RAID   A to copy x.
//   E-RAID 1    A to copies x and y.
//   E-RAID 1+P  A to copies x and y, and A ^ R to the parity word, R being
//               the random prime drawn at start-up.
// All copies are written in the same cycle when they lie in different
// DSPAMs (the SLV WR unit serialises writes that share a DSPAM). The write
// then completes with CHANNEL_OK; a write cannot fail.
//
// Interface: start_i (one cycle, while idle) with desc_i, widx_i, wdata_i and
// prime_i; done_o pulses when the SLV WR unit has issued every write.
// Timing: with copies in different DSPAMs all writes are on the DSPAM ports,
// and done_o high, in the cycle after the edge that samples start_i; each
// extra write to a shared DSPAM adds one cycle.
//
// The write policies follow the E-RAID level definitions; timing is this
// design's.
module eroc_raid_write
  import eroc_pkg::*;
#(
  parameter int BLOCK_BYTES = 64
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  logic                          start_i,
  input  eraid_desc_t                   desc_i,
  input  logic [WADDR_W-1:0]            widx_i,
  input  logic [DATA_W-1:0]             wdata_i,
  input  logic [DATA_W-1:0]             prime_i,
  output logic                          busy_o,
  output logic                          done_o,
  // SLV WR unit
  output logic                          wr_start_o,
  output logic [NCOPY-1:0]              wr_mask_o,
  output phys_addr_t [NCOPY-1:0]        wr_pa_o,
  output logic [NCOPY-1:0][DATA_W-1:0]  wr_data_o,
  input  logic                          wr_done_i
);

  logic busy_q;

  eroc_addr_xlate #(.BLOCK_BYTES(BLOCK_BYTES)) u_xlate (
    .desc_i (desc_i),
    .widx_i (widx_i),
    .pa_o   (wr_pa_o)
  );

  always_comb begin
    wr_start_o = start_i && !busy_q;
    case (desc_i.level)
      LVL_RAID1:  wr_mask_o = 3'b011;
      LVL_RAID1P: wr_mask_o = 3'b111;
      default:    wr_mask_o = 3'b001;
    endcase
    wr_data_o[0] = wdata_i;
    wr_data_o[1] = wdata_i;
    wr_data_o[2] = wdata_i ^ prime_i;
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni)             busy_q <= 1'b0;
    else if (wr_start_o)     busy_q <= 1'b1;
    else if (wr_done_i)      busy_q <= 1'b0;
  end

  assign done_o = busy_q && wr_done_i;
  assign busy_o = busy_q;

endmodule
