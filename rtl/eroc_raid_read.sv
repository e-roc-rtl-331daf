// eroc_raid_read: E-RAID read policy engine ("ERAID Read").
//
// Reads one 32-bit word of a logical SPM according to its E-RAID level:
//   NO E-RAID   read the single copy x and return it unchecked.
//   E-RAID 1    read copies x and y (in parallel when they sit in different
//               DSPAMs); equal -> return x with CHANNEL_OK, else SLV_ERR so
//               the master refetches from main memory.
//   E-RAID 1+P  as E-RAID 1, but on a mismatch also read the parity word P
//               (stored as A ^ R, R being the random prime drawn at start-up)
//               and return the copy for which copy ^ P == R (x tried first);
//               SLV_ERR only if neither copy passes.
// The check compares, XORs and nothing more, which is the point of the
// scheme: no ECC decoding on the read path.
//
// Interface: start_i (one cycle, while idle) with desc_i, widx_i and prime_i;
// the engine drives the SLV RD unit (rd_*) and returns done_o (one cycle)
// with rdata_o, err_o (SLV_ERR) and corrected_o (a mismatch was resolved by
// parity). Timing, copies in separate DSPAMs: done_o is high 3 clock edges
// after the edge that samples start_i; the parity step adds 3 more.
//
// The three policies follow the E-RAID level definitions; the cycle timing
// and the choice not to rewrite a bad copy are this design's.
module eroc_raid_read
  import eroc_pkg::*;
#(
  parameter int BLOCK_BYTES = 64
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  logic                          start_i,
  input  eraid_desc_t                   desc_i,
  input  logic [WADDR_W-1:0]            widx_i,
  input  logic [DATA_W-1:0]             prime_i,
  output logic                          busy_o,
  output logic                          done_o,
  output logic [DATA_W-1:0]             rdata_o,
  output logic                          err_o,
  output logic                          corrected_o,
  // SLV RD unit
  output logic                          rd_start_o,
  output logic [NCOPY-1:0]              rd_mask_o,
  output phys_addr_t [NCOPY-1:0]        rd_pa_o,
  input  logic                          rd_done_i,
  input  logic [NCOPY-1:0][DATA_W-1:0]  rd_data_i
);

  typedef enum logic [1:0] {S_IDLE, S_COPIES, S_PARITY} state_e;

  state_e                  state_q;
  level_e                  level_q;
  logic [DATA_W-1:0]       prime_q;
  phys_addr_t [NCOPY-1:0]  pa_in, pa_q;

  eroc_addr_xlate #(.BLOCK_BYTES(BLOCK_BYTES)) u_xlate (
    .desc_i (desc_i),
    .widx_i (widx_i),
    .pa_o   (pa_in)
  );

  logic [DATA_W-1:0] a1, a2, p;
  assign a1 = rd_data_i[0];
  assign a2 = rd_data_i[1];
  assign p  = rd_data_i[2];

  always_comb begin
    rd_start_o = 1'b0;
    rd_mask_o  = '0;
    rd_pa_o    = pa_q;
    done_o     = 1'b0;
    rdata_o    = a1;
    err_o      = 1'b0;
    corrected_o = 1'b0;
    case (state_q)
      S_IDLE: begin
        rd_start_o = start_i;
        rd_mask_o  = (desc_i.level == LVL_NONE) ? 3'b001 : 3'b011;
        rd_pa_o    = pa_in;
      end
      S_COPIES: if (rd_done_i) begin
        if (level_q == LVL_NONE || a1 == a2) begin
          done_o = 1'b1;
        end else if (level_q == LVL_RAID1) begin
          done_o = 1'b1;
          err_o  = 1'b1;
        end else begin
          rd_start_o = 1'b1;        // fetch parity P
          rd_mask_o  = 3'b100;
        end
      end
      S_PARITY: if (rd_done_i) begin
        done_o      = 1'b1;
        corrected_o = 1'b1;
        if ((a1 ^ p) == prime_q)      rdata_o = a1;
        else if ((a2 ^ p) == prime_q) rdata_o = a2;
        else begin
          err_o       = 1'b1;
          corrected_o = 1'b0;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      level_q <= LVL_NONE;
      prime_q <= '0;
      pa_q    <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (start_i) begin
          state_q <= S_COPIES;
          level_q <= desc_i.level;
          prime_q <= prime_i;
          pa_q    <= pa_in;
        end
        S_COPIES: if (rd_done_i) state_q <= rd_start_o ? S_PARITY : S_IDLE;
        S_PARITY: if (rd_done_i) state_q <= S_IDLE;
        default:  state_q <= S_IDLE;
      endcase
    end
  end

  assign busy_o = state_q != S_IDLE;

endmodule
