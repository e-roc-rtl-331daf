// eroc_prime_gen: start-up generator of the random prime R used by
// E-RAID 1+P parity (P = A ^ R).
//
// After reset a 32-bit Galois LFSR (polynomial x^32+x^22+x^2+x+1), seeded
// from seed_i (0 selects a built-in seed), proposes candidates. Each
// candidate is forced odd and >= 2^31 ("large") and tested by trial division
// with the odd divisors 3, 5, 7, ... while d*d <= candidate, one remainder
// per cycle. The first candidate with no divisor is R: done_o rises and
// prime_o holds R until the next reset. A prime takes about 2^15 cycles to
// confirm; composites usually fall out within a few divisors.
//
// That R is a large random prime drawn at start-up comes from the E-RoC
// scheme; the LFSR, the trial-division method and the one-remainder-per-cycle
// timing are this design's choices.
module eroc_prime_gen
  import eroc_pkg::*;
(
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic [DATA_W-1:0]  seed_i,
  output logic               done_o,
  output logic [DATA_W-1:0]  prime_o
);

  localparam logic [31:0] DEFAULT_SEED = 32'hACE1_2468;
  localparam logic [31:0] POLY         = 32'h8020_0003;

  typedef enum logic [1:0] {S_SEED, S_DRAW, S_TEST, S_DONE} state_e;

  state_e       state_q;
  logic [31:0]  lfsr_q, cand_q;
  logic [16:0]  div_q;
  logic [33:0]  div_sq;
  logic [16:0]  rem;

  assign div_sq = 34'(div_q) * 34'(div_q);
  assign rem    = 17'(cand_q % 32'(div_q));

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state_q <= S_SEED;
      lfsr_q  <= DEFAULT_SEED;
      cand_q  <= '0;
      div_q   <= 17'd3;
    end else begin
      case (state_q)
        S_SEED: begin
          lfsr_q  <= (seed_i == '0) ? DEFAULT_SEED : seed_i;
          state_q <= S_DRAW;
        end
        S_DRAW: begin
          cand_q  <= {1'b1, lfsr_q[30:1], 1'b1};
          lfsr_q  <= lfsr_q[0] ? ((lfsr_q >> 1) ^ POLY) : (lfsr_q >> 1);
          div_q   <= 17'd3;
          state_q <= S_TEST;
        end
        S_TEST: begin
          if (div_sq > 34'(cand_q))  state_q <= S_DONE;   // no divisor found
          else if (rem == '0)        state_q <= S_DRAW;   // composite
          else                       div_q   <= div_q + 17'd2;
        end
        default: ;
      endcase
    end
  end

  assign done_o  = state_q == S_DONE;
  assign prime_o = cand_q;

endmodule
