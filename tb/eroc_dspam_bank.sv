// eroc_dspam_bank: behavioural bank of N DSPAMs for unit testbenches. Same
// port behaviour as the dspam module (one-cycle read, rdata held), but the
// contents are one array mem[dspam][word] that a testbench can read and
// corrupt with variable indices. It also flags a request to a DSPAM number
// past N.
module eroc_dspam_bank
  import eroc_pkg::*;
#(
  parameter int N     = 4,
  parameter int WORDS = 256
) (
  input  logic                      clk_i,
  input  dspam_req_t [N-1:0]        req_i,
  output logic [N-1:0][DATA_W-1:0]  rdata_o
);
  logic [DATA_W-1:0] mem [N][WORDS];
  int unsigned reads = 0, writes = 0;

  initial for (int d = 0; d < N; d++) for (int a = 0; a < WORDS; a++) mem[d][a] = '0;

  always_ff @(posedge clk_i) begin
    int unsigned nr, nw;
    nr = 0; nw = 0;
    for (int d = 0; d < N; d++) begin
      if (req_i[d].req && req_i[d].we) nw++;
      if (req_i[d].req && !req_i[d].we) nr++;
    end
    reads  <= reads + nr;
    writes <= writes + nw;
    for (int d = 0; d < N; d++) begin
      if (req_i[d].req) begin
        if (req_i[d].we) begin
          mem[d][req_i[d].addr % WORDS] <= req_i[d].wdata;
        end else begin
          rdata_o[d] <= mem[d][req_i[d].addr % WORDS];
        end
      end
    end
  end
endmodule
