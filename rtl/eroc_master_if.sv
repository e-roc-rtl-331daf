// eroc_master_if: the manager's master interface toward the DSPAMs
// ("EROC Master IF").
//
// The read unit (SLV RD) and the write unit (SLV WR) each produce one
// request per DSPAM. This block merges the two streams onto the
// point-to-point DSPAM ports, one port per DSPAM, and hands read data back to
// the read unit. A write wins if both units address the same DSPAM in the
// same cycle; the manager never runs a read and a write at the same time, so
// this only matters as a rule, and an assertion flags it. Purely
// combinational: requests reach the DSPAMs in the cycle they are made.
//
// The point-to-point attachment corresponds to the stand-alone E-RoC
// platform arrangement; the priority rule is this design's choice.
module eroc_master_if
  import eroc_pkg::*;
#(
  parameter int NUM_DSPAM = 8
) (
  input  logic                              clk_i,
  input  logic                              rst_ni,
  input  dspam_req_t [NUM_DSPAM-1:0]        rd_req_i,
  input  dspam_req_t [NUM_DSPAM-1:0]        wr_req_i,
  output logic [NUM_DSPAM-1:0][DATA_W-1:0]  rd_rdata_o,
  output dspam_req_t [NUM_DSPAM-1:0]        dsp_req_o,
  input  logic [NUM_DSPAM-1:0][DATA_W-1:0]  dsp_rdata_i
);

  always_comb begin
    for (int d = 0; d < NUM_DSPAM; d++) begin
      if (wr_req_i[d].req) begin
        dsp_req_o[d]    = wr_req_i[d];
        dsp_req_o[d].we = 1'b1;
      end else if (rd_req_i[d].req) begin
        dsp_req_o[d]    = rd_req_i[d];
        dsp_req_o[d].we = 1'b0;
      end else begin
        dsp_req_o[d] = '0;
      end
      rd_rdata_o[d] = dsp_rdata_i[d];
    end
  end

  for (genvar d = 0; d < NUM_DSPAM; d++) begin : g_chk
    assert property (@(posedge clk_i) disable iff (!rst_ni) !(rd_req_i[d].req && wr_req_i[d].req));
  end

endmodule
