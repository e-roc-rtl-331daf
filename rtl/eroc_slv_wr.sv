// eroc_slv_wr: the write side of the manager's DSPAM access ("ERAID SLV WR").
//
// Takes up to three word writes (copy x, copy y, parity; mask_i selects
// which) and issues them: writes to different DSPAMs in the same cycle,
// writes that share a DSPAM one per cycle, lowest copy first. With
// DSPAM_BUS set all DSPAMs share one bus and every write goes alone.
//
// Timing: start_i is sampled at a clock edge; writes are driven from the
// next cycle on; done_o is high for one cycle once every write has been
// issued (the DSPAM stores it at that same edge). With all copies in
// different DSPAMs start_i to done_o is 2 cycles; each write that has to
// wait for another adds one cycle. start_i only while idle.
//
// Only the name of this unit is given by the E-RoC architecture; the
// serialisation rule and the timing are this design's. DSPAM_BUS stands
// for the platform with a dedicated DSPAM bus, point-to-point (0) for the
// stand-alone manager.
module eroc_slv_wr
  import eroc_pkg::*;
#(
  parameter int NUM_DSPAM = 8,
  parameter bit DSPAM_BUS = 1'b0   // 1: all DSPAMs share one bus, one access per cycle
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  logic                          start_i,
  input  logic [NCOPY-1:0]              mask_i,
  input  phys_addr_t [NCOPY-1:0]        pa_i,
  input  logic [NCOPY-1:0][DATA_W-1:0]  data_i,
  output logic                          busy_o,
  output logic                          done_o,
  output dspam_req_t [NUM_DSPAM-1:0]    wr_req_o
);

  logic                          active_q, issued_q;
  logic [NCOPY-1:0]              pending_q, issue;
  phys_addr_t [NCOPY-1:0]        pa_q;
  logic [NCOPY-1:0][DATA_W-1:0]  data_q;

  always_comb begin
    issue = '0;
    for (int c = 0; c < NCOPY; c++) begin
      logic clash;
      clash = 1'b0;
      for (int p = 0; p < c; p++)
        if (issue[p] && (DSPAM_BUS || pa_q[p].dsp == pa_q[c].dsp)) clash = 1'b1;
      issue[c] = pending_q[c] && !clash;
    end
  end

  always_comb begin
    for (int d = 0; d < NUM_DSPAM; d++) wr_req_o[d] = '0;
    for (int c = 0; c < NCOPY; c++) begin
      if (issue[c]) begin
        wr_req_o[pa_q[c].dsp].req   = 1'b1;
        wr_req_o[pa_q[c].dsp].we    = 1'b1;
        wr_req_o[pa_q[c].dsp].addr  = pa_q[c].addr;
        wr_req_o[pa_q[c].dsp].wdata = data_q[c];
      end
    end
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      active_q  <= 1'b0;
      issued_q  <= 1'b0;
      pending_q <= '0;
      pa_q      <= '0;
      data_q    <= '0;
    end else if (start_i) begin
      active_q  <= 1'b1;
      issued_q  <= 1'b0;
      pending_q <= mask_i;
      pa_q      <= pa_i;
      data_q    <= data_i;
    end else begin
      pending_q <= pending_q & ~issue;
      issued_q  <= 1'b1;
      if (done_o) active_q <= 1'b0;
    end
  end

  // done once the last pending write is on the port (or nothing was asked)
  assign done_o = active_q && ((pending_q & ~issue) == '0) && (pending_q != '0 || issued_q);
  assign busy_o = active_q;

  assert property (@(posedge clk_i) disable iff (!rst_ni) start_i |-> !active_q);

endmodule
