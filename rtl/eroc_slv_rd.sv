// eroc_slv_rd: the read side of the manager's DSPAM access ("ERAID SLV RD").
//
// One E-RAID read touches up to three physical words: copy x, copy y and
// the parity word. This unit takes the set (mask_i selects which of the three
// are wanted, pa_i gives DSPAM number and word address of each) and issues
// the reads. Reads to different DSPAMs go out in the same cycle; reads that
// share a DSPAM (the allocator may put two copies in one DSPAM when DSPAMs
// run short) are issued one per cycle, lowest copy first. With DSPAM_BUS
// set, the DSPAMs are taken to hang on one shared DSPAM bus, so every read
// is issued alone, one per cycle, lowest copy first.
//
// Timing: start_i is sampled at a clock edge; the first reads are driven in
// the following cycle; each DSPAM answers one cycle after its request;
// done_o is high for one cycle after the last word was captured, with the
// words on data_o (they stay there until the next start). With all copies
// in different DSPAMs start_i to done_o is 3 cycles; each read that has to
// wait for another adds one cycle. start_i may be
// raised while the unit is idle or in its done_o cycle; words already
// captured in data_o are kept for copies not read again.
//
// Only the name of this unit is given by the E-RoC architecture; the
// serialisation rule and the timing are this design's. DSPAM_BUS stands
// for the platform with a dedicated DSPAM bus, point-to-point (0) for the
// stand-alone manager.
module eroc_slv_rd
  import eroc_pkg::*;
#(
  parameter int NUM_DSPAM = 8,
  parameter bit DSPAM_BUS = 1'b0   // 1: all DSPAMs share one bus, one access per cycle
) (
  input  logic                              clk_i,
  input  logic                              rst_ni,
  input  logic                              start_i,
  input  logic [NCOPY-1:0]                  mask_i,
  input  phys_addr_t [NCOPY-1:0]            pa_i,
  output logic                              busy_o,
  output logic                              done_o,
  output logic [NCOPY-1:0][DATA_W-1:0]      data_o,
  output dspam_req_t [NUM_DSPAM-1:0]        rd_req_o,
  input  logic [NUM_DSPAM-1:0][DATA_W-1:0]  rd_rdata_i
);

  logic                          active_q;
  logic [NCOPY-1:0]              pending_q, inflight_q, issue;
  phys_addr_t [NCOPY-1:0]        pa_q;

  // pick the copies that can go out this cycle: one per DSPAM
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
    for (int d = 0; d < NUM_DSPAM; d++) rd_req_o[d] = '0;
    for (int c = 0; c < NCOPY; c++) begin
      if (issue[c]) begin
        rd_req_o[pa_q[c].dsp].req  = 1'b1;
        rd_req_o[pa_q[c].dsp].we   = 1'b0;
        rd_req_o[pa_q[c].dsp].addr = pa_q[c].addr;
      end
    end
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      active_q   <= 1'b0;
      pending_q  <= '0;
      inflight_q <= '0;
      pa_q       <= '0;
      data_o     <= '0;
    end else if (start_i) begin
      active_q   <= 1'b1;
      pending_q  <= mask_i;
      inflight_q <= '0;
      pa_q       <= pa_i;
    end else begin
      pending_q  <= pending_q & ~issue;
      inflight_q <= issue;
      for (int c = 0; c < NCOPY; c++)
        if (inflight_q[c]) data_o[c] <= rd_rdata_i[pa_q[c].dsp];
      if (done_o) active_q <= 1'b0;
    end
  end

  assign done_o = active_q && pending_q == '0 && inflight_q == '0;
  assign busy_o = active_q;

  // a start while reads are in progress would drop them
  assert property (@(posedge clk_i) disable iff (!rst_ni) start_i |-> !active_q || done_o);

endmodule
