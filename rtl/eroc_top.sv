// eroc_top: an E-RoC memory subsystem - the E-RoC manager with NUM_DSPAM
// DSPAMs, attached point to point or over one DSPAM bus.
//
// Masters see logical scratch pads (E-RAID systems of level NO E-RAID,
// E-RAID 1 or E-RAID 1+P) through the manager's bus slave port; behind it
// the manager spreads the copies over the DSPAMs, checks them on every read
// and hides the errors of the aggressively voltage-scaled DSPAMs. The
// manager's iDMA port to main memory is brought out, as are the entropy seed
// for the start-up prime and a mask of DSPAMs that must no longer be used.
//
// Defaults: 8 masters, 8 DSPAMs of 4KB (1024 x 32-bit), 64-byte allocation
// blocks, 16 E-RAID descriptors. Port protocols and timing: see
// eroc_manager. By default the DSPAMs are attached point to point (the
// stand-alone manager platform); DSPAM_BUS = 1 gives the platform with a
// dedicated DSPAM bus, on which only one DSPAM access happens per cycle.
// The platform with the DSPAMs on the main on-chip bus is not built here:
// that bus and its traffic lie outside this subsystem.
module eroc_top
  import eroc_pkg::*;
#(
  parameter int NUM_MASTERS = 8,
  parameter int NUM_DSPAM   = 8,
  parameter int DSPAM_WORDS = 1024,
  parameter int BLOCK_BYTES = 64,
  parameter int NUM_ERAID   = 16,
  parameter bit DSPAM_BUS   = 1'b0
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  input  logic [DATA_W-1:0]     prime_seed_i,
  output logic                  init_done_o,
  input  logic [NUM_DSPAM-1:0]  dspam_retired_i,
  // bus slave port
  input  logic                  req_valid_i,
  output logic                  req_ready_o,
  input  logic [MID_W-1:0]      req_mid_i,
  input  logic                  req_we_i,
  input  logic [31:0]           req_addr_i,
  input  logic [DATA_W-1:0]     req_wdata_i,
  output logic                  rsp_valid_o,
  output logic [DATA_W-1:0]     rsp_rdata_o,
  output logic                  rsp_err_o,
  // main memory port
  output logic                  mem_req_valid_o,
  input  logic                  mem_req_ready_i,
  output logic                  mem_req_we_o,
  output logic [31:0]           mem_req_addr_o,
  output logic [DATA_W-1:0]     mem_req_wdata_o,
  input  logic                  mem_rsp_valid_i,
  input  logic [DATA_W-1:0]     mem_rsp_rdata_i
);

  dspam_req_t [NUM_DSPAM-1:0]        dsp_req;
  logic [NUM_DSPAM-1:0][DATA_W-1:0]  dsp_rdata;

  eroc_manager #(
    .NUM_MASTERS (NUM_MASTERS),
    .NUM_DSPAM   (NUM_DSPAM),
    .DSPAM_WORDS (DSPAM_WORDS),
    .BLOCK_BYTES (BLOCK_BYTES),
    .NUM_ERAID   (NUM_ERAID),
    .DSPAM_BUS   (DSPAM_BUS)
  ) u_mgr (
    .clk_i, .rst_ni, .prime_seed_i, .init_done_o, .dspam_retired_i,
    .req_valid_i, .req_ready_o, .req_mid_i, .req_we_i, .req_addr_i, .req_wdata_i,
    .rsp_valid_o, .rsp_rdata_o, .rsp_err_o,
    .dsp_req_o   (dsp_req),
    .dsp_rdata_i (dsp_rdata),
    .mem_req_valid_o, .mem_req_ready_i, .mem_req_we_o, .mem_req_addr_o,
    .mem_req_wdata_o, .mem_rsp_valid_i, .mem_rsp_rdata_i
  );

  for (genvar d = 0; d < NUM_DSPAM; d++) begin : g_dspam
    dspam #(.WORDS(DSPAM_WORDS)) u_dspam (
      .clk_i   (clk_i),
      .req_i   (dsp_req[d]),
      .rdata_o (dsp_rdata[d])
    );
  end

endmodule
