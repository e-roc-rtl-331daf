// eroc_config_mem: configuration memory of the E-RoC manager.
//
// Holds one descriptor per E-RAID system (logical SPM): valid, level,
// owner, ACL mask, size in blocks, and the DSPAM and first block of each
// copy. A descriptor's index is the logical SPM number masters use in their
// addresses. Besides the descriptors it keeps each master's own
// configuration registers: the main-memory address used by the iDMA
// (MEMADDR), the outcome of the master's last configuration command
// (RESULT = {err at bit 31, E-RAID index in bits 7:0}) and the upper half
// of the ACL its next CREATE uses (ACLHI, bits 7:0 = masters 8-15).
//
// Interface and timing: rd_idx_i -> rd_desc_o is combinational (an index
// past NUM_ERAID reads as an invalid descriptor); descriptor write and
// invalidate take effect at the clock edge (invalidate wins). free_idx_o is
// the lowest unused descriptor, free_found_o says one exists. Register
// reads (reg_mid_i, reg_sel_i) are combinational.
//
// The existence of this memory is from the E-RoC architecture; its contents
// and register layout are this design's.
module eroc_config_mem
  import eroc_pkg::*;
#(
  parameter int NUM_MASTERS = 8,
  parameter int NUM_ERAID   = 16
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  // descriptors
  input  logic [IDX_W-1:0]     rd_idx_i,
  output eraid_desc_t          rd_desc_o,
  input  logic                 wr_en_i,
  input  logic [IDX_W-1:0]     wr_idx_i,
  input  eraid_desc_t          wr_desc_i,
  input  logic                 inv_en_i,
  input  logic [IDX_W-1:0]     inv_idx_i,
  output logic                 free_found_o,
  output logic [IDX_W-1:0]     free_idx_o,
  // per-master registers
  input  logic [MID_W-1:0]     reg_mid_i,
  input  logic [1:0]           reg_sel_i,
  output logic [DATA_W-1:0]    reg_rdata_o,
  output logic [DATA_W-1:0]    memaddr_o,
  input  logic                 memaddr_we_i,
  input  logic [DATA_W-1:0]    memaddr_wdata_i,
  input  logic                 result_we_i,
  input  logic [DATA_W-1:0]    result_wdata_i,
  output logic [ACL_LO_W-1:0]  aclhi_o,
  input  logic                 aclhi_we_i,
  input  logic [ACL_LO_W-1:0]  aclhi_wdata_i
);

  localparam int EW = (NUM_ERAID > 1) ? $clog2(NUM_ERAID) : 1;      // descriptor index bits used
  localparam int MW = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1;  // master index bits used

  eraid_desc_t        desc_q    [NUM_ERAID];
  logic [DATA_W-1:0]  memaddr_q [NUM_MASTERS];
  logic [DATA_W-1:0]  result_q  [NUM_MASTERS];
  logic [ACL_LO_W-1:0] aclhi_q  [NUM_MASTERS];

  logic mid_ok;
  assign mid_ok = 32'(reg_mid_i) < NUM_MASTERS;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      for (int i = 0; i < NUM_ERAID; i++)   desc_q[i]    <= '0;
      for (int m = 0; m < NUM_MASTERS; m++) memaddr_q[m] <= '0;
      for (int m = 0; m < NUM_MASTERS; m++) result_q[m]  <= '0;
      for (int m = 0; m < NUM_MASTERS; m++) aclhi_q[m]   <= '0;
    end else begin
      if (wr_en_i && 32'(wr_idx_i) < NUM_ERAID)   desc_q[wr_idx_i[EW-1:0]]         <= wr_desc_i;
      if (inv_en_i && 32'(inv_idx_i) < NUM_ERAID) desc_q[inv_idx_i[EW-1:0]].valid  <= 1'b0;
      if (memaddr_we_i && mid_ok) memaddr_q[reg_mid_i[MW-1:0]] <= memaddr_wdata_i;
      if (result_we_i && mid_ok)  result_q[reg_mid_i[MW-1:0]]  <= result_wdata_i;
      if (aclhi_we_i && mid_ok)   aclhi_q[reg_mid_i[MW-1:0]]   <= aclhi_wdata_i;
    end
  end

  always_comb begin
    rd_desc_o = (32'(rd_idx_i) < NUM_ERAID) ? desc_q[rd_idx_i[EW-1:0]] : '0;
    free_found_o = 1'b0;
    free_idx_o   = '0;
    for (int i = NUM_ERAID - 1; i >= 0; i--) begin
      if (!desc_q[i].valid) begin
        free_found_o = 1'b1;
        free_idx_o   = IDX_W'(i);
      end
    end
    memaddr_o   = mid_ok ? memaddr_q[reg_mid_i[MW-1:0]] : '0;
    aclhi_o     = mid_ok ? aclhi_q[reg_mid_i[MW-1:0]] : '0;
    reg_rdata_o = '0;
    if (mid_ok) begin
      case (reg_sel_i)
        REG_MEMADDR: reg_rdata_o = memaddr_q[reg_mid_i[MW-1:0]];
        REG_RESULT:  reg_rdata_o = result_q[reg_mid_i[MW-1:0]];
        REG_ACLHI:   reg_rdata_o = DATA_W'(aclhi_q[reg_mid_i[MW-1:0]]);
        default:     reg_rdata_o = '0;
      endcase
    end
  end

endmodule
