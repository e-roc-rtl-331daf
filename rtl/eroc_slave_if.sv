// eroc_slave_if: bus slave interface of the E-RoC manager ("EROC Slave IF").
//
// Masters (CPUs or hardware blocks) reach their E-RAID systems through this
// port. One request is served at a time. The 32-bit request address is
// decoded as follows:
//   bit 31 = 0  data access to a logical SPM:
//               bits 23:16 logical SPM (E-RAID index), bits 15:0 byte
//               offset, which must be word aligned.
//   bit 31 = 1  configuration access: bits 11:8 name the master whose
//               register window is addressed, bits 3:2 the register
//               (MEMADDR, CMD, RESULT, ACLHI). A master may only touch its own
//               window; anything else is refused with SLV_ERR, so no master
//               can change another master's E-RAID configuration.
// Refused requests are answered here, one cycle after acceptance; all others
// are handed to the manager's controller as a decoded command (cmd_valid_o
// pulses once, the fields stay stable until done_i) and answered when the
// controller signals done_i (looked at from the cycle after cmd_valid_o).
//
// Handshake: the request is accepted when req_valid_i and req_ready_o are
// both high; req_ready_o is low while a request is being served or while
// enable_i is low (start-up). The answer is a one-cycle rsp_valid_o pulse
// with rsp_rdata_o and rsp_err_o (1 = SLV_ERR, 0 = CHANNEL_OK).
//
// The per-master protected configuration space follows the E-RoC manager
// description; the address map and handshake are this design's.
module eroc_slave_if
  import eroc_pkg::*;
#(
  parameter int NUM_MASTERS = 8
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                enable_i,
  // bus side
  input  logic                req_valid_i,
  output logic                req_ready_o,
  input  logic [MID_W-1:0]    req_mid_i,
  input  logic                req_we_i,
  input  logic [31:0]         req_addr_i,
  input  logic [DATA_W-1:0]   req_wdata_i,
  output logic                rsp_valid_o,
  output logic [DATA_W-1:0]   rsp_rdata_o,
  output logic                rsp_err_o,
  // controller side
  output logic                cmd_valid_o,
  output req_kind_e           cmd_kind_o,
  output logic [MID_W-1:0]    cmd_mid_o,
  output logic [IDX_W-1:0]    cmd_lspm_o,
  output logic [WADDR_W-1:0]  cmd_widx_o,
  output logic [1:0]          cmd_reg_o,
  output logic [DATA_W-1:0]   cmd_wdata_o,
  input  logic                done_i,
  input  logic                done_err_i,
  input  logic [DATA_W-1:0]   done_rdata_i
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_REFUSE} state_e;

  state_e state_q;

  req_kind_e kind;
  always_comb begin
    if (32'(req_mid_i) >= NUM_MASTERS) begin
      kind = K_BAD;
    end else if (req_addr_i[31]) begin
      if (req_addr_i[11:8] != req_mid_i) kind = K_BAD;   // another master's window
      else kind = req_we_i ? K_CFG_WR : K_CFG_RD;
    end else begin
      if (req_addr_i[1:0] != 2'b00) kind = K_BAD;        // unaligned
      else kind = req_we_i ? K_DATA_WR : K_DATA_RD;
    end
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state_q     <= S_IDLE;
      cmd_kind_o  <= K_DATA_RD;
      cmd_mid_o   <= '0;
      cmd_lspm_o  <= '0;
      cmd_widx_o  <= '0;
      cmd_reg_o   <= '0;
      cmd_wdata_o <= '0;
      rsp_valid_o <= 1'b0;
      rsp_rdata_o <= '0;
      rsp_err_o   <= 1'b0;
    end else begin
      rsp_valid_o <= 1'b0;
      case (state_q)
        S_IDLE: if (req_valid_i && req_ready_o) begin
          cmd_kind_o  <= kind;
          cmd_mid_o   <= req_mid_i;
          cmd_lspm_o  <= req_addr_i[23:16];
          cmd_widx_o  <= WADDR_W'(req_addr_i[15:2]);
          cmd_reg_o   <= req_addr_i[3:2];
          cmd_wdata_o <= req_wdata_i;
          state_q     <= (kind == K_BAD) ? S_REFUSE : S_ISSUE;
        end
        S_ISSUE: state_q <= S_WAIT;
        S_WAIT: if (done_i) begin
          rsp_valid_o <= 1'b1;
          rsp_rdata_o <= done_rdata_i;
          rsp_err_o   <= done_err_i;
          state_q     <= S_IDLE;
        end
        S_REFUSE: begin
          rsp_valid_o <= 1'b1;
          rsp_rdata_o <= '0;
          rsp_err_o   <= 1'b1;
          state_q     <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign req_ready_o = enable_i && state_q == S_IDLE && !rsp_valid_o;
  assign cmd_valid_o = state_q == S_ISSUE;

endmodule
