// eroc_idma: internal DMA engine of the E-RoC manager ("iDMA").
//
// Moves a whole E-RAID between main memory and the DSPAMs, one 32-bit word
// at a time, going through the E-RAID read and write engines so that every
// word is stored or checked according to the E-RAID level:
//   load    (load_i = 1, used at create): read word w at mem_base + 4w from
//           main memory, write it to E-RAID word w.
//   offload (load_i = 0, used at delete): read E-RAID word w (checked),
//           write it to main memory at mem_base + 4w.
// A word that fails its check while offloading is still written (copy x)
// and the transfer ends with err_o set.
//
// Main-memory port: a request is taken when mem_req_valid_o and
// mem_req_ready_i are both high; every request, read or write, is answered
// by exactly one mem_rsp_valid_i pulse (with read data for reads).
// Engine port: eng_rd_start_o / eng_wr_start_o with eng_widx_o and
// eng_wdata_o; the engines answer with eng_rd_done_i / eng_wr_done_i.
// start_i is taken while idle; done_o pulses at the end. One word is in
// flight at a time.
//
// That an internal DMA fills a new E-RAID from memory and offloads it on
// deletion comes from the E-RoC manager description; the port protocol and
// the word-at-a-time sequencing are this design's.
module eroc_idma
  import eroc_pkg::*;
(
  input  logic                  clk_i,
  input  logic                  rst_ni,
  input  logic                  start_i,
  input  logic                  load_i,
  input  logic [WADDR_W:0]      nwords_i,
  input  logic [31:0]           mem_base_i,
  output logic                  busy_o,
  output logic                  done_o,
  output logic                  err_o,
  // E-RAID engines
  output logic                  eng_rd_start_o,
  output logic                  eng_wr_start_o,
  output logic [WADDR_W-1:0]    eng_widx_o,
  output logic [DATA_W-1:0]     eng_wdata_o,
  input  logic                  eng_rd_done_i,
  input  logic                  eng_rd_err_i,
  input  logic [DATA_W-1:0]     eng_rdata_i,
  input  logic                  eng_wr_done_i,
  // main memory
  output logic                  mem_req_valid_o,
  input  logic                  mem_req_ready_i,
  output logic                  mem_req_we_o,
  output logic [31:0]           mem_req_addr_o,
  output logic [DATA_W-1:0]     mem_req_wdata_o,
  input  logic                  mem_rsp_valid_i,
  input  logic [DATA_W-1:0]     mem_rsp_rdata_i
);

  typedef enum logic [2:0] {S_IDLE, S_NEXT, S_MEM_REQ, S_MEM_RSP, S_ENG_START, S_ENG_WAIT, S_DONE} state_e;

  state_e             state_q;
  logic               load_q, err_q;
  logic [WADDR_W:0]   n_q, w_q;
  logic [31:0]        base_q;
  logic [DATA_W-1:0]  data_q;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      load_q  <= 1'b0;
      err_q   <= 1'b0;
      n_q     <= '0;
      w_q     <= '0;
      base_q  <= '0;
      data_q  <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (start_i) begin
          load_q  <= load_i;
          n_q     <= nwords_i;
          base_q  <= mem_base_i;
          w_q     <= '0;
          err_q   <= 1'b0;
          state_q <= S_NEXT;
        end
        S_NEXT: begin
          if (w_q == n_q)  state_q <= S_DONE;
          else if (load_q) state_q <= S_MEM_REQ;     // memory -> E-RAID
          else             state_q <= S_ENG_START;   // E-RAID -> memory
        end
        S_MEM_REQ: if (mem_req_ready_i) state_q <= S_MEM_RSP;
        S_MEM_RSP: if (mem_rsp_valid_i) begin
          if (load_q) begin
            data_q  <= mem_rsp_rdata_i;
            state_q <= S_ENG_START;
          end else begin
            w_q     <= w_q + 1'b1;
            state_q <= S_NEXT;
          end
        end
        S_ENG_START: state_q <= S_ENG_WAIT;
        S_ENG_WAIT: begin
          if (load_q && eng_wr_done_i) begin
            w_q     <= w_q + 1'b1;
            state_q <= S_NEXT;
          end else if (!load_q && eng_rd_done_i) begin
            data_q  <= eng_rdata_i;
            err_q   <= err_q | eng_rd_err_i;
            state_q <= S_MEM_REQ;
          end
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign eng_rd_start_o  = state_q == S_ENG_START && !load_q;
  assign eng_wr_start_o  = state_q == S_ENG_START && load_q;
  assign eng_widx_o      = w_q[WADDR_W-1:0];
  assign eng_wdata_o     = data_q;
  assign mem_req_valid_o = state_q == S_MEM_REQ;
  assign mem_req_we_o    = !load_q;
  assign mem_req_addr_o  = base_q + (32'(w_q) << 2);
  assign mem_req_wdata_o = data_q;
  assign done_o          = state_q == S_DONE;
  assign err_o           = err_q;
  assign busy_o          = state_q != S_IDLE;

endmodule
