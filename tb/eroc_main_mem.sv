// eroc_main_mem: behavioural model of the off-chip main memory seen by the
// E-RoC iDMA port, for testbenches only. WORDS 32-bit words at byte
// addresses 0 .. 4*WORDS-1. A request is accepted when valid and ready are
// high (ready drops every fourth cycle to exercise the handshake); every
// request gets one rsp_valid pulse LAT cycles later, with data for a read.
module eroc_main_mem #(
  parameter int WORDS = 4096,
  parameter int LAT   = 2
) (
  input  logic        clk_i,
  input  logic        req_valid_i,
  output logic        req_ready_o,
  input  logic        req_we_i,
  input  logic [31:0] req_addr_i,
  input  logic [31:0] req_wdata_i,
  output logic        rsp_valid_o,
  output logic [31:0] rsp_rdata_o
);
  logic [31:0] mem [WORDS];
  logic [1:0]  tick = '0;
  logic [LAT-1:0] pipe_v = '0;
  logic [31:0] pipe_d [LAT];

  initial for (int i = 0; i < WORDS; i++) mem[i] = 32'h5A00_0000 ^ (i * 32'h0101_0103);

  assign req_ready_o = tick != 2'd3;

  always_ff @(posedge clk_i) begin
    tick <= tick + 1'b1;
    pipe_v <= {pipe_v[LAT-2:0], req_valid_i && req_ready_o};
    for (int i = LAT - 1; i > 0; i--) pipe_d[i] <= pipe_d[i-1];
    pipe_d[0] <= mem[req_addr_i[31:2] % WORDS];
    if (req_valid_i && req_ready_o && req_we_i) mem[req_addr_i[31:2] % WORDS] <= req_wdata_i;
  end
  assign rsp_valid_o = pipe_v[LAT-1];
  assign rsp_rdata_o = pipe_d[LAT-1];
endmodule
