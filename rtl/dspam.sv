// dspam: Dynamic Scratch Pad Allocatable Memory.
//
// A DSPAM is a plain on-chip SRAM that only the E-RoC manager reads and
// writes; its space is handed out to E-RAID systems in blocks. This model is
// a single-port synchronous RAM of WORDS 32-bit words (default 1024 words =
// 4KB, the size used for the evaluated platform).
//
// Interface: req (struct with req/we/addr/wdata) sampled on the rising edge;
// a read returns the word on rdata in the next cycle and holds it until the
// next read. A write does not change rdata.
//
// The DSPAMs are meant to run at an aggressively scaled supply; the errors
// that causes are not modelled here (testbenches flip stored bits instead).
// Latency and port count are this design's choice. No reset: contents are
// undefined until written, as in an SRAM.
module dspam
  import eroc_pkg::*;
#(
  parameter int WORDS = 1024
) (
  input  logic              clk_i,
  input  dspam_req_t        req_i,
  output logic [DATA_W-1:0] rdata_o
);

  localparam int AW = $clog2(WORDS);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk_i) begin
    if (req_i.req) begin
      if (req_i.we) mem[req_i.addr[AW-1:0]] <= req_i.wdata;
      else          rdata_o <= mem[req_i.addr[AW-1:0]];
    end
  end

endmodule
