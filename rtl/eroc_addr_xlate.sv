// eroc_addr_xlate: back-end address translation of the E-RoC manager.
//
// Masters address a logical SPM by word index; the E-RAID behind it keeps
// each copy (x, y and, for E-RAID 1+P, the parity copy) as one contiguous
// run of allocation blocks inside one DSPAM. The physical word of copy c is
// base[c] * (BLOCK_BYTES/4) + widx in DSPAM dsp[c]. Combinational.
//
// Translation from a virtual to a physical DSPAM location is part of the
// E-RoC scheme; the contiguous-run layout that makes it a multiply-add is
// this design's choice.
module eroc_addr_xlate
  import eroc_pkg::*;
#(
  parameter int BLOCK_BYTES = 64
) (
  input  eraid_desc_t             desc_i,
  input  logic [WADDR_W-1:0]      widx_i,
  output phys_addr_t [NCOPY-1:0]  pa_o
);

  localparam int WPB = BLOCK_BYTES / (DATA_W / 8);  // words per block

  always_comb begin
    for (int c = 0; c < NCOPY; c++) begin
      pa_o[c].dsp  = desc_i.dsp[c];
      pa_o[c].addr = WADDR_W'(desc_i.base[c]) * WADDR_W'(WPB) + widx_i;
    end
  end

endmodule
