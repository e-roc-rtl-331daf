// tb_eroc_addr_xlate: random descriptors and word indices; each copy's
// physical address must be base * 16 + index in the copy's DSPAM.
module tb_eroc_addr_xlate;
  import eroc_pkg::*;
  eraid_desc_t desc;
  logic [15:0] widx;
  phys_addr_t [2:0] pa;
  int checks = 0, failures = 0;

  eroc_addr_xlate #(.BLOCK_BYTES(64)) dut (.desc_i(desc), .widx_i(widx), .pa_o(pa));

  initial begin
    for (int i = 0; i < 500; i++) begin
      desc = eraid_desc_t'({$urandom, $urandom});
      for (int c = 0; c < 3; c++) desc.base[c] = 8'($urandom_range(0, 63));
      widx = 16'($urandom_range(0, 1023));
      #1;
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (pa[c].dsp != desc.dsp[c] || 32'(pa[c].addr) != 32'(desc.base[c]) * 16 + 32'(widx)) begin
          failures++; $display("FAIL: copy %0d", c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
