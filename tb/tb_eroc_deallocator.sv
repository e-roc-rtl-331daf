// tb_eroc_deallocator: random descriptors of each level are deleted with
// and without offload. The testbench plays iDMA and allocator: it checks
// that offload (when asked) comes first, that exactly the level's copies
// are freed with their DSPAM, base and size, that the right descriptor is
// invalidated last, and that an offload error is reported.
module tb_eroc_deallocator;
  import eroc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, offload = 1'b0, busy, done, err;
  eraid_desc_t desc;
  logic [7:0] idx = '0;
  logic dma_start, dma_done = 1'b0, dma_err = 1'b0;
  logic free_start, free_done = 1'b0;
  logic [3:0] free_dsp;
  logic [7:0] free_base, free_nblk, inv_idx;
  logic inv_en;
  int checks = 0, failures = 0;

  eroc_deallocator dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .desc_i(desc), .idx_i(idx), .offload_i(offload),
    .busy_o(busy), .done_o(done), .err_o(err),
    .dma_start_o(dma_start), .dma_done_i(dma_done), .dma_err_i(dma_err),
    .free_start_o(free_start), .free_dsp_o(free_dsp), .free_base_o(free_base), .free_nblk_o(free_nblk),
    .free_done_i(free_done), .inv_en_o(inv_en), .inv_idx_o(inv_idx));

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    desc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 200; it++) begin
      int nfree, ndma, ninv, cyc;
      bit e_err, inv_before_free, dma_after_free;
      eraid_desc_t d;
      @(negedge clk);
      d = eraid_desc_t'({$urandom, $urandom});
      d.valid = 1; d.level = level_e'($urandom_range(0, 2));
      desc = d; idx = 8'($urandom_range(0, 15)); offload = $urandom_range(0, 1);
      e_err = offload && $urandom_range(0, 1);
      start = 1'b1;
      nfree = 0; ndma = 0; ninv = 0; cyc = 0; inv_before_free = 0; dma_after_free = 0;
      #1 if (dma_start) ndma++;
      @(negedge clk);
      start = 1'b0;
      desc = '0;                         // the unit must have kept its own copy
      begin
        bit pend_free, dma_given;
        int dma_wait;
        pend_free = 0; dma_given = 0; dma_wait = 0;
        while (!done && cyc < 500) begin
          dma_done = 0; dma_err = 0; free_done = 0;
          if (dma_start) ndma++;   // must not repeat
          if (ndma > 0 && !dma_given && ++dma_wait == 4) begin
            check(nfree == 0, "offload before any free");
            dma_done = 1; dma_err = e_err; dma_given = 1;
          end
          if (free_start) begin
            check(nfree < 3 && free_dsp == d.dsp[nfree] && free_base == d.base[nfree] && free_nblk == d.nblk,
                  $sformatf("free copy %0d", nfree));
            if (ninv > 0) inv_before_free = 1;
            nfree++;
            pend_free = 1;
          end else if (pend_free) begin
            free_done = 1;
            pend_free = 0;
          end
          if (inv_en) begin
            ninv++;
            check(inv_idx == idx, "invalidate index");
          end
          @(negedge clk);
          cyc++;
        end
        check(ndma == (offload ? 1 : 0), "offload only when asked");
      end
      check(done, "done");
      check(err == e_err, "offload error reported");
      check(nfree == int'(ncopies(d.level)), $sformatf("%0d regions freed for level %0d", nfree, d.level));
      check(ninv == 1 && !inv_before_free, "one invalidate, after the frees");
      @(negedge clk);
      dma_done = 0; free_done = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
