// tb_eroc_config_mem: random descriptor writes and invalidates against a
// shadow table; reads must match, out-of-range indices read invalid, the
// free-slot finder must name the lowest invalid entry; per-master MEMADDR
// RESULT and ACLHI registers must keep their own values.
module tb_eroc_config_mem;
  import eroc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [7:0] rd_idx = '0, wr_idx = '0, inv_idx = '0, free_idx;
  eraid_desc_t rd_desc, wr_desc;
  logic wr_en = 1'b0, inv_en = 1'b0, free_found;
  logic [3:0] mid = '0;
  logic [1:0] sel = '0;
  logic [31:0] reg_rdata, memaddr, mwd = '0, rwd = '0;
  logic mwe = 1'b0, rwe = 1'b0, awe = 1'b0;
  logic [7:0] aclhi, awd = '0;
  int checks = 0, failures = 0;
  eraid_desc_t model [16];
  logic [31:0] m_mem [8], m_res [8];
  logic [7:0]  m_ahi [8];

  eroc_config_mem #(.NUM_MASTERS(8), .NUM_ERAID(16)) dut (
    .clk_i(clk), .rst_ni(rst_n), .rd_idx_i(rd_idx), .rd_desc_o(rd_desc),
    .wr_en_i(wr_en), .wr_idx_i(wr_idx), .wr_desc_i(wr_desc), .inv_en_i(inv_en), .inv_idx_i(inv_idx),
    .free_found_o(free_found), .free_idx_o(free_idx),
    .reg_mid_i(mid), .reg_sel_i(sel), .reg_rdata_o(reg_rdata), .memaddr_o(memaddr),
    .memaddr_we_i(mwe), .memaddr_wdata_i(mwd), .result_we_i(rwe), .result_wdata_i(rwd),
    .aclhi_o(aclhi), .aclhi_we_i(awe), .aclhi_wdata_i(awd));

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    wr_desc = '0;
    for (int i = 0; i < 16; i++) model[i] = '0;
    for (int m = 0; m < 8; m++) begin m_mem[m] = 0; m_res[m] = 0; m_ahi[m] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 1500; it++) begin
      int ef;
      @(negedge clk);
      wr_en = $urandom_range(0, 2) == 0;
      wr_idx = 8'($urandom_range(0, 17));
      wr_desc = eraid_desc_t'({$urandom, $urandom, $urandom});
      wr_desc.valid = 1'b1;
      inv_en = $urandom_range(0, 3) == 0;
      inv_idx = 8'($urandom_range(0, 15));
      mid = 4'($urandom_range(0, 7));
      mwe = $urandom_range(0, 3) == 0; mwd = $urandom;
      rwe = $urandom_range(0, 3) == 0; rwd = $urandom;
      awe = $urandom_range(0, 3) == 0; awd = 8'($urandom);
      @(posedge clk);
      if (wr_en && wr_idx < 16) model[wr_idx] = wr_desc;
      if (inv_en) model[inv_idx].valid = 1'b0;
      if (mwe) m_mem[mid] = mwd;
      if (rwe) m_res[mid] = rwd;
      if (awe) m_ahi[mid] = awd;
      #1;
      wr_en = 0; inv_en = 0; mwe = 0; rwe = 0; awe = 0;
      rd_idx = 8'($urandom_range(0, 19));
      sel = 2'($urandom_range(0, 3));
      mid = 4'($urandom_range(0, 7));
      #1;
      check(rd_desc == ((rd_idx < 16) ? model[rd_idx] : '0), $sformatf("descriptor %0d", rd_idx));
      ef = -1;
      for (int i = 15; i >= 0; i--) if (!model[i].valid) ef = i;
      check(free_found == (ef >= 0) && (ef < 0 || free_idx == 8'(ef)), "free slot");
      check(memaddr == m_mem[mid], "memaddr");
      check(aclhi == m_ahi[mid], "aclhi");
      check(reg_rdata == ((sel == REG_MEMADDR) ? m_mem[mid] : (sel == REG_RESULT) ? m_res[mid] :
                          (sel == REG_ACLHI) ? 32'(m_ahi[mid]) : 32'd0), "register read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
