// tb_eroc_slave_if: random bus requests from 10 master ids (two of them
// beyond the 8 masters) to data and configuration addresses, some into
// other masters' windows or unaligned. The testbench plays the controller:
// it checks each decoded command and answers after a random delay of 1-4
// cycles (done_i is only looked at from the cycle after cmd_valid_o).
// Refused requests must be answered with SLV_ERR without reaching the
// controller; others must return the controller's data and status; nothing
// is accepted before enable or while a request is in service.
module tb_eroc_slave_if;
  import eroc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic en = 1'b0, rv = 1'b0, rr, we = 1'b0, sv, serr;
  logic [3:0] mid = '0;
  logic [31:0] addr = '0, wd = '0, srd;
  logic cv;
  req_kind_e ck;
  logic [3:0] cmid;
  logic [7:0] clspm;
  logic [15:0] cwidx;
  logic [1:0] creg;
  logic [31:0] cwd;
  logic dn = 1'b0, derr = 1'b0;
  logic [31:0] drd = '0;
  int checks = 0, failures = 0, ncmd = 0, n_refused = 0;

  eroc_slave_if #(.NUM_MASTERS(8)) dut (
    .clk_i(clk), .rst_ni(rst_n), .enable_i(en),
    .req_valid_i(rv), .req_ready_o(rr), .req_mid_i(mid), .req_we_i(we), .req_addr_i(addr), .req_wdata_i(wd),
    .rsp_valid_o(sv), .rsp_rdata_o(srd), .rsp_err_o(serr),
    .cmd_valid_o(cv), .cmd_kind_o(ck), .cmd_mid_o(cmid), .cmd_lspm_o(clspm), .cmd_widx_o(cwidx),
    .cmd_reg_o(creg), .cmd_wdata_o(cwd), .done_i(dn), .done_err_i(derr), .done_rdata_i(drd));

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    rv = 1'b1;
    repeat (3) begin @(negedge clk); check(!rr, "not ready before enable"); end
    rv = 1'b0;
    en = 1'b1;
    for (int it = 0; it < 600; it++) begin
      bit cfg, refuse;
      int win, cyc;
      req_kind_e ek;
      logic [31:0] e_rd;
      bit e_err;
      @(negedge clk);
      mid = 4'($urandom_range(0, 9));
      we = $urandom_range(0, 1);
      wd = $urandom;
      cfg = $urandom_range(0, 1);
      if (cfg) begin
        win = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 15) : int'(mid);
        addr = 32'h8000_0000 | (32'(win) << 8) | (32'($urandom_range(0, 3)) << 2);
        refuse = win != int'(mid);
        ek = we ? K_CFG_WR : K_CFG_RD;
      end else begin
        addr = {8'h00, 8'($urandom_range(0, 20)), 16'($urandom)};
        if ($urandom_range(0, 1)) addr[1:0] = 2'b00;
        refuse = addr[1:0] != 0;
        ek = we ? K_DATA_WR : K_DATA_RD;
      end
      if (mid >= 8) refuse = 1;
      rv = 1'b1;
      while (!rr) @(negedge clk);
      @(negedge clk);
      rv = 1'b0;
      check(!rr, "busy after accept");
      cyc = 0;
      e_rd = 0; e_err = 1;
      while (!sv && cyc < 100) begin
        dn = 0;
        if (cv) begin
          ncmd++;
          check(!refuse, "refused request reached the controller");
          check(ck == ek && cmid == mid && cwd == wd, "decoded kind, master, data");
          if (!cfg) check(clspm == addr[23:16] && cwidx == 16'(addr[15:2]), "lspm and word index");
          else      check(creg == addr[3:2], "register");
          repeat ($urandom_range(1, 4)) begin @(negedge clk); check(!cv, "one cmd_valid pulse"); end
          dn = 1; derr = $urandom_range(0, 1); drd = $urandom;
          e_rd = drd; e_err = derr;
        end
        @(negedge clk);
        cyc++;
      end
      dn = 0;
      check(sv, "response given");
      check(serr == e_err && srd == e_rd, "response data and status");
      if (refuse) begin
        n_refused++;
        check(cyc == 1, "refusal answered one cycle after acceptance");
      end
    end
    check(ncmd > 100 && n_refused > 100, "both paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
