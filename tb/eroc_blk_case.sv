// eroc_blk_case: one test case of tb_eroc_block_sizes. A manager with two
// masters and two 4KB DSPAMs allocating in blocks of K bytes (K/4 words),
// driven through its bus port. It checks that region sizes, the range check
// and block placement scale with K, and raises done_o with its counts.
module eroc_blk_case
  import eroc_pkg::*;
#(
  parameter int K = 64
) (
  input  logic clk_i,
  output int   checks_o,
  output int   failures_o,
  output logic done_o
);
  localparam int WPB = K / 4, NBLK = 4096 / K;

  logic rst_n = 1'b0, init_done;
  logic req_valid = 1'b0, req_ready, req_we = 1'b0, rsp_valid, rsp_err;
  logic [3:0]  req_mid = '0;
  logic [31:0] req_addr = '0, req_wdata = '0, rsp_rdata;
  dspam_req_t [1:0]         dreq;
  logic [1:0][DATA_W-1:0]   drdata;

  eroc_manager #(.NUM_MASTERS(2), .NUM_DSPAM(2), .DSPAM_WORDS(1024), .BLOCK_BYTES(K), .NUM_ERAID(4)) dut (
    .clk_i, .rst_ni (rst_n), .prime_seed_i (32'(K) * 32'h0101_0101 + 1), .init_done_o (init_done),
    .dspam_retired_i ('0),
    .req_valid_i (req_valid), .req_ready_o (req_ready), .req_mid_i (req_mid), .req_we_i (req_we),
    .req_addr_i (req_addr), .req_wdata_i (req_wdata),
    .rsp_valid_o (rsp_valid), .rsp_rdata_o (rsp_rdata), .rsp_err_o (rsp_err),
    .dsp_req_o (dreq), .dsp_rdata_i (drdata),
    .mem_req_valid_o (), .mem_req_ready_i (1'b1), .mem_req_we_o (), .mem_req_addr_o (), .mem_req_wdata_o (),
    .mem_rsp_valid_i (1'b0), .mem_rsp_rdata_i ('0)
  );
  eroc_dspam_bank #(.N(2), .WORDS(1024)) u_bank (.clk_i, .req_i (dreq), .rdata_o (drdata));

  int checks = 0, failures = 0;
  assign checks_o = checks;
  assign failures_o = failures;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL (K=%0d): %s", K, s); end
  endtask

  logic [31:0] rd;
  bit er;
  task automatic bus(input int mid, input bit we, input logic [31:0] addr, input logic [31:0] wdata);
    @(negedge clk_i);
    req_valid = 1'b1; req_mid = 4'(mid); req_we = we; req_addr = addr; req_wdata = wdata;
    while (!req_ready) @(negedge clk_i);
    @(posedge clk_i);
    #1 req_valid = 1'b0;
    while (!rsp_valid) begin @(posedge clk_i); #1; end
    rd = rsp_rdata; er = rsp_err;
  endtask
  function automatic logic [31:0] cmd(input level_e lv, input int nblk);
    cfg_cmd_t c;
    c = '0; c.op = OP_CREATE; c.level = lv; c.nblk = 8'(nblk);
    return c;
  endfunction
  localparam logic [31:0] CMD0 = 32'h8000_0004, CMD1 = 32'h8000_0104;

  initial begin
    done_o = 1'b0;
    repeat (3) @(posedge clk_i);
    rst_n = 1'b1;
    while (!init_done) @(posedge clk_i);
    // E-RAID 1 of 3 blocks: 3*K/4 words, copies in DSPAMs 0 and 1 at block 0
    bus(0, 1, CMD0, cmd(LVL_RAID1, 3));
    check(!er && rd == 0, "E-RAID 1 of 3 blocks created");
    bus(0, 1, {16'h0000, 16'((3 * WPB - 1) * 4)}, 32'hA5A5_0000 + K);
    check(!er, "last word of the region writable");
    check(u_bank.mem[0][3 * WPB - 1] == 32'hA5A5_0000 + K && u_bank.mem[1][3 * WPB - 1] == 32'hA5A5_0000 + K,
          "copies at block 0 of DSPAMs 0 and 1");
    bus(0, 0, {16'h0000, 16'(3 * WPB * 4)}, 0);
    check(er, "first word past the region refused");
    // E-RAID 1+P of 2 blocks: x, y after the first region, parity shares DSPAM 0
    bus(1, 1, CMD1, cmd(LVL_RAID1P, 2));
    check(!er && rd == 1, "E-RAID 1+P of 2 blocks created");
    bus(1, 1, {16'h0001, 16'(WPB * 4)}, 32'h0F0F_1234);
    check(u_bank.mem[0][3 * WPB + WPB] == 32'h0F0F_1234 && u_bank.mem[1][3 * WPB + WPB] == 32'h0F0F_1234,
          "copies x, y at block 3");
    check(u_bank.mem[0][5 * WPB + WPB] == (32'h0F0F_1234 ^ dut.prime_r), "parity at block 5 of DSPAM 0");
    bus(1, 0, {16'h0001, 16'(WPB * 4)}, 0);
    check(!er && rd == 32'h0F0F_1234, "read back");
    // size limits: one DSPAM is NBLK blocks
    bus(0, 1, CMD0, cmd(LVL_NONE, NBLK + 1));
    check(er, "region larger than a DSPAM refused");
    bus(0, 1, CMD0, cmd(LVL_NONE, NBLK - 6));
    check(!er, "NO E-RAID filling the rest of DSPAM 1");
    done_o = 1'b1;
  end
endmodule
