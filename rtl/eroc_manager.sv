// eroc_manager: the E-RoC manager, which builds reliable "logical SPMs" out
// of unreliable, aggressively voltage-scaled DSPAMs.
//
// A master creates an E-RAID system of a chosen level and size by a
// configuration command; the manager allocates blocks for every copy across
// its DSPAMs, records the E-RAID in its configuration memory and (if asked)
// fills it from main memory with its internal DMA. The master then reads and
// writes the E-RAID as a plain memory-mapped scratch pad: the manager writes
// every copy (and the parity word A ^ R for E-RAID 1+P) in parallel and, on a
// read, compares the copies, uses the parity to pick the good copy, or
// answers SLV_ERR so the master refetches from main memory. A delete command
// (owner only) optionally offloads the E-RAID to main memory and frees its
// blocks.
//
// Inside (all one request at a time):
//   eroc_slave_if     bus port, address decode, per-master config windows
//   eroc_config_mem   E-RAID descriptors and per-master registers
//   eroc_acl          owner / ACL / range checks
//   eroc_allocator    next-fit block allocation, round robin over DSPAMs
//   eroc_deallocator  offload, free, invalidate
//   eroc_idma         main memory <-> E-RAID word copy
//   eroc_raid_read / eroc_raid_write   the E-RAID level policies
//   eroc_slv_rd / eroc_slv_wr / eroc_master_if   DSPAM access
//   eroc_prime_gen    random prime R, drawn after reset
// Requests are refused (req_ready_o low) until R exists (init_done_o).
//
// Retired DSPAMs (dspam_retired_i, e.g. found unusable) get no new regions,
// and every copy that already lies in one is moved in the background while
// no bus request is open: a new region is allocated for that copy alone,
// the words are copied (checked through x/y/parity for E-RAID 1+P), the
// descriptor is updated and the old region freed. Bus requests wait
// (req_ready_o low) while one copy is being moved.
//
// Configuration command (write to the CMD register of the master's own
// window, see eroc_pkg::cfg_cmd_t): CREATE with level, size in blocks, ACL
// mask of masters 0-7 (masters 8-15 come from the ACLHI register) and dma
// (fill from MEMADDR) answers with the new E-RAID index in
// rsp_rdata_o, or SLV_ERR when no descriptor or no DSPAM space is left;
// DELETE with the E-RAID index and dma (offload to MEMADDR).
//
// Timing, counted from the accepting clock edge to the edge that raises
// rsp_valid_o, copies in different DSPAMs: refused request or register
// access 3 cycles, data write 3 cycles, NO E-RAID /
// E-RAID 1 read 5 cycles, E-RAID 1+P read that needs the parity word 8
// cycles. Copies that share a DSPAM add one cycle per extra access to it.
// DSPAM_BUS = 1 models the platform where the DSPAMs sit on one dedicated
// DSPAM bus: every DSPAM access then takes its own cycle, so a step with
// n accesses costs n - 1 extra cycles (E-RAID 1 write 4, read 6; E-RAID
// 1+P write 5, clean read 6, parity read 9). DSPAM_BUS = 0 (default) is
// the stand-alone manager with a point-to-point link to each DSPAM.
//
// The block structure follows the E-RoC manager architecture (slave IF,
// E-RAID read/write, configuration memory, allocator, de-allocator, iDMA,
// SLV RD/WR, master IF), as does removing unusable DSPAMs with background
// re-mapping. Encodings, handshakes, timing and the re-mapping procedure
// (one copy at a time, traffic held off meanwhile) are this design's.
module eroc_manager
  import eroc_pkg::*;
#(
  parameter int NUM_MASTERS = 8,
  parameter int NUM_DSPAM   = 8,
  parameter int DSPAM_WORDS = 1024,
  parameter int BLOCK_BYTES = 64,
  parameter int NUM_ERAID   = 16,
  parameter bit DSPAM_BUS   = 1'b0
) (
  input  logic                              clk_i,
  input  logic                              rst_ni,
  input  logic [DATA_W-1:0]                 prime_seed_i,
  output logic                              init_done_o,
  input  logic [NUM_DSPAM-1:0]              dspam_retired_i,
  // bus slave port
  input  logic                              req_valid_i,
  output logic                              req_ready_o,
  input  logic [MID_W-1:0]                  req_mid_i,
  input  logic                              req_we_i,
  input  logic [31:0]                       req_addr_i,
  input  logic [DATA_W-1:0]                 req_wdata_i,
  output logic                              rsp_valid_o,
  output logic [DATA_W-1:0]                 rsp_rdata_o,
  output logic                              rsp_err_o,
  // DSPAM ports
  output dspam_req_t [NUM_DSPAM-1:0]        dsp_req_o,
  input  logic [NUM_DSPAM-1:0][DATA_W-1:0]  dsp_rdata_i,
  // main memory port (iDMA)
  output logic                              mem_req_valid_o,
  input  logic                              mem_req_ready_i,
  output logic                              mem_req_we_o,
  output logic [31:0]                       mem_req_addr_o,
  output logic [DATA_W-1:0]                 mem_req_wdata_o,
  input  logic                              mem_rsp_valid_i,
  input  logic [DATA_W-1:0]                 mem_rsp_rdata_i
);

  localparam int WPB  = BLOCK_BYTES / (DATA_W / 8);
  localparam int NBLK = DSPAM_WORDS / WPB;

  // ---------------------------------------------------------------- prime R
  logic              prime_done;
  logic [DATA_W-1:0] prime_r;

  eroc_prime_gen u_prime (
    .clk_i, .rst_ni,
    .seed_i  (prime_seed_i),
    .done_o  (prime_done),
    .prime_o (prime_r)
  );
  assign init_done_o = prime_done;

  // background re-mapping (see below)
  logic                 rm_active, rm_go, rm_found, rm_free, req_open_q, rm_hold_q;
  logic [1:0]           rm_copy, rm_copy_q, rm_src, rm_src_q;
  logic [NUM_DSPAM-1:0] rm_avoid, retired_q;
  logic [DSP_ID_W-1:0]  rm_dsp_q;
  logic [BLK_W-1:0]     rm_base_q;
  logic [WADDR_W-1:0]   rm_w_q;
  logic [DATA_W-1:0]    rm_data_q;
  logic [NCOPY-1:0]     in_retired;

  // ---------------------------------------------------------------- slave IF
  logic               cmd_valid;
  req_kind_e          cmd_kind;
  logic [MID_W-1:0]   cmd_mid;
  logic [IDX_W-1:0]   cmd_lspm;
  logic [WADDR_W-1:0] cmd_widx;
  logic [1:0]         cmd_reg;
  logic [DATA_W-1:0]  cmd_wdata;
  logic               done_q, done_err_q;
  logic [DATA_W-1:0]  done_rdata_q;

  eroc_slave_if #(.NUM_MASTERS(NUM_MASTERS)) u_sif (
    .clk_i, .rst_ni,
    .enable_i     (prime_done && !rm_active),
    .req_valid_i, .req_ready_o, .req_mid_i, .req_we_i, .req_addr_i, .req_wdata_i,
    .rsp_valid_o, .rsp_rdata_o, .rsp_err_o,
    .cmd_valid_o  (cmd_valid),
    .cmd_kind_o   (cmd_kind),
    .cmd_mid_o    (cmd_mid),
    .cmd_lspm_o   (cmd_lspm),
    .cmd_widx_o   (cmd_widx),
    .cmd_reg_o    (cmd_reg),
    .cmd_wdata_o  (cmd_wdata),
    .done_i       (done_q),
    .done_err_i   (done_err_q),
    .done_rdata_i (done_rdata_q)
  );

  cfg_cmd_t ccmd;
  assign ccmd = cfg_cmd_t'(cmd_wdata);

  // ---------------------------------------------------------------- controller state
  typedef enum logic [3:0] {
    S_IDLE, S_RD, S_WR, S_ALLOC, S_LOAD_START, S_LOAD, S_DEL, S_DONE,
    S_RM_ALLOC, S_RM_RD, S_RM_RWAIT, S_RM_WR, S_RM_WWAIT, S_RM_FIN, S_RM_FREE
  } state_e;

  state_e            state_q;
  logic [IDX_W-1:0]  idx_q;
  logic              is_cmd;
  assign is_cmd = cmd_kind == K_CFG_WR && cmd_reg == REG_CMD;

  // ---------------------------------------------------------------- configuration memory
  logic [IDX_W-1:0]  cfg_rd_idx;
  eraid_desc_t       desc;
  logic              desc_we;
  eraid_desc_t       desc_new;
  logic              inv_en;
  logic [IDX_W-1:0]  inv_idx;
  logic              free_found;
  logic [IDX_W-1:0]  free_idx;
  logic [DATA_W-1:0] reg_rdata, memaddr;
  logic              memaddr_we, result_we, aclhi_we;
  logic [ACL_LO_W-1:0] aclhi;
  logic [DATA_W-1:0] result_wdata;

  // while idle with no command, the read port scans the descriptors for copies
  // that sit in a retired DSPAM (background re-mapping, see below)
  logic [IDX_W-1:0]  scan_q;
  assign cfg_rd_idx = (state_q != S_IDLE) ? idx_q :
                      cmd_valid ? (is_cmd ? ccmd.lspm : cmd_lspm) : scan_q;

  eroc_config_mem #(.NUM_MASTERS(NUM_MASTERS), .NUM_ERAID(NUM_ERAID)) u_cfg (
    .clk_i, .rst_ni,
    .rd_idx_i        (cfg_rd_idx),
    .rd_desc_o       (desc),
    .wr_en_i         (desc_we),
    .wr_idx_i        (idx_q),
    .wr_desc_i       (desc_new),
    .inv_en_i        (inv_en),
    .inv_idx_i       (inv_idx),
    .free_found_o    (free_found),
    .free_idx_o      (free_idx),
    .reg_mid_i       (cmd_mid),
    .reg_sel_i       (cmd_reg),
    .reg_rdata_o     (reg_rdata),
    .memaddr_o       (memaddr),
    .memaddr_we_i    (memaddr_we),
    .memaddr_wdata_i (cmd_wdata),
    .result_we_i     (result_we),
    .result_wdata_i  (result_wdata),
    .aclhi_o         (aclhi),
    .aclhi_we_i      (aclhi_we),
    .aclhi_wdata_i   (cmd_wdata[ACL_LO_W-1:0])
  );

  // ---------------------------------------------------------------- ACL
  logic access_ok, owner_ok;

  eroc_acl #(.NUM_MASTERS(NUM_MASTERS), .BLOCK_BYTES(BLOCK_BYTES)) u_acl (
    .desc_i      (desc),
    .mid_i       (cmd_mid),
    .widx_i      (cmd_widx),
    .access_ok_o (access_ok),
    .owner_ok_o  (owner_ok)
  );

  // ---------------------------------------------------------------- allocator
  logic                           alloc_start, alloc_done, alloc_ok, alloc_busy;
  logic [NCOPY-1:0][DSP_ID_W-1:0] alloc_dsp;
  logic [NCOPY-1:0][BLK_W-1:0]    alloc_base;
  logic                           free_start, free_done;
  logic [DSP_ID_W-1:0]            free_dsp;
  logic [BLK_W-1:0]               free_base, free_nblk;

  eroc_allocator #(.NUM_DSPAM(NUM_DSPAM), .DSPAM_WORDS(DSPAM_WORDS), .BLOCK_BYTES(BLOCK_BYTES)) u_alloc (
    .clk_i, .rst_ni,
    .retired_i       (dspam_retired_i),
    .alloc_start_i   (alloc_start),
    .alloc_ncopies_i (rm_go ? 2'd1 : ncopies(ccmd.level)),
    .alloc_nblk_i    (rm_go ? desc.nblk : ccmd.nblk),
    .alloc_avoid_i   (rm_go ? rm_avoid : '0),
    .alloc_done_o    (alloc_done),
    .alloc_ok_o      (alloc_ok),
    .alloc_dsp_o     (alloc_dsp),
    .alloc_base_o    (alloc_base),
    .free_start_i    (free_start | rm_free),
    .free_dsp_i      (rm_free ? desc.dsp[rm_copy_q] : free_dsp),
    .free_base_i     (rm_free ? desc.base[rm_copy_q] : free_base),
    .free_nblk_i     (rm_free ? desc.nblk : free_nblk),
    .free_done_o     (free_done),
    .busy_o          (alloc_busy)
  );

  // ---------------------------------------------------------------- iDMA and de-allocator
  logic               dma_start, dma_load, dma_done, dma_err, dma_busy;
  logic               dma_rd_start, dma_wr_start;
  logic [WADDR_W-1:0] dma_widx;
  logic [DATA_W-1:0]  dma_wdata;
  logic               ctrl_load_start, del_dma_start;
  logic               del_start, del_done, del_err, del_busy;

  logic               rd_start, rd_done, rd_err, rd_corrected, rd_busy;
  logic [DATA_W-1:0]  rd_rdata;
  logic               wr_start, wr_done, wr_busy;
  logic               ctrl_rd_start, ctrl_wr_start;

  assign dma_start = ctrl_load_start | del_dma_start;
  assign dma_load  = ctrl_load_start;

  eroc_idma u_idma (
    .clk_i, .rst_ni,
    .start_i         (dma_start),
    .load_i          (dma_load),
    .nwords_i        ((WADDR_W+1)'(32'(desc.nblk) * WPB)),
    .mem_base_i      (memaddr),
    .busy_o          (dma_busy),
    .done_o          (dma_done),
    .err_o           (dma_err),
    .eng_rd_start_o  (dma_rd_start),
    .eng_wr_start_o  (dma_wr_start),
    .eng_widx_o      (dma_widx),
    .eng_wdata_o     (dma_wdata),
    .eng_rd_done_i   (rd_done),
    .eng_rd_err_i    (rd_err),
    .eng_rdata_i     (rd_rdata),
    .eng_wr_done_i   (wr_done),
    .mem_req_valid_o, .mem_req_ready_i, .mem_req_we_o, .mem_req_addr_o,
    .mem_req_wdata_o, .mem_rsp_valid_i, .mem_rsp_rdata_i
  );

  eroc_deallocator u_dealloc (
    .clk_i, .rst_ni,
    .start_i      (del_start),
    .desc_i       (desc),
    .idx_i        (ccmd.lspm),
    .offload_i    (ccmd.dma),
    .busy_o       (del_busy),
    .done_o       (del_done),
    .err_o        (del_err),
    .dma_start_o  (del_dma_start),
    .dma_done_i   (dma_done),
    .dma_err_i    (dma_err),
    .free_start_o (free_start),
    .free_dsp_o   (free_dsp),
    .free_base_o  (free_base),
    .free_nblk_o  (free_nblk),
    .free_done_i  (free_done),
    .inv_en_o     (inv_en),
    .inv_idx_o    (inv_idx)
  );

  // ---------------------------------------------------------------- E-RAID engines
  logic [WADDR_W-1:0] eng_widx;
  assign eng_widx = dma_busy ? dma_widx : rm_active ? rm_w_q : cmd_widx;
  assign rd_start = ctrl_rd_start | dma_rd_start | (state_q == S_RM_RD);
  assign wr_start = ctrl_wr_start | dma_wr_start | (state_q == S_RM_WR);

  // while a copy is moved, the engines see a one-copy (NO E-RAID) view: the
  // source copy for reads, the new region for writes.
  eraid_desc_t eng_desc;
  always_comb begin
    eng_desc = desc;
    // E-RAID 1+P words are read through the full check (x, y and parity;
    // the retired DSPAM is still read); other levels from the healthy copy
    if (rm_active && !(desc.level == LVL_RAID1P && (state_q == S_RM_RD || state_q == S_RM_RWAIT))) begin
      eng_desc.level   = LVL_NONE;
      eng_desc.dsp[0]  = (state_q == S_RM_RD || state_q == S_RM_RWAIT) ? desc.dsp[rm_src_q]  : rm_dsp_q;
      eng_desc.base[0] = (state_q == S_RM_RD || state_q == S_RM_RWAIT) ? desc.base[rm_src_q] : rm_base_q;
    end
  end

  logic                          srd_start, srd_done, srd_busy;
  logic [NCOPY-1:0]              srd_mask;
  phys_addr_t [NCOPY-1:0]        srd_pa;
  logic [NCOPY-1:0][DATA_W-1:0]  srd_data;
  logic                          swr_start, swr_done, swr_busy;
  logic [NCOPY-1:0]              swr_mask;
  phys_addr_t [NCOPY-1:0]        swr_pa;
  logic [NCOPY-1:0][DATA_W-1:0]  swr_data;

  eroc_raid_read #(.BLOCK_BYTES(BLOCK_BYTES)) u_rd (
    .clk_i, .rst_ni,
    .start_i     (rd_start),
    .desc_i      (eng_desc),
    .widx_i      (eng_widx),
    .prime_i     (prime_r),
    .busy_o      (rd_busy),
    .done_o      (rd_done),
    .rdata_o     (rd_rdata),
    .err_o       (rd_err),
    .corrected_o (rd_corrected),
    .rd_start_o  (srd_start),
    .rd_mask_o   (srd_mask),
    .rd_pa_o     (srd_pa),
    .rd_done_i   (srd_done),
    .rd_data_i   (srd_data)
  );

  eroc_raid_write #(.BLOCK_BYTES(BLOCK_BYTES)) u_wr (
    .clk_i, .rst_ni,
    .start_i    (wr_start),
    .desc_i     (eng_desc),
    .widx_i     (eng_widx),
    .wdata_i    (dma_busy ? dma_wdata : rm_active ? rm_data_q : cmd_wdata),
    .prime_i    (prime_r),
    .busy_o     (wr_busy),
    .done_o     (wr_done),
    .wr_start_o (swr_start),
    .wr_mask_o  (swr_mask),
    .wr_pa_o    (swr_pa),
    .wr_data_o  (swr_data),
    .wr_done_i  (swr_done)
  );

  // ---------------------------------------------------------------- DSPAM access
  dspam_req_t [NUM_DSPAM-1:0]        srd_req, swr_req;
  logic [NUM_DSPAM-1:0][DATA_W-1:0]  srd_rdata;

  eroc_slv_rd #(.NUM_DSPAM(NUM_DSPAM), .DSPAM_BUS(DSPAM_BUS)) u_slv_rd (
    .clk_i, .rst_ni,
    .start_i    (srd_start),
    .mask_i     (srd_mask),
    .pa_i       (srd_pa),
    .busy_o     (srd_busy),
    .done_o     (srd_done),
    .data_o     (srd_data),
    .rd_req_o   (srd_req),
    .rd_rdata_i (srd_rdata)
  );

  eroc_slv_wr #(.NUM_DSPAM(NUM_DSPAM), .DSPAM_BUS(DSPAM_BUS)) u_slv_wr (
    .clk_i, .rst_ni,
    .start_i  (swr_start),
    .mask_i   (swr_mask),
    .pa_i     (swr_pa),
    .data_i   (swr_data),
    .busy_o   (swr_busy),
    .done_o   (swr_done),
    .wr_req_o (swr_req)
  );

  eroc_master_if #(.NUM_DSPAM(NUM_DSPAM)) u_mif (
    .clk_i, .rst_ni,
    .rd_req_i    (srd_req),
    .wr_req_i    (swr_req),
    .rd_rdata_o  (srd_rdata),
    .dsp_req_o   (dsp_req_o),
    .dsp_rdata_i (dsp_rdata_i)
  );

  // ---------------------------------------------------------------- controller
  logic level_ok, size_ok;
  assign level_ok = ccmd.level != 2'd3;
  assign size_ok  = ccmd.nblk != '0 && 32'(ccmd.nblk) <= NBLK;

  always_comb begin
    ctrl_rd_start   = 1'b0;
    ctrl_wr_start   = 1'b0;
    ctrl_load_start = state_q == S_LOAD_START;
    alloc_start     = 1'b0;
    del_start       = 1'b0;
    memaddr_we      = 1'b0;
    aclhi_we        = 1'b0;
    desc_we         = 1'b0;
    desc_new        = '0;
    desc_new.valid  = 1'b1;
    desc_new.level  = ccmd.level;
    desc_new.owner  = cmd_mid;
    desc_new.acl    = {aclhi, ccmd.acl} | ACL_W'(1 << cmd_mid);
    desc_new.nblk   = ccmd.nblk;
    desc_new.dsp    = alloc_dsp;
    desc_new.base   = alloc_base;
    if (state_q == S_IDLE && cmd_valid) begin
      case (cmd_kind)
        K_DATA_RD: ctrl_rd_start = access_ok;
        K_DATA_WR: ctrl_wr_start = access_ok;
        K_CFG_WR: begin
          if (cmd_reg == REG_MEMADDR) memaddr_we = 1'b1;
          if (cmd_reg == REG_ACLHI)   aclhi_we   = 1'b1;
          if (is_cmd && ccmd.op == OP_CREATE) alloc_start = free_found && level_ok && size_ok;
          if (is_cmd && ccmd.op == OP_DELETE) del_start   = owner_ok;
        end
        default: ;
      endcase
    end
    if (state_q == S_ALLOC && alloc_done && alloc_ok) desc_we = 1'b1;
    if (rm_go) alloc_start = 1'b1;
    if (state_q == S_RM_FIN) begin
      desc_we                = 1'b1;
      desc_new               = desc;
      desc_new.dsp[rm_copy_q]  = rm_dsp_q;
      desc_new.base[rm_copy_q] = rm_base_q;
    end
  end

  // a finished configuration command leaves its outcome in RESULT
  logic cmd_fin, cmd_fin_err;
  always_comb begin
    cmd_fin     = 1'b0;
    cmd_fin_err = 1'b0;
    case (state_q)
      S_IDLE:  if (cmd_valid && is_cmd && !alloc_start && !del_start) begin
                 cmd_fin = 1'b1; cmd_fin_err = 1'b1;
               end
      S_ALLOC: if (alloc_done && !(alloc_ok && ccmd.dma)) begin
                 cmd_fin = 1'b1; cmd_fin_err = !alloc_ok;
               end
      S_LOAD:  if (dma_done) cmd_fin = 1'b1;
      S_DEL:   if (del_done) begin cmd_fin = 1'b1; cmd_fin_err = del_err; end
      default: ;
    endcase
  end
  assign result_we    = cmd_fin;
  assign result_wdata = {cmd_fin_err, 23'b0, (state_q == S_IDLE) ? ccmd.lspm : idx_q};

  // ---------------------------------------------------------------- background re-mapping
  // A copy of a live E-RAID that lies in a retired DSPAM is moved, one copy
  // at a time, while no bus request is open: a new region is allocated
  // (avoiding the DSPAMs of the E-RAID's other copies), every word is read
  // (E-RAID 1+P: with the full x/y/parity check; otherwise from a healthy
  // copy, x or y, or the copy itself if no other exists) and written to the
  // new region (as A ^ R for the parity copy), then the
  // descriptor is updated and the old region freed. If no region can be
  // found, re-mapping waits until the retired mask changes or a delete
  // frees space.

  assign rm_active = state_q inside {S_RM_ALLOC, S_RM_RD, S_RM_RWAIT, S_RM_WR, S_RM_WWAIT, S_RM_FIN, S_RM_FREE};
  assign rm_free   = state_q == S_RM_FIN;

  always_comb begin
    in_retired = '0;
    rm_avoid   = '0;
    for (int c = 0; c < NCOPY; c++)
      for (int d = 0; d < NUM_DSPAM; d++)
        if (32'(c) < 32'(ncopies(desc.level)) && desc.dsp[c] == DSP_ID_W'(d)) begin
          if (dspam_retired_i[d]) in_retired[c] = 1'b1;
          rm_avoid[d] = 1'b1;
        end
    rm_found = desc.valid && in_retired != '0;
    rm_copy  = in_retired[0] ? 2'd0 : in_retired[1] ? 2'd1 : 2'd2;
    // source of the data: the other data copy if it is healthy
    if (rm_copy == 2'd0) rm_src = (desc.level != LVL_NONE && !in_retired[1]) ? 2'd1 : 2'd0;
    else                 rm_src = !in_retired[0] ? 2'd0 : 2'd1;
    // the moved copy's own DSPAM is retired anyway; avoid the others
  end

  assign rm_go = state_q == S_IDLE && !cmd_valid && !req_open_q && !(req_valid_i && req_ready_o) &&
                 prime_done && !rm_hold_q && rm_found;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      scan_q     <= '0;
      req_open_q <= 1'b0;
      rm_hold_q  <= 1'b0;
      retired_q  <= '0;
      rm_copy_q  <= '0;
      rm_src_q   <= '0;
      rm_dsp_q   <= '0;
      rm_base_q  <= '0;
      rm_w_q     <= '0;
      rm_data_q  <= '0;
    end else begin
      if (req_valid_i && req_ready_o) req_open_q <= 1'b1;
      else if (rsp_valid_o)           req_open_q <= 1'b0;
      retired_q <= dspam_retired_i;
      if (state_q == S_IDLE && !cmd_valid && !rm_go)
        scan_q <= (32'(scan_q) + 1 >= NUM_ERAID) ? '0 : scan_q + 1'b1;
      if (retired_q != dspam_retired_i || del_done) rm_hold_q <= 1'b0;
      case (state_q)
        S_IDLE: if (rm_go) begin
          rm_copy_q <= rm_copy;
          rm_src_q  <= rm_src;
        end
        S_RM_ALLOC: if (alloc_done) begin
          rm_dsp_q  <= alloc_dsp[0];
          rm_base_q <= alloc_base[0];
          rm_w_q    <= '0;
          if (!alloc_ok) rm_hold_q <= 1'b1;
        end
        S_RM_RWAIT: if (rd_done) rm_data_q <= (rm_copy_q == 2'd2) ? rd_rdata ^ prime_r : rd_rdata;
        S_RM_WWAIT: if (wr_done) rm_w_q <= rm_w_q + 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state_q      <= S_IDLE;
      idx_q        <= '0;
      done_q       <= 1'b0;
      done_err_q   <= 1'b0;
      done_rdata_q <= '0;
    end else begin
      done_q <= 1'b0;
      case (state_q)
        S_IDLE: if (rm_go) begin
          idx_q   <= scan_q;
          state_q <= S_RM_ALLOC;
        end else if (cmd_valid) begin
          idx_q        <= cfg_rd_idx;
          done_err_q   <= 1'b0;
          done_rdata_q <= '0;
          case (cmd_kind)
            K_DATA_RD: if (access_ok) state_q <= S_RD;
                       else begin done_err_q <= 1'b1; state_q <= S_DONE; end
            K_DATA_WR: if (access_ok) state_q <= S_WR;
                       else begin done_err_q <= 1'b1; state_q <= S_DONE; end
            K_CFG_RD: begin
              done_rdata_q <= reg_rdata;
              done_err_q   <= cmd_reg == REG_CMD;
              state_q      <= S_DONE;
            end
            K_CFG_WR: begin
              if (cmd_reg == REG_MEMADDR || cmd_reg == REG_ACLHI) state_q <= S_DONE;
              else if (alloc_start) begin
                idx_q   <= free_idx;
                state_q <= S_ALLOC;
              end else if (del_start) begin
                done_rdata_q <= 32'(ccmd.lspm);
                state_q <= S_DEL;
              end else begin
                done_err_q <= 1'b1;
                state_q    <= S_DONE;
              end
            end
            default: begin
              done_err_q <= 1'b1;
              state_q    <= S_DONE;
            end
          endcase
        end
        S_RD: if (rd_done) begin
          done_q       <= 1'b1;
          done_err_q   <= rd_err;
          done_rdata_q <= rd_rdata;
          state_q      <= S_IDLE;
        end
        S_WR: if (wr_done) begin
          done_q  <= 1'b1;
          state_q <= S_IDLE;
        end
        S_ALLOC: if (alloc_done) begin
          done_rdata_q <= 32'(idx_q);
          if (!alloc_ok) begin
            done_err_q <= 1'b1;
            done_q     <= 1'b1;
            state_q    <= S_IDLE;
          end else if (ccmd.dma) begin
            state_q <= S_LOAD_START;
          end else begin
            done_q  <= 1'b1;
            state_q <= S_IDLE;
          end
        end
        S_LOAD_START: state_q <= S_LOAD;
        S_LOAD: if (dma_done) begin
          done_q  <= 1'b1;
          state_q <= S_IDLE;
        end
        S_DEL: if (del_done) begin
          done_q     <= 1'b1;
          done_err_q <= del_err;
          state_q    <= S_IDLE;
        end
        S_DONE: begin
          done_q  <= 1'b1;
          state_q <= S_IDLE;
        end
        S_RM_ALLOC: if (alloc_done) state_q <= alloc_ok ? S_RM_RD : S_IDLE;
        S_RM_RD:    state_q <= S_RM_RWAIT;
        S_RM_RWAIT: if (rd_done) state_q <= S_RM_WR;
        S_RM_WR:    state_q <= S_RM_WWAIT;
        S_RM_WWAIT: if (wr_done)
                      state_q <= (32'(rm_w_q) + 1 == 32'(desc.nblk) * WPB) ? S_RM_FIN : S_RM_RD;
        S_RM_FIN:   state_q <= S_RM_FREE;
        S_RM_FREE:  if (free_done) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // the engines never touch the DSPAMs at the same time
  assert property (@(posedge clk_i) disable iff (!rst_ni) !(srd_busy && swr_busy));

endmodule
