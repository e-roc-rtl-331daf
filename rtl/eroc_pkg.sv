// eroc_pkg: types and constants shared by the E-RoC (Embedded RAIDs-on-Chip)
// memory manager.
//
// The E-RAID levels (NO E-RAID, E-RAID 1, E-RAID 1+P), the status codes
// CHANNEL_OK / SLV_ERR and the use of 32-bit words follow the E-RoC
// description. Field widths of the structs below are this design's choice:
// they fix upper bounds (16 DSPAMs, 16 masters, 16 masters in an ACL,
// 256 descriptors, 65536 words per DSPAM) that the module parameters must
// stay within. The configuration command layout and the address map are
// also this design's own.
package eroc_pkg;

  localparam int DATA_W    = 32;  // one E-RAID block is a 32-bit word
  localparam int DSP_ID_W  = 4;   // DSPAM number
  localparam int WADDR_W   = 16;  // word address inside a DSPAM
  localparam int BLK_W     = 8;   // block number / block count
  localparam int MID_W     = 4;   // master id
  localparam int ACL_W     = 16;  // masters covered by an ACL
  localparam int ACL_LO_W  = 8;   // ACL bits carried in the CMD word (masters 0-7)
  localparam int IDX_W     = 8;   // E-RAID descriptor index (logical SPM id)
  localparam int NCOPY     = 3;   // copy x, copy y, parity p

  // E-RAID level of a logical SPM
  typedef enum logic [1:0] {
    LVL_NONE   = 2'd0,   // NO E-RAID: one copy, no check
    LVL_RAID1  = 2'd1,   // two copies, compared on read
    LVL_RAID1P = 2'd2    // two copies plus parity P = A ^ R
  } level_e;

  // configuration operations written to a master's CMD register
  typedef enum logic [1:0] {
    OP_NOP    = 2'd0,
    OP_CREATE = 2'd1,
    OP_DELETE = 2'd2
  } cfg_op_e;

  // CMD register layout (32 bits)
  typedef struct packed {
    cfg_op_e            op;      // [31:30]
    level_e             level;   // [29:28]
    logic               dma;     // [27] load from / offload to main memory
    logic [2:0]         rsvd;    // [26:24]
    logic [ACL_LO_W-1:0] acl;    // [23:16] extra masters 0-7 allowed to access
    logic [IDX_W-1:0]   lspm;    // [15:8]  E-RAID to delete
    logic [BLK_W-1:0]   nblk;    // [7:0]   size in allocation blocks
  } cfg_cmd_t;

  // per-master configuration registers (address bits [3:2])
  localparam logic [1:0] REG_MEMADDR = 2'd0;  // main-memory base for iDMA
  localparam logic [1:0] REG_CMD     = 2'd1;  // write starts an operation
  localparam logic [1:0] REG_RESULT  = 2'd2;  // {err, lspm} of last operation
  localparam logic [1:0] REG_ACLHI   = 2'd3;  // [7:0]: ACL bits of masters 8-15 for CREATE

  // descriptor of one E-RAID system (one logical SPM)
  typedef struct packed {
    logic                            valid;
    level_e                          level;
    logic [MID_W-1:0]                owner;
    logic [ACL_W-1:0]                acl;
    logic [BLK_W-1:0]                nblk;
    logic [NCOPY-1:0][DSP_ID_W-1:0]  dsp;   // [0]=x [1]=y [2]=parity
    logic [NCOPY-1:0][BLK_W-1:0]     base;  // first block of each copy
  } eraid_desc_t;

  // one physical word location
  typedef struct packed {
    logic [DSP_ID_W-1:0] dsp;
    logic [WADDR_W-1:0]  addr;
  } phys_addr_t;

  // request to a DSPAM port
  typedef struct packed {
    logic                req;
    logic                we;
    logic [WADDR_W-1:0]  addr;
    logic [DATA_W-1:0]   wdata;
  } dspam_req_t;

  // kind of a decoded slave request
  typedef enum logic [2:0] {
    K_DATA_RD = 3'd0,
    K_DATA_WR = 3'd1,
    K_CFG_RD  = 3'd2,
    K_CFG_WR  = 3'd3,
    K_BAD     = 3'd4   // rejected by the slave interface
  } req_kind_e;

  // number of stored copies (x, y, parity) for a level
  function automatic logic [1:0] ncopies(level_e l);
    case (l)
      LVL_RAID1:  return 2'd2;
      LVL_RAID1P: return 2'd3;
      default:    return 2'd1;
    endcase
  endfunction

endpackage
