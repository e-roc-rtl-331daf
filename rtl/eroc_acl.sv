// eroc_acl: access control list check of the E-RoC manager.
//
// Every E-RAID carries an owner (the master that created it) and an ACL bit
// mask naming the other masters that may use it (two CPUs can share one
// E-RAID); the mask has one bit for each of up to 16 masters. A data access is allowed when the descriptor is valid, the master
// is the owner or in the mask, and the word index lies inside the E-RAID. A
// delete is allowed for the owner only, so no master can tear down another
// master's E-RAID. Combinational.
//
// ACL protection of E-RAID regions follows the E-RoC scheme; the mask form,
// the owner rule and the range check are this design's choices.
module eroc_acl
  import eroc_pkg::*;
#(
  parameter int NUM_MASTERS = 8,
  parameter int BLOCK_BYTES = 64
) (
  input  eraid_desc_t         desc_i,
  input  logic [MID_W-1:0]    mid_i,
  input  logic [WADDR_W-1:0]  widx_i,
  output logic                access_ok_o,
  output logic                owner_ok_o
);

  localparam int WPB = BLOCK_BYTES / (DATA_W / 8);

  logic        is_owner, in_acl, in_range;
  logic [31:0] nwords;

  always_comb begin
    is_owner = desc_i.owner == mid_i;
    in_acl   = (32'(mid_i) < NUM_MASTERS) && desc_i.acl[mid_i];
    nwords   = 32'(desc_i.nblk) * WPB;
    in_range = 32'(widx_i) < nwords;
    access_ok_o = desc_i.valid && (is_owner || in_acl) && in_range;
    owner_ok_o  = desc_i.valid && is_owner;
  end

endmodule
