// tb_eroc_acl: exhaustive masters x random descriptors. Access is allowed
// for the owner or an ACL member inside the E-RAID's words; delete for the
// owner only; nothing for an invalid descriptor. Two instances: 8 masters
// (ids 8-9 are outside it and only pass as owner) and 16 masters, where
// the upper half of the ACL mask is used.
module tb_eroc_acl;
  import eroc_pkg::*;
  eraid_desc_t desc;
  logic [3:0]  mid;
  logic [15:0] widx;
  logic acc, own, acc16, own16;
  int checks = 0, failures = 0;

  eroc_acl #(.NUM_MASTERS(8), .BLOCK_BYTES(64)) dut (
    .desc_i(desc), .mid_i(mid), .widx_i(widx), .access_ok_o(acc), .owner_ok_o(own));
  eroc_acl #(.NUM_MASTERS(16), .BLOCK_BYTES(64)) dut16 (
    .desc_i(desc), .mid_i(mid), .widx_i(widx), .access_ok_o(acc16), .owner_ok_o(own16));

  initial begin
    for (int i = 0; i < 400; i++) begin
      bit e_acc, e_own, e_acc16;
      desc = eraid_desc_t'({$urandom, $urandom, $urandom});
      desc.valid = ($urandom_range(0, 3) != 0);
      desc.owner = 4'($urandom_range(0, 15));
      desc.nblk  = 8'($urandom_range(1, 64));
      for (int m = 0; m < 16; m++) begin
        mid  = 4'(m);
        widx = 16'($urandom_range(0, 1100));
        #1;
        e_own = desc.valid && desc.owner == 4'(m);
        e_acc = desc.valid && (desc.owner == 4'(m) || (m < 8 && desc.acl[m])) && int'(widx) < int'(desc.nblk) * 16;
        e_acc16 = desc.valid && (desc.owner == 4'(m) || desc.acl[m]) && int'(widx) < int'(desc.nblk) * 16;
        checks += 2;
        if (acc16 != e_acc16 || own16 != e_own) begin
          failures++; $display("FAIL: 16 masters, mid %0d widx %0d", m, widx);
        end
        if (acc != e_acc || own != e_own) begin
          failures++; $display("FAIL: mid %0d widx %0d", m, widx);
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
