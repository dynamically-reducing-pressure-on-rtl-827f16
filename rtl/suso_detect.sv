// suso_detect: rename-stage detector of single-use self-overwriting (SUSO)
// instructions that may share their assignment's physical register.
//
// An instruction is self-overwriting when its destination is one of its
// source registers. It is single-use when no instruction since the last
// write of that logical register has read it, which the RAT tracks with a
// per-register reference bit (cleared on write, set on read, set for all
// registers after a branch so that sharing stays inside one basic block).
// Sharing is granted when, in addition, the current mapping is a pooled
// register (not P0/P1), its version field has not reached its maximum, the
// operation is reversible, and the computation was not already turned into
// a trivial-0 mapping. The granted tag is the current tag with its version
// field (the tag's most significant bits) incremented. Combinational.
//
// Follows the document: reference bits, branch boundary, version bits in the
// tag MSBs with the chain ending when the version reaches its maximum, no
// sharing for mappings to P0/P1 or for irreversible operations. Excluding an
// instruction whose two register operands are the same is this design's own
// choice (X + X loses its top bit and cannot be reversed exactly).
module suso_detect
  import rs_pkg::*;
(
  input  op_e                      op,
  input  logic                     has_dst,
  input  logic [LREG_W-1:0]        dst,
  input  logic [LREG_W-1:0]        src1,
  input  logic [LREG_W-1:0]        src2,
  input  logic                     use_imm,
  input  logic                     ref_bit,   // dst read since its last write
  input  logic [VER_W+PREG_W-1:0]  cur_tag,   // current mapping of dst
  input  logic                     triv0,
  output logic                     suso,
  output logic [VER_W+PREG_W-1:0]  new_tag
);
  logic so, dedicated, ver_full, same_src;

  always_comb begin
    so        = has_dst && ((dst == src1) || (!use_imm && dst == src2));
    same_src  = !use_imm && (src1 == src2);
    dedicated = (cur_tag[PREG_W-1:1] == '0);
    ver_full  = (cur_tag[VER_W+PREG_W-1:PREG_W] == '1);
    suso      = so && !ref_bit && !dedicated && !ver_full && is_reversible(op)
                && !same_src && !triv0;
    new_tag   = {cur_tag[VER_W+PREG_W-1:PREG_W] + VER_W'(1), cur_tag[PREG_W-1:0]};
  end
endmodule
