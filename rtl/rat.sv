// rat: register alias table with checkpoints, reference bits and an
// early-release CAM port.
//
// Holds, for each of the NLREG logical registers, the tag of its current
// physical register, plus a reference bit per logical register used to
// detect single-use self-overwriting instructions. The rename stage reads the
// whole map and writes back the map it computed (map_next/ref_next), which
// models the table's read and write ports.
//
// Checkpoints: a branch saves the map (as it stands after the branch) into a
// free one of NCKPT copies, together with its reorder-buffer index and the
// free list's head pointer. Correctly predicted branches free their copies; a
// mispredicted one restores it, sets all reference bits and frees its copy
// and every younger one. An exception frees all copies.
//
// Early-release CAM port: one candidate tag per cycle is compared against
// every entry of the map as it stands after this cycle's rename writes (the
// CAM works in the clock phase after the RAM ports). On a match the matching
// entry becomes the dedicated register P0 or P1 (clear all bits, set the LSB
// to the value), and so does every checkpoint entry holding the same tag.
// Without a match in the map no checkpoint is touched either: the register
// is not released then, and a restored checkpoint must still name it.
// er_match is combinational; all updates take effect at the clock edge.
//
// Unwinding after an exception writes one entry per cycle (walk_we).
//
// Follows the document: CAM search of the RAT for the committed candidate,
// update of the RAT and all checkpoint copies to P0/P1, reference bits set
// on checkpoint creation and restore, RAT plus free-list read pointer
// checkpointed at branches. Own choices: NCKPT = 4, checkpoint copies
// compared entry by entry rather than overwritten blindly (the same result
// for every valid copy), reset mapping of every logical register to P0.
module rat
  import rs_pkg::*;
#(
  parameter int unsigned NUM_PREG = 160,
  parameter int unsigned NCKPT    = 4,
  parameter int unsigned ROB_N    = 256,
  parameter int unsigned FLP_W    = $clog2(2 * NUM_PREG)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic [TAG_W-1:0]     map_q [NLREG],
  output logic [NLREG-1:0]     ref_q,
  // rename write-back
  input  logic                 ren_en,
  input  logic [TAG_W-1:0]     map_next [NLREG],
  input  logic [NLREG-1:0]     ref_next,
  // checkpoint creation
  output logic                 ckpt_avail,
  output cki_t                 ckpt_free_id,
  input  logic                 ckpt_take,
  input  logic [TAG_W-1:0]     ckpt_map [NLREG],
  input  robi_t                ckpt_rob,
  input  logic [FLP_W-1:0]     ckpt_flp,
  // branch resolution
  input  logic [NCKPT-1:0]     ck_free,      // branches resolved as predicted
  input  logic                 br_bad,       // branch mispredicted: restore
  input  cki_t                 br_id,
  input  robi_t                rob_head,
  output logic [FLP_W-1:0]     restore_flp,  // free-list head of br_id
  // exception unwinding
  input  logic                 flush_all,    // drop all checkpoints, set refs
  input  logic                 walk_we,
  input  logic [LREG_W-1:0]    walk_lreg,
  input  logic [TAG_W-1:0]     walk_tag,
  // early-release CAM port
  input  logic                 er_valid,
  input  logic [TAG_W-1:0]     er_tag,
  input  logic                 er_val,
  output logic                 er_match
);
  logic [TAG_W-1:0] ck_map [NCKPT][NLREG];
  robi_t            ck_rob [NCKPT];
  logic [FLP_W-1:0] ck_flp [NCKPT];
  logic [NCKPT-1:0] ck_vld;

  logic [TAG_W-1:0] map_after [NLREG];   // after this cycle's rename write
  logic [TAG_W-1:0] pv_tag;

  always_comb begin
    map_after = ren_en ? map_next : map_q;
    pv_tag    = {{(TAG_W-1){1'b0}}, er_val};
    er_match  = 1'b0;
    for (int l = 0; l < NLREG; l++)
      if (er_valid && map_after[l] == er_tag) er_match = 1'b1;
    // No early release while the map is being restored or unwound.
    if (walk_we || flush_all || br_bad) er_match = 1'b0;
  end

  always_comb begin
    ckpt_avail   = 1'b0;
    ckpt_free_id = '0;
    for (int c = NCKPT - 1; c >= 0; c--)
      if (!ck_vld[c]) begin
        ckpt_avail   = 1'b1;
        ckpt_free_id = CK_W'(c);
      end
    restore_flp = ck_flp[br_id];
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < NLREG; l++) map_q[l] <= '0;
      ref_q  <= '1;
      ck_vld <= '0;
      for (int c = 0; c < NCKPT; c++) begin
        ck_rob[c] <= '0;
        ck_flp[c] <= '0;
        for (int l = 0; l < NLREG; l++) ck_map[c][l] <= '0;
      end
    end else if (walk_we || flush_all) begin
      if (walk_we) map_q[walk_lreg] <= walk_tag;
      if (flush_all) begin
        ck_vld <= '0;
        ref_q  <= '1;
      end
    end else if (br_bad) begin
      map_q <= ck_map[br_id];
      ref_q <= '1;
      for (int c = 0; c < NCKPT; c++)
        if (ck_vld[c] && rob_age(ck_rob[c], rob_head, ROB_N) >= rob_age(ck_rob[br_id], rob_head, ROB_N))
          ck_vld[c] <= 1'b0;
    end else begin
      for (int l = 0; l < NLREG; l++)
        map_q[l] <= (er_valid && map_after[l] == er_tag) ? pv_tag : map_after[l];
      if (ren_en) ref_q <= ref_next;
      for (int c = 0; c < NCKPT; c++)
        for (int l = 0; l < NLREG; l++)
          if (ck_vld[c] && er_match && ck_map[c][l] == er_tag) ck_map[c][l] <= pv_tag;
      for (int c = 0; c < NCKPT; c++) if (ck_free[c]) ck_vld[c] <= 1'b0;
      if (ckpt_take) begin
        ck_vld[ckpt_free_id] <= 1'b1;
        ck_rob[ckpt_free_id] <= ckpt_rob;
        ck_flp[ckpt_free_id] <= ckpt_flp;
        for (int l = 0; l < NLREG; l++)
          ck_map[ckpt_free_id][l] <= (er_match && ckpt_map[l] == er_tag) ? pv_tag
                                                                         : ckpt_map[l];
      end
    end
  end
endmodule
