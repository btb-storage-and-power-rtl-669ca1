// rbtb_alloc_ctrl: decides, when a branch resolves, whether it goes into the
// Reduced BTB, and trains the direction predictor.
//
// Branches are split in two classes. A branch is handleable when the Branch
// Handling Unit gave the right target for it at fetch; it then needs no RBTB
// entry. A taken branch for which the BHU had no usable target, or a wrong
// one, is unhandleable and is written into the RBTB so the next fetch finds
// it there. Since RBTB contents are trusted before the BHU, a branch that
// hit in the RBTB is rewritten only when the RBTB target was wrong (target
// update, as in a conventional BTB). Not-taken branches are never written.
// Every resolved branch trains the direction predictor.
//
// The module also classifies the prediction for statistics: mispredicted
// when the predicted direction differs, or when a taken branch got the wrong
// target.
//
// Combinational; its outputs are meant to drive the RBTB write port and the
// predictor update port in the same cycle.
module rbtb_alloc_ctrl
  import bhu_pkg::*;
#(
  parameter int unsigned DP_IDX_W = 10
)(
  input  br_resolve_t          res,
  output logic                 rbtb_wr_en,
  output logic [XLEN-1:0]      rbtb_wr_pc,
  output logic [XLEN-1:0]      rbtb_wr_target,
  output logic                 dp_upd_en,
  output logic [DP_IDX_W-1:0]  dp_upd_index,
  output logic                 dp_upd_taken,
  output logic                 alloc,        // new RBTB entry
  output logic                 fix,          // RBTB target corrected
  output logic                 handled_by_bhu,
  output logic                 mispredict
);

  logic bhu_right, rbtb_right;

  always_comb begin
    bhu_right  = res.meta.bhu_valid && (res.meta.bhu_target == res.target);
    rbtb_right = res.meta.rbtb_hit  && (res.meta.rbtb_target == res.target);

    fix   = res.valid && res.taken && res.meta.rbtb_hit && !rbtb_right;
    alloc = res.valid && res.taken && !res.meta.rbtb_hit && !bhu_right;
    handled_by_bhu = res.valid && res.taken && !res.meta.rbtb_hit && bhu_right;

    rbtb_wr_en     = fix || alloc;
    rbtb_wr_pc     = res.pc;
    rbtb_wr_target = res.target;

    dp_upd_en    = res.valid;
    dp_upd_index = res.meta.dp_index[DP_IDX_W-1:0];
    dp_upd_taken = res.taken;

    mispredict = res.valid &&
                 ((res.meta.pred_taken != res.taken) ||
                  (res.taken && res.meta.pred_target != res.target));
  end

endmodule
