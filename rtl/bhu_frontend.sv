// bhu_frontend: IF-stage branch prediction with a Branch Handling Unit (BHU)
// and a Reduced BTB (RBTB) in place of a large conventional BTB.
//
// Every cycle the fetch PC goes to:
//   - the instruction buffer (IB), which supplies the instruction from its
//     one-line copy on a hit or from the i-cache line on a miss (refill);
//   - the BHU, which partially decodes the IB instruction and generates its
//     target early: PC+4+offset with a short dedicated adder for PC-relative
//     branches, the $26/$27/$28 register buffers for RET/JSR/JMP;
//   - the RBTB, looked up by PC like a conventional BTB;
//   - the direction predictor (PC XOR global history).
// A first 2:1 mux picks the RBTB target on an RBTB hit and the BHU target
// otherwise; a second 2:1 mux picks that target or PC+4 according to the
// direction prediction. A target exists only when the RBTB hit or the BHU
// identified a branch; without one the next PC is PC+4.
//
// When the branch resolves in EXE, the pipeline returns the outcome together
// with the prediction record `pred` it got at fetch (`res`). Taken branches
// the BHU could not handle, and RBTB hits with a wrong target, are written
// into the RBTB; all resolved branches train the direction predictor.
//
// Interface: `fetch_en`/`fetch_pc` with the i-cache line `ic_line` that holds
// fetch_pc (needed only when `ic_abort` is low); `instr`, `next_pc` and
// `pred` are combinational from fetch_pc. `rf_*` is the register file's write
// port. `events` flags what happened this cycle, for counting.
module bhu_frontend
  import bhu_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned REFILL_N   = 1,
  parameter int unsigned ADDER_W    = 19,
  parameter int unsigned RBTB_SETS  = 32,
  parameter int unsigned RBTB_WAYS  = 1,
  parameter int unsigned DP_IDX_W   = 10,
  parameter int unsigned DP_HIST    = 10
)(
  input  logic                    clk,
  input  logic                    rst_n,
  // fetch
  input  logic                    fetch_en,
  input  logic [XLEN-1:0]         fetch_pc,
  input  logic [LINE_BYTES*8-1:0] ic_line,
  output logic                    ic_abort,
  output logic [XLEN-1:0]         instr,
  output logic [XLEN-1:0]         next_pc,
  output pred_meta_t              pred,
  // register file write port (snooped)
  input  logic                    rf_we,
  input  logic [4:0]              rf_waddr,
  input  logic [XLEN-1:0]         rf_wdata,
  // branch resolution from EXE
  input  br_resolve_t             res,
  // per-cycle events
  output fe_events_t              events
);

  // ---------------- IF: instruction buffer ----------------
  logic ib_bhu_valid;

  instr_buffer #(.LINE_BYTES(LINE_BYTES), .REFILL_N(REFILL_N)) u_ib (
    .clk       (clk),
    .rst_n     (rst_n),
    .fetch     (fetch_en),
    .pc        (fetch_pc),
    .ic_line   (ic_line),
    .ic_abort  (ic_abort),
    .instr     (instr),
    .bhu_valid (ib_bhu_valid)
  );

  // ---------------- IF: BHU ----------------
  br_type_t        bhu_type;
  logic            bhu_is_branch, bhu_valid, bhu_ovf;
  logic [XLEN-1:0] bhu_target;

  bhu #(.ADDER_W(ADDER_W)) u_bhu (
    .clk            (clk),
    .rst_n          (rst_n),
    .pc             (fetch_pc),
    .instr          (instr),
    .ib_valid       (ib_bhu_valid),
    .rf_we          (rf_we),
    .rf_waddr       (rf_waddr),
    .rf_wdata       (rf_wdata),
    .br_type        (bhu_type),
    .is_branch      (bhu_is_branch),
    .valid          (bhu_valid),
    .target         (bhu_target),
    .adder_overflow (bhu_ovf)
  );

  // ---------------- IF: RBTB and direction predictor ----------------
  logic            rbtb_hit;
  logic [XLEN-1:0] rbtb_target;
  logic            rbtb_wr_en, rbtb_evict;
  logic [XLEN-1:0] rbtb_wr_pc, rbtb_wr_target;

  rbtb #(.SETS(RBTB_SETS), .WAYS(RBTB_WAYS)) u_rbtb (
    .clk       (clk),
    .rst_n     (rst_n),
    .lk_en     (fetch_en),
    .lk_pc     (fetch_pc),
    .lk_hit    (rbtb_hit),
    .lk_target (rbtb_target),
    .wr_en     (rbtb_wr_en),
    .wr_pc     (rbtb_wr_pc),
    .wr_target (rbtb_wr_target),
    .wr_evict  (rbtb_evict)
  );

  logic                dp_taken;
  logic [DP_IDX_W-1:0] dp_index;
  logic                dp_upd_en, dp_upd_taken;
  logic [DP_IDX_W-1:0] dp_upd_index;

  direction_predictor #(.IDX_W(DP_IDX_W), .HIST(DP_HIST)) u_dp (
    .clk       (clk),
    .rst_n     (rst_n),
    .pc        (fetch_pc),
    .taken     (dp_taken),
    .index     (dp_index),
    .upd_en    (dp_upd_en),
    .upd_index (dp_upd_index),
    .upd_taken (dp_upd_taken)
  );

  // ---------------- IF: target and next-PC muxes ----------------
  logic [XLEN-1:0] final_target;
  logic            has_target;

  always_comb begin
    final_target = rbtb_hit ? rbtb_target : bhu_target;
    has_target   = rbtb_hit || bhu_valid;

    pred.bhu_valid   = bhu_valid;
    pred.bhu_target  = bhu_target;
    pred.rbtb_hit    = rbtb_hit;
    pred.rbtb_target = rbtb_target;
    pred.dp_taken    = dp_taken;
    pred.dp_index    = 16'(dp_index);
    pred.pred_taken  = has_target && dp_taken;
    pred.pred_target = final_target;

    next_pc = pred.pred_taken ? final_target : fetch_pc + XLEN'(4);
  end

  // ---------------- resolution: RBTB allocation, predictor training --------
  logic alloc, fix, handled, mispred;

  rbtb_alloc_ctrl #(.DP_IDX_W(DP_IDX_W)) u_alloc (
    .res            (res),
    .rbtb_wr_en     (rbtb_wr_en),
    .rbtb_wr_pc     (rbtb_wr_pc),
    .rbtb_wr_target (rbtb_wr_target),
    .dp_upd_en      (dp_upd_en),
    .dp_upd_index   (dp_upd_index),
    .dp_upd_taken   (dp_upd_taken),
    .alloc          (alloc),
    .fix            (fix),
    .handled_by_bhu (handled),
    .mispredict     (mispred)
  );

  // ---------------- events ----------------
  always_comb begin
    events.ib_miss        = fetch_en && !ic_abort;
    events.bhu_gated      = fetch_en && ic_abort && !ib_bhu_valid;
    events.bhu_target     = fetch_en && pred.pred_taken && !rbtb_hit;
    events.rbtb_target    = fetch_en && pred.pred_taken && rbtb_hit;
    events.rbtb_over_bhu  = fetch_en && rbtb_hit && bhu_valid;
    events.adder_overflow = fetch_en && bhu_ovf;
    events.rbtb_alloc     = alloc;
    events.rbtb_fix       = fix;
    events.rbtb_evict     = rbtb_evict;
    events.mispredict     = mispred;
  end

  // bhu_is_branch and bhu_type are decoded for completeness; the muxes above
  // only need bhu_valid.
  logic unused_ok;
  assign unused_ok = ^{bhu_is_branch, bhu_type, handled};

endmodule
