// bhu_pkg: types and constants shared by the Branch Handling Unit (BHU),
// the Reduced BTB (RBTB) and the front end that ties them together.
//
// The op-code values are those of the Alpha branch instructions that the
// partial decoder recognises: every PC-relative branch lives in the op-code
// space 11xxxx, and the three indirect branches handled by register buffers
// are matched as full six-bit patterns. The indirect-branch registers are
// the Alpha conventions $26 (return address), $27 (procedure value, JSR)
// and $28 (assembler temporary, JMP).
package bhu_pkg;

  localparam int unsigned XLEN = 32;          // address / data width
  localparam int unsigned OP_W = 6;           // op-code field, instr[31:26]
  localparam int unsigned DISP_W = 21;        // branch displacement, instr[20:0]

  localparam logic [OP_W-1:0] OP_JMP   = 6'b000000;
  localparam logic [OP_W-1:0] OP_JSR   = 6'b000001;
  localparam logic [OP_W-1:0] OP_RET   = 6'b000010;
  localparam logic [OP_W-1:0] OP_JSR_C = 6'b000011;  // not handled by the BHU

  localparam logic [4:0] REG_RA = 5'd26;      // RET target
  localparam logic [4:0] REG_PV = 5'd27;      // JSR target
  localparam logic [4:0] REG_AT = 5'd28;      // JMP target

  // One-hot output of the partial decoder (all zero: not a branch the
  // BHU knows).
  typedef struct packed {
    logic pcrel;
    logic ret;
    logic jsr;
    logic jmp;
  } br_type_t;

  // Everything the front end decided for one fetched instruction. It travels
  // down the pipeline with the instruction and comes back at resolution so the
  // RBTB allocation and the direction predictor can be trained.
  typedef struct packed {
    logic            bhu_valid;    // BHU produced a usable target
    logic [XLEN-1:0] bhu_target;
    logic            rbtb_hit;
    logic [XLEN-1:0] rbtb_target;
    logic            dp_taken;     // direction prediction
    logic [15:0]     dp_index;     // predictor table index used (low bits)
    logic            pred_taken;   // final: next PC is pred_target
    logic [XLEN-1:0] pred_target;
  } pred_meta_t;

  // Branch outcome reported by the EXE stage.
  typedef struct packed {
    logic            valid;        // a branch was resolved this cycle
    logic [XLEN-1:0] pc;
    logic            taken;
    logic [XLEN-1:0] target;       // correct target (meaningful when taken)
    pred_meta_t      meta;         // what was predicted for it at fetch
  } br_resolve_t;

  // Per-cycle event flags of the front end, for counting how often each
  // mechanism fires (IB refill, BHU target, RBTB override, ...).
  typedef struct packed {
    logic ib_miss;          // fetch missed the instruction buffer (refill)
    logic bhu_gated;        // IB hit but still inside the unhandleable window
    logic bhu_target;       // next-PC target came from the BHU
    logic rbtb_target;      // next-PC target came from the RBTB
    logic rbtb_over_bhu;    // both had a target; RBTB took priority
    logic adder_overflow;   // PC-relative branch beyond the short adder
    logic rbtb_alloc;       // resolution wrote a new RBTB entry
    logic rbtb_fix;         // resolution corrected an RBTB target
    logic rbtb_evict;       // the RBTB write replaced another branch
    logic mispredict;       // resolved branch was mispredicted
  } fe_events_t;

endpackage
