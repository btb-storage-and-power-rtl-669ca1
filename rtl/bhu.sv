// bhu: Branch Handling Unit = Branch Identifier (partial decoder) + Early
// Branch Target Generator + the 4:1 target mux.
//
// In the IF stage the instruction buffer hands the instruction at PC to the
// BHU. The partial decoder classifies it (PC-relative, RET, JSR, JMP or none)
// while the EBTG computes all four candidate targets in parallel; the decoder
// output steers the 4:1 mux. The result is usable (`valid`) only when
//   - the instruction came from the instruction buffer and is outside the
//     refill window (`ib_valid`), since during a refill the BHU has no input,
//   - it is one of the four branch kinds, and
//   - for a PC-relative branch, the shortened adder finished the addition.
// `is_branch`/`br_type` report the decode even when the target is not usable,
// and `adder_overflow` flags a PC-relative branch the short adder could not
// reach. A RET/JSR/JMP target can still be wrong (stale or unconventional
// register); that is only found at resolution.
//
// Combinational from pc/instr to the outputs; the register buffers inside
// are clocked.
module bhu
  import bhu_pkg::*;
#(
  parameter int unsigned ADDER_W = 19
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [XLEN-1:0] pc,
  input  logic [XLEN-1:0] instr,        // from the instruction buffer
  input  logic            ib_valid,     // instr is a valid IB read for the BHU
  input  logic            rf_we,
  input  logic [4:0]      rf_waddr,
  input  logic [XLEN-1:0] rf_wdata,
  output br_type_t        br_type,      // decode, gated by ib_valid
  output logic            is_branch,
  output logic            valid,        // target usable
  output logic [XLEN-1:0] target,
  output logic            adder_overflow
);

  br_type_t        pd_type;
  logic [XLEN-1:0] t_pcrel, t_ret, t_jsr, t_jmp;
  logic            pcrel_ok;

  partial_decoder u_pd (
    .opcode  (instr[XLEN-1 -: OP_W]),
    .br_type (pd_type)
  );

  ebtg #(.ADDER_W(ADDER_W)) u_ebtg (
    .clk          (clk),
    .rst_n        (rst_n),
    .pc           (pc),
    .instr        (instr),
    .rf_we        (rf_we),
    .rf_waddr     (rf_waddr),
    .rf_wdata     (rf_wdata),
    .pcrel_target (t_pcrel),
    .pcrel_ok     (pcrel_ok),
    .ret_target   (t_ret),
    .jsr_target   (t_jsr),
    .jmp_target   (t_jmp)
  );

  always_comb begin
    br_type = ib_valid ? pd_type : '0;
    is_branch = |br_type;
    unique case (1'b1)
      br_type.ret: target = t_ret;
      br_type.jsr: target = t_jsr;
      br_type.jmp: target = t_jmp;
      default:     target = t_pcrel;
    endcase
    adder_overflow = br_type.pcrel && !pcrel_ok;
    valid = is_branch && !adder_overflow;
  end

  // The decoder is one-hot or silent.
  always_comb assert ($onehot0(pd_type));

endmodule
