// partial_decoder: the Branch Identifier (BI) of the Branch Handling Unit.
//
// It looks only at the six-bit op code of the instruction held in the
// instruction buffer and says which of the four early targets, if any, is the
// right one. PC-relative branches all have op codes 11xxxx, so a two-input
// AND of the top two bits finds them. RET, JSR and JMP are each matched with
// a full six-bit compare (a six-input AND over true/inverted bits). At most
// one output is high; none is high for any other instruction, including
// JSR_COROUTINE, which the BHU leaves to the RBTB.
//
// Purely combinational: the decode sits in the IF stage next to the adder.
module partial_decoder
  import bhu_pkg::*;
(
  input  logic [OP_W-1:0] opcode,   // instr[31:26]
  output br_type_t        br_type
);

  always_comb begin
    br_type.pcrel = opcode[5] & opcode[4];
    br_type.ret   = (opcode == OP_RET);
    br_type.jsr   = (opcode == OP_JSR);
    br_type.jmp   = (opcode == OP_JMP);
  end

endmodule
