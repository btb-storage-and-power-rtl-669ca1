// tb_partial_decoder: exhaustive check of the branch identifier over all 64
// op codes. Expected classes are written out from the Alpha branch op-code
// lists: PC-relative branches are 110000..111111, JMP 000000, JSR 000001,
// RET 000010; everything else (JSR_COROUTINE 000011 included) is no branch.
module tb_partial_decoder;
  import bhu_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [5:0] opcode;
  br_type_t   br_type;
  int checks = 0, failures = 0;

  partial_decoder dut (.opcode(opcode), .br_type(br_type));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    br_type_t exp;
    for (int op = 0; op < 64; op++) begin
      opcode = 6'(op);
      exp = '0;
      case (op)
        6'o60, 6'o61, 6'o62, 6'o63, 6'o64, 6'o65, 6'o66, 6'o67,
        6'o70, 6'o71, 6'o72, 6'o73, 6'o74, 6'o75, 6'o76, 6'o77: exp.pcrel = 1'b1;
        0: exp.jmp = 1'b1;
        1: exp.jsr = 1'b1;
        2: exp.ret = 1'b1;
        default: ;
      endcase
      @(posedge clk);
      checks++;
      if (br_type !== exp) begin
        failures++;
        $display("FAIL op=%b got=%b exp=%b", opcode, br_type, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
