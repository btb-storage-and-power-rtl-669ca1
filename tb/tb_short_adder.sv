// tb_short_adder: compares the shortened target adder with a full 32-bit
// PC + 4 + 4*disp reference. The short result must be flagged complete
// exactly when the full target keeps the PC's bits above the adder, and then
// must equal the full target. Runs the default 19-bit adder and an 8-bit one
// (where overflow is frequent), with random and edge-case operands.
module tb_short_adder;
  import bhu_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] pc;
  logic [20:0] disp;
  logic [31:0] t19, t8;
  logic        ok19, ok8;
  int checks = 0, failures = 0;
  int n_ok19 = 0, n_ovf19 = 0, n_ok8 = 0, n_ovf8 = 0;

  short_adder                dut19 (.pc(pc), .disp(disp), .target(t19), .ok(ok19));
  short_adder #(.ADDER_W(8)) dut8  (.pc(pc), .disp(disp), .target(t8),  .ok(ok8));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int aw, logic [31:0] t, logic ok);
    logic [31:0] full;
    logic        exp_ok;
    full   = pc + 32'd4 + {{9{disp[20]}}, disp, 2'b00};
    exp_ok = (full >> (aw + 2)) == (pc >> (aw + 2));
    checks++;
    if (ok !== exp_ok || (exp_ok && t !== full)) begin
      failures++;
      $display("FAIL aw=%0d pc=%h disp=%h got %h/%b exp %h/%b", aw, pc, disp, t, ok, full, exp_ok);
    end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      pc = {$urandom()} & ~32'h3;
      case (i % 4)
        0: disp = 21'($urandom());
        1: disp = 21'($signed(8'($urandom())));           // short branches
        2: disp = 21'($signed(16'($urandom())));
        default: begin                                   // near a boundary
          pc[20:2] = (i % 8 == 3) ? '1 : '0;
          disp = (i % 16 < 8) ? 21'd0 : 21'h1FFFFF;
        end
      endcase
      @(posedge clk);
      check_one(19, t19, ok19);
      check_one(8, t8, ok8);
      if (ok19) n_ok19++; else n_ovf19++;
      if (ok8)  n_ok8++;  else n_ovf8++;
    end
    checks++;
    if (n_ok19 == 0 || n_ovf19 == 0 || n_ok8 == 0 || n_ovf8 == 0) begin
      failures++;
      $display("FAIL: a case class never occurred");
    end
    $display("19-bit: %0d complete, %0d overflow; 8-bit: %0d complete, %0d overflow",
             n_ok19, n_ovf19, n_ok8, n_ovf8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
