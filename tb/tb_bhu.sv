// tb_bhu: random instructions (biased to the Alpha branch op codes), random
// IB availability and register-file writes. A reference decides for each
// cycle whether the BHU must offer a target and which one: PC + 4 + 4*disp
// for op codes 11xxxx when the 19-bit adder reaches it, the $26/$27/$28
// shadow for RET/JSR/JMP, nothing otherwise or when the IB is not ready.
module tb_bhu;
  import bhu_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, rf_we, ib_valid;
  logic [4:0] rf_waddr;
  logic [31:0] rf_wdata, pc, instr, target;
  br_type_t br_type;
  logic is_branch, valid, ovf;
  logic [31:0] m[3];
  int checks = 0, failures = 0;
  int n_kind[5];

  bhu dut (.clk(clk), .rst_n(rst_n), .pc(pc), .instr(instr), .ib_valid(ib_valid),
    .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata), .br_type(br_type),
    .is_branch(is_branch), .valid(valid), .target(target), .adder_overflow(ovf));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] full, exp_t;
    logic exp_v, exp_br, exp_ovf;
    logic [5:0] op;
    for (int k = 0; k < 5; k++) n_kind[k] = 0;
    rst_n = 0; rf_we = 0; rf_waddr = 0; rf_wdata = 0; pc = 0; instr = 0; ib_valid = 0;
    m[0] = 0; m[1] = 0; m[2] = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      pc = $urandom() & ~32'h3;
      case ($urandom() % 6)
        0: op = 6'($urandom());
        1: op = 6'(48 + $urandom() % 16);
        2: op = 6'(48 + $urandom() % 16);
        default: op = 6'($urandom() % 4);
      endcase
      instr = {op, 26'($urandom())};
      if (i % 4 != 0) instr[20:0] = 21'($signed(12'($urandom())));
      ib_valid = ($urandom() % 5) != 0;
      rf_we    = $urandom() % 2;
      rf_waddr = 5'(25 + $urandom() % 5);
      rf_wdata = $urandom();
      #1;
      full = pc + 32'd4 + {{9{instr[20]}}, instr[20:0], 2'b00};
      exp_br = ib_valid && (op[5:4] == 2'b11 || op <= 6'd2);
      exp_ovf = ib_valid && op[5:4] == 2'b11 && full[31:21] != pc[31:21];
      exp_v = exp_br && !exp_ovf;
      exp_t = (op == 6'd2) ? (m[0] & ~32'h3) :
              (op == 6'd1) ? (m[1] & ~32'h3) :
              (op == 6'd0) ? (m[2] & ~32'h3) : full;
      checks++;
      if (valid !== exp_v || is_branch !== exp_br || ovf !== exp_ovf || (exp_v && target !== exp_t)) begin
        failures++;
        $display("FAIL op=%b ibv=%b: v=%b br=%b ovf=%b t=%h exp v=%b br=%b ovf=%b t=%h",
                 op, ib_valid, valid, is_branch, ovf, target, exp_v, exp_br, exp_ovf, exp_t);
      end
      if (exp_v) n_kind[(op[5:4] == 2'b11) ? 0 : int'(op) + 1]++;
      if (exp_ovf) n_kind[4]++;
      @(posedge clk);
      if (rf_we && rf_waddr >= 26 && rf_waddr <= 28) m[rf_waddr - 26] = rf_wdata;
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (n_kind[k] == 0) begin failures++; $display("FAIL: case %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
