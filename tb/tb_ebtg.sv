// tb_ebtg: drives random PCs, instructions and register-file writes into the
// early target generator and checks all four candidate targets every cycle
// against a reference: full PC + 4 + 4*disp (only when the 19-bit adder can
// reach it, which must match pcrel_ok) and shadow copies of $26, $27, $28.
module tb_ebtg;
  import bhu_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, rf_we;
  logic [4:0] rf_waddr;
  logic [31:0] rf_wdata, pc, instr;
  logic [31:0] t_pc, t_ret, t_jsr, t_jmp;
  logic ok;
  logic [31:0] m[3];
  int checks = 0, failures = 0, n_ovf = 0;

  ebtg dut (.clk(clk), .rst_n(rst_n), .pc(pc), .instr(instr), .rf_we(rf_we),
    .rf_waddr(rf_waddr), .rf_wdata(rf_wdata), .pcrel_target(t_pc), .pcrel_ok(ok),
    .ret_target(t_ret), .jsr_target(t_jsr), .jmp_target(t_jmp));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] full;
    rst_n = 0; rf_we = 0; rf_waddr = 0; rf_wdata = 0; pc = 0; instr = 0;
    m[0] = 0; m[1] = 0; m[2] = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      pc    = $urandom() & ~32'h3;
      instr = $urandom();
      if (i % 3 == 0) instr[20:0] = 21'($signed(10'($urandom())));
      rf_we    = $urandom() % 2;
      rf_waddr = 5'(25 + $urandom() % 5);
      rf_wdata = $urandom();
      #1;
      full = pc + 32'd4 + {{9{instr[20]}}, instr[20:0], 2'b00};
      checks++;
      if (ok !== (full[31:21] == pc[31:21]) || (ok && t_pc !== full) ||
          t_ret !== (m[0] & ~32'h3) || t_jsr !== (m[1] & ~32'h3) || t_jmp !== (m[2] & ~32'h3)) begin
        failures++;
        $display("FAIL pc=%h instr=%h: %h/%b %h %h %h", pc, instr, t_pc, ok, t_ret, t_jsr, t_jmp);
      end
      if (!ok) n_ovf++;
      @(posedge clk);
      if (rf_we && rf_waddr >= 26 && rf_waddr <= 28) m[rf_waddr - 26] = rf_wdata;
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL: no adder overflow seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
