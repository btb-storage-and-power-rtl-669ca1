// tb_register_buffers: random register-file writes, biased towards $26..$28;
// a reference copy of the three registers predicts the buffer outputs (with
// the two low bits cleared). Checks reset values and that writes to other
// registers or with the enable low change nothing.
module tb_register_buffers;
  import bhu_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic rf_we;
  logic [4:0] rf_waddr;
  logic [31:0] rf_wdata;
  logic [31:0] ret_t, jsr_t, jmp_t;
  logic [31:0] m[3];
  int checks = 0, failures = 0;

  register_buffers dut (.clk(clk), .rst_n(rst_n), .rf_we(rf_we), .rf_waddr(rf_waddr),
    .rf_wdata(rf_wdata), .ret_target(ret_t), .jsr_target(jsr_t), .jmp_target(jmp_t));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (ret_t !== (m[0] & ~32'h3) || jsr_t !== (m[1] & ~32'h3) || jmp_t !== (m[2] & ~32'h3)) begin
      failures++;
      $display("FAIL got %h %h %h exp %h %h %h", ret_t, jsr_t, jmp_t, m[0], m[1], m[2]);
    end
  endtask

  initial begin
    rst_n = 0; rf_we = 0; rf_waddr = 0; rf_wdata = 0;
    m[0] = 0; m[1] = 0; m[2] = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    check();
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      rf_we    = ($urandom() % 4) != 0;
      rf_waddr = ($urandom() % 2) ? 5'(26 + $urandom() % 3) : 5'($urandom());
      rf_wdata = $urandom();
      @(posedge clk);
      if (rf_we && rf_waddr >= 26 && rf_waddr <= 28) m[rf_waddr - 26] = rf_wdata;
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
