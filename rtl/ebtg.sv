// ebtg: Early Branch Target Generator.
//
// Produces, every cycle and without knowing yet whether the instruction is a
// branch, the four targets an Alpha branch can have:
//   - PC-relative: PC + 4 + 4*disp from the shortened dedicated adder
//     (disp = instr[20:0]); `pcrel_ok` is low when the short adder could not
//     finish the addition;
//   - RET, JSR, JMP: the register buffers that shadow $26, $27, $28.
// The Branch Identifier then picks one of them (see bhu).
//
// The adder is combinational; the register buffers update on the clock edge
// of the register-file write they copy.
module ebtg
  import bhu_pkg::*;
#(
  parameter int unsigned ADDER_W = 19
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [XLEN-1:0] pc,
  input  logic [XLEN-1:0] instr,
  input  logic            rf_we,
  input  logic [4:0]      rf_waddr,
  input  logic [XLEN-1:0] rf_wdata,
  output logic [XLEN-1:0] pcrel_target,
  output logic            pcrel_ok,
  output logic [XLEN-1:0] ret_target,
  output logic [XLEN-1:0] jsr_target,
  output logic [XLEN-1:0] jmp_target
);

  short_adder #(.ADDER_W(ADDER_W)) u_adder (
    .pc     (pc),
    .disp   (instr[DISP_W-1:0]),
    .target (pcrel_target),
    .ok     (pcrel_ok)
  );

  register_buffers u_rbuf (
    .clk        (clk),
    .rst_n      (rst_n),
    .rf_we      (rf_we),
    .rf_waddr   (rf_waddr),
    .rf_wdata   (rf_wdata),
    .ret_target (ret_target),
    .jsr_target (jsr_target),
    .jmp_target (jmp_target)
  );

endmodule
