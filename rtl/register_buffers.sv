// register_buffers: the three indirect-branch register buffers of the Early
// Branch Target Generator.
//
// Each buffer shadows one architectural register: $26 (RET target), $27 (JSR
// target), $28 (JMP target). The buffers sit on the register file's write
// port and take a copy of every write addressed to their register, in the
// same clock edge that writes the register file. They are read in the IF
// stage, one stage earlier than the register file would be, so an in-flight
// write or a register used against convention gives a stale target; such
// branches are caught at resolution and put in the RBTB.
//
// Outputs are the buffer contents with the two low bits cleared (Alpha
// indirect targets are (Rb) & ~3). Buffers reset to zero.
module register_buffers
  import bhu_pkg::*;
#(
  parameter logic [4:0] RET_REG = REG_RA,
  parameter logic [4:0] JSR_REG = REG_PV,
  parameter logic [4:0] JMP_REG = REG_AT
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rf_we,        // register-file write port
  input  logic [4:0]      rf_waddr,
  input  logic [XLEN-1:0] rf_wdata,
  output logic [XLEN-1:0] ret_target,
  output logic [XLEN-1:0] jsr_target,
  output logic [XLEN-1:0] jmp_target
);

  logic [XLEN-1:0] buf_ret, buf_jsr, buf_jmp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_ret <= '0;
      buf_jsr <= '0;
      buf_jmp <= '0;
    end else if (rf_we) begin
      if (rf_waddr == RET_REG) buf_ret <= rf_wdata;
      if (rf_waddr == JSR_REG) buf_jsr <= rf_wdata;
      if (rf_waddr == JMP_REG) buf_jmp <= rf_wdata;
    end
  end

  assign ret_target = {buf_ret[XLEN-1:2], 2'b00};
  assign jsr_target = {buf_jsr[XLEN-1:2], 2'b00};
  assign jmp_target = {buf_jmp[XLEN-1:2], 2'b00};

endmodule
