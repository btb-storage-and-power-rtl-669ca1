// short_adder: shortened PC-relative target adder of the Early Branch Target
// Generator.
//
// A PC-relative target is PC + 4 + 4*disp. Working on word addresses, that is
// PC[31:2] + disp + 1, so the "+4" is the adder's carry-in. Branches rarely
// jump far, so only ADDER_W bits of the word address are added (bits
// [ADDER_W+1:2], i.e. [20:2] at the default of 19); bits [1:0] are zero and
// the bits above the adder are copied from the PC.
//
// The short result is right only when the full addition would not have
// changed the copied upper bits. For a forward branch (upper displacement
// bits all zero) that means carry-out 0; for a backward branch (upper
// displacement bits all one) it means carry-out 1, which absorbs the sign
// extension. Any other displacement reaches beyond the adder. `ok` reports
// that the target is complete; otherwise the branch is unhandleable and
// left to the RBTB.
//
// Combinational.
module short_adder
  import bhu_pkg::*;
#(
  parameter int unsigned ADDER_W = 19     // adder length in bits
)(
  input  logic [XLEN-1:0]   pc,           // byte address of the branch
  input  logic [DISP_W-1:0] disp,         // signed word displacement
  output logic [XLEN-1:0]   target,
  output logic              ok            // short result equals the full one
);

  localparam int unsigned WA_W = XLEN - 2;  // word-address width

  initial assert (ADDER_W >= 1 && ADDER_W < WA_W)
    else $error("short_adder: ADDER_W must be in 1..%0d", WA_W - 1);

  logic [WA_W-1:0]    disp_x;   // sign-extended displacement
  logic [ADDER_W:0]   sum;      // with carry-out on top
  logic               cout;
  logic [WA_W-ADDER_W-1:0] disp_hi;

  always_comb begin
    disp_x  = WA_W'($signed(disp));
    sum     = {1'b0, pc[ADDER_W+1:2]} + {1'b0, disp_x[ADDER_W-1:0]} + (ADDER_W+1)'(1);
    cout    = sum[ADDER_W];
    disp_hi = disp_x[WA_W-1:ADDER_W];
    ok      = ((disp_hi == '0) && !cout) || ((disp_hi == '1) && cout);
    target  = {pc[XLEN-1:ADDER_W+2], sum[ADDER_W-1:0], 2'b00};
  end

endmodule
