// tb_bhu_frontend: end-to-end run of the front end at its default
// parameters (32-entry direct-mapped RBTB, 19-bit adder, one-cycle IB
// refill, 32-byte line). fe_harness supplies the program, the pipeline
// and all checks; see there.
module tb_bhu_frontend;
  import bhu_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;

  logic fetch_en, ic_abort, rf_we, done;
  logic [31:0] fetch_pc, instr, next_pc, rf_wdata;
  logic [255:0] ic_line;
  logic [4:0] rf_waddr;
  pred_meta_t pred;
  br_resolve_t res;
  fe_events_t events;
  int checks, failures;

  bhu_frontend dut (
    .clk(clk), .rst_n(rst_n), .fetch_en(fetch_en), .fetch_pc(fetch_pc), .ic_line(ic_line),
    .ic_abort(ic_abort), .instr(instr), .next_pc(next_pc), .pred(pred),
    .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata), .res(res), .events(events));

  fe_harness #(.CYCLES(40000), .NAME("default")) h (
    .clk(clk), .rst_n(rst_n), .fetch_en(fetch_en), .fetch_pc(fetch_pc), .ic_line(ic_line),
    .ic_abort(ic_abort), .instr(instr), .next_pc(next_pc), .pred(pred),
    .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata), .res(res), .events(events),
    .done(done), .checks(checks), .failures(failures));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
