// tb_bhu_frontend_configs: the front end in every RBTB configuration it is
// meant to be run in: RBTB sizes of 16 to 128 entries, direct-mapped, 2-way
// and 4-way, each with N = 1, 2 and 3, where N (REFILL_N) is the number of
// instructions after each line change that the BHU cannot handle (slower
// i-cache refill or a longer BHU). N = 1 uses the nine smaller RBTBs, N = 2
// and 3 add 128x1, 64x2 and 32x4. Each configuration is one instance of
// bhu_frontend with its own fe_harness (program, pipeline model and checks),
// all side by side on one clock; every mechanism, the unhandleable window
// included when N > 1, must occur in each.
module tb_bhu_frontend_configs;
  import bhu_pkg::*;

  localparam int NC = 33;
  localparam int unsigned CFG_N   [NC] = '{1, 1, 1, 1, 1, 1, 1, 1, 1, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3};
  localparam int unsigned CFG_SETS[NC] = '{16, 8, 4, 32, 16, 8, 64, 32, 16, 16, 8, 4, 32, 16, 8, 64, 32, 16, 128, 64, 32, 16, 8, 4, 32, 16, 8, 64, 32, 16, 128, 64, 32};
  localparam int unsigned CFG_WAYS[NC] = '{1, 2, 4, 1, 2, 4, 1, 2, 4, 1, 2, 4, 1, 2, 4, 1, 2, 4, 1, 2, 4, 1, 2, 4, 1, 2, 4, 1, 2, 4, 1, 2, 4};
  localparam string       CFG_NAME[NC] = '{"RBTB_16_1_rc1", "RBTB_8_2_rc1", "RBTB_4_4_rc1", "RBTB_32_1_rc1", "RBTB_16_2_rc1", "RBTB_8_4_rc1", "RBTB_64_1_rc1", "RBTB_32_2_rc1", "RBTB_16_4_rc1", "RBTB_16_1_rc2", "RBTB_8_2_rc2", "RBTB_4_4_rc2", "RBTB_32_1_rc2", "RBTB_16_2_rc2", "RBTB_8_4_rc2", "RBTB_64_1_rc2", "RBTB_32_2_rc2", "RBTB_16_4_rc2", "RBTB_128_1_rc2", "RBTB_64_2_rc2", "RBTB_32_4_rc2", "RBTB_16_1_rc3", "RBTB_8_2_rc3", "RBTB_4_4_rc3", "RBTB_32_1_rc3", "RBTB_16_2_rc3", "RBTB_8_4_rc3", "RBTB_64_1_rc3", "RBTB_32_2_rc3", "RBTB_16_4_rc3", "RBTB_128_1_rc3", "RBTB_64_2_rc3", "RBTB_32_4_rc3"};

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  logic done[NC];
  int   chk[NC], fl[NC];

  for (genvar i = 0; i < NC; i++) begin : g_cfg
    logic         fetch_en, ic_abort, rf_we;
    logic [31:0]  fetch_pc, instr, next_pc, rf_wdata;
    logic [255:0] ic_line;
    logic [4:0]   rf_waddr;
    pred_meta_t   pred;
    br_resolve_t  res;
    fe_events_t   events;

    bhu_frontend #(.REFILL_N(CFG_N[i]), .RBTB_SETS(CFG_SETS[i]), .RBTB_WAYS(CFG_WAYS[i])) dut (
      .clk(clk), .rst_n(rst_n), .fetch_en(fetch_en), .fetch_pc(fetch_pc), .ic_line(ic_line),
      .ic_abort(ic_abort), .instr(instr), .next_pc(next_pc), .pred(pred),
      .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata), .res(res), .events(events));

    fe_harness #(.REFILL_N(CFG_N[i]), .RBTB_SETS(CFG_SETS[i]), .RBTB_WAYS(CFG_WAYS[i]),
                 .CYCLES(20000), .SEED(301 + i), .NAME(CFG_NAME[i])) h (
      .clk(clk), .rst_n(rst_n), .fetch_en(fetch_en), .fetch_pc(fetch_pc), .ic_line(ic_line),
      .ic_abort(ic_abort), .instr(instr), .next_pc(next_pc), .pred(pred),
      .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata), .res(res), .events(events),
      .done(done[i]), .checks(chk[i]), .failures(fl[i]));
  end

  function automatic int sum(int a[NC]);
    int t;
    t = 0;
    for (int i = 0; i < NC; i++) t += a[i];
    return t;
  endfunction

  function automatic bit all_done();
    for (int i = 0; i < NC; i++) if (!done[i]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum(chk), sum(fl) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    do @(posedge clk); while (!all_done());
    $display("TB_RESULT checks=%0d failures=%0d", sum(chk), sum(fl));
    $finish;
  end
endmodule
