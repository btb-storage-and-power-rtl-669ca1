// tb_rbtb_alloc_ctrl: random resolution records (predictions right or wrong
// by construction) and a table of expected actions: a taken branch that missed
// the RBTB and whose BHU target was missing or wrong is allocated; a taken
// RBTB hit with a wrong target is corrected; nothing else is written.
module tb_rbtb_alloc_ctrl;
  import bhu_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  br_resolve_t res;
  logic wr_en, dp_en, dp_taken, alloc, fix, handled, mispred;
  logic [31:0] wr_pc, wr_t;
  logic [9:0] dp_idx;
  int checks = 0, failures = 0;
  int n_alloc = 0, n_fix = 0, n_handled = 0;

  rbtb_alloc_ctrl dut (.res(res), .rbtb_wr_en(wr_en), .rbtb_wr_pc(wr_pc), .rbtb_wr_target(wr_t),
    .dp_upd_en(dp_en), .dp_upd_index(dp_idx), .dp_upd_taken(dp_taken), .alloc(alloc), .fix(fix),
    .handled_by_bhu(handled), .mispredict(mispred));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int case_bhu, case_rbtb;
    bit e_alloc, e_fix, e_mis;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      res = '0;
      res.valid  = ($urandom() % 8) != 0;
      res.pc     = $urandom() & ~32'h3;
      res.taken  = $urandom() % 2;
      res.target = $urandom() & ~32'h3;
      case_bhu  = $urandom() % 3;   // 0 none, 1 right, 2 wrong
      case_rbtb = $urandom() % 3;
      res.meta.bhu_valid   = case_bhu != 0;
      res.meta.bhu_target  = (case_bhu == 1) ? res.target : res.target ^ 32'h40;
      res.meta.rbtb_hit    = case_rbtb != 0;
      res.meta.rbtb_target = (case_rbtb == 1) ? res.target : res.target + 32'h100;
      res.meta.dp_index    = 16'($urandom());
      res.meta.pred_taken  = $urandom() % 2;
      res.meta.pred_target = ($urandom() % 2) ? res.target : res.target + 4;
      #1;
      e_alloc = 0; e_fix = 0;
      if (res.valid && res.taken) begin
        if (case_rbtb == 2) e_fix = 1;
        else if (case_rbtb == 0 && case_bhu != 1) e_alloc = 1;
      end
      e_mis = res.valid && (res.meta.pred_taken != res.taken ||
                            (res.taken && res.meta.pred_target != res.target));
      checks++;
      if (alloc !== e_alloc || fix !== e_fix || wr_en !== (e_alloc || e_fix) ||
          (wr_en && (wr_pc !== res.pc || wr_t !== res.target)) || mispred !== e_mis ||
          handled !== (res.valid && res.taken && case_rbtb == 0 && case_bhu == 1) ||
          dp_en !== res.valid || dp_taken !== res.taken || dp_idx !== res.meta.dp_index[9:0]) begin
        failures++;
        $display("FAIL bhu=%0d rbtb=%0d v=%b t=%b: alloc=%b fix=%b mis=%b", case_bhu, case_rbtb,
                 res.valid, res.taken, alloc, fix, mispred);
      end
      if (e_alloc) n_alloc++;
      if (e_fix) n_fix++;
      if (handled) n_handled++;
    end
    checks++;
    if (n_alloc == 0 || n_fix == 0 || n_handled == 0) begin failures++; $display("FAIL: missing case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
