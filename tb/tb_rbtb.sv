// tb_rbtb: random lookups and writes over a small pool of branch addresses
// (so sets conflict), checked against a reference that keeps, per set, a
// recency-ordered list of (tag, target) entries: lookup hits move an entry to
// the front (unless a write hits the same set that cycle), writes update a
// present entry or fill the lowest free way, else replace the last (least
// recently used) one. Runs the default 32x1 direct-mapped RBTB and a 4-set
// 4-way one.
module tb_rbtb;
  import bhu_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;
  int n_hit = 0, n_evict = 0, n_upd = 0;

  logic        lk_en, wr_en;
  logic [31:0] lk_pc, wr_pc, wr_target;
  logic        hit_a, hit_b, ev_a, ev_b;
  logic [31:0] t_a, t_b;

  rbtb                          dut_a (.clk(clk), .rst_n(rst_n), .lk_en(lk_en), .lk_pc(lk_pc),
    .lk_hit(hit_a), .lk_target(t_a), .wr_en(wr_en), .wr_pc(wr_pc), .wr_target(wr_target), .wr_evict(ev_a));
  rbtb #(.SETS(4), .WAYS(4))    dut_b (.clk(clk), .rst_n(rst_n), .lk_en(lk_en), .lk_pc(lk_pc),
    .lk_hit(hit_b), .lk_target(t_b), .wr_en(wr_en), .wr_pc(wr_pc), .wr_target(wr_target), .wr_evict(ev_b));

  // reference: m_pc/m_tgt per set, slot order = way number; order list = recency
  class ref_btb;
    int sets, ways;
    logic [31:0] pcs[int][int];     // [set][way]
    logic [31:0] tgts[int][int];
    int          order[int][$];     // way numbers, front = most recent
    function new(int s, int w);
      sets = s; ways = w;
      for (int i = 0; i < s; i++)
        for (int k = 0; k < w; k++) order[i].push_back(k);
    endfunction
    function int set_of(logic [31:0] a); return (a >> 2) % sets; endfunction
    function int find(logic [31:0] a);
      int s = set_of(a);
      for (int k = 0; k < ways; k++)
        if (pcs[s].exists(k) && pcs[s][k] == a) return k;
      return -1;
    endfunction
    function void touch(int s, int k);
      foreach (order[s][i]) if (order[s][i] == k) begin order[s].delete(i); break; end
      order[s].push_front(k);
    endfunction
    // returns 1 on eviction
    function bit write(logic [31:0] a, logic [31:0] t);
      int s = set_of(a), k = find(a);
      bit ev = 0;
      if (k < 0) begin
        for (int j = 0; j < ways; j++) if (!pcs[s].exists(j)) begin k = j; break; end
        if (k < 0) begin k = order[s][$]; ev = 1; end
      end
      pcs[s][k] = a; tgts[s][k] = t & ~32'h3;
      touch(s, k);
      return ev;
    endfunction
  endclass

  ref_btb ra, rb;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick_pc();
    // 48 distinct branch addresses spread over many sets and tags
    int n = $urandom() % 48;
    return 32'h0040_0000 + 32'(n % 12) * 4 + 32'(n / 12) * 32'h0001_0000;
  endfunction

  task automatic check_side(ref_btb r, logic hit, logic [31:0] t, logic ev, bit exp_ev, string nm);
    int k = r.find(lk_pc);
    checks++;
    if (hit !== (k >= 0) || (k >= 0 && t !== r.tgts[r.set_of(lk_pc)][k]) || (wr_en && ev !== exp_ev)) begin
      failures++;
      $display("FAIL %s lk=%h hit=%b t=%h ev=%b exp hit=%b ev=%b", nm, lk_pc, hit, t, ev, k >= 0, exp_ev);
    end
  endtask

  initial begin
    bit ev_a_exp, ev_b_exp;
    ref_btb sa, sb;
    ra = new(32, 1);
    rb = new(4, 4);
    rst_n = 0; lk_en = 0; wr_en = 0; lk_pc = 0; wr_pc = 0; wr_target = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      int ka, kb;
      @(negedge clk);
      lk_en = ($urandom() % 4) != 0;
      lk_pc = pick_pc();
      wr_en = ($urandom() % 3) == 0;
      wr_pc = pick_pc();
      wr_target = $urandom();
      #1;
      // eviction expectation, computed on copies before the write
      ev_a_exp = 0; ev_b_exp = 0;
      if (wr_en) begin
        int s;
        s = ra.set_of(wr_pc); ev_a_exp = (ra.find(wr_pc) < 0) && ra.pcs[s].num() == 1;
        s = rb.set_of(wr_pc); ev_b_exp = (rb.find(wr_pc) < 0) && rb.pcs[s].num() == 4;
      end
      check_side(ra, hit_a, t_a, ev_a, ev_a_exp, "32x1");
      check_side(rb, hit_b, t_b, ev_b, ev_b_exp, "4x4");
      if (hit_b) n_hit++;
      if (ev_b_exp) n_evict++;
      // state updates, in the order the hardware applies them
      ka = ra.find(lk_pc); kb = rb.find(lk_pc);
      if (lk_en && kb >= 0 && !(wr_en && rb.set_of(wr_pc) == rb.set_of(lk_pc))) rb.touch(rb.set_of(lk_pc), kb);
      if (lk_en && ka >= 0 && !(wr_en && ra.set_of(wr_pc) == ra.set_of(lk_pc))) ra.touch(ra.set_of(lk_pc), ka);
      if (wr_en) begin
        if (rb.find(wr_pc) >= 0) n_upd++;
        void'(ra.write(wr_pc, wr_target));
        void'(rb.write(wr_pc, wr_target));
      end
      @(posedge clk);
    end
    checks++;
    if (n_hit == 0 || n_evict == 0 || n_upd == 0) begin failures++; $display("FAIL: missing case"); end
    $display("hits=%0d evictions=%0d updates=%0d", n_hit, n_evict, n_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
