// fe_harness: program model, pipeline model and checker for the
// bhu_frontend branch-prediction front end.
//
// Program: two code regions of NW words, 3 MB apart so that branches between
// them are beyond the 19-bit short adder. Each word is, at random, an ALU
// instruction, a register load (LDA) writing $26/$27/$28 or $5 with a fixed
// in-region address (low bits sometimes set), a conditional branch (loops
// with a trip count, or forward branches always / never / mostly taken), a
// short or far BR, a forward BSR (writes $26 = PC+4), a JSR (reads $27, or
// $5 against convention; writes $26), a RET (reads $26, sometimes $5) or a
// JMP (reads $28, sometimes $5). The last word of a region branches back to
// its start, and every TRAP_EVERY cycles fetch is redirected to a random
// address (as an exception would) so no path repeats forever.
//
// Pipeline: fetch follows the architecturally correct path (a perfect
// recovery without bubbles); occasionally fetch stalls for a cycle. The
// branch outcome returns to the front end 2 cycles after fetch (EXE) with
// the prediction record, and register writes reach the register file, and so
// the register buffers, 4 cycles after fetch (WB). An indirect branch fetched
// within 4 cycles of the write to its register sees a stale buffer.
//
// Checks, every fetch: the instruction; the IB hit; whether the BHU offers a
// target and which one (full-width PC+4+4*disp, or a shadow of the register
// file's write stream); the RBTB hit and target against a reference RBTB
// kept with its own LRU lists and the allocation rule; and the next-PC muxes.
// Afterwards each mechanism must have occurred at least once.
module fe_harness
  import bhu_pkg::*;
#(
  parameter int unsigned REFILL_N   = 1,
  parameter int unsigned RBTB_SETS  = 32,
  parameter int unsigned RBTB_WAYS  = 1,
  parameter int unsigned ADDER_W    = 19,
  parameter int unsigned CYCLES     = 20000,
  parameter int unsigned NW         = 512,
  parameter int unsigned TRAP_EVERY = 200,
  parameter int unsigned SEED       = 1,
  parameter string       NAME       = "fe"
)(
  input  logic         clk,
  input  logic         rst_n,
  output logic         fetch_en,
  output logic [31:0]  fetch_pc,
  output logic [255:0] ic_line,
  input  logic         ic_abort,
  input  logic [31:0]  instr,
  input  logic [31:0]  next_pc,
  input  pred_meta_t   pred,
  output logic         rf_we,
  output logic [4:0]   rf_waddr,
  output logic [31:0]  rf_wdata,
  output br_resolve_t  res,
  input  fe_events_t   events,
  output logic         done,
  output int           checks,
  output int           failures
);

  localparam logic [31:0] BASE[2] = '{32'h0010_0000, 32'h0040_0000};

  typedef enum int {K_ALU, K_LDA, K_COND, K_BR, K_BRFAR, K_BSR, K_JSR, K_RET, K_JMP} kind_e;

  logic [31:0] prog  [2][NW];
  kind_e       kind  [2][NW];
  int          aux   [2][NW];   // cond: behaviour; lda: value
  int          trip  [2][NW];   // loop trip count
  int          iter  [2][NW];   // loop iteration counter

  // architectural and shadow register state
  logic [31:0] arch_rf[32];
  logic [31:0] rb_model[3];     // what the DUT's register buffers must hold

  // pipeline slots: [0] fetched last cycle ... ; valid bit inside
  typedef struct packed {
    logic        v;
    logic        is_br;
    logic        taken;
    logic [31:0] pc;
    logic [31:0] target;
    pred_meta_t  meta;
    logic        we;
    logic [4:0]  wa;
    logic [31:0] wd;
  } slot_t;
  slot_t pipe[4];

  // reference IB and RBTB
  logic        ib_v;
  logic [26:0] ib_line_addr;
  int          ib_settle;
  bit          rb_v   [RBTB_SETS][RBTB_WAYS];
  logic [31:0] rb_pc  [RBTB_SETS][RBTB_WAYS];
  logic [31:0] rb_tgt [RBTB_SETS][RBTB_WAYS];
  int          rb_ord [RBTB_SETS][$];          // ways, most recent first

  // mechanism counters
  int n_fetch, n_stall, n_ibmiss, n_gated, n_bhu_pcrel, n_bhu_ret, n_bhu_jsr, n_bhu_jmp;
  int n_ovf, n_alloc, n_fix, n_evict, n_rbtb_used, n_rbtb_over, n_stale, n_mis, n_br;
  int n_dp_t, n_dp_nt, n_trap, n_taken, n_tk_bhu, n_tk_rbtb, n_far;

  function automatic int widx(logic [31:0] a);  return int'((a - BASE[a >= BASE[1]]) >> 2); endfunction
  function automatic int reg_of(logic [31:0] a); return int'(a >= BASE[1]); endfunction
  function automatic logic [31:0] addr(int r, int j); return BASE[r] + 32'(j) * 4; endfunction

  function automatic logic [31:0] enc_disp(logic [5:0] op, logic [4:0] ra, logic [31:0] from, logic [31:0] to);
    logic [31:0] d = (to - from - 32'd4) >>> 2;
    return {op, ra, d[20:0]};
  endfunction

  function automatic logic [31:0] line_of(logic [31:0] a);
    return 32'(a);
  endfunction

  task automatic gen_program();
    for (int r = 0; r < 2; r++)
      for (int j = 0; j < NW; j++) begin
        int u = $urandom() % 100;
        logic [31:0] pc = addr(r, j);
        iter[r][j] = 0; trip[r][j] = 0; aux[r][j] = 0;
        if (j == NW - 1) begin
          kind[r][j] = K_BR; prog[r][j] = enc_disp(6'b110000, 5'd31, pc, BASE[r]);
        end else if (u < 52) begin
          kind[r][j] = K_ALU; prog[r][j] = {6'h10, 26'($urandom())};
        end else if (u < 60) begin
          logic [4:0] ra;
          case ($urandom() % 5) 0: ra = 26; 1: ra = 27; 2, 3: ra = 28; default: ra = 5; endcase
          kind[r][j] = K_LDA; prog[r][j] = {6'h08, ra, 5'd0, 16'($urandom())};
          aux[r][j] = int'(addr($urandom() % 2, $urandom() % (NW - 10)) | 32'($urandom() % 4));
        end else if (u < 78) begin
          int d, t;
          logic [5:0] op;
          op = ($urandom() % 4 == 0) ? 6'(49 + $urandom() % 3) : 6'(56 + $urandom() % 8);
          if ($urandom() % 2 && j > 2) begin
            d = -(2 + int'($urandom() % 10)); aux[r][j] = 3; trip[r][j] = 2 + $urandom() % 5;
          end else begin
            d = 1 + $urandom() % 20; aux[r][j] = $urandom() % 3;
          end
          t = j + 1 + d;
          if (t < 0) t = 0;
          if (t > NW - 2) t = NW - 2;
          kind[r][j] = K_COND; prog[r][j] = enc_disp(op, 5'($urandom()), pc, addr(r, t));
        end else if (u < 80) begin
          int t = j + 2 + $urandom() % 30;
          if (t > NW - 2) t = NW - 2;
          kind[r][j] = K_BR; prog[r][j] = enc_disp(6'b110000, 5'd31, pc, addr(r, t));
        end else if (u < 84) begin
          kind[r][j] = K_BRFAR;
          prog[r][j] = enc_disp(6'b110000, 5'd31, pc, addr(1 - r, $urandom() % (NW - 1)));
        end else if (u < 88) begin
          int t = j + 2 + $urandom() % 40;
          if (t > NW - 2) t = NW - 2;
          kind[r][j] = K_BSR; prog[r][j] = enc_disp(6'b110100, 5'd26, pc, addr(r, t));
        end else if (u < 92) begin
          kind[r][j] = K_JSR; prog[r][j] = {6'b000001, 5'd26, ($urandom() % 8 == 0) ? 5'd5 : 5'd27, 16'($urandom())};
        end else if (u < 96) begin
          kind[r][j] = K_RET; prog[r][j] = {6'b000010, 5'd31, ($urandom() % 8 == 0) ? 5'd5 : 5'd26, 16'($urandom())};
        end else begin
          kind[r][j] = K_JMP; prog[r][j] = {6'b000000, 5'd31, ($urandom() % 8 == 0) ? 5'd5 : 5'd28, 16'($urandom())};
        end
        // now and then load the register an indirect branch reads right
        // before it, so the branch sees a stale register buffer
        if ((kind[r][j] == K_JSR || kind[r][j] == K_JMP) && j > 0 && $urandom() % 4 == 0) begin
          kind[r][j-1] = K_LDA;
          prog[r][j-1] = {6'h08, prog[r][j][20:16], 5'd0, 16'($urandom())};
          aux[r][j-1]  = int'(addr($urandom() % 2, $urandom() % (NW - 10)));
        end
      end
  endtask

  function automatic bit rbtb_find(logic [31:0] a, output int s, output int k);
    bit found = 0;
    s = int'((a >> 2) % RBTB_SETS);
    k = -1;
    for (int w = 0; w < RBTB_WAYS; w++)
      if (!found && rb_v[s][w] && rb_pc[s][w] == a) begin k = w; found = 1; end
    return found;
  endfunction

  function automatic void rbtb_touch(int s, int k);
    int at = -1;
    for (int i = 0; i < rb_ord[s].size(); i++) if (rb_ord[s][i] == k) at = i;
    if (at >= 0) rb_ord[s].delete(at);
    rb_ord[s].push_front(k);
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("[%s] FAIL t=%0t pc=%h: %s", NAME, $time, fetch_pc, msg);
  endtask

  task automatic need(int n, string what);
    checks++;
    if (n == 0) fail({what, " never happened"});
  endtask

  initial begin
    logic [31:0] pc, npc, exp_bt, act_t, rfv;
    int r, j, s, k, rbs, rbk, since_trap;
    logic exp_bv, ib_hit, act_taken, is_br, m_hit;
    logic [31:0] m_t;
    slot_t cur;
    void'($urandom(SEED));
    checks = 0; failures = 0; done = 0;
    {n_fetch, n_stall, n_ibmiss, n_gated, n_bhu_pcrel, n_bhu_ret, n_bhu_jsr, n_bhu_jmp} = '0;
    {n_ovf, n_alloc, n_fix, n_evict, n_rbtb_used, n_rbtb_over, n_stale, n_mis, n_br} = '0;
    {n_dp_t, n_dp_nt, n_trap, n_taken, n_tk_bhu, n_tk_rbtb, n_far} = '0;
    for (int i = 0; i < 4; i++) pipe[i] = '0;
    for (int i = 0; i < RBTB_SETS; i++)
      for (int w = 0; w < RBTB_WAYS; w++) begin rb_ord[i].push_back(w); rb_v[i][w] = 0; end
    for (int i = 0; i < 32; i++) arch_rf[i] = 0;
    rb_model = '{0, 0, 0};
    ib_v = 0; ib_line_addr = 0; ib_settle = 0;
    gen_program();
    fetch_en = 0; fetch_pc = BASE[0]; ic_line = '0; rf_we = 0; rf_waddr = 0; rf_wdata = 0; res = '0;
    @(posedge rst_n);
    // initialise $5, $26, $27, $28 through the register-file write port
    for (int q = 0; q < 4; q++) begin
      logic [4:0] a;
      a = (q == 0) ? 5'd5 : 5'(25 + q);
      @(negedge clk);
      rf_we = 1; rf_waddr = a; rf_wdata = addr(q % 2, 10 + q);
      arch_rf[a] = rf_wdata;
      if (a >= 26) rb_model[a - 26] = rf_wdata;
      @(posedge clk);
    end
    @(negedge clk); rf_we = 0;
    pc = BASE[0]; since_trap = 0;

    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      // ---- drive ----
      fetch_en = ($urandom() % 20) != 0;
      fetch_pc = pc;
      r = reg_of(pc); j = widx(pc);
      for (int w = 0; w < 8; w++) ic_line[w*32 +: 32] = prog[r][(j & ~7) + w];
      cur = pipe[3];
      rf_we = cur.v && cur.we; rf_waddr = cur.wa; rf_wdata = cur.wd;
      cur = pipe[1];
      res = '0;
      res.valid = cur.v && cur.is_br; res.pc = cur.pc; res.taken = cur.taken;
      res.target = cur.target; res.meta = cur.meta;
      #1;
      // ---- check and execute the fetched instruction ----
      cur = '0;
      if (fetch_en) begin
        logic [5:0] op;
        logic [31:0] full;
        n_fetch++;
        ib_hit = ib_v && pc[31:5] == ib_line_addr;
        op = prog[r][j][31:26];
        full = pc + 32'd4 + {{9{prog[r][j][20]}}, prog[r][j][20:0], 2'b00};
        checks++;
        if (instr !== prog[r][j]) fail($sformatf("instr %h exp %h", instr, prog[r][j]));
        checks++;
        if (ic_abort !== ib_hit) fail("IB hit");
        exp_bv = 0; exp_bt = 0;
        if (ib_hit && ib_settle == 0) begin
          if (op[5:4] == 2'b11 && (full >> (ADDER_W + 2)) == (pc >> (ADDER_W + 2))) begin
            exp_bv = 1; exp_bt = full;
          end
          if (op == 6'd2) begin exp_bv = 1; exp_bt = rb_model[0] & ~32'h3; end
          if (op == 6'd1) begin exp_bv = 1; exp_bt = rb_model[1] & ~32'h3; end
          if (op == 6'd0) begin exp_bv = 1; exp_bt = rb_model[2] & ~32'h3; end
        end
        if (ib_hit && ib_settle != 0) n_gated++;
        checks++;
        if (pred.bhu_valid !== exp_bv || (exp_bv && pred.bhu_target !== exp_bt))
          fail($sformatf("BHU v=%b t=%h exp v=%b t=%h", pred.bhu_valid, pred.bhu_target, exp_bv, exp_bt));
        m_hit = rbtb_find(pc, rbs, rbk);
        m_t = m_hit ? rb_tgt[rbs][rbk] : 0;
        checks++;
        if (pred.rbtb_hit !== m_hit || (m_hit && pred.rbtb_target !== m_t))
          fail($sformatf("RBTB hit=%b t=%h exp hit=%b t=%h", pred.rbtb_hit, pred.rbtb_target, m_hit, m_t));
        checks++;
        if (pred.pred_taken !== ((pred.rbtb_hit || pred.bhu_valid) && pred.dp_taken) ||
            pred.pred_target !== (pred.rbtb_hit ? pred.rbtb_target : pred.bhu_target) ||
            next_pc !== (pred.pred_taken ? pred.pred_target : pc + 4))
          fail("next-PC muxes");

        // architectural execution
        is_br = 1; act_taken = 1; act_t = 0;
        cur.v = 1; cur.pc = pc; cur.meta = pred;
        case (kind[r][j])
          K_ALU: is_br = 0;
          K_LDA: begin
            // the loaded address alternates between two nearby values
            is_br = 0; cur.we = 1; cur.wa = prog[r][j][25:21];
            cur.wd = 32'(aux[r][j]) + ((iter[r][j] % 2 == 1) ? 32'd32 : 32'd0);
            iter[r][j]++;
          end
          K_COND: begin
            act_t = full;
            case (aux[r][j])
              0: act_taken = 1;
              1: act_taken = 0;
              2: act_taken = ($urandom() % 10) < 7;
              default: begin
                iter[r][j]++;
                act_taken = iter[r][j] < trip[r][j];
                if (!act_taken) iter[r][j] = 0;
              end
            endcase
          end
          K_BR, K_BRFAR: act_t = full;
          K_BSR: begin act_t = full; cur.we = 1; cur.wa = 26; cur.wd = pc + 4; end
          K_JSR: begin
            act_t = arch_rf[prog[r][j][20:16]] & ~32'h3; cur.we = 1; cur.wa = 26; cur.wd = pc + 4;
          end
          default: act_t = arch_rf[prog[r][j][20:16]] & ~32'h3;   // RET, JMP
        endcase
        if (cur.we) arch_rf[cur.wa] = cur.wd;
        cur.is_br = is_br; cur.taken = is_br && act_taken; cur.target = act_t;
        npc = (is_br && act_taken) ? act_t : pc + 4;

        // statistics
        if (!ib_hit) n_ibmiss++;
        if (events.adder_overflow) n_ovf++;
        if (events.rbtb_over_bhu) n_rbtb_over++;
        if (events.rbtb_target) n_rbtb_used++;
        if (pred.dp_taken) n_dp_t++; else n_dp_nt++;
        if (kind[r][j] == K_BRFAR) n_far++;
        if (is_br) begin
          n_br++;
          if (next_pc !== npc) n_mis++;
          if (act_taken) begin
            n_taken++;
            if (!pred.rbtb_hit && pred.bhu_valid && pred.bhu_target == act_t) n_tk_bhu++;
            if (pred.rbtb_hit && pred.rbtb_target == act_t) n_tk_rbtb++;
          end
          if (exp_bv && pred.bhu_target == act_t) begin
            if (op[5:4] == 2'b11) n_bhu_pcrel++;
            if (op == 6'd2) n_bhu_ret++;
            if (op == 6'd1) n_bhu_jsr++;
            if (op == 6'd0) n_bhu_jmp++;
          end
          if (exp_bv && op[5:4] != 2'b11 && pred.bhu_target != act_t) n_stale++;
        end

        // reference IB update
        if (!ib_hit) begin ib_v = 1; ib_line_addr = pc[31:5]; ib_settle = REFILL_N - 1; end
        else if (ib_settle > 0) ib_settle--;
      end else begin
        n_stall++;
        npc = pc;
      end

      // ---- reference RBTB: lookup LRU touch, then the resolution write ----
      begin
        bit wr, lk_same;
        int ws, wk;
        logic ok_bhu, ok_rbtb;
        ok_bhu  = res.meta.bhu_valid && res.meta.bhu_target == res.target;
        ok_rbtb = res.meta.rbtb_hit && res.meta.rbtb_target == res.target;
        wr = res.valid && res.taken && (res.meta.rbtb_hit ? !ok_rbtb : !ok_bhu);
        if (res.valid && res.taken && res.meta.rbtb_hit && !ok_rbtb) n_fix++;
        if (res.valid && res.taken && !res.meta.rbtb_hit && !ok_bhu) n_alloc++;
        checks++;
        if (events.rbtb_alloc !== (wr && !res.meta.rbtb_hit) || events.rbtb_fix !== (wr && res.meta.rbtb_hit))
          fail("RBTB allocation decision");
        lk_same = wr && ((res.pc >> 2) % RBTB_SETS) == ((pc >> 2) % RBTB_SETS);
        if (fetch_en && m_hit && !lk_same) rbtb_touch(rbs, rbk);
        if (wr) begin
          bit ev;
          ev = 0;
          if (!rbtb_find(res.pc, ws, wk)) begin
            for (int w = RBTB_WAYS - 1; w >= 0; w--) if (!rb_v[ws][w]) wk = w;
            if (wk < 0) begin wk = rb_ord[ws][rb_ord[ws].size() - 1]; ev = 1; end
          end
          checks++;
          if (events.rbtb_evict !== ev) fail($sformatf("RBTB eviction dut=%b exp=%b res.pc=%h set=%0d way=%0d hitmeta=%b", events.rbtb_evict, ev, res.pc, ws, wk, res.meta.rbtb_hit));
          if (ev) n_evict++;
          rb_v[ws][wk] = 1; rb_pc[ws][wk] = res.pc; rb_tgt[ws][wk] = res.target & ~32'h3;
          rbtb_touch(ws, wk);
        end
      end
      if (rf_we && rf_waddr >= 26 && rf_waddr <= 28) rb_model[rf_waddr - 26] = rf_wdata;

      // ---- clock edge, then advance the pipeline ----
      @(posedge clk);
      #1;
      pipe[3] = pipe[2]; pipe[2] = pipe[1]; pipe[1] = pipe[0]; pipe[0] = cur;
      since_trap++;
      if (fetch_en && since_trap >= TRAP_EVERY) begin
        since_trap = 0; n_trap++;
        npc = addr($urandom() % 2, $urandom() % (NW - 1));
      end
      pc = npc;
    end

    need(n_ibmiss, "IB miss / refill");
    need(n_stall, "fetch stall");
    need(n_bhu_pcrel, "BHU PC-relative target");
    need(n_bhu_ret, "BHU RET target from $26 buffer");
    need(n_bhu_jsr, "BHU JSR target from $27 buffer");
    need(n_bhu_jmp, "BHU JMP target from $28 buffer");
    need(n_ovf, "short-adder overflow");
    need(n_stale, "wrong indirect target from a register buffer");
    need(n_alloc, "RBTB allocation");
    need(n_fix, "RBTB target correction");
    need(n_evict, "RBTB eviction");
    need(n_rbtb_used, "RBTB target used");
    need(n_rbtb_over, "RBTB priority over BHU");
    need(n_mis, "misprediction");
    need(n_dp_t, "taken direction prediction");
    need(n_dp_nt, "not-taken direction prediction");
    need(n_far, "far branch");
    if (REFILL_N > 1) need(n_gated, "unhandleable window after refill");
    $display("[%s] REFILL_N=%0d RBTB %0dx%0d: fetches=%0d stalls=%0d branches=%0d taken=%0d",
             NAME, REFILL_N, RBTB_SETS, RBTB_WAYS, n_fetch, n_stall, n_br, n_taken);
    $display("[%s] IB misses=%0d gated=%0d adder overflows=%0d stale indirect=%0d",
             NAME, n_ibmiss, n_gated, n_ovf, n_stale);
    $display("[%s] BHU correct: pcrel=%0d ret=%0d jsr=%0d jmp=%0d; RBTB alloc=%0d fix=%0d evict=%0d over-BHU=%0d",
             NAME, n_bhu_pcrel, n_bhu_ret, n_bhu_jsr, n_bhu_jmp, n_alloc, n_fix, n_evict, n_rbtb_over);
    $display("[%s] taken targets: by BHU %0d, by RBTB %0d of %0d; next-PC accuracy %0d/%0d",
             NAME, n_tk_bhu, n_tk_rbtb, n_taken, n_br - n_mis, n_br);
    done = 1;
  end

endmodule
