// rbtb: Reduced Branch Target Buffer.
//
// A conventional BTB holding tag and target only (direction comes
// from a separate predictor), made small because it only holds the branches
// the Branch Handling Unit could not handle: branches fetched during an IB
// refill, PC-relative branches beyond the short adder, and indirect branches
// whose register buffer gave a wrong target.
//
// Organisation: SETS sets x WAYS ways. The PC's two low bits are dropped;
// index = PC[IDX_W+1:2], tag = PC[31:IDX_W+2]. Each entry stores valid, tag
// and a 30-bit word target. Replacement is true LRU (per-way age counters);
// with WAYS = 1 it is direct-mapped.
//
// Lookup is combinational from `lk_pc` (the IF-stage access); a hit with
// `lk_en` high marks the way most recently used at the clock edge. The write
// port (`wr_en`, from branch resolution) updates the matching entry if the
// branch is present, otherwise fills an invalid way or the LRU way; `wr_evict`
// tells that a valid entry of another branch was replaced. A write to the same
// set in the same cycle as a lookup wins the LRU order.
module rbtb
  import bhu_pkg::*;
#(
  parameter int unsigned SETS = 32,
  parameter int unsigned WAYS = 1
)(
  input  logic            clk,
  input  logic            rst_n,
  // lookup (IF)
  input  logic            lk_en,
  input  logic [XLEN-1:0] lk_pc,
  output logic            lk_hit,
  output logic [XLEN-1:0] lk_target,
  // write (resolution)
  input  logic            wr_en,
  input  logic [XLEN-1:0] wr_pc,
  input  logic [XLEN-1:0] wr_target,
  output logic            wr_evict
);

  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned IDX_B = (SETS > 1) ? $clog2(SETS) : 0;  // PC bits used
  localparam int unsigned TAG_W = XLEN - 2 - IDX_B;
  localparam int unsigned TGT_W = XLEN - 2;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  initial assert ((1 << IDX_B) == SETS && WAYS >= 1 && (WAYS == 1 || (1 << WAY_W) == WAYS))
    else $error("rbtb: SETS and WAYS must be powers of two");

  logic [WAYS-1:0]             valid_q [SETS];
  logic [TAG_W-1:0]            tag_q   [SETS][WAYS];
  logic [TGT_W-1:0]            tgt_q   [SETS][WAYS];
  logic [WAY_W-1:0]            age_q   [SETS][WAYS];   // 0 = most recent

  function automatic logic [IDX_W-1:0] idx_of(logic [XLEN-1:0] a);
    return (SETS > 1) ? IDX_W'(a[2 +: IDX_W]) : '0;
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(logic [XLEN-1:0] a);
    return a[XLEN-1 -: TAG_W];
  endfunction

  // ---------------- lookup ----------------
  logic [IDX_W-1:0] lk_idx;
  logic [WAY_W-1:0] lk_way;

  always_comb begin
    lk_idx    = idx_of(lk_pc);
    lk_hit    = 1'b0;
    lk_way    = '0;
    lk_target = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[lk_idx][w] && tag_q[lk_idx][w] == tag_of(lk_pc) && !lk_hit) begin
        lk_hit    = 1'b1;
        lk_way    = WAY_W'(w);
        lk_target = {tgt_q[lk_idx][w], 2'b00};
      end
    end
  end

  // ---------------- write way choice ----------------
  logic [IDX_W-1:0] wr_idx;
  logic [WAY_W-1:0] wr_way;
  logic             wr_match, wr_free;

  always_comb begin
    wr_idx   = idx_of(wr_pc);
    wr_match = 1'b0;
    wr_free  = 1'b0;
    wr_way   = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[wr_idx][w] && tag_q[wr_idx][w] == tag_of(wr_pc) && !wr_match) begin
        wr_match = 1'b1;
        wr_way   = WAY_W'(w);
      end
    if (!wr_match) begin
      for (int w = 0; w < WAYS; w++)
        if (!valid_q[wr_idx][w] && !wr_free) begin
          wr_free = 1'b1;
          wr_way  = WAY_W'(w);
        end
      if (!wr_free)
        for (int w = 0; w < WAYS; w++)
          if (age_q[wr_idx][w] == WAY_W'(WAYS - 1)) wr_way = WAY_W'(w);
    end
    wr_evict = wr_en && !wr_match && !wr_free;
  end

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) age_q[s][w] <= WAY_W'(w);
      end
    end else begin
      // LRU touch on a lookup hit (skipped if the write touches the same set)
      if (lk_en && lk_hit && WAYS > 1 && !(wr_en && wr_idx == lk_idx)) begin
        for (int w = 0; w < WAYS; w++)
          if (age_q[lk_idx][w] < age_q[lk_idx][lk_way])
            age_q[lk_idx][w] <= age_q[lk_idx][w] + 1'b1;
        age_q[lk_idx][lk_way] <= '0;
      end
      if (wr_en) begin
        valid_q[wr_idx][wr_way] <= 1'b1;
        if (WAYS > 1) begin
          for (int w = 0; w < WAYS; w++)
            if (age_q[wr_idx][w] < age_q[wr_idx][wr_way])
              age_q[wr_idx][w] <= age_q[wr_idx][w] + 1'b1;
          age_q[wr_idx][wr_way] <= '0;
        end
      end
    end
  end

  // Tag and target arrays need no reset: they are guarded by valid_q.
  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag_q[wr_idx][wr_way] <= tag_of(wr_pc);
      tgt_q[wr_idx][wr_way] <= wr_target[XLEN-1:2];
    end
  end

endmodule
