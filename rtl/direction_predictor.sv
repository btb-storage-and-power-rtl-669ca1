// direction_predictor: gshare-style taken/not-taken predictor.
//
// The branch prediction mechanism keeps direction and target prediction in
// separate structures; this is the direction half. A table of 2^IDX_W
// two-bit saturating counters is indexed by PC[IDX_W+1:2] XOR the global
// history of the last HIST resolved branch outcomes. The counter's upper bit
// is the prediction. The table size, history length and training policy are
// this design's own choices.
//
// Prediction is combinational from `pc`; `index` is returned with the branch
// at resolution (`upd_index`), where the counter is trained and the outcome
// is shifted into the history (history is updated at resolution, not
// speculatively). Counters reset to weakly not-taken, history to zero.
module direction_predictor
  import bhu_pkg::*;
#(
  parameter int unsigned IDX_W = 10,
  parameter int unsigned HIST  = 10
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [XLEN-1:0]  pc,
  output logic             taken,
  output logic [IDX_W-1:0] index,
  input  logic             upd_en,
  input  logic [IDX_W-1:0] upd_index,
  input  logic             upd_taken
);

  initial assert (HIST >= 1 && HIST <= IDX_W && IDX_W <= 16)
    else $error("direction_predictor: need 1 <= HIST <= IDX_W <= 16");

  logic [1:0]      pht_q [2**IDX_W];
  logic [HIST-1:0] ghr_q;

  assign index = pc[IDX_W+1:2] ^ IDX_W'(ghr_q);
  assign taken = pht_q[index][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2**IDX_W; i++) pht_q[i] <= 2'b01;
      ghr_q <= '0;
    end else if (upd_en) begin
      if (upd_taken && pht_q[upd_index] != 2'b11)
        pht_q[upd_index] <= pht_q[upd_index] + 2'b01;
      else if (!upd_taken && pht_q[upd_index] != 2'b00)
        pht_q[upd_index] <= pht_q[upd_index] - 2'b01;
      ghr_q <= (ghr_q << 1) | HIST'(upd_taken);
    end
  end

endmodule
