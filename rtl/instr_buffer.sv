// instr_buffer: one-line instruction buffer (IB) in front of the i-cache.
//
// The IB keeps a copy of the most recently fetched i-cache line together with
// the tag&index part of its address (PC[31:5] for a 32-byte line). Each fetch
// compares PC[31:5] with the stored value. On a match the instruction is
// taken from the IB (word PC[4:2]) and `ic_abort` tells the i-cache to drop
// its access; on a mismatch the instruction comes from the i-cache line
// presented on `ic_line` in the same cycle, and that line is written into the
// IB (the write enable is the inverted match, as in a conventional IB).
//
// The BHU can only be fed from the IB, so the instruction fetched in a refill
// cycle is not visible to it. With REFILL_N > 1 (slower i-cache or a longer
// BHU), the first REFILL_N instructions fetched from a new line are
// unhandleable: `bhu_valid` stays low for REFILL_N-1 further IB hits after
// the refill. The default REFILL_N = 1 is the single-cycle refill case.
//
// Timing: one fetch per cycle when `fetch` is high; `instr`, `ic_abort` and
// `bhu_valid` are combinational from `pc`. Word 0 of a line is ic_line[31:0].
// Reset empties the buffer.
module instr_buffer
  import bhu_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned REFILL_N   = 1
)(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    fetch,      // a fetch at pc this cycle
  input  logic [XLEN-1:0]         pc,
  input  logic [LINE_BYTES*8-1:0] ic_line,    // i-cache line holding pc
  output logic                    ic_abort,   // IB hit: i-cache access not needed
  output logic [XLEN-1:0]         instr,      // fetched instruction
  output logic                    bhu_valid   // instr came from the IB, BHU may use it
);

  localparam int unsigned WORDS = LINE_BYTES / 4;
  localparam int unsigned OFF_W = $clog2(LINE_BYTES);   // byte offset bits
  localparam int unsigned TAG_W = XLEN - OFF_W;          // tag & index bits
  localparam int unsigned CNT_W = (REFILL_N > 1) ? $clog2(REFILL_N) : 1;

  initial assert (REFILL_N >= 1 && WORDS >= 2 && (1 << OFF_W) == LINE_BYTES)
    else $error("instr_buffer: bad parameters");

  logic [LINE_BYTES*8-1:0] line_q;
  logic [TAG_W-1:0]        last_q;
  logic                    last_valid_q;
  logic [CNT_W-1:0]        settle_q;    // IB hits still hidden from the BHU
  logic                    hit;
  logic [OFF_W-3:0]        word;

  assign hit      = last_valid_q && (pc[XLEN-1:OFF_W] == last_q);
  assign word     = pc[OFF_W-1:2];
  assign ic_abort = fetch && hit;
  assign instr    = hit ? line_q[word*32 +: 32] : ic_line[word*32 +: 32];
  assign bhu_valid = fetch && hit && (settle_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_valid_q <= 1'b0;
      last_q       <= '0;
      settle_q     <= '0;
    end else if (fetch) begin
      if (!hit) begin
        last_valid_q <= 1'b1;
        last_q       <= pc[XLEN-1:OFF_W];
        settle_q     <= CNT_W'(REFILL_N - 1);
      end else if (settle_q != '0) begin
        settle_q <= settle_q - 1'b1;
      end
    end
  end

  // Line storage has no reset: it is only read after a refill has filled it.
  always_ff @(posedge clk) begin
    if (fetch && !hit) line_q <= ic_line;
  end

endmodule
