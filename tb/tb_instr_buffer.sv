// tb_instr_buffer: fetch streams that mostly step sequentially, sometimes
// jump into the middle of another line, and sometimes pause. The i-cache is
// a function of the address. A reference keeps the last fetched line address
// and the unhandleable-window count and predicts ic_abort, bhu_valid and the
// instruction. Instances with REFILL_N = 1 (default) and REFILL_N = 3.
module tb_instr_buffer;
  import bhu_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, fetch;
  logic [31:0] pc;
  logic [255:0] line;
  logic ab1, ab3, bv1, bv3;
  logic [31:0] in1, in3;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_gated = 0;

  instr_buffer                 dut1 (.clk(clk), .rst_n(rst_n), .fetch(fetch), .pc(pc),
    .ic_line(line), .ic_abort(ab1), .instr(in1), .bhu_valid(bv1));
  instr_buffer #(.REFILL_N(3)) dut3 (.clk(clk), .rst_n(rst_n), .fetch(fetch), .pc(pc),
    .ic_line(line), .ic_abort(ab3), .instr(in3), .bhu_valid(bv3));

  function automatic logic [31:0] mem(logic [31:0] a);
    return (a * 32'h9E3779B1) ^ 32'h5A5A1234;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        m_valid;
    logic [26:0] m_line;
    int          m_cnt3;
    logic        hit;
    m_valid = 0; m_line = 0; m_cnt3 = 0;
    rst_n = 0; fetch = 0; pc = 32'h1000; line = '0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      fetch = ($urandom() % 8) != 0;
      if (fetch && $urandom() % 10 == 0) pc = 32'h0001_0000 + (($urandom() % 256) << 2);
      hit = m_valid && (pc[31:5] == m_line);
      // the i-cache line is only valid on a miss; on a hit it is garbage,
      // which the IB must not use
      if (!hit) for (int w = 0; w < 8; w++) line[w*32 +: 32] = mem({pc[31:5], 5'(w * 4)});
      else      line = {8{$urandom()}};
      #1;
      checks++;
      if (ab1 !== (fetch && hit) || ab3 !== (fetch && hit) ||
          bv1 !== (fetch && hit) || bv3 !== (fetch && hit && m_cnt3 == 0) ||
          (fetch && (in1 !== mem(pc) || in3 !== mem(pc)))) begin
        failures++;
        $display("FAIL pc=%h hit=%b ab=%b/%b bv=%b/%b instr=%h/%h exp %h", pc, hit, ab1, ab3,
                 bv1, bv3, in1, in3, mem(pc));
      end
      if (fetch) begin
        if (!hit) begin
          n_miss++;
          m_valid = 1; m_line = pc[31:5]; m_cnt3 = 2;
        end else begin
          n_hit++;
          if (m_cnt3 > 0) begin m_cnt3--; n_gated++; end
        end
      end
      @(posedge clk);
      #1 if (fetch) pc = pc + 4;
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_gated == 0) begin
      failures++; $display("FAIL: hit/miss/window case missing");
    end
    $display("hits=%0d misses=%0d gated=%0d", n_hit, n_miss, n_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
