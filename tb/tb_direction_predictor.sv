// tb_direction_predictor: random predictions and delayed updates, checked
// against a reference table of 2-bit saturating counters indexed by
// PC[11:2] XOR a 10-bit outcome history. Branches follow biased patterns so
// counters saturate both ways.
module tb_direction_predictor;
  import bhu_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, taken, upd_en, upd_taken;
  logic [31:0] pc;
  logic [9:0] index, upd_index;
  int checks = 0, failures = 0, n_t = 0, n_nt = 0;
  logic [1:0] m_pht[1024];
  logic [9:0] m_ghr;

  direction_predictor dut (.clk(clk), .rst_n(rst_n), .pc(pc), .taken(taken), .index(index),
    .upd_en(upd_en), .upd_index(upd_index), .upd_taken(upd_taken));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] ei;
    for (int i = 0; i < 1024; i++) m_pht[i] = 2'b01;
    m_ghr = 0;
    rst_n = 0; pc = 0; upd_en = 0; upd_index = 0; upd_taken = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < 30000; i++) begin
      @(negedge clk);
      pc = 32'h0001_0000 + (($urandom() % 16) << 2);
      upd_en = $urandom() % 2;
      upd_index = ($urandom() % 2) ? index : 10'($urandom() % 64);
      upd_taken = ($urandom() % 8) < ((upd_index[0]) ? 7 : 1);
      #1;
      ei = pc[11:2] ^ m_ghr;
      checks++;
      if (index !== ei || taken !== m_pht[ei][1]) begin
        failures++;
        $display("FAIL pc=%h idx=%h/%h taken=%b exp %b", pc, index, ei, taken, m_pht[ei][1]);
      end
      if (taken) n_t++; else n_nt++;
      if (upd_en) begin
        if (upd_taken && m_pht[upd_index] != 3) m_pht[upd_index]++;
        if (!upd_taken && m_pht[upd_index] != 0) m_pht[upd_index]--;
        m_ghr = {m_ghr[8:0], upd_taken};
      end
      @(posedge clk);
    end
    checks++;
    if (n_t == 0 || n_nt == 0) begin failures++; $display("FAIL: one direction never predicted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
