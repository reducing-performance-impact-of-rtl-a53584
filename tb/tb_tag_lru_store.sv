// tb_tag_lru_store: random fills and touches against a reference model of
// the tags and of true LRU order; checks tags, valid bits and the victim
// (first invalid way, else least recently used) of every touched set, and
// that inv_all clears every valid bit.
module tb_tag_lru_store;
  localparam int N = 16, NW = 4, TW = 18;
  logic clk = 0, rst_n = 0;
  logic [3:0] rd_idx = 0, touch_idx = 0, fill_idx = 0;
  logic rd_valid [NW];
  logic [TW-1:0] rd_tag [NW];
  logic [1:0] victim, touch_way = 0, fill_way = 0;
  logic touch_en = 0, fill_en = 0, inv_all = 0;
  logic [TW-1:0] fill_tag = 0;
  // reference
  logic m_valid [N][NW];
  logic [TW-1:0] m_tag [N][NW];
  int m_order [N][$];   // most recent first
  int checks = 0, failures = 0;

  tag_lru_store #(.N_SETS(N), .N_WAYS(NW), .TAG_W(TW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_victim(int s);
    for (int w = 0; w < NW; w++) if (!m_valid[s][w]) return w;
    return m_order[s][NW - 1];
  endfunction

  task automatic ref_touch(int s, int w);
    foreach (m_order[s][i]) if (m_order[s][i] == w) begin m_order[s].delete(i); break; end
    m_order[s].push_front(w);
  endtask

  task automatic check_set(int s);
    @(negedge clk); rd_idx = 4'(s); #1;
    for (int w = 0; w < NW; w++) begin
      check(rd_valid[w] == m_valid[s][w], $sformatf("set %0d way %0d valid", s, w));
      if (m_valid[s][w]) check(rd_tag[w] == m_tag[s][w], $sformatf("set %0d way %0d tag", s, w));
    end
    check(int'(victim) == ref_victim(s), $sformatf("set %0d victim %0d exp %0d", s, victim, ref_victim(s)));
  endtask

  initial begin
    for (int s = 0; s < N; s++) begin
      m_order[s] = {};
      for (int w = 0; w < NW; w++) begin m_valid[s][w] = 0; m_order[s].push_back(w); end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < N; s++) check_set(s);
    for (int n = 0; n < 3000; n++) begin
      int s, w;
      s = $urandom_range(0, N - 1);
      @(negedge clk);
      if ($urandom_range(0, 2) == 0) begin
        rd_idx = 4'(s); #1;
        w = int'(victim);
        fill_en = 1; fill_idx = 4'(s); fill_way = 2'(w); fill_tag = TW'($urandom);
        m_valid[s][w] = 1; m_tag[s][w] = fill_tag;
      end else begin
        w = $urandom_range(0, NW - 1);
        touch_en = 1; touch_idx = 4'(s); touch_way = 2'(w);
      end
      ref_touch(s, w);
      @(negedge clk); fill_en = 0; touch_en = 0;
      check_set(s);
    end
    @(negedge clk); inv_all = 1;
    @(negedge clk); inv_all = 0;
    for (int s = 0; s < N; s++) begin
      for (int w = 0; w < NW; w++) m_valid[s][w] = 0;
      check_set(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
