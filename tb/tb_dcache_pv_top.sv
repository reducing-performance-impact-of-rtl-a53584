// tb_dcache_pv_top: end-to-end test of the whole cache at its default size
// (64 KB, 4 ways, 256 sets, 20 % slowed lines, reshuffling degree 3) with a
// next-level memory model of 12 cycles.
//
// Phase 1, before characterisation: every set runs at the worst latency
// (3 extra cycles) with the identity decoder; data must be correct.
// Phase 2: init_start is raised while accesses are in flight; the cache
// drains, runs the March test, reshuffles, programs the latency table and
// flushes. The slow-line count and the number of slow sets are checked
// against values recomputed from the array models' seeds.
// Phase 3: random loads and stores; every hit must report, and isolated
// hits must take, the latency of its set after reshuffling (the largest
// k-th smallest line delay over the ways, computed here by sorting).
// Each mechanism is counted, and one that never happened is a failure:
// worst-case accesses, regular hits, stretched hits, refills, stores,
// request stalls, drain before init, sets sped up by reshuffling.
module tb_dcache_pv_top;
  import dcache_pkg::*;
  localparam int N = 256, NW = 4, PCT = 20;
  localparam logic [31:0] SEED = 32'h2013_0001;

  logic clk = 0, rst_n = 0;
  logic init_start = 0, init_busy, init_done;
  logic [10:0] n_slow_lines, n_unrep_lines;
  logic [8:0] n_slow_sets;
  logic req_valid = 0, req_ready, resp_valid;
  dc_req_t req = '0;
  dc_resp_t resp;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr;
  word_t mem_req_wdata, mem_resp_data;

  dcache_pv_top dut (.*);

  l2_mem_model #(.LATENCY(12)) u_mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [1:0] line_lat [NW][N];
  int set_lat [N];       // latency expected for each set in the current phase
  int ident_lat [N];     // slowest line of each set without reshuffling
  word_t ref_mem [logic [31:0]];

  typedef struct {
    logic we; logic [31:0] addr; word_t exp; int acc; bit isolated;
  } pend_t;
  pend_t pend [$];
  int n_worst = 0, n_hit0 = 0, n_hit_slow = 0, n_miss = 0, n_store = 0, n_stall = 0;
  int n_drain = 0, n_sped = 0;
  longint lat_sum = 0;
  int lat_cnt = 0;

  function automatic logic [31:0] xs(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13); y = y ^ (y >> 17); y = y ^ (y << 5);
    return y;
  endfunction

  function automatic word_t init_word(input logic [31:0] a);
    logic [63:0] x;
    x = 64'(a) * 64'h9E37_79B9_7F4A_7C15 + 64'h0123_4567_89AB_CDEF;
    x = x ^ (x >> 29);
    return x;
  endfunction

  function automatic word_t ref_rd(input logic [31:0] a);
    if (ref_mem.exists(a)) return ref_mem[a];
    return init_word(a);
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && resp_valid) begin
    pend_t p;
    #1;
    if (pend.size() == 0) check(0, "response without request");
    else begin
      p = pend.pop_front();
      check(resp.we == p.we, "response type");
      if (!p.we) check(resp.rdata == p.exp, $sformatf("load %h: %h expected %h", p.addr, resp.rdata, p.exp));
      else n_store++;
      if (resp.hit) begin
        int s;
        s = int'(p.addr[13:6]);
        check(int'(resp.lat) == set_lat[s], $sformatf("set %0d latency %0d expected %0d", s, resp.lat, set_lat[s]));
        if (p.isolated)
          check(cyc - p.acc == 2 + set_lat[s], $sformatf("isolated hit, set %0d: %0d cycles", s, cyc - p.acc + 1));
        if (!init_done) n_worst++;
        else begin
          if (set_lat[s] == 0) n_hit0++; else n_hit_slow++;
          lat_sum += 3 + set_lat[s];
          lat_cnt++;
        end
      end else if (!p.we) n_miss++;
    end
  end

  task automatic issue(input logic we, input logic [31:0] addr, input word_t d);
    pend_t p;
    @(negedge clk);
    req_valid = 1; req.we = we; req.addr = addr; req.wdata = d;
    #2;
    while (!req_ready) begin n_stall++; @(negedge clk); #2; end
    p.we = we; p.addr = addr; p.acc = cyc; p.isolated = (pend.size() == 0) && dut.u_pipe.idle;
    p.exp = we ? '0 : ref_rd(addr);
    if (we) ref_mem[addr] = d;
    pend.push_back(p);
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  task automatic drain();
    while (pend.size() != 0) @(negedge clk);
    @(negedge clk);
  endtask

  function automatic logic [31:0] mk(int tag, int set, int word);
    return (32'(tag) << 14) | (32'(set) << 6) | (32'(word) << 3);
  endfunction

  task automatic traffic(input int n_ops, input int n_tags);
    for (int n = 0; n < n_ops; n++) begin
      int s, t, w;
      s = $urandom_range(0, N - 1);
      t = $urandom_range(0, n_tags - 1);
      w = $urandom_range(0, 7);
      if ($urandom_range(0, 3) == 0) issue(1, mk(t, s, w), {$urandom, $urandom});
      else issue(0, mk(t, s, w), '0);
      if ($urandom_range(0, 5) == 0) drain();
    end
    drain();
  endtask

  initial begin
    int exp_slow_lines, exp_slow_sets, init_t0;
    exp_slow_lines = 0;
    for (int w = 0; w < NW; w++) begin
      logic [31:0] s;
      s = SEED + 32'h9E37_79B9 * 32'(w);
      for (int r = 0; r < N; r++) begin
        s = xs(s);
        if ((s % 100) < PCT) begin s = xs(s); line_lat[w][r] = 2'(1 + (s % 3)); end
        else line_lat[w][r] = 0;
        if (line_lat[w][r] != 0) exp_slow_lines++;
      end
    end
    for (int s = 0; s < N; s++) set_lat[s] = 3;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // phase 1: worst-case timing everywhere
    traffic(400, 8);

    // phase 2: characterisation, started while requests are in flight
    for (int i = 0; i < 3; i++) issue(0, mk(1, 40 + i, 0), '0);
    @(negedge clk); init_start = 1;
    #2 if (!dut.u_pipe.idle) n_drain++;
    @(negedge clk); init_start = 0;
    init_t0 = cyc;
    while (!init_done) begin
      @(negedge clk);
      #2 if (init_busy) check(!req_ready, "no request taken during init");
      if (init_busy && dut.istate == dut.I_DRAIN) n_drain++;
    end
    $display("characterisation took %0d cycles", cyc - init_t0);
    drain();
    check(int'(n_slow_lines) == exp_slow_lines,
          $sformatf("slow lines %0d expected %0d", n_slow_lines, exp_slow_lines));
    check(n_unrep_lines == 0, "no line beyond 3 extra cycles");
    // expected set latencies after reshuffling
    exp_slow_sets = 0;
    for (int g = 0; g < N / 8; g++) begin
      int srt [NW][8];
      for (int w = 0; w < NW; w++) begin
        int v [8];
        for (int i = 0; i < 8; i++) v[i] = line_lat[w][g * 8 + i];
        v.sort();
        for (int i = 0; i < 8; i++) srt[w][i] = v[i];
      end
      for (int k = 0; k < 8; k++) begin
        int mx, mi;
        mx = 0; mi = 0;
        for (int w = 0; w < NW; w++) begin
          if (srt[w][k] > mx) mx = srt[w][k];
          if (line_lat[w][g * 8 + k] > mi) mi = line_lat[w][g * 8 + k];
        end
        set_lat[g * 8 + k] = mx;
        ident_lat[g * 8 + k] = mi;
        if (mx != 0) exp_slow_sets++;
      end
    end
    check(int'(n_slow_sets) == exp_slow_sets, $sformatf("slow sets %0d expected %0d", n_slow_sets, exp_slow_sets));
    begin
      int sum_id, sum_rs;
      sum_id = 0; sum_rs = 0;
      for (int s = 0; s < N; s++) begin
        sum_id += ident_lat[s]; sum_rs += set_lat[s];
        if (set_lat[s] < ident_lat[s]) n_sped++;
      end
      $display("sum of set latencies: identity %0d, reshuffled %0d; slow lines %0d, slow sets %0d",
               sum_id, sum_rs, n_slow_lines, n_slow_sets);
      check(sum_rs <= sum_id, "reshuffling does not slow the cache");
    end
    // the March test overwrote the array: the reference stays the memory model

    // phase 3: tuned timing
    traffic(4000, 6);
    // isolated hits on every set
    for (int s = 0; s < N; s++) begin
      issue(0, mk(9, s, 3), '0); drain();
      issue(0, mk(9, s, 4), '0); drain();
    end

    $display("worst-case=%0d regular=%0d stretched=%0d refills=%0d stores=%0d stalls=%0d drain=%0d sped-up sets=%0d",
             n_worst, n_hit0, n_hit_slow, n_miss, n_store, n_stall, n_drain, n_sped);
    if (lat_cnt > 0)
      $display("mean hit latency after tuning: %0d.%02d cycles (worst case 6)",
               lat_sum / lat_cnt, (lat_sum * 100 / lat_cnt) % 100);
    check(n_worst > 0, "worst-case accesses happened");
    check(n_hit0 > 0, "regular hits happened");
    check(n_hit_slow > 0, "stretched hits happened");
    check(n_miss > 0, "refills happened");
    check(n_store > 0, "stores happened");
    check(n_stall > 0, "stalls happened");
    check(n_drain > 0, "drain before init happened");
    check(n_sped > 0, "reshuffling sped up some sets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
