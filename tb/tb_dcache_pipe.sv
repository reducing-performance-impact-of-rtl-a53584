// tb_dcache_pipe: the pipeline controller with a latency table, a
// reshuffling decoder programmed with random permutations, four array
// models with 40 % slowed lines and a next-level memory model.
//
// The testbench recomputes every line's delay from the model seeds,
// programs the table with each set's slowest mapped line, and checks:
// isolated hits answer in exactly 3 + table-value cycles (accept cycle
// counted), back-to-back hits to regular sets stream at one per cycle, a
// load miss refills the line and returns the right word, stores are
// written through, and random traffic returns the values of a reference
// memory with the table latency reported on every hit.
module tb_dcache_pipe;
  import dcache_pkg::*;
  localparam int N = 256, NW = 4, PCT = 40;
  localparam logic [31:0] SEED0 = 32'h5EED_0001;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, resp_valid;
  dc_req_t req = '0;
  dc_resp_t resp;
  logic lt_rd_en;
  logic [7:0] lt_rd_idx;
  logic [1:0] lt_rd_lat;
  logic lt_we = 0;
  logic [7:0] lt_widx = 0;
  logic [1:0] lt_wlat = 0;
  logic [7:0] dec_idx;
  logic [7:0] dec_row [NW];
  logic cfg_we = 0;
  logic [1:0] cfg_way = 0;
  logic [7:0] cfg_idx = 0;
  logic [2:0] cfg_slot = 0;
  logic arr_en [NW], arr_we [NW], arr_sa_en [NW];
  logic [7:0] arr_row [NW];
  logic [2:0] arr_word;
  word_t arr_wdata;
  word_t arr_rdata [NW];
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr;
  word_t mem_req_wdata, mem_resp_data;
  logic idle;

  dcache_pipe dut (
    .clk, .rst_n, .enable(1'b1), .flush(1'b0), .idle,
    .req_valid, .req_ready, .req, .resp_valid, .resp,
    .lt_rd_en, .lt_rd_idx, .lt_rd_lat, .dec_idx, .dec_row,
    .arr_en, .arr_we, .arr_row, .arr_sa_en, .arr_word, .arr_wdata, .arr_rdata,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_data);

  latency_table u_lt (.clk, .rst_n, .rd_en(lt_rd_en), .rd_idx(lt_rd_idx), .rd_lat(lt_rd_lat),
                      .wr_en(lt_we), .wr_idx(lt_widx), .wr_lat(lt_wlat));
  reshuffle_decoder u_dec (.clk, .rst_n, .idx(dec_idx), .phys_row(dec_row),
                           .cfg_we, .cfg_way, .cfg_idx, .cfg_slot);
  for (genvar w = 0; w < NW; w++) begin : g_way
    pv_sram_way #(.N_ROWS(N), .WPL(8), .W(64), .L_W(2), .FAULT_PCT(PCT),
                  .SEED(SEED0 + 32'(w) * 32'h1111_1111)) u_way (
      .clk, .en(arr_en[w]), .we(arr_we[w]), .row(arr_row[w]), .word(arr_word),
      .wdata(arr_wdata), .sa_en(arr_sa_en[w]), .rdata(arr_rdata[w]));
  end
  l2_mem_model #(.LATENCY(12)) u_mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [1:0] line_lat [NW][N];
  int perm [NW][N];
  int set_lat [N];
  word_t ref_mem [logic [31:0]];

  typedef struct {
    logic we; logic [31:0] addr; word_t exp; int acc; bit isolated;
  } pend_t;
  pend_t pend [$];
  int n_hit0 = 0, n_hit_slow = 0, n_miss = 0, n_store = 0, n_b2b = 0, n_stall = 0;
  int last_resp = -10;

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // response monitor, sampled mid-cycle
  always @(negedge clk) if (rst_n && resp_valid) begin
    pend_t p;
    #1;
    if (pend.size() == 0) begin
      check(0, "response without request");
    end else begin
      p = pend.pop_front();
      check(resp.we == p.we, "response type");
      if (!p.we) check(resp.rdata == p.exp, $sformatf("load %h data %h expected %h", p.addr, resp.rdata, p.exp));
      if (p.we) n_store++;
      if (resp.hit) begin
        int s;
        s = int'(p.addr[13:6]);
        check(int'(resp.lat) == set_lat[s], $sformatf("set %0d latency %0d expected %0d", s, resp.lat, set_lat[s]));
        if (p.isolated)
          check(cyc - p.acc == 2 + set_lat[s], $sformatf("isolated hit set %0d took %0d cycles", s, cyc - p.acc + 1));
        if (set_lat[s] == 0) n_hit0++; else n_hit_slow++;
      end else if (!p.we) begin
        n_miss++;
      end
      if (last_resp == cyc - 1) n_b2b++;
      last_resp = cyc;
    end
  end

  // issue one request and wait until it is accepted
  task automatic issue(input logic we, input logic [31:0] addr, input word_t d);
    pend_t p;
    @(negedge clk);
    req_valid = 1; req.we = we; req.addr = addr; req.wdata = d;
    #2;
    while (!req_ready) begin n_stall++; @(negedge clk); #2; end
    p.we = we; p.addr = addr; p.acc = cyc; p.isolated = (pend.size() == 0) && idle;
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

  initial begin
    int slow_set, fast_set;
    // variation draw of every line, recomputed
    for (int w = 0; w < NW; w++) begin
      logic [31:0] s;
      s = SEED0 + 32'(w) * 32'h1111_1111;
      for (int r = 0; r < N; r++) begin
        s = xs(s);
        if ((s % 100) < PCT) begin s = xs(s); line_lat[w][r] = 2'(1 + (s % 3)); end
        else line_lat[w][r] = 0;
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // random permutations inside each group of 8, then table = slowest mapped line
    for (int w = 0; w < NW; w++)
      for (int g = 0; g < N / 8; g++) begin
        int p [8];
        for (int i = 0; i < 8; i++) p[i] = i;
        for (int i = 7; i > 0; i--) begin
          int j, t;
          j = $urandom_range(0, i); t = p[i]; p[i] = p[j]; p[j] = t;
        end
        for (int i = 0; i < 8; i++) begin
          perm[w][g * 8 + i] = g * 8 + p[i];
          @(negedge clk); cfg_we = 1; cfg_way = 2'(w); cfg_idx = 8'(g * 8 + i); cfg_slot = 3'(p[i]);
        end
      end
    @(negedge clk); cfg_we = 0;
    slow_set = -1; fast_set = -1;
    for (int s = 0; s < N; s++) begin
      int mx;
      mx = 0;
      for (int w = 0; w < NW; w++) if (line_lat[w][perm[w][s]] > mx) mx = line_lat[w][perm[w][s]];
      set_lat[s] = mx;
      if (mx == 3 && slow_set < 0) slow_set = s;
      if (mx == 0 && fast_set < 0) fast_set = s;
      @(negedge clk); lt_we = 1; lt_widx = 8'(s); lt_wlat = 2'(mx);
    end
    @(negedge clk); lt_we = 0;
    check(slow_set >= 0 && fast_set >= 0, "both slow and regular sets exist");
    if (fast_set < 0) fast_set = 0;
    if (slow_set < 0) slow_set = 1;

    // directed: miss then isolated hits on a regular and a slow set
    issue(0, mk(3, fast_set, 5), '0); drain();
    issue(0, mk(3, fast_set, 2), '0); drain();
    issue(0, mk(7, slow_set, 1), '0); drain();
    issue(0, mk(7, slow_set, 6), '0); drain();
    // store hit, then load it back
    issue(1, mk(7, slow_set, 6), 64'hDEAD_BEEF_0000_0001); drain();
    issue(0, mk(7, slow_set, 6), '0); drain();
    check(u_mem.store.exists(mk(7, slow_set, 6)) && u_mem.store[mk(7, slow_set, 6)] == 64'hDEAD_BEEF_0000_0001,
          "store written through");
    // back-to-back hits to a regular set: one per cycle
    begin
      int first_acc, n0;
      n0 = n_b2b;
      first_acc = cyc + 1;
      for (int i = 0; i < 8; i++) issue(0, mk(3, fast_set, i), '0);
      check(cyc - first_acc == 7 || cyc - first_acc == 8, $sformatf("8 hits accepted over %0d cycles", cyc - first_acc));
      drain();
      check(n_b2b - n0 >= 7, $sformatf("streamed responses %0d", n_b2b - n0));
    end
    // random traffic over 24 sets and 6 tags: hits, misses, evictions, stores
    for (int n = 0; n < 6000; n++) begin
      int s, t, w;
      s = (n % 3 == 0) ? fast_set : $urandom_range(0, 23) * 10 % N;
      t = $urandom_range(0, 5);
      w = $urandom_range(0, 7);
      if ($urandom_range(0, 3) == 0) issue(1, mk(t, s, w), {$urandom, $urandom});
      else issue(0, mk(t, s, w), '0);
      if ($urandom_range(0, 7) == 0) drain();
    end
    drain();
    $display("hits regular=%0d slow=%0d misses=%0d stores=%0d back-to-back=%0d stall cycles=%0d",
             n_hit0, n_hit_slow, n_miss, n_store, n_b2b, n_stall);
    check(n_hit0 > 0 && n_hit_slow > 0 && n_miss > 0 && n_store > 0 && n_stall > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
