// wl_runner: drives one cache instance through a data-intensive stream for
// the workload testbench. Configuration: FAULT_PCT percent slowed lines,
// reshuffling degree R, array variation drawn from SEED. After characterisation it sweeps a 32 KB array
// twice, word by word (first pass refills, second pass hits only), issuing
// a new load every cycle the cache accepts one. It reports the sum of the
// set latencies in the table, the cycles of the all-hit pass, and the
// cycles the same pass would take with no variation (perfect: one cycle
// per access in stage 2) and with worst-case timing for every set
// (delayed: four cycles per access), and with an oracle that knows the
// delay of every individual line (one plus that line's delay per access,
// using the way that hit and the decoder mapping). It checks the loaded data and that
// the measured pass length equals the sum over accesses of 1 + the set's
// table value, within two cycles of pipeline fill.
module wl_runner
  import dcache_pkg::*;
#(
  parameter int unsigned FAULT_PCT = 20,
  parameter int unsigned R         = 3,
  parameter int unsigned SEED      = 32'h2013_0001
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   lt_sum,
  output int   pass_cycles,
  output int   perfect_cycles,
  output int   delayed_cycles,
  output int   oracle_cycles
);
  localparam int N = 256, WORDS = 32 * 1024 / 8;

  logic init_start = 0, init_busy, init_done;
  logic [10:0] n_slow_lines, n_unrep_lines;
  logic [8:0] n_slow_sets;
  logic req_valid = 0, req_ready, resp_valid;
  dc_req_t req = '0;
  dc_resp_t resp;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr;
  word_t mem_req_wdata, mem_resp_data;

  dcache_pv_top #(.R(R), .FAULT_PCT(FAULT_PCT), .SEED(SEED)) dut (.*);

  l2_mem_model #(.LATENCY(12)) u_mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data));

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [31:0] exp_q [$];
  int n_resp = 0, last_resp = 0;
  bit hit_pass = 0;
  int oracle_acc = 0;
  logic [1:0] line_lat [4][N];

  function automatic logic [31:0] xs(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13); y = y ^ (y >> 17); y = y ^ (y << 5);
    return y;
  endfunction

  always @(negedge clk) if (rst_n && resp_valid) begin
    logic [31:0] a;
    #1;
    a = exp_q.pop_front();
    checks++;
    if (resp.rdata != u_mem.init_word(a)) begin
      failures++;
      $display("FAIL [%0d%%, r=%0d, seed %h] load %h", FAULT_PCT, R, SEED, a);
    end
    if (hit_pass) begin
      // oracle: the delay of the very line that holds the word
      int w;
      logic [7:0] set, row;
      w = int'(dut.u_pipe.s3_way);
      set = a[13:6];
      row = {set[7:R], dut.u_dec.slot_map[w][set]};
      oracle_acc += 1 + int'(line_lat[w][row]);
    end
    n_resp++;
    last_resp = cyc;
  end

  task automatic sweep(output int first_acc);
    first_acc = -1;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      req_valid = 1; req.we = 0; req.addr = 32'(i * 8); req.wdata = '0;
      #2;
      while (!req_ready) begin @(negedge clk); #2; end
      if (first_acc < 0) first_acc = cyc;
      exp_q.push_back(32'(i * 8));
      @(posedge clk);
      #1 req_valid = 0;
    end
    while (exp_q.size() != 0) @(negedge clk);
  endtask

  initial begin
    int a0, expect_c;
    finished = 0; checks = 0; failures = 0;
    for (int w = 0; w < 4; w++) begin
      logic [31:0] sd;
      sd = SEED + 32'h9E37_79B9 * 32'(w);
      for (int r = 0; r < N; r++) begin
        sd = xs(sd);
        if ((sd % 100) < FAULT_PCT) begin sd = xs(sd); line_lat[w][r] = 2'(1 + (sd % 3)); end
        else line_lat[w][r] = 0;
      end
    end
    wait (rst_n);
    @(negedge clk); init_start = 1;
    @(negedge clk); init_start = 0;
    wait (init_done);
    lt_sum = 0;
    for (int s = 0; s < N; s++) lt_sum += int'(dut.u_lt.tbl[s]);
    sweep(a0);
    hit_pass = 1;
    sweep(a0);
    oracle_cycles = oracle_acc + 2;
    pass_cycles = last_resp - a0 + 1;
    expect_c = 2;
    for (int i = 0; i < WORDS; i++) expect_c += 1 + int'(dut.u_lt.tbl[(i / 8) % N]);
    perfect_cycles = WORDS + 2;
    delayed_cycles = 4 * WORDS + 2;
    checks++;
    if (pass_cycles < expect_c - 2 || pass_cycles > expect_c + 2) begin
      failures++;
      $display("FAIL [%0d%%, r=%0d] hit pass took %0d cycles, expected %0d", FAULT_PCT, R, pass_cycles, expect_c);
    end
    checks++;
    if (!(pass_cycles < delayed_cycles && pass_cycles >= perfect_cycles)) begin
      failures++;
      $display("FAIL [%0d%%, r=%0d] hit pass %0d outside perfect %0d .. delayed %0d",
               FAULT_PCT, R, pass_cycles, perfect_cycles, delayed_cycles);
    end
    checks++;
    if (!(oracle_cycles <= pass_cycles + 2)) begin
      failures++;
      $display("FAIL [%0d%%, r=%0d] oracle %0d slower than table %0d", FAULT_PCT, R, oracle_cycles, pass_cycles);
    end
    checks++;
    if (n_unrep_lines != 0) failures++;
    finished = 1;
  end
endmodule
