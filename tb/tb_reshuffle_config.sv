// tb_reshuffle_config: loads random line latencies (40 % slowed) and runs
// the configuration engine. It checks that, per way and group, the decoder
// writes form a permutation with logical slots in non-decreasing latency
// order, and that each latency-table entry equals the largest latency of
// the lines steered into that set, which for sorted ways is the k-th
// smallest latency of each way (computed here independently by sorting).
// Also checks the run length of N_WAYS*8*4 + 8 cycles per group.
module tb_reshuffle_config;
  localparam int N = 256, NW = 4, R = 3, G = 8;
  logic clk = 0, rst_n = 0;
  logic ll_we = 0;
  logic [1:0] ll_way = 0;
  logic [7:0] ll_row = 0;
  logic [1:0] ll_lat = 0;
  logic start = 0, busy, done;
  logic cfg_we;
  logic [1:0] cfg_way;
  logic [7:0] cfg_idx;
  logic [2:0] cfg_slot;
  logic lt_we;
  logic [7:0] lt_idx;
  logic [1:0] lt_lat;
  logic [8:0] n_slow_sets;
  logic [1:0] lat [NW][N];
  int map [NW][N];
  int lt_got [N];
  int checks = 0, failures = 0;

  reshuffle_config #(.N_SETS(N), .N_WAYS(NW), .R(R), .L_W(2)) dut (.*);

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

  always @(posedge clk) if (rst_n) begin
    if (cfg_we) map[cfg_way][cfg_idx] = int'(cfg_slot);
    if (lt_we)  lt_got[lt_idx] = int'(lt_lat);
  end

  initial begin
    int cycles, n_slow_exp;
    for (int w = 0; w < NW; w++)
      for (int s = 0; s < N; s++) begin
        lat[w][s] = ($urandom_range(0, 99) < 40) ? 2'($urandom_range(1, 3)) : 2'd0;
        map[w][s] = -1;
      end
    for (int s = 0; s < N; s++) lt_got[s] = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NW; w++)
      for (int s = 0; s < N; s++) begin
        @(negedge clk); ll_we = 1; ll_way = 2'(w); ll_row = 8'(s); ll_lat = lat[w][s];
      end
    @(negedge clk); ll_we = 0; start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    check(cycles == (N / G) * (NW * G * 4 + G) + 1, $sformatf("run took %0d cycles", cycles));
    n_slow_exp = 0;
    for (int g = 0; g < N / G; g++) begin
      int srt [NW][G];
      for (int w = 0; w < NW; w++) begin
        int used [G];
        int v [G];
        for (int i = 0; i < G; i++) begin used[i] = 0; v[i] = lat[w][g * G + i]; end
        v.sort();
        for (int i = 0; i < G; i++) srt[w][i] = v[i];
        for (int k = 0; k < G; k++) begin
          int m;
          m = map[w][g * G + k];
          check(m >= 0 && m < G, $sformatf("way %0d set %0d programmed", w, g * G + k));
          if (m >= 0 && m < G) begin
            used[m]++;
            check(int'(lat[w][g * G + m]) == srt[w][k],
                  $sformatf("way %0d set %0d gets a line of latency %0d, sorted %0d", w, g * G + k,
                            lat[w][g * G + m], srt[w][k]));
          end
        end
        for (int i = 0; i < G; i++) check(used[i] == 1, $sformatf("way %0d group %0d slot %0d used %0d", w, g, i, used[i]));
      end
      for (int k = 0; k < G; k++) begin
        int mx;
        mx = 0;
        for (int w = 0; w < NW; w++) if (srt[w][k] > mx) mx = srt[w][k];
        if (mx != 0) n_slow_exp++;
        check(lt_got[g * G + k] == mx, $sformatf("table entry %0d = %0d expected %0d", g * G + k,
                                                 lt_got[g * G + k], mx));
      end
    end
    check(int'(n_slow_sets) == n_slow_exp, $sformatf("slow sets %0d expected %0d", n_slow_sets, n_slow_exp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
