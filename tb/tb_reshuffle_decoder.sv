// tb_reshuffle_decoder: checks the identity mapping after reset, then
// programs a random permutation per way and group and checks that every
// logical set of every way is steered to {group, programmed slot}, and that
// each group's rows stay a permutation.
module tb_reshuffle_decoder;
  localparam int N = 256, NW = 4, R = 3, G = 1 << R;
  logic clk = 0, rst_n = 0;
  logic [7:0] idx = 0;
  logic [7:0] phys_row [NW];
  logic cfg_we = 0;
  logic [1:0] cfg_way = 0;
  logic [7:0] cfg_idx = 0;
  logic [2:0] cfg_slot = 0;
  logic [2:0] ref_map [NW][N];
  int checks = 0, failures = 0;

  reshuffle_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int s = 0; s < N; s++) begin
      @(negedge clk); idx = 8'(s);
      #1;
      for (int w = 0; w < NW; w++) begin
        checks++;
        if (phys_row[w] !== {idx[7:R], ref_map[w][s]}) begin
          failures++;
          $display("FAIL way %0d set %0d: row %0d expected %0d", w, s, phys_row[w],
                   {idx[7:R], ref_map[w][s]});
        end
      end
    end
  endtask

  initial begin
    for (int w = 0; w < NW; w++)
      for (int s = 0; s < N; s++) ref_map[w][s] = 3'(s);
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all();
    // random permutation per (way, group): Fisher-Yates with $urandom
    for (int w = 0; w < NW; w++)
      for (int g = 0; g < N / G; g++) begin
        int p [G];
        for (int i = 0; i < G; i++) p[i] = i;
        for (int i = G - 1; i > 0; i--) begin
          int j, t;
          j = $urandom_range(0, i);
          t = p[i]; p[i] = p[j]; p[j] = t;
        end
        for (int i = 0; i < G; i++) begin
          ref_map[w][g * G + i] = 3'(p[i]);
          @(negedge clk);
          cfg_we = 1; cfg_way = 2'(w); cfg_idx = 8'(g * G + i); cfg_slot = 3'(p[i]);
        end
      end
    @(negedge clk); cfg_we = 0;
    check_all();
    // permutation property: every physical row reached exactly once per way
    for (int w = 0; w < NW; w++) begin
      int hits [N];
      for (int r = 0; r < N; r++) hits[r] = 0;
      for (int s = 0; s < N; s++) begin
        @(negedge clk); idx = 8'(s); #1;
        hits[phys_row[w]]++;
      end
      for (int r = 0; r < N; r++) begin
        checks++;
        if (hits[r] != 1) begin
          failures++;
          $display("FAIL way %0d row %0d reached %0d times", w, r, hits[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
