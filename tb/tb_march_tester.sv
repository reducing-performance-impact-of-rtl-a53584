// tb_march_tester: runs the March-test engine on four array models with
// 40 % slowed lines and checks that every line is reported exactly once,
// with the delay class the model was built with (recomputed here from the
// same seeds), and that the slow-line count matches. Reduced array: 32
// rows of 2 words per way.
module tb_march_tester;
  localparam int N = 32, NW = 4, WPL = 2, PCT = 40;
  localparam logic [31:0] SEED0 = 32'h0BAD_F00D;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic t_en, t_we, t_sa_en;
  logic [4:0] t_row;
  logic [0:0] t_word;
  logic [63:0] t_wdata;
  logic [63:0] t_rdata [NW];
  logic res_we;
  logic [1:0] res_way, res_lat;
  logic [4:0] res_row;
  logic [7:0] n_slow, n_unrep;
  logic [1:0] exp_lat [NW][N];
  int reported [NW][N];
  int checks = 0, failures = 0;

  march_tester #(.N_ROWS(N), .N_WAYS(NW), .WPL(WPL), .W(64), .L_W(2)) dut (.*);

  for (genvar w = 0; w < NW; w++) begin : g_way
    pv_sram_way #(.N_ROWS(N), .WPL(WPL), .W(64), .L_W(2), .FAULT_PCT(PCT),
                  .SEED(SEED0 + 32'(w) * 32'h1111_1111)) u_way (
      .clk, .en(t_en), .we(t_we), .row(t_row), .word(t_word), .wdata(t_wdata),
      .sa_en(t_sa_en), .rdata(t_rdata[w]));
  end

  always #5 clk = ~clk;

  function automatic logic [31:0] xs(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13); y = y ^ (y >> 17); y = y ^ (y << 5);
    return y;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && res_we) begin
    reported[res_way][res_row]++;
    check(res_lat == exp_lat[res_way][res_row],
          $sformatf("way %0d row %0d: class %0d expected %0d", res_way, res_row, res_lat,
                    exp_lat[res_way][res_row]));
  end

  initial begin
    int n_exp_slow;
    n_exp_slow = 0;
    for (int w = 0; w < NW; w++) begin
      logic [31:0] s;
      s = SEED0 + 32'(w) * 32'h1111_1111;
      for (int r = 0; r < N; r++) begin
        s = xs(s);
        if ((s % 100) < PCT) begin s = xs(s); exp_lat[w][r] = 2'(1 + (s % 3)); end
        else exp_lat[w][r] = 0;
        if (exp_lat[w][r] != 0) n_exp_slow++;
        reported[w][r] = 0;
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    check(busy, "busy after start");
    wait (done);
    @(posedge clk);
    @(negedge clk);
    check(!busy, "idle after done");
    for (int w = 0; w < NW; w++)
      for (int r = 0; r < N; r++)
        check(reported[w][r] == 1, $sformatf("way %0d row %0d reported %0d times", w, r, reported[w][r]));
    check(int'(n_slow) == n_exp_slow, $sformatf("n_slow %0d expected %0d", n_slow, n_exp_slow));
    check(n_unrep == 0, "no unrepairable lines");
    check(n_exp_slow > 0, "some lines slowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
