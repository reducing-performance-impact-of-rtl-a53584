// tb_stage2_timer: checks that the second stage lasts 1 + lat cycles for
// every latency code, that lat_cur reports the code, that done stays high
// while the stage is held by a downstream stall, and that a hold (array
// lent to a refill) drops the wordline and restarts the count.
module tb_stage2_timer;
  logic clk = 0, rst_n = 0;
  logic valid = 0, first = 0, hold = 0;
  logic [1:0] lat_in = 0, lat_cur;
  logic wl_en, done;
  int checks = 0, failures = 0;

  stage2_timer #(.L_W(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one access: returns the cycle (1-based) in which done first rose
  task automatic access(input logic [1:0] lat, input int hold_at, input int stall);
    int cyc, first_done, restart;
    cyc = 0; first_done = 0; restart = 0;
    @(negedge clk); valid = 1; first = 1; lat_in = lat; hold = 0;
    forever begin
      cyc++;
      hold = (cyc == hold_at);
      #1;
      if (hold) check(!wl_en && !done, "wordline dropped during hold");
      else check(wl_en, "wordline on");
      check(lat_cur == lat, "lat_cur");
      if (hold) restart = cyc;
      if (done && first_done == 0) first_done = cyc;
      if (first_done != 0 && cyc == first_done + stall) break;
      @(negedge clk); first = 0; lat_in = 2'($urandom);
    end
    if (restart == 0)
      check(first_done == 1 + lat, $sformatf("lat %0d: done in cycle %0d", lat, first_done));
    else
      check(first_done == restart + 1 + lat,
            $sformatf("lat %0d hold at %0d: done in cycle %0d", lat, restart, first_done));
    @(negedge clk); valid = 0; hold = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 4; l++) access(2'(l), 0, 0);
    for (int l = 0; l < 4; l++) access(2'(l), 0, 3);
    for (int l = 1; l < 4; l++) access(2'(l), l, 0);
    for (int n = 0; n < 200; n++) begin
      int l;
      l = $urandom_range(0, 3);
      access(2'(l), ($urandom_range(0, 1) == 1) ? $urandom_range(1, l + 1) : 0, $urandom_range(0, 2));
      if ($urandom_range(0, 1) == 1) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
