// tb_pv_sram_way: checks the array model. It recomputes the variation
// draw from the same seed and generator, checks the fraction of slowed
// lines and the spread of their delays, then writes every word and reads
// it back with the wordline held 1..4 cycles before sensing: the word must
// come back exactly when the hold covers the line's delay, and all ones
// otherwise. It also checks that sensing ends an access.
module tb_pv_sram_way;
  localparam int N = 256, WPL = 8, PCT = 40;
  localparam logic [31:0] SEED = 32'hCAFE_0042;
  logic clk = 0;
  logic en = 0, we = 0, sa_en = 0;
  logic [7:0] row = 0;
  logic [2:0] word = 0;
  logic [63:0] wdata = 0, rdata;
  logic [1:0] exp_lat [N];
  int checks = 0, failures = 0;

  pv_sram_way #(.N_ROWS(N), .WPL(WPL), .W(64), .L_W(2), .FAULT_PCT(PCT), .SEED(SEED)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] xs(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13); y = y ^ (y >> 17); y = y ^ (y << 5);
    return y;
  endfunction

  function automatic logic [63:0] pat(input int r, input int w);
    return {32'(r * 977 + 5), 32'(w * 31 + r)} ^ 64'hA5A5_0F0F_3C3C_9696;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] s;
    int n_slow, n_by [4];
    s = SEED; n_slow = 0;
    for (int i = 0; i < 4; i++) n_by[i] = 0;
    for (int i = 0; i < N; i++) begin
      s = xs(s);
      if ((s % 100) < PCT) begin s = xs(s); exp_lat[i] = 2'(1 + (s % 3)); end
      else exp_lat[i] = 0;
      n_by[exp_lat[i]]++;
      if (exp_lat[i] != 0) n_slow++;
    end
    // about PCT percent slowed, each delay class represented
    check(n_slow > N * PCT / 100 - 30 && n_slow < N * PCT / 100 + 30,
          $sformatf("slowed lines %0d", n_slow));
    for (int c = 1; c < 4; c++) check(n_by[c] > n_slow / 6, $sformatf("class %0d count %0d", c, n_by[c]));
    // write every word
    for (int r = 0; r < N; r++)
      for (int w = 0; w < WPL; w++) begin
        @(negedge clk); en = 1; we = 1; row = 8'(r); word = 3'(w); wdata = pat(r, w);
      end
    @(negedge clk); en = 0; we = 0;
    // read with each hold length
    for (int r = 0; r < N; r++)
      for (int h = 1; h <= 4; h++) begin
        int w;
        w = (r + h) % WPL;
        for (int c = 1; c <= h; c++) begin
          @(negedge clk); en = 1; we = 0; row = 8'(r); word = 3'(w); sa_en = (c == h);
        end
        @(negedge clk); en = 0; sa_en = 0;
        if (h >= 1 + exp_lat[r])
          check(rdata == pat(r, w), $sformatf("row %0d lat %0d hold %0d: data", r, exp_lat[r], h));
        else
          check(rdata == '1, $sformatf("row %0d lat %0d hold %0d: early sense", r, exp_lat[r], h));
      end
    // back-to-back sensing of a slow row: the second access starts afresh
    for (int r = 0; r < N; r++) if (exp_lat[r] != 0) begin
      @(negedge clk); en = 1; row = 8'(r); word = 0; sa_en = 0;
      repeat (exp_lat[r]) @(negedge clk);
      sa_en = 1;
      @(negedge clk); sa_en = 1;
      @(negedge clk); en = 0; sa_en = 0;
      check(rdata == '1, $sformatf("row %0d: fresh access after sensing", r));
      break;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
