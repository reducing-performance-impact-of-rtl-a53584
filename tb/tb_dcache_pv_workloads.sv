// tb_dcache_pv_workloads: the variation configurations the scheme is
// evaluated with: 20 % and 40 % slowed lines at reshuffling degree 3, and
// 40 % at degrees 4 and 5. As in a Monte-Carlo evaluation, each
// configuration is run on five arrays with different random variation
// (five seeds) and the results are averaged. Every run is a full-size
// cache executing the same data-intensive stream (wl_runner). For each
// configuration the bench prints the mean all-hit pass length normalised to
// the perfect (variation-free) cache and to the delayed (worst-case) cache,
// and the same for an oracle that times every access by its own line.
// Besides each run's own checks it checks that, for every array, a larger
// reshuffling degree never increases the sum of the set latencies, and
// that 40 % slowed lines never give a faster table than 20 % on average.
module tb_dcache_pv_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NC = 4, NS = 5;
  localparam int unsigned PCT  [NC] = '{20, 40, 40, 40};
  localparam int unsigned RDEG [NC] = '{3, 3, 4, 5};
  localparam logic [31:0] SEEDS [NS] = '{32'h2013_0001, 32'h0000_BEEF, 32'h1357_9BDF,
                                         32'h7777_0042, 32'hC0FF_EE11};

  logic fin [NC][NS];
  int chk [NC][NS], fl [NC][NS], lts [NC][NS], pc [NC][NS], pp [NC][NS], pd [NC][NS], po [NC][NS];

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    for (genvar s = 0; s < NS; s++) begin : g_seed
      wl_runner #(.FAULT_PCT(PCT[c]), .R(RDEG[c]), .SEED(SEEDS[s])) u_run (
        .clk, .rst_n, .finished(fin[c][s]), .checks(chk[c][s]), .failures(fl[c][s]),
        .lt_sum(lts[c][s]), .pass_cycles(pc[c][s]), .perfect_cycles(pp[c][s]),
        .delayed_cycles(pd[c][s]), .oracle_cycles(po[c][s]));
    end
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_done();
    for (int c = 0; c < NC; c++)
      for (int s = 0; s < NS; s++) if (!fin[c][s]) return 0;
    return 1;
  endfunction

  initial begin
    int sum_lt [NC];
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!all_done()) @(posedge clk);
    for (int c = 0; c < NC; c++) begin
      longint npf, ndl, norc;
      npf = 0; ndl = 0; norc = 0; sum_lt[c] = 0;
      for (int s = 0; s < NS; s++) begin
        checks += chk[c][s]; failures += fl[c][s];
        sum_lt[c] += lts[c][s];
        npf += longint'(pc[c][s]) * 1000 / longint'(pp[c][s]);
        ndl += longint'(pc[c][s]) * 1000 / longint'(pd[c][s]);
        norc += longint'(po[c][s]) * 1000 / longint'(pp[c][s]);
      end
      npf /= longint'(NS); ndl /= longint'(NS); norc /= longint'(NS);
      $display("%0d%% slowed, r=%0d: mean table sum %0d, hit pass %0d.%03d x perfect (oracle %0d.%03d), %0d.%03d x delayed",
               PCT[c], RDEG[c], sum_lt[c] / NS, npf / 1000, npf % 1000, norc / 1000, norc % 1000,
               ndl / 1000, ndl % 1000);
    end
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (!(lts[3][s] <= lts[2][s] && lts[2][s] <= lts[1][s])) begin
        failures++;
        $display("FAIL seed %0d: table sums %0d %0d %0d not monotonic in r", s, lts[1][s], lts[2][s], lts[3][s]);
      end
    end
    checks++;
    if (!(sum_lt[1] >= sum_lt[0])) begin
      failures++;
      $display("FAIL 40%% slowed lines gave a faster table than 20%%");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
