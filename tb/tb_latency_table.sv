// tb_latency_table: checks the latency table: worst-case contents after
// reset, one-cycle read latency, writes of every entry, read-during-write
// returning the old value, and that rd_lat holds while rd_en is low.
module tb_latency_table;
  localparam int N = 256;
  logic clk = 0, rst_n = 0;
  logic rd_en = 0, wr_en = 0;
  logic [7:0] rd_idx = 0, wr_idx = 0;
  logic [1:0] rd_lat, wr_lat = 0;
  logic [1:0] ref_tbl [N];
  int checks = 0, failures = 0;

  latency_table dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [1:0] got, input logic [1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reset contents: worst case everywhere
    for (int i = 0; i < N; i++) begin
      @(negedge clk); rd_en = 1; rd_idx = 8'(i);
      @(negedge clk); rd_en = 0;
      check(rd_lat, 2'd3, $sformatf("reset entry %0d", i));
    end
    // program random values
    for (int i = 0; i < N; i++) begin
      ref_tbl[i] = 2'($urandom_range(0, 3));
      @(negedge clk); wr_en = 1; wr_idx = 8'(i); wr_lat = ref_tbl[i];
    end
    @(negedge clk); wr_en = 0;
    // read back in random order, with idle cycles in between
    for (int n = 0; n < 2 * N; n++) begin
      int i;
      i = $urandom_range(0, N - 1);
      @(negedge clk); rd_en = 1; rd_idx = 8'(i);
      @(negedge clk); rd_en = 0;
      check(rd_lat, ref_tbl[i], $sformatf("entry %0d", i));
      @(negedge clk);
      check(rd_lat, ref_tbl[i], "hold without rd_en");
    end
    // read and write of the same entry in one cycle returns the old value
    @(negedge clk); rd_en = 1; rd_idx = 8'd17; wr_en = 1; wr_idx = 8'd17; wr_lat = ~ref_tbl[17];
    @(negedge clk); rd_en = 1; wr_en = 0;
    check(rd_lat, ref_tbl[17], "read during write");
    @(negedge clk); rd_en = 0;
    check(rd_lat, ~ref_tbl[17], "after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
