// l2_mem_model: behavioural stand-in for the next memory level (L2 cache
// and memory) behind the L1 data cache, for simulation only.
//
// Word writes (mem_req_we = 1) are absorbed in one cycle. A line read is
// accepted, and after LATENCY cycles the WPL words of the line are returned
// in order, one per cycle, on resp_valid/resp_data. Storage is a sparse
// associative array; a word never written reads as init_word(address), a
// fixed hash, so testbenches can predict it. One request at a time: ready
// is low while a line read is being served.
module l2_mem_model #(
  parameter int unsigned LATENCY = 12,
  parameter int unsigned WPL     = 8,
  parameter int unsigned AW      = 32,
  parameter int unsigned W       = 64
) (
  input  logic          clk,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_we,
  input  logic [AW-1:0] req_addr,
  input  logic [W-1:0]  req_wdata,
  output logic          resp_valid,
  output logic [W-1:0]  resp_data
);

  logic [W-1:0] store [logic [AW-1:0]];

  function automatic logic [W-1:0] init_word(input logic [AW-1:0] a);
    logic [63:0] x;
    x = 64'(a) * 64'h9E37_79B9_7F4A_7C15 + 64'h0123_4567_89AB_CDEF;
    x = x ^ (x >> 29);
    return W'(x);
  endfunction

  function automatic logic [W-1:0] peek(input logic [AW-1:0] a);
    if (store.exists(a)) return store[a];
    return init_word(a);
  endfunction

  int unsigned   wait_cnt;
  int unsigned   beat;
  logic          serving;
  logic [AW-1:0] line_addr;

  initial begin
    serving    = 1'b0;
    resp_valid = 1'b0;
    resp_data  = '0;
    wait_cnt   = 0;
    beat       = 0;
  end

  assign req_ready = !serving;

  always @(posedge clk) begin
    resp_valid <= 1'b0;
    if (!serving && req_valid) begin
      if (req_we) begin
        store[req_addr] = req_wdata;
      end else begin
        serving   <= 1'b1;
        line_addr <= req_addr;
        wait_cnt  <= LATENCY;
        beat      <= 0;
      end
    end else if (serving) begin
      if (wait_cnt != 0) wait_cnt <= wait_cnt - 1;
      else begin
        resp_valid <= 1'b1;
        resp_data  <= peek(line_addr + AW'(beat * (W / 8)));
        beat       <= beat + 1;
        if (beat == WPL - 1) serving <= 1'b0;
      end
    end
  end

endmodule
