// pv_sram_way: behavioural model of one way of the data array, including the
// read-timing spread caused by process variation.
//
// This is a behavioural model, not synthesizable logic for the real part:
// the array is a full-custom SRAM macro whose per-line access time is an
// analog property of the silicon (threshold-voltage mismatch slows the
// bitline discharge of some cells). The model reproduces that at cycle
// level so the surrounding digital logic can be exercised.
//
// Each physical row (one cache line of this way) has an extra sense delay
// line_lat[row] in 0..3 cycles. A fraction FAULT_PCT of the lines is slowed,
// and a slowed line needs 1, 2 or 3 extra cycles with equal probability;
// both follow the variation model the design is evaluated with. The
// distribution is drawn at time zero from a xorshift generator seeded by
// SEED, so it is reproducible.
//
// Read timing: the wordline is on while en=1 and we=0. The cycles it has
// been held on the same row are counted, the current cycle included. When
// sa_en (sense-amplifier enable) is asserted together with the wordline and
// the count is at least 1 + line_lat[row], rdata is loaded with the stored
// word at the next clock edge; if the sense amplifiers fire too early the
// bitlines are still near their precharge level and rdata is loaded with
// all ones. Firing the sense amplifiers ends the access: a read of the same
// row in the next cycle starts counting afresh. Writes (en=1, we=1) take one cycle and are not affected by the
// variation (only read sensing is modelled as slowed).
module pv_sram_way #(
  parameter int unsigned N_ROWS    = 256,
  parameter int unsigned WPL       = 8,     // words per line
  parameter int unsigned W         = 64,    // word width
  parameter int unsigned L_W       = 2,     // latency code width
  parameter int unsigned FAULT_PCT = 20,    // percent of slowed lines
  parameter int unsigned SEED      = 32'h1234_5678,
  localparam int unsigned ROW_W    = $clog2(N_ROWS),
  localparam int unsigned WRD_W    = (WPL > 1) ? $clog2(WPL) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [ROW_W-1:0] row,
  input  logic [WRD_W-1:0] word,
  input  logic [W-1:0]     wdata,
  input  logic             sa_en,
  output logic [W-1:0]     rdata
);

  logic [W-1:0]   mem      [N_ROWS][WPL];
  logic [L_W-1:0] line_lat [N_ROWS];

  function automatic logic [31:0] xorshift32(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  initial begin : draw_variation
    logic [31:0] s;
    s = (SEED == 0) ? 32'h9E37_79B9 : 32'(SEED);
    for (int i = 0; i < N_ROWS; i++) begin
      s = xorshift32(s);
      if ((s % 100) < FAULT_PCT) begin
        s = xorshift32(s);
        line_lat[i] = L_W'(1 + (s % 3));
      end else begin
        line_lat[i] = '0;
      end
    end
  end

  // wordline hold counter
  logic             prev_rd;
  logic [ROW_W-1:0] prev_row;
  logic [2:0]       held_q;
  logic [2:0]       held;

  always_comb begin
    if (prev_rd && prev_row == row) held = (held_q == 3'd7) ? 3'd7 : held_q + 3'd1;
    else                            held = 3'd1;
  end

  always_ff @(posedge clk) begin
    prev_rd  <= en && !we && !sa_en;
    prev_row <= row;
    held_q   <= (en && !we) ? held : 3'd0;
    if (en && we) mem[row][word] <= wdata;
    if (en && !we && sa_en) begin
      if (held >= 3'd1 + 3'(line_lat[row])) rdata <= mem[row][word];
      else                                  rdata <= '1;
    end
  end

endmodule
