// latency_table: per-set latency of the data cache's second pipe stage.
//
// One LAT_W-bit entry per cache set tells how many extra cycles the
// wordline/bitline/sense-amplifier stage of that set needs beyond the
// nominal single cycle (0 = regular set, 1..3 = set holding a line slowed
// by process variation). It is read with the set index at the same time as
// the data array decodes that index; the read is synchronous, so rd_lat is
// valid in the cycle after rd_en, i.e. by the end of the first pipe stage,
// as the design requires. Default size: 256 entries x 2 bits = 512 bits.
//
// The write port is used by the configuration engine after the lines have
// been characterised. Reset fills every entry with RESET_LAT; the default,
// the worst latency, makes the cache safe (worst-case timing everywhere)
// until the table has been programmed: this reset policy is this design's
// own choice. A write and a read of the same entry in one cycle return the
// old value.
module latency_table
  import dcache_pkg::*;
#(
  parameter int unsigned N_SETS    = SETS,
  parameter int unsigned L_W       = LAT_W,
  parameter int unsigned RESET_LAT = (1 << L_W) - 1,
  localparam int unsigned IDX_W    = $clog2(N_SETS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // read port (stage 1)
  input  logic             rd_en,
  input  logic [IDX_W-1:0] rd_idx,
  output logic [L_W-1:0]   rd_lat,
  // write port (configuration)
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic [L_W-1:0]   wr_lat
);

  logic [L_W-1:0] tbl [N_SETS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_SETS; i++) tbl[i] <= L_W'(RESET_LAT);
    end else if (wr_en) begin
      tbl[wr_idx] <= wr_lat;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd_lat <= L_W'(RESET_LAT);
    else if (rd_en) rd_lat <= tbl[rd_idx];
  end

endmodule
