// reshuffle_decoder: programmable address decoder for line reshuffling.
//
// Within each way, the lines of 2^r consecutive sets form a reshuffling
// group. The decoder maps the logical set index used by the cache to the
// physical wordline (row) of every way: the upper index bits (the group)
// pass through, the low r bits are replaced by a programmed r-bit slot
// number, one per way and logical set. This models the pass transistors
// whose control inputs steer each decoded set line to a chosen wordline.
// With a valid programming each group's mapping is a permutation, so every
// physical line is still used exactly once.
//
// Interface: idx -> phys_row[w] is combinational for all ways at once (it
// belongs to the first, decode, pipe stage). Programming: cfg_we writes
// slot cfg_slot for (cfg_way, cfg_idx) at the clock edge. Reset programs
// the identity mapping (no reshuffling), this design's own choice.
// Storage: WAYS x SETS x r bits (3072 flops at the defaults).
module reshuffle_decoder
  import dcache_pkg::*;
#(
  parameter int unsigned N_SETS = SETS,
  parameter int unsigned N_WAYS = WAYS,
  parameter int unsigned R      = R_DEG,
  localparam int unsigned IDX_W = $clog2(N_SETS),
  localparam int unsigned WAY_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  logic [IDX_W-1:0] idx,
  output logic [IDX_W-1:0] phys_row [N_WAYS],
  // programming
  input  logic             cfg_we,
  input  logic [WAY_W-1:0] cfg_way,
  input  logic [IDX_W-1:0] cfg_idx,
  input  logic [R-1:0]     cfg_slot
);

  logic [R-1:0] slot_map [N_WAYS][N_SETS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < N_WAYS; w++)
        for (int s = 0; s < N_SETS; s++)
          slot_map[w][s] <= R'(s);
    end else if (cfg_we) begin
      slot_map[cfg_way][cfg_idx] <= cfg_slot;
    end
  end

  always_comb begin
    for (int w = 0; w < N_WAYS; w++)
      phys_row[w] = {idx[IDX_W-1:R], slot_map[w][idx]};
  end

endmodule
