// tag_lru_store: tags, valid bits and LRU state of the set-associative cache.
//
// For the set rd_idx it returns, combinationally, the valid bit and tag of
// every way and the replacement victim: the lowest-numbered invalid way, or
// else the least recently used one. LRU is exact (true LRU, as the cache is
// specified): every way of a set has a rank 0 (most recent) .. N_WAYS-1
// (least recent). touch_en makes touch_way the most recent way of
// touch_idx; fill_en writes a new tag into fill_way of fill_idx, marks it
// valid and most recent. inv_all clears all valid bits in one cycle. Tags
// are kept per logical set: line reshuffling moves data lines between
// wordlines, but the tag array is a separate structure indexed by the
// logical set and is assumed not to suffer the variation; that split is this
// design's own choice. Reset: all lines invalid, way w has rank w.
module tag_lru_store #(
  parameter int unsigned N_SETS = 256,
  parameter int unsigned N_WAYS = 4,
  parameter int unsigned TAG_W  = 18,
  localparam int unsigned IDX_W = $clog2(N_SETS),
  localparam int unsigned WAY_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IDX_W-1:0] rd_idx,
  output logic             rd_valid [N_WAYS],
  output logic [TAG_W-1:0] rd_tag   [N_WAYS],
  output logic [WAY_W-1:0] victim,
  input  logic             touch_en,
  input  logic [IDX_W-1:0] touch_idx,
  input  logic [WAY_W-1:0] touch_way,
  input  logic             fill_en,
  input  logic [IDX_W-1:0] fill_idx,
  input  logic [WAY_W-1:0] fill_way,
  input  logic [TAG_W-1:0] fill_tag,
  input  logic             inv_all
);

  logic [TAG_W-1:0] tags  [N_SETS][N_WAYS];
  logic             valid [N_SETS][N_WAYS];
  logic [WAY_W-1:0] rank  [N_SETS][N_WAYS];

  // read side
  always_comb begin
    logic found;
    found  = 1'b0;
    victim = '0;
    for (int w = 0; w < N_WAYS; w++) begin
      rd_valid[w] = valid[rd_idx][w];
      rd_tag[w]   = tags[rd_idx][w];
    end
    for (int w = 0; w < N_WAYS; w++) begin
      if (!found && !valid[rd_idx][w]) begin
        found  = 1'b1;
        victim = WAY_W'(w);
      end
    end
    if (!found) begin
      for (int w = 0; w < N_WAYS; w++)
        if (rank[rd_idx][w] == WAY_W'(N_WAYS - 1)) victim = WAY_W'(w);
    end
  end

  // update side: a fill also counts as a touch
  logic             upd_en;
  logic [IDX_W-1:0] upd_idx;
  logic [WAY_W-1:0] upd_way;

  always_comb begin
    upd_en  = touch_en || fill_en;
    upd_idx = fill_en ? fill_idx : touch_idx;
    upd_way = fill_en ? fill_way : touch_way;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_SETS; s++)
        for (int w = 0; w < N_WAYS; w++) begin
          valid[s][w] <= 1'b0;
          rank[s][w]  <= WAY_W'(w);
        end
    end else begin
      if (inv_all) begin
        for (int s = 0; s < N_SETS; s++)
          for (int w = 0; w < N_WAYS; w++) valid[s][w] <= 1'b0;
      end else if (fill_en) begin
        valid[fill_idx][fill_way] <= 1'b1;
      end
      if (upd_en) begin
        for (int w = 0; w < N_WAYS; w++) begin
          if (WAY_W'(w) == upd_way)
            rank[upd_idx][w] <= '0;
          else if (rank[upd_idx][w] < rank[upd_idx][upd_way])
            rank[upd_idx][w] <= rank[upd_idx][w] + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fill_en) tags[fill_idx][fill_way] <= fill_tag;
  end

endmodule
