// dcache_pipe: controller of the 3-stage pipelined, variation-aware L1 data
// cache.
//
// Stage 1 (the cycle a request is accepted): the set index is decoded by
// the reshuffling decoder into one physical row per way and, in parallel,
// the latency table is read with the same index. Stage 2: the wordlines of
// all ways are driven and the bitlines develop for 1 + lat cycles, lat
// being the latency-table value of the set (stage2_timer); tags are
// compared; the sense amplifiers fire in the cycle the stage hands over.
// Stage 3: the hit way is selected by the output multiplexer and the word
// is returned. A load hit to a regular set is therefore answered in the
// third cycle, counting the accept cycle, and one to a set slowed by 1..3
// cycles in the fourth to sixth. One access per cycle enters
// while no stage is stretched; a stretched stage 2 stalls stage 1.
//
// The following is this design's own choice, as the cache's miss and write
// policies are not specified: loads that miss allocate a line, fetched from
// the next level as WPL words in order, into the LRU way (invalid ways
// first) and return the requested word when the refill ends; stores are
// write-through with no allocation (a hit writes the array in the last
// stage-2 cycle, every store is sent to the next level from stage 3). A
// store passes through the stretched stage like a load. Responses cannot be
// back-pressured. During a refill the array is lent to it and a waiting
// stage-2 access restarts its timing afterwards.
//
// Interfaces: req_valid/req_ready handshake with a dc_req_t; resp_valid
// pulses with a dc_resp_t. Latency-table read port, decoder lookup, one set
// of array ports per way, and a next-level port: mem_req_* handshake
// (valid/ready) for line reads and word writes, mem_resp_valid/data for the
// refill beats. enable = 0 blocks new requests; flush clears all tags;
// idle = 1 when no access is in flight.
module dcache_pipe
  import dcache_pkg::*;
#(
  parameter int unsigned N_SETS = SETS,
  parameter int unsigned N_WAYS = WAYS,
  parameter int unsigned WPL    = WORDS_PER_LINE,
  parameter int unsigned L_W    = LAT_W,
  localparam int unsigned IDX_W = $clog2(N_SETS),
  localparam int unsigned WAY_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1,
  localparam int unsigned WRD_W = (WPL > 1) ? $clog2(WPL) : 1,
  localparam int unsigned OFF_W = WRD_W + $clog2(WORD_W / 8),
  localparam int unsigned TAG_W = ADDR_W - IDX_W - OFF_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              flush,
  output logic              idle,
  // load/store unit
  input  logic              req_valid,
  output logic              req_ready,
  input  dc_req_t           req,
  output logic              resp_valid,
  output dc_resp_t          resp,
  // latency table read port
  output logic              lt_rd_en,
  output logic [IDX_W-1:0]  lt_rd_idx,
  input  logic [L_W-1:0]    lt_rd_lat,
  // reshuffling decoder
  output logic [IDX_W-1:0]  dec_idx,
  input  logic [IDX_W-1:0]  dec_row [N_WAYS],
  // data array, one port per way
  output logic              arr_en    [N_WAYS],
  output logic              arr_we    [N_WAYS],
  output logic [IDX_W-1:0]  arr_row   [N_WAYS],
  output logic              arr_sa_en [N_WAYS],
  output logic [WRD_W-1:0]  arr_word,
  output word_t             arr_wdata,
  input  word_t             arr_rdata [N_WAYS],
  // next level
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [ADDR_W-1:0] mem_req_addr,
  output word_t             mem_req_wdata,
  input  logic              mem_resp_valid,
  input  word_t             mem_resp_data
);

  typedef enum logic [1:0] {R_IDLE, R_REQ, R_DATA, R_DONE} rstate_e;

  // ---------------- pipeline registers
  logic             s2_valid, s2_first;
  dc_req_t          s2_req;
  logic [IDX_W-1:0] s2_row [N_WAYS];

  logic             s3_valid;
  dc_req_t          s3_req;
  logic             s3_hit;
  logic [WAY_W-1:0] s3_way;      // hit way, or victim way on a miss
  logic [IDX_W-1:0] s3_vrow;     // physical row of the victim line
  logic [L_W-1:0]   s3_lat;

  // address fields: tag | set index | word | byte
  logic [IDX_W-1:0] req_idx, s2_idx, s3_idx;
  logic [TAG_W-1:0] s2_tag, s3_tag;
  logic [WRD_W-1:0] s2_wrd, s3_wrd;

  rstate_e          rstate;
  logic [WRD_W-1:0] beat;
  word_t            fill_word;

  // ---------------- stage-2 / stage-3 handshake
  logic           hold, t_wl, t_done;
  logic [L_W-1:0] t_lat;
  logic           s2_adv, s3_done, s3_free;

  always_comb begin
    req_idx = req.addr[OFF_W +: IDX_W];
    s2_idx  = s2_req.addr[OFF_W +: IDX_W];
    s2_tag  = s2_req.addr[ADDR_W-1 -: TAG_W];
    s2_wrd  = s2_req.addr[OFF_W-1 -: WRD_W];
    s3_idx  = s3_req.addr[OFF_W +: IDX_W];
    s3_tag  = s3_req.addr[ADDR_W-1 -: TAG_W];
    s3_wrd  = s3_req.addr[OFF_W-1 -: WRD_W];
  end

  // ---------------- tags
  logic             tg_valid [N_WAYS];
  logic [TAG_W-1:0] tg_tag   [N_WAYS];
  logic [WAY_W-1:0] tg_victim;
  logic             s2_hit;
  logic [WAY_W-1:0] s2_hway;

  tag_lru_store #(.N_SETS(N_SETS), .N_WAYS(N_WAYS), .TAG_W(TAG_W)) u_tags (
    .clk, .rst_n,
    .rd_idx   (s2_idx),
    .rd_valid (tg_valid),
    .rd_tag   (tg_tag),
    .victim   (tg_victim),
    .touch_en (s2_adv && s2_hit),
    .touch_idx(s2_idx),
    .touch_way(s2_hway),
    .fill_en  (rstate == R_DONE),
    .fill_idx (s3_idx),
    .fill_way (s3_way),
    .fill_tag (s3_tag),
    .inv_all  (flush)
  );

  always_comb begin
    s2_hit  = 1'b0;
    s2_hway = '0;
    for (int w = 0; w < N_WAYS; w++)
      if (tg_valid[w] && tg_tag[w] == s2_tag) begin
        s2_hit  = 1'b1;
        s2_hway = WAY_W'(w);
      end
  end

  // ---------------- stage-2 timing
  assign hold = (rstate != R_IDLE);

  stage2_timer #(.L_W(L_W)) u_timer (
    .clk, .rst_n,
    .valid (s2_valid),
    .first (s2_first),
    .lat_in(lt_rd_lat),
    .hold  (hold),
    .wl_en (t_wl),
    .done  (t_done),
    .lat_cur(t_lat)
  );

  always_comb begin
    s3_done = 1'b0;
    if (s3_valid) begin
      if (s3_req.we)   s3_done = mem_req_ready;
      else if (s3_hit) s3_done = 1'b1;
      else             s3_done = (rstate == R_DONE);
    end
    s3_free   = !s3_valid || s3_done;
    s2_adv    = s2_valid && t_done && s3_free;
    req_ready = enable && !flush && (!s2_valid || s2_adv);
  end

  // ---------------- stage 1: decode and latency-table read
  assign dec_idx   = req_idx;
  assign lt_rd_idx = req_idx;
  assign lt_rd_en  = req_valid && req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_first <= 1'b0;
    end else begin
      s2_first <= 1'b0;
      if (req_valid && req_ready) begin
        s2_valid <= 1'b1;
        s2_first <= 1'b1;
      end else if (s2_adv) begin
        s2_valid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (req_valid && req_ready) begin
      s2_req <= req;
      s2_row <= dec_row;
    end
  end

  // ---------------- stage 3 registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_valid <= 1'b0;
    end else if (s2_adv) begin
      s3_valid <= 1'b1;
    end else if (s3_done) begin
      s3_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (s2_adv) begin
      s3_req  <= s2_req;
      s3_hit  <= s2_hit;
      s3_way  <= s2_hit ? s2_hway : tg_victim;
      s3_vrow <= s2_row[tg_victim];
      s3_lat  <= t_lat;
    end
  end

  // ---------------- refill of a missing load
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate <= R_IDLE;
      beat   <= '0;
    end else begin
      unique case (rstate)
        R_IDLE: if (s3_valid && !s3_req.we && !s3_hit) rstate <= R_REQ;
        R_REQ:  if (mem_req_ready) begin
                  rstate <= R_DATA;
                  beat   <= '0;
                end
        R_DATA: if (mem_resp_valid) begin
                  beat <= beat + 1'b1;
                  if (beat == WRD_W'(WPL - 1)) rstate <= R_DONE;
                end
        R_DONE: rstate <= R_IDLE;
        default: rstate <= R_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rstate == R_DATA && mem_resp_valid && beat == s3_wrd)
      fill_word <= mem_resp_data;
  end

  // ---------------- next-level port
  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = '0;
    mem_req_wdata = s3_req.wdata;
    if (rstate == R_REQ) begin
      mem_req_valid = 1'b1;
      mem_req_addr  = {s3_req.addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
    end else if (s3_valid && s3_req.we) begin
      mem_req_valid = 1'b1;
      mem_req_we    = 1'b1;
      mem_req_addr  = s3_req.addr;
    end
  end

  // ---------------- array ports
  always_comb begin
    arr_word  = s2_wrd;
    arr_wdata = s2_req.wdata;
    for (int w = 0; w < N_WAYS; w++) begin
      arr_row[w]   = s2_row[w];
      arr_en[w]    = 1'b0;
      arr_we[w]    = 1'b0;
      arr_sa_en[w] = 1'b0;
      if (rstate == R_DATA) begin
        // refill beat into the victim line
        if (WAY_W'(w) == s3_way && mem_resp_valid) begin
          arr_en[w] = 1'b1;
          arr_we[w] = 1'b1;
        end
        arr_row[w] = s3_vrow;
      end else if (t_wl) begin
        if (!s2_req.we) begin
          arr_en[w]    = 1'b1;
          arr_sa_en[w] = s2_adv;
        end else if (s2_adv && s2_hit && WAY_W'(w) == s2_hway) begin
          arr_en[w] = 1'b1;
          arr_we[w] = 1'b1;
        end
      end
    end
    if (rstate == R_DATA) begin
      arr_word  = beat;
      arr_wdata = mem_resp_data;
    end
  end

  // ---------------- stage 3 output
  always_comb begin
    resp_valid = s3_done;
    resp.we    = s3_req.we;
    resp.hit   = s3_hit;
    resp.lat   = s3_lat;
    resp.rdata = s3_hit ? arr_rdata[s3_way] : fill_word;
  end

  assign idle = !s2_valid && !s3_valid;

  // ---------------- checks
  a_no_refill_overlap : assert property (@(posedge clk) disable iff (!rst_n)
    (rstate != R_IDLE) |-> !s2_adv);
  a_mem_req_stable : assert property (@(posedge clk) disable iff (!rst_n)
    (mem_req_valid && !mem_req_ready) |=> mem_req_valid);

endmodule
