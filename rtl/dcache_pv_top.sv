// dcache_pv_top: variation-aware pipelined L1 data cache (64 KB, 4-way,
// 64-byte lines, 3-stage pipeline) with a latency table and line
// reshuffling.
//
// Process variation makes some SRAM lines slower to sense than others.
// Instead of timing every access for the slowest line, the cache keeps a
// 2-bit latency per set in a small latency table that is read in parallel
// with set decoding; the second pipe stage then lasts 1 + that many cycles.
// To keep fast lines out of slow sets, a programmable decoder reshuffles
// the lines of 2^r consecutive sets within each way so that lines of equal
// latency share a set.
//
// Blocks: dcache_pipe (pipeline and miss handling, with stage2_timer and
// tag_lru_store), latency_table, reshuffle_decoder, N_WAYS pv_sram_way
// array models, march_tester (line characterisation) and reshuffle_config
// (decoder and table programming).
//
// Operation: after reset the table holds the worst latency everywhere and
// the decoder is the identity, so the cache already works, with worst-case
// timing. A pulse on init_start stops taking requests, waits until the
// pipeline is empty, runs the March test on the array (this overwrites the
// data), programs decoder and table, invalidates all tags and resumes;
// init_done then stays high. The init sequencing is this design's own
// choice; the text only says the lines are characterised by a March test
// and that hardware manages the table.
//
// Ports: load/store request and response as in dcache_pipe; a next-level
// port (mem_*) where the L2 cache connects; status outputs with the number
// of slow lines found, of lines failing even at the longest timing and of
// sets left slow after reshuffling.
module dcache_pv_top
  import dcache_pkg::*;
#(
  parameter int unsigned N_SETS    = SETS,
  parameter int unsigned N_WAYS    = WAYS,
  parameter int unsigned R         = R_DEG,
  parameter int unsigned FAULT_PCT = 20,
  parameter int unsigned SEED      = 32'h2013_0001,
  localparam int unsigned IDX_W    = $clog2(N_SETS),
  localparam int unsigned WAY_W    = (N_WAYS > 1) ? $clog2(N_WAYS) : 1,
  localparam int unsigned WRD_W    = $clog2(WORDS_PER_LINE),
  localparam int unsigned LN_W     = IDX_W + WAY_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // characterisation control
  input  logic              init_start,
  output logic              init_busy,
  output logic              init_done,
  output logic [LN_W:0]     n_slow_lines,
  output logic [LN_W:0]     n_unrep_lines,
  output logic [IDX_W:0]    n_slow_sets,
  // load/store unit
  input  logic              req_valid,
  output logic              req_ready,
  input  dc_req_t           req,
  output logic              resp_valid,
  output dc_resp_t          resp,
  // next level (L2)
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [ADDR_W-1:0] mem_req_addr,
  output word_t             mem_req_wdata,
  input  logic              mem_resp_valid,
  input  word_t             mem_resp_data
);

  typedef enum logic [2:0] {I_RUN, I_DRAIN, I_MARCH, I_CFG, I_FLUSH} istate_e;
  istate_e istate;

  // ---------------- latency table
  logic             lt_rd_en, lt_we;
  logic [IDX_W-1:0] lt_rd_idx, lt_widx;
  logic [LAT_W-1:0] lt_rd_lat, lt_wlat;

  latency_table #(.N_SETS(N_SETS), .L_W(LAT_W)) u_lt (
    .clk, .rst_n,
    .rd_en (lt_rd_en), .rd_idx(lt_rd_idx), .rd_lat(lt_rd_lat),
    .wr_en (lt_we),    .wr_idx(lt_widx),   .wr_lat(lt_wlat)
  );

  // ---------------- reshuffling decoder
  logic [IDX_W-1:0] dec_idx;
  logic [IDX_W-1:0] dec_row [N_WAYS];
  logic             cfg_we;
  logic [WAY_W-1:0] cfg_way;
  logic [IDX_W-1:0] cfg_idx;
  logic [R-1:0]     cfg_slot;

  reshuffle_decoder #(.N_SETS(N_SETS), .N_WAYS(N_WAYS), .R(R)) u_dec (
    .clk, .rst_n,
    .idx(dec_idx), .phys_row(dec_row),
    .cfg_we, .cfg_way, .cfg_idx, .cfg_slot
  );

  // ---------------- pipeline
  logic             p_en [N_WAYS];
  logic             p_we [N_WAYS];
  logic [IDX_W-1:0] p_row [N_WAYS];
  logic             p_sa [N_WAYS];
  logic [WRD_W-1:0] p_word;
  word_t            p_wdata;
  word_t            a_rdata [N_WAYS];
  logic             pipe_idle;

  dcache_pipe #(.N_SETS(N_SETS), .N_WAYS(N_WAYS), .WPL(WORDS_PER_LINE),
                .L_W(LAT_W)) u_pipe (
    .clk, .rst_n,
    .enable   (istate == I_RUN),
    .flush    (istate == I_FLUSH),
    .idle     (pipe_idle),
    .req_valid, .req_ready, .req, .resp_valid, .resp,
    .lt_rd_en, .lt_rd_idx, .lt_rd_lat,
    .dec_idx, .dec_row,
    .arr_en(p_en), .arr_we(p_we), .arr_row(p_row), .arr_sa_en(p_sa),
    .arr_word(p_word), .arr_wdata(p_wdata), .arr_rdata(a_rdata),
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr,
    .mem_req_wdata, .mem_resp_valid, .mem_resp_data
  );

  // ---------------- March-test engine
  logic             m_start, m_busy, m_done;
  logic             t_en, t_we, t_sa;
  logic [IDX_W-1:0] t_row;
  logic [WRD_W-1:0] t_word;
  word_t            t_wdata;
  logic             res_we;
  logic [WAY_W-1:0] res_way;
  logic [IDX_W-1:0] res_row;
  logic [LAT_W-1:0] res_lat;

  march_tester #(.N_ROWS(N_SETS), .N_WAYS(N_WAYS), .WPL(WORDS_PER_LINE),
                 .W(WORD_W), .L_W(LAT_W)) u_march (
    .clk, .rst_n,
    .start(m_start), .busy(m_busy), .done(m_done),
    .t_en, .t_we, .t_row, .t_word, .t_wdata, .t_sa_en(t_sa),
    .t_rdata(a_rdata),
    .res_we, .res_way, .res_row, .res_lat,
    .n_slow(n_slow_lines), .n_unrep(n_unrep_lines)
  );

  // ---------------- configuration engine
  logic c_start, c_busy, c_done;

  reshuffle_config #(.N_SETS(N_SETS), .N_WAYS(N_WAYS), .R(R), .L_W(LAT_W)) u_cfg (
    .clk, .rst_n,
    .ll_we(res_we), .ll_way(res_way), .ll_row(res_row), .ll_lat(res_lat),
    .start(c_start), .busy(c_busy), .done(c_done),
    .cfg_we, .cfg_way, .cfg_idx, .cfg_slot,
    .lt_we, .lt_idx(lt_widx), .lt_lat(lt_wlat),
    .n_slow_sets
  );

  // ---------------- data array (one model per way)
  for (genvar w = 0; w < N_WAYS; w++) begin : g_way
    logic             en, we, sa;
    logic [IDX_W-1:0] row;
    logic [WRD_W-1:0] word;
    word_t            wdata;

    always_comb begin
      if (m_busy) begin
        en = t_en;  we = t_we;  sa = t_sa;  row = t_row;  word = t_word;  wdata = t_wdata;
      end else begin
        en = p_en[w]; we = p_we[w]; sa = p_sa[w]; row = p_row[w]; word = p_word; wdata = p_wdata;
      end
    end

    pv_sram_way #(.N_ROWS(N_SETS), .WPL(WORDS_PER_LINE), .W(WORD_W), .L_W(LAT_W),
                  .FAULT_PCT(FAULT_PCT), .SEED(SEED + 32'h9E37_79B9 * w)) u_way (
      .clk, .en, .we, .row, .word, .wdata, .sa_en(sa), .rdata(a_rdata[w])
    );
  end

  // ---------------- init sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      istate    <= I_RUN;
      init_done <= 1'b0;
    end else begin
      unique case (istate)
        I_RUN:   if (init_start) istate <= I_DRAIN;
        I_DRAIN: if (pipe_idle) istate <= I_MARCH;
        I_MARCH: if (m_done) istate <= I_CFG;
        I_CFG:   if (c_done) istate <= I_FLUSH;
        I_FLUSH: begin
          istate    <= I_RUN;
          init_done <= 1'b1;
        end
        default: istate <= I_RUN;
      endcase
    end
  end

  // start pulses: one cycle on entering the state
  logic m_started, c_started;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_started <= 1'b0;
      c_started <= 1'b0;
    end else begin
      m_started <= (istate == I_MARCH);
      c_started <= (istate == I_CFG);
    end
  end
  assign m_start   = (istate == I_MARCH) && !m_started;
  assign c_start   = (istate == I_CFG) && !c_started;
  assign init_busy = (istate != I_RUN) || c_busy;

endmodule
