// reshuffle_config: turns the measured line latencies into a reshuffling
// of the decoder and the contents of the latency table.
//
// A set is as slow as its slowest line, so a set mixing regular and slow
// lines wastes cycles on every access to its regular lines. Line
// reshuffling regroups lines among the 2^r consecutive sets of a
// reshuffling group, each way separately, so that lines of equal latency
// end up in the same set as far as possible. This engine sorts, in every
// group and every way, the 2^r lines by latency class (a counting sort:
// classes 0..MAX in turn, members in row order) and gives the k-th fastest
// line to logical set k of the group. Giving every way the same order puts
// the fast lines of all ways together, which minimises the sum of the set
// latencies of the group. It then writes each set's latency, the largest
// class among its lines, into the latency table. The sorting rule is this
// design's own choice; the aim, grouping equal latencies, is the scheme's.
//
// Input port ll_*: one write per physical line (way, row, class), from the
// March-test engine; reset marks every line as worst case. start -> busy
// ... done (one-cycle pulse). Programming takes one cycle per line per
// class and one per set: N_WAYS * 2^r * (MAX+1) + 2^r cycles per group
// (136 at the defaults, 4352 in total). n_slow_sets counts the sets whose
// table entry is not zero.
module reshuffle_config #(
  parameter int unsigned N_SETS = 256,
  parameter int unsigned N_WAYS = 4,
  parameter int unsigned R      = 3,
  parameter int unsigned L_W    = 2,
  localparam int unsigned IDX_W = $clog2(N_SETS),
  localparam int unsigned WAY_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1,
  localparam int unsigned GRP   = 1 << R,
  localparam int unsigned G_W   = IDX_W - R
) (
  input  logic             clk,
  input  logic             rst_n,
  // measured latency of each physical line
  input  logic             ll_we,
  input  logic [WAY_W-1:0] ll_way,
  input  logic [IDX_W-1:0] ll_row,
  input  logic [L_W-1:0]   ll_lat,
  // control
  input  logic             start,
  output logic             busy,
  output logic             done,
  // decoder programming
  output logic             cfg_we,
  output logic [WAY_W-1:0] cfg_way,
  output logic [IDX_W-1:0] cfg_idx,
  output logic [R-1:0]     cfg_slot,
  // latency table programming
  output logic             lt_we,
  output logic [IDX_W-1:0] lt_idx,
  output logic [L_W-1:0]   lt_lat,
  output logic [IDX_W:0]   n_slow_sets
);

  typedef enum logic [1:0] {C_IDLE, C_SCAN, C_LTW, C_FIN} state_e;

  logic [L_W-1:0] line_lat [N_WAYS][N_SETS];
  logic [L_W-1:0] set_max  [GRP];

  state_e         state;
  logic [G_W-1:0] grp;
  logic [WAY_W-1:0] way;
  logic [L_W-1:0] cls;
  logic [R-1:0]   mem;   // member (physical slot) being examined
  logic [R-1:0]   k;     // next logical slot to fill / table entry to write
  logic           match;

  always_comb begin
    match    = (state == C_SCAN) && (line_lat[way][{grp, mem}] == cls);
    cfg_we   = match;
    cfg_way  = way;
    cfg_idx  = {grp, k};
    cfg_slot = mem;
    lt_we    = (state == C_LTW);
    lt_idx   = {grp, k};
    lt_lat   = set_max[k];
    busy     = (state != C_IDLE);
    done     = (state == C_FIN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < N_WAYS; w++)
        for (int s = 0; s < N_SETS; s++) line_lat[w][s] <= '1;
    end else if (ll_we) begin
      line_lat[ll_way][ll_row] <= ll_lat;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_IDLE;
      grp         <= '0;
      way         <= '0;
      cls         <= '0;
      mem         <= '0;
      k           <= '0;
      n_slow_sets <= '0;
      for (int i = 0; i < GRP; i++) set_max[i] <= '0;
    end else begin
      unique case (state)
        C_IDLE: if (start) begin
          state       <= C_SCAN;
          grp         <= '0;
          way         <= '0;
          cls         <= '0;
          mem         <= '0;
          k           <= '0;
          n_slow_sets <= '0;
          for (int i = 0; i < GRP; i++) set_max[i] <= '0;
        end
        C_SCAN: begin
          if (match) begin
            k <= k + 1'b1;
            if (cls > set_max[k]) set_max[k] <= cls;
          end
          mem <= mem + 1'b1;
          if (mem == '1) begin
            cls <= cls + 1'b1;
            if (cls == '1) begin
              k <= '0;
              if (way == WAY_W'(N_WAYS - 1)) begin
                way   <= '0;
                state <= C_LTW;
              end else begin
                way <= way + 1'b1;
              end
            end
          end
        end
        C_LTW: begin
          if (set_max[k] != '0) n_slow_sets <= n_slow_sets + 1'b1;
          set_max[k] <= '0;
          k <= k + 1'b1;
          if (k == '1) begin
            grp <= grp + 1'b1;
            state <= (grp == '1) ? C_FIN : C_SCAN;
          end
        end
        C_FIN: state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
