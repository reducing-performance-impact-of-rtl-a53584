// march_tester: characterises the access latency of every data-array line.
//
// The lines of the data array are sorted into latency classes with the
// March test. A March test checks memory function, so this engine turns it
// into a timing test: it runs the complete March C- sequence
//   up(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); up(r0)
// over every word of every way (all ways in parallel) once per sense
// timing, holding the wordline 1 + w cycles before sensing, for
// w = 0, 1, ..., MAX. A line whose reads all return the expected value at
// timing w, and failed at every shorter timing, gets latency class w. A
// line that still fails at the longest timing is given class MAX and
// counted in n_unrep. "0" and "1" are the all-zero and all-one words. The
// use of March C- and the timing sweep are this design's own choice; the
// class of each line is what the latency table and the reshuffling need.
//
// After each timing pass, a sweep of one line per cycle emits the newly
// classified lines on the result port (res_we with way, row and class); each
// line is reported exactly once. Interface: start (pulse) -> busy ... done
// (one-cycle pulse). Array port: t_en/t_we/t_row/t_word/t_wdata/t_sa_en
// drive all ways alike; t_rdata[w] is each way's sensed word, valid the
// cycle after t_sa_en. A read at timing w takes 2 + w cycles, a write one.
module march_tester #(
  parameter int unsigned N_ROWS = 256,
  parameter int unsigned N_WAYS = 4,
  parameter int unsigned WPL    = 8,
  parameter int unsigned W      = 64,
  parameter int unsigned L_W    = 2,
  localparam int unsigned ROW_W = $clog2(N_ROWS),
  localparam int unsigned WRD_W = (WPL > 1) ? $clog2(WPL) : 1,
  localparam int unsigned WAY_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1,
  localparam int unsigned A_W   = ROW_W + WRD_W,
  localparam int unsigned LN_W  = ROW_W + WAY_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  // array test port
  output logic             t_en,
  output logic             t_we,
  output logic [ROW_W-1:0] t_row,
  output logic [WRD_W-1:0] t_word,
  output logic [W-1:0]     t_wdata,
  output logic             t_sa_en,
  input  logic [W-1:0]     t_rdata [N_WAYS],
  // per-line result
  output logic             res_we,
  output logic [WAY_W-1:0] res_way,
  output logic [ROW_W-1:0] res_row,
  output logic [L_W-1:0]   res_lat,
  output logic [LN_W:0]    n_slow,
  output logic [LN_W:0]    n_unrep
);

  localparam int unsigned N_LINES = N_ROWS * N_WAYS;
  localparam int unsigned N_ELEM  = 6;
  localparam logic [L_W-1:0] MAXW = '1;

  typedef enum logic [2:0] {S_IDLE, S_OP, S_CHK, S_SWEEP, S_FIN} state_e;

  typedef struct packed {
    logic down;       // address order
    logic two;        // element has two operations
    logic rd0;        // first op is a read (else a write)
    logic v0;         // value of first op
    logic v1;         // value of second op (always a write)
  } elem_t;

  function automatic elem_t elem_info(input logic [2:0] e);
    unique case (e)
      3'd0:    return '{down: 1'b0, two: 1'b0, rd0: 1'b0, v0: 1'b0, v1: 1'b0};
      3'd1:    return '{down: 1'b0, two: 1'b1, rd0: 1'b1, v0: 1'b0, v1: 1'b1};
      3'd2:    return '{down: 1'b0, two: 1'b1, rd0: 1'b1, v0: 1'b1, v1: 1'b0};
      3'd3:    return '{down: 1'b1, two: 1'b1, rd0: 1'b1, v0: 1'b0, v1: 1'b1};
      3'd4:    return '{down: 1'b1, two: 1'b1, rd0: 1'b1, v0: 1'b1, v1: 1'b0};
      default: return '{down: 1'b0, two: 1'b0, rd0: 1'b1, v0: 1'b0, v1: 1'b0};
    endcase
  endfunction

  state_e          state;
  logic [L_W-1:0]  pass_w;
  logic [2:0]      elem;
  logic            opi;
  logic [A_W-1:0]  addr;
  logic [L_W-1:0]  cyc;
  logic [LN_W-1:0] line;
  logic            fail [N_LINES];
  logic            cls  [N_LINES];

  elem_t e_cur;
  logic  op_rd, op_val, last_addr, last_op;

  always_comb begin
    e_cur     = elem_info(elem);
    op_rd     = (opi == 1'b0) && e_cur.rd0;
    op_val    = (opi == 1'b0) ? e_cur.v0 : e_cur.v1;
    last_addr = e_cur.down ? (addr == '0) : (addr == '1);
    last_op   = e_cur.two ? (opi == 1'b1) : 1'b1;
  end

  // array port
  always_comb begin
    t_en    = (state == S_OP);
    t_we    = (state == S_OP) && !op_rd;
    t_row   = addr[A_W-1 -: ROW_W];
    t_word  = addr[WRD_W-1:0];
    t_wdata = {W{op_val}};
    t_sa_en = (state == S_OP) && op_rd && (cyc == pass_w);
    busy    = (state != S_IDLE);
    done    = (state == S_FIN);
  end

  // result port
  logic fail_l, cls_l;
  always_comb begin
    fail_l  = fail[line];
    cls_l   = cls[line];
    res_we  = (state == S_SWEEP) && !cls_l && (!fail_l || pass_w == MAXW);
    res_way = line[LN_W-1 -: WAY_W];
    res_row = line[ROW_W-1:0];
    res_lat = pass_w;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pass_w  <= '0;
      elem    <= '0;
      opi     <= 1'b0;
      addr    <= '0;
      cyc     <= '0;
      line    <= '0;
      n_slow  <= '0;
      n_unrep <= '0;
      for (int i = 0; i < N_LINES; i++) begin
        fail[i] <= 1'b0;
        cls[i]  <= 1'b0;
      end
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_OP;
          pass_w  <= '0;
          elem    <= '0;
          opi     <= 1'b0;
          addr    <= '0;
          cyc     <= '0;
          n_slow  <= '0;
          n_unrep <= '0;
          for (int i = 0; i < N_LINES; i++) begin
            fail[i] <= 1'b0;
            cls[i]  <= 1'b0;
          end
        end
        S_OP: begin
          if (op_rd) begin
            if (cyc == pass_w) begin
              cyc   <= '0;
              state <= S_CHK;
            end else begin
              cyc <= cyc + 1'b1;
            end
          end else begin
            // write done: next operation
            if (!last_op) opi <= 1'b1;
            else begin
              opi <= 1'b0;
              if (!last_addr) addr <= e_cur.down ? addr - 1'b1 : addr + 1'b1;
              else if (elem == 3'(N_ELEM - 1)) begin
                state <= S_SWEEP;
                line  <= '0;
              end else begin
                elem <= elem + 1'b1;
                addr <= elem_info(elem + 1'b1).down ? '1 : '0;
              end
            end
          end
        end
        S_CHK: begin
          for (int w = 0; w < N_WAYS; w++)
            if (t_rdata[w] != {W{op_val}})
              fail[w * N_ROWS + int'(addr[A_W-1 -: ROW_W])] <= 1'b1;
          state <= S_OP;
          if (!last_op) opi <= 1'b1;
          else begin
            opi <= 1'b0;
            if (!last_addr) addr <= e_cur.down ? addr - 1'b1 : addr + 1'b1;
            else if (elem == 3'(N_ELEM - 1)) begin
              state <= S_SWEEP;
              line  <= '0;
            end else begin
              elem <= elem + 1'b1;
              addr <= elem_info(elem + 1'b1).down ? '1 : '0;
            end
          end
        end
        S_SWEEP: begin
          if (res_we) begin
            cls[line] <= 1'b1;
            if (pass_w != '0) n_slow <= n_slow + 1'b1;
            if (fail_l)       n_unrep <= n_unrep + 1'b1;
          end
          fail[line] <= 1'b0;
          line <= line + 1'b1;
          if (line == LN_W'(N_LINES - 1)) begin
            if (pass_w == MAXW) state <= S_FIN;
            else begin
              pass_w <= pass_w + 1'b1;
              elem   <= '0;
              opi    <= 1'b0;
              addr   <= '0;
              state  <= S_OP;
            end
          end
        end
        S_FIN: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
