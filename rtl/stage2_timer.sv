// stage2_timer: sets the length of the data cache's second pipe stage.
//
// The second stage (wordline drive, bitline development, sensing) cannot be
// split into sub-stages, so a set slowed by process variation stretches it.
// When an access enters the stage (first = 1) the timer takes the set's
// latency code lat_in, read from the latency table during stage 1, and
// counts the cycles the wordline has been held. done rises once 1 + lat
// cycles have elapsed (in the first cycle already for a regular set), which
// is when the sense amplifiers may fire and the stage may hand over to the
// output stage. The controller fires the sense amplifiers in the cycle the
// stage actually advances, so a downstream stall only lengthens the hold.
//
// hold = 1 means the array is lent to another agent (a line refill) for
// this cycle: the wordline is dropped and the count restarts from zero when
// the access resumes. wl_en is the wordline enable for the access in the
// stage. lat_cur is the code the current access uses (lat_in in its first
// cycle, the sampled code afterwards). All of this follows the
// described scheme; the hold/restart handling is this design's own choice.
module stage2_timer #(
  parameter int unsigned L_W = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           valid,   // an access occupies stage 2
  input  logic           first,   // first cycle of that access in stage 2
  input  logic [L_W-1:0] lat_in,  // latency code, sampled when first = 1
  input  logic           hold,    // array borrowed: drop wordline, restart
  output logic           wl_en,   // wordline enable
  output logic           done,    // stage time satisfied in this cycle
  output logic [L_W-1:0] lat_cur  // latency code of the current access
);

  logic [L_W:0]   elapsed_q;  // wordline cycles already completed
  logic [L_W:0]   elapsed;
  logic [L_W-1:0] lat_eff;
  logic [L_W-1:0] lat_q;

  always_comb begin
    lat_eff = first ? lat_in : lat_q;
    elapsed = first ? '0 : elapsed_q;
    wl_en   = valid && !hold;
    done    = wl_en && (elapsed >= {1'b0, lat_eff});
    lat_cur = lat_eff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      elapsed_q <= '0;
      lat_q     <= '0;
    end else begin
      if (first) lat_q <= lat_in;
      if (hold || !valid)            elapsed_q <= '0;
      else if (elapsed != '1)        elapsed_q <= elapsed + 1'b1;
      else                           elapsed_q <= elapsed;
    end
  end

endmodule
