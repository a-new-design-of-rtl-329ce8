// Phase accumulator: velocity and displacement from measured periods.
//
// For every measured period (valid) it forms the period word in 1/8
// fast-clock units,
//   meas_word = (integral + DEAD_COUNTS) * 8 + fraction,
// subtracts the reference count ref_word, and registers the difference as
// count_sub: the phase the measurement signal gained or lost against the
// reference in that cycle, i.e. the instantaneous velocity. count_sub is
// added into total_count, the accumulated phase, i.e. the displacement since
// the last total reset. One count is 1/(8*M) of a reference period for a
// fast clock M times the reference frequency (lambda/512 for M = 64).
//
// Interface: single clock (clk_ph[0]); count_sub, total_count and
// out_valid update one cycle after valid. total_reset_n is active low and
// synchronous, and clears total_count; while it is low nothing accumulates.
//
// From the document: the subtraction from the reference count, the
// accumulation, the +2 correction and the 32-bit registers. Wrap-around of
// total_count (two's complement) and the reset polarity, read from the
// waveforms where total_reset stays high in operation, are this design's
// choices.
module phase_accumulator
  import hli_pkg::*;
#(
  parameter int unsigned CNT_W = 32,
  parameter int unsigned ACC_W = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   total_reset_n,
  input  logic                   valid,
  input  logic [CNT_W-1:0]       integral,
  input  logic [PH_W-1:0]        fraction,
  input  logic [CNT_W+PH_W-1:0]  ref_word,
  output logic [CNT_W+PH_W-1:0]  meas_word,
  output logic signed [ACC_W-1:0] count_sub,
  output logic signed [ACC_W-1:0] total_count,
  output logic                   out_valid
);

  localparam int unsigned W = CNT_W + PH_W;

  logic signed [W:0]       diff;
  logic signed [ACC_W-1:0] diff_acc;

  assign meas_word = {integral + CNT_W'(DEAD_COUNTS), fraction};
  assign diff      = $signed({1'b0, meas_word}) - $signed({1'b0, ref_word});
  assign diff_acc  = ACC_W'(diff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_sub   <= '0;
      total_count <= '0;
      out_valid   <= 1'b0;
    end else begin
      out_valid <= valid;
      if (valid) count_sub <= diff_acc;
      if (!total_reset_n)  total_count <= '0;
      else if (valid)      total_count <= total_count + diff_acc;
    end
  end

endmodule
