// Octonary phase interpolator.
//
// On every rising edge of the measurement signal the levels of the eight
// phase clocks are captured in eight flip-flops clocked by the measurement
// signal itself. Because clk_ph[k] lags clk_ph[0] by k/8 of a clock period,
// the captured pattern is a run of four ones whose rotation tells in which
// eighth of the fast-clock period the edge arrived. The code converter of
// hli_pkg turns it into the 3-bit phase location sel (0..7).
//
// Interface: pattern and sel change right after each rising edge of mea and
// then hold for the whole measurement period, so a fast-clock domain may read
// them a few cycles after it has synchronised the edge.
//
// FOUR_SAMPLES = 1 builds the reduced form: since clk_ph[k+4] is the
// complement of clk_ph[k], only clk_ph[0..3] are captured and the upper half
// of the pattern is their inverse. Then every captured value maps to a valid
// location, and a metastable sample can only move the result to the
// neighbouring location.
//
// From the document: eight phase clocks, capture at the measurement edge, an
// 8-bit to 3-bit code conversion, and the remark that four captured clocks
// suffice. The converter rule for invalid patterns, the default of eight
// capture flip-flops and the asynchronous reset are this design's choices.
module phase_interp
  import hli_pkg::*;
#(
  parameter bit FOUR_SAMPLES = 1'b0
) (
  input  logic                rst_n,
  input  logic                mea,
  input  logic [N_PHASES-1:0] clk_ph,
  output logic [N_PHASES-1:0] pattern,
  output logic [PH_W-1:0]     sel
);

  localparam int unsigned NCAP = FOUR_SAMPLES ? N_PHASES / 2 : N_PHASES;

  logic [NCAP-1:0] cap;

  always_ff @(posedge mea or negedge rst_n) begin
    if (!rst_n) cap <= '0;
    else        cap <= clk_ph[NCAP-1:0];
  end

  if (FOUR_SAMPLES) begin : g_four
    assign pattern = {~cap, cap};
  end else begin : g_eight
    assign pattern = cap;
  end

  assign sel = phase_code(pattern);

endmodule
