// Phasemeter: measures every period of one input signal to 1/8 of a
// fast-clock period.
//
// Eight int_counter instances, one per phase clock, count the period between
// rising edges of mea. The octonary phase interpolator gives the phase
// location sel of each rising edge; on the sel_ctrl pulse of the phase-0
// counter the present location is shifted into the previous one and the
// fractional part is formed as (present - previous) mod 8. On the add pulse
// of the phase-0 counter (after the falling edge of mea, when all eight
// counter registers are settled) the minimum sorter picks the integral part
// and integral, fraction and valid are registered. The measured period is
//   period = (integral + 2) * 8 + fraction   [1/8 clock period]
//
// Interface: all outputs are in the clk_ph[0] domain. valid pulses once per
// period of mea, 4 clock cycles after its falling edge. The first two
// periods after reset are discarded: the first has no previous phase location
// and no complete count, and a signal already high at reset makes the second
// one incomplete as well.
//
// From the document: the structure (eight counters, interpolator, fraction
// subtraction, minimum sorter) and the output relation. FOUR_SAMPLES selects
// the interpolator with four capture flip-flops. The priming rule, the
// output registers and the use of counter 0's strobes for the shared control
// are this design's choices.
module phasemeter
  import hli_pkg::*;
#(
  parameter int unsigned CNT_W        = 32,
  parameter bit          FOUR_SAMPLES = 1'b0
) (
  input  logic [N_PHASES-1:0] clk_ph,
  input  logic                rst_n,
  input  logic                mea,
  output logic                valid,
  output logic [CNT_W-1:0]    integral,
  output logic [PH_W-1:0]     fraction,
  output logic [PH_W-1:0]     sel,
  output logic                use_max,
  output logic [CNT_W-1:0]    count_regs [N_PHASES]
);

  logic                clk;
  logic [N_PHASES-1:0] reg_transfer, cnt_reset, sel_ctrl, add;
  logic [N_PHASES-1:0] pattern;
  logic [PH_W-1:0]     sel_now, frac_now;
  logic [CNT_W-1:0]    sort_int, sort_min, sort_max_m1;
  logic                sort_use_max;
  logic [1:0]          primed;

  assign clk = clk_ph[0];

  for (genvar k = 0; k < N_PHASES; k++) begin : g_cnt
    int_counter #(.CNT_W(CNT_W)) u_cnt (
      .clk          (clk_ph[k]),
      .rst_n        (rst_n),
      .mea          (mea),
      .count_reg    (count_regs[k]),
      .reg_transfer (reg_transfer[k]),
      .cnt_reset    (cnt_reset[k]),
      .sel_ctrl     (sel_ctrl[k]),
      .add          (add[k])
    );
  end

  phase_interp #(.FOUR_SAMPLES(FOUR_SAMPLES)) u_interp (
    .rst_n   (rst_n),
    .mea     (mea),
    .clk_ph  (clk_ph),
    .pattern (pattern),
    .sel     (sel_now)
  );

  // sel_ctrl: shift present and previous phase location.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel      <= '0;
      frac_now <= '0;
      primed   <= '0;
    end else if (sel_ctrl[0]) begin
      sel      <= sel_now;
      frac_now <= sel_now - sel;
      if (primed != 2'd3) primed <= primed + 1'b1;
    end
  end

  min_sorter #(.CNT_W(CNT_W)) u_sort (
    .count_regs (count_regs),
    .fraction   (frac_now),
    .integral   (sort_int),
    .min_val    (sort_min),
    .max_m1     (sort_max_m1),
    .use_max    (sort_use_max)
  );

  // add: register the result of this period.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= 1'b0;
      integral <= '0;
      fraction <= '0;
      use_max  <= 1'b0;
    end else begin
      valid <= add[0] && (primed == 2'd3);
      if (add[0]) begin
        integral <= sort_int;
        fraction <= frac_now;
        use_max  <= sort_use_max;
      end
    end
  end

endmodule
