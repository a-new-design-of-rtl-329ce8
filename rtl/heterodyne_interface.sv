// Digital interface for a heterodyne laser interferometer (top level).
//
// A heterodyne laser head delivers a reference signal at the beat frequency
// of its two optical frequencies and a measurement signal whose frequency is
// shifted by the Doppler frequency of the moving target mirror. Every period
// of the measurement signal is measured with a fast clock M times the
// reference frequency, refined to 1/8 clock period by eight phases of that
// clock; the difference to the reference period is the phase the target
// gained in that cycle (velocity), and its running sum is the displacement.
//
//   clk_ph[7:0] -+-> phasemeter (mea) --> phase_accumulator --> count_sub
//                |                             ^                total_count
//                +-> phasemeter (ref_sig) -----+  (USE_REF_PHASEMETER = 1)
//   REF_COUNT ---------------------------------+  (USE_REF_PHASEMETER = 0)
//
// USE_REF_PHASEMETER = 0 is the main architecture: the eight clocks come
// from a PLL locked to the reference (M = 64, 4 MHz reference, 256 MHz
// clocks), so the reference period is the constant REF_COUNT = 64*8 = 512
// steps and ref_sig is not used by the logic. USE_REF_PHASEMETER = 1 is the
// variant for a PLL that cannot lock to the reference: a second phasemeter
// measures the reference signal, its last word is held, and each measurement
// period is compared with the reference word held at that moment.
//
// Interface: clk_ph[k] lags clk_ph[0] by k*45 degrees; all outputs are in
// the clk_ph[0] domain. count_sub and total_count change on the clock edge
// on which valid rises, 5 clock cycles after the falling edge of mea that
// ends a measured period; integral, fraction and meas_word are the inputs of
// that update and are valid one cycle earlier. mea and ref_sig need a
// duty cycle leaving at least 4 clock cycles high and low.
//
// FOUR_SAMPLES = 1 makes the interpolators capture only four of the eight
// clocks, which is enough to find all eight phase locations.
//
// From the document: the whole structure and the constants. The parameters
// that select the variant and the four-sample interpolator and the holding register of the reference word
// are this design's choices.
module heterodyne_interface
  import hli_pkg::*;
#(
  parameter int unsigned CNT_W              = 32,
  parameter int unsigned ACC_W              = 32,
  parameter int unsigned REF_COUNT          = 512,
  parameter bit          USE_REF_PHASEMETER = 1'b0,
  parameter bit          FOUR_SAMPLES       = 1'b0
) (
  input  logic [N_PHASES-1:0]     clk_ph,
  input  logic                    rst_n,
  input  logic                    mea,
  input  logic                    ref_sig,
  input  logic                    total_reset_n,
  output logic                    valid,
  output logic signed [ACC_W-1:0] count_sub,
  output logic signed [ACC_W-1:0] total_count,
  output logic [CNT_W-1:0]        integral,
  output logic [PH_W-1:0]         fraction,
  output logic [PH_W-1:0]         sel,
  output logic                    use_max,
  output logic [CNT_W-1:0]        count_regs [N_PHASES],
  output logic [CNT_W+PH_W-1:0]   meas_word,
  output logic [CNT_W+PH_W-1:0]   ref_word,
  output logic                    ref_valid
);

  localparam int unsigned W = CNT_W + PH_W;

  logic pm_valid;

  phasemeter #(.CNT_W(CNT_W), .FOUR_SAMPLES(FOUR_SAMPLES)) u_mea_pm (
    .clk_ph     (clk_ph),
    .rst_n      (rst_n),
    .mea        (mea),
    .valid      (pm_valid),
    .integral   (integral),
    .fraction   (fraction),
    .sel        (sel),
    .use_max    (use_max),
    .count_regs (count_regs)
  );

  if (USE_REF_PHASEMETER) begin : g_ref_pm
    logic             r_valid, r_use_max;
    logic [CNT_W-1:0] r_integral;
    logic [PH_W-1:0]  r_fraction, r_sel;
    logic [CNT_W-1:0] r_count_regs [N_PHASES];

    phasemeter #(.CNT_W(CNT_W), .FOUR_SAMPLES(FOUR_SAMPLES)) u_ref_pm (
      .clk_ph     (clk_ph),
      .rst_n      (rst_n),
      .mea        (ref_sig),
      .valid      (r_valid),
      .integral   (r_integral),
      .fraction   (r_fraction),
      .sel        (r_sel),
      .use_max    (r_use_max),
      .count_regs (r_count_regs)
    );

    // Hold the latest reference word; the accumulator samples it when a
    // measurement period completes.
    always_ff @(posedge clk_ph[0] or negedge rst_n) begin
      if (!rst_n)       ref_word <= W'(REF_COUNT);
      else if (r_valid) ref_word <= {r_integral + CNT_W'(DEAD_COUNTS), r_fraction};
    end
    assign ref_valid = r_valid;
  end else begin : g_ref_const
    assign ref_word  = W'(REF_COUNT);
    assign ref_valid = 1'b0;
  end

  phase_accumulator #(.CNT_W(CNT_W), .ACC_W(ACC_W)) u_acc (
    .clk           (clk_ph[0]),
    .rst_n         (rst_n),
    .total_reset_n (total_reset_n),
    .valid         (pm_valid),
    .integral      (integral),
    .fraction      (fraction),
    .ref_word      (ref_word),
    .meas_word     (meas_word),
    .count_sub     (count_sub),
    .total_count   (total_count),
    .out_valid     (valid)
  );

endmodule
