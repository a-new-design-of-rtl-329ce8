// Workload testbench: constant Doppler shifts, as in the interface's
// level tests with a function generator.
//
// The top runs with all defaults (4 MHz reference = 512 phase steps, eight
// 256 MHz clocks). Eleven Doppler frequencies from +0.8 MHz to -0.8 MHz in
// 0.16 MHz steps are applied; for each, NSAMP = 8192 measurement periods
// are generated. The measurement frequency is 4 MHz + fd, so its period is
// 512 * 4 / (4 + fd) steps, generally not a whole number: edge n is placed
// at round(n * period) on the phase-step grid (always half a step away from
// a clock edge), so single periods alternate between the two neighbouring
// whole numbers.
//
// Checks: every count_sub equals the generated period minus 512; the mean
// displacement difference over a level is within 0.05 nm of the ideal
// (period - 512) / 512 * 631.99 nm; and the RMS deviation of the displacement
// difference, count_sub / 512 * 631.99 nm, is below one nanometre. It prints
// the mean velocity word and RMS per level.
module tb_doppler_levels;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int  NSAMP  = 8192;
  localparam int  NLEVEL = 11;
  localparam real LAMBDA = 631.99;   // nm

  logic [7:0]         clk_ph;
  int                 tick;
  logic               rst_n, mea;
  logic               valid, use_max, ref_valid;
  logic signed [31:0] count_sub, total_count;
  logic [31:0]        integral;
  logic [2:0]         fraction, sel;
  logic [31:0]        count_regs [8];
  logic [34:0]        meas_word, ref_word;

  int     checks = 0, failures = 0, n_valid = 0;
  int     exp_q [$];
  int     lvl_n;
  real    lvl_sum, lvl_sq;

  pll8_model u_pll (.clk_ph(clk_ph), .tick(tick));

  heterodyne_interface dut (
    .clk_ph(clk_ph), .rst_n(rst_n), .mea(mea), .ref_sig(1'b0), .total_reset_n(1'b1),
    .valid(valid), .count_sub(count_sub), .total_count(total_count), .integral(integral),
    .fraction(fraction), .sel(sel), .use_max(use_max), .count_regs(count_regs),
    .meas_word(meas_word), .ref_word(ref_word), .ref_valid(ref_valid)
  );

  task automatic wait_ticks(input int n);
    repeat (n) @(tick);
  endtask

  initial begin
    wait_ticks(250_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_ph[0]) begin
    if (valid && rst_n) begin
      int  p;
      real d;
      if (n_valid == 0) void'(exp_q.pop_front());
      n_valid++;
      p = exp_q.pop_front();
      checks++;
      if (count_sub != p - 512) begin
        failures++;
        if (failures < 20) $display("FAIL period %0d: count_sub %0d", p, count_sub);
      end
      d = real'(count_sub) / 512.0 * LAMBDA;
      lvl_n++;
      lvl_sum += d;
      lvl_sq  += d * d;
    end
  end

  initial begin
    real    fd, per, ideal, mean, rms;
    longint last, e_t;
    int     p, hi;
    rst_n = 1'b0;
    mea   = 1'b0;
    wait_ticks(41);
    rst_n = 1'b1;
    wait_ticks(200);
    for (int l = 0; l < NLEVEL; l++) begin
      fd    = 0.8 - 0.16 * l;                   // MHz
      per   = 512.0 * 4.0 / (4.0 + fd);         // steps
      ideal = (per - 512.0) / 512.0 * LAMBDA;   // nm per period
      // Two settling periods, then the samples of this level.
      last = 0;
      for (int n = 1; n <= NSAMP + 2; n++) begin
        e_t = longint'(real'(n) * per + 0.5);
        p    = int'(e_t - last);
        last = e_t;
        if (n == 3) begin
          lvl_n = 0; lvl_sum = 0.0; lvl_sq = 0.0;
        end
        hi = (p % 2 == 0) ? p : p - 1;
        exp_q.push_back(p);
        mea = 1'b1;
        wait_ticks(hi);
        mea = 1'b0;
        wait_ticks(2 * p - hi);
      end
      mean = lvl_sum / lvl_n;
      rms  = lvl_sq / lvl_n - mean * mean;
      rms  = (rms > 0.0) ? $sqrt(rms) : 0.0;   // rounding can make it -0
      $display("Doppler %5.2f MHz: %0d results, mean %8.3f nm (ideal %8.3f), RMS %5.3f nm",
               fd, lvl_n, mean, ideal, rms);
      checks++;
      if (lvl_n < NSAMP - 2 || rms >= 1.0 || (mean - ideal) > 0.05 || (ideal - mean) > 0.05) begin
        failures++;
        $display("FAIL level %0d", l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
