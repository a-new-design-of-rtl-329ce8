// Testbench of the variant with a reference phasemeter
// (USE_REF_PHASEMETER = 1): the eight-phase clock is not locked to the
// reference, so the reference signal is measured like the measurement
// signal and each measurement period is compared with the last reference
// period.
//
// Part 1 repeats the document's gate-level simulation of this variant:
// 32 MHz clocks and a 4 MHz reference, i.e. a reference period of 8 clocks
// = 64 phase steps, and measurement periods of 127, 118, ..., 64 steps with
// expected integral parts 0xD..0x6 and fractions 7..0.
// Part 2 is the on-chip case: 260 MHz clocks, so a 4 MHz reference lasts 65
// clocks = 520 steps, with random measurement periods for a +-0.8 MHz
// Doppler shift (433..650 steps).
// Both signals run concurrently with unrelated phases, and both
// interpolators use the four-sample form (FOUR_SAMPLES = 1). Checks: integral and
// fraction of every period, count_sub = P - (reference word in use),
// total_count as the running sum, and the reference word equal to the
// reference period once it has settled.
module tb_heterodyne_interface_fpga;
  timeunit 1ps;
  timeprecision 1ps;

  logic [7:0]         clk_ph;
  int                 tick;
  logic               rst_n, mea, ref_sig;
  logic               valid, use_max, ref_valid;
  logic signed [31:0] count_sub, total_count;
  logic [31:0]        integral;
  logic [2:0]         fraction, sel;
  logic [31:0]        count_regs [8];
  logic [34:0]        meas_word, ref_word, ref_word_d;

  int     checks = 0, failures = 0, n_valid = 0, n_periods = 0, n_ref_checks = 0, n_ref_valid = 0;
  int     exp_q [$];
  int     ref_p = 64, ref_stable = 0;
  bit     done = 0;
  longint exp_total = 0;

  pll8_model u_pll (.clk_ph(clk_ph), .tick(tick));

  heterodyne_interface #(.USE_REF_PHASEMETER(1'b1), .FOUR_SAMPLES(1'b1)) dut (
    .clk_ph(clk_ph), .rst_n(rst_n), .mea(mea), .ref_sig(ref_sig), .total_reset_n(1'b1),
    .valid(valid), .count_sub(count_sub), .total_count(total_count), .integral(integral),
    .fraction(fraction), .sel(sel), .use_max(use_max), .count_regs(count_regs),
    .meas_word(meas_word), .ref_word(ref_word), .ref_valid(ref_valid)
  );

  task automatic wait_ticks(input int n);
    repeat (n) @(tick);
  endtask

  task automatic mea_period(input int p);
    int hi;
    hi = (p % 2 == 0) ? p : p - 1;
    exp_q.push_back(p);
    n_periods++;
    mea = 1'b1;
    wait_ticks(hi);
    mea = 1'b0;
    wait_ticks(2 * p - hi);
  endtask

  initial begin
    wait_ticks(2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_ph[0]) begin
    ref_word_d <= ref_word;
    if (ref_valid && rst_n) n_ref_valid++;
    if (valid && rst_n) begin
      int p;
      if (n_valid == 0) void'(exp_q.pop_front());
      n_valid++;
      p = exp_q.pop_front();
      exp_total = exp_total + longint'(count_sub);
      checks++;
      if (int'(integral) != p / 8 - 2 || int'(fraction) != p % 8) begin
        failures++;
        $display("FAIL period %0d: integral %0h.%0d", p, integral, fraction);
      end
      checks++;
      if (count_sub != p - int'(ref_word_d) || total_count != 32'(exp_total)) begin
        failures++;
        $display("FAIL period %0d: count_sub %0d with reference %0d, total %0d",
                 p, count_sub, ref_word_d, total_count);
      end
      if (ref_stable >= 4) begin
        checks++;
        n_ref_checks++;
        if (int'(ref_word_d) != ref_p) begin
          failures++;
          $display("FAIL reference word %0d, reference period %0d", ref_word_d, ref_p);
        end
      end
    end
  end

  // Reference signal: 64 steps, then 520 steps after the switch.
  initial begin
    ref_sig = 1'b0;
    @(posedge rst_n);
    wait_ticks(101);                     // odd tick, unrelated to mea
    while (!done) begin
      ref_sig = 1'b1;
      wait_ticks(ref_p);
      ref_sig = 1'b0;
      wait_ticks(ref_p);
      ref_stable++;
    end
  end

  initial begin
    rst_n = 1'b0;
    mea   = 1'b0;
    wait_ticks(41);
    rst_n = 1'b1;
    wait_ticks(200);
    for (int n = 0; n < 4; n++) mea_period(64);
    for (int i = 0; i < 8; i++)
      for (int n = 0; n < 8; n++) mea_period(127 - 9 * i);
    // Switch the reference to the 260 MHz on-chip case.
    ref_stable = -2;
    ref_p      = 520;
    for (int n = 0; n < 60; n++) mea_period($urandom_range(433, 650));
    mea = 1'b1;
    wait_ticks(400);
    mea = 1'b0;
    wait_ticks(400);
    done = 1;
    checks++;
    if (n_valid != n_periods - 1 || exp_q.size() != 0 || n_ref_checks < 50 || n_ref_valid < 50) begin
      failures++;
      $display("FAIL %0d results for %0d periods, %0d reference checks, %0d reference results",
               n_valid, n_periods, n_ref_checks, n_ref_valid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
