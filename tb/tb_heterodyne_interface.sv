// End-to-end testbench of the interface in its main configuration, all
// parameters at their defaults: 256 MHz eight-phase clocks locked to a
// 4 MHz reference, so the reference period is the constant 512 phase steps.
//
// Stimulus, all on the phase-step grid of the ideal clock source:
//   1. the document's gate-level sweep, P = 511, 502, ..., 448 steps;
//   2. target standing still (P = 512) and the total reset;
//   3. random Doppler shifts of up to +-0.8 MHz (P = 427..640 steps), both
//      directions of motion.
// For every result it checks count_sub = P - 512 (velocity), total_count
// as the running sum since the last total reset (displacement), integral
// and fraction, one result per period and the latency from the falling
// edge of mea to valid (5 clock cycles). It counts how often each mechanism
// happened (save/reset sequence, minimum branch, maximum-minus-one branch,
// fraction wrap-around, total reset, motion in both directions) and fails
// if one never did.
module tb_heterodyne_interface;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int REF = 512;

  logic [7:0]        clk_ph;
  int                tick;
  logic              rst_n, mea, total_reset_n;
  logic              valid, use_max, ref_valid;
  logic signed [31:0] count_sub, total_count;
  logic [31:0]       integral;
  logic [2:0]        fraction, sel;
  logic [31:0]       count_regs [8];
  logic [34:0]       meas_word, ref_word;

  int checks = 0, failures = 0, n_valid = 0, n_periods = 0;
  int n_seq = 0, n_min = 0, n_max = 0, n_wrap = 0, n_treset = 0;
  int n_pos = 0, n_neg = 0, n_zero = 0;
  int exp_q [$];
  int fall_tick;
  longint exp_total;
  logic [2:0] sel_last;

  pll8_model u_pll (.clk_ph(clk_ph), .tick(tick));

  heterodyne_interface dut (
    .clk_ph(clk_ph), .rst_n(rst_n), .mea(mea), .ref_sig(1'b0), .total_reset_n(total_reset_n),
    .valid(valid), .count_sub(count_sub), .total_count(total_count), .integral(integral),
    .fraction(fraction), .sel(sel), .use_max(use_max), .count_regs(count_regs),
    .meas_word(meas_word), .ref_word(ref_word), .ref_valid(ref_valid)
  );

  task automatic wait_ticks(input int n);
    repeat (n) @(tick);
  endtask

  task automatic period(input int p);
    int hi;
    hi = (p % 2 == 0) ? p : p - 1;
    exp_q.push_back(p);
    n_periods++;
    mea = 1'b1;
    wait_ticks(hi);
    mea = 1'b0;
    fall_tick = tick;
    wait_ticks(2 * p - hi);
  endtask

  initial begin
    wait_ticks(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Save/reset sequences of the phase-0 counter.
  always @(posedge clk_ph[0]) if (rst_n && dut.u_mea_pm.g_cnt[0].u_cnt.sel_ctrl) begin
    n_seq++;
    if (sel < sel_last) n_wrap++;   // sel is the location just shifted out
  end
  always @(posedge clk_ph[0]) if (dut.u_mea_pm.g_cnt[0].u_cnt.sel_ctrl) sel_last <= sel;

  always @(posedge clk_ph[0]) begin
    if (valid && rst_n) begin
      int p;
      if (n_valid == 0) void'(exp_q.pop_front());
      n_valid++;
      p = exp_q.pop_front();
      exp_total = exp_total + (p - REF);
      checks++;
      if (count_sub != p - REF || total_count != 32'(exp_total)) begin
        failures++;
        $display("FAIL period %0d: count_sub %0d total %0d, expected %0d %0d",
                 p, count_sub, total_count, p - REF, exp_total);
      end
      checks++;
      if (int'(integral) != p / 8 - 2 || int'(fraction) != p % 8) begin
        failures++;
        $display("FAIL period %0d: integral %0h.%0d", p, integral, fraction);
      end
      checks++;
      // valid rose on the 5th clk_ph[0] edge after the fall and is seen here, on the 6th.
      if ((tick - fall_tick) > 16 * 6 || (tick - fall_tick) <= 16 * 5) begin
        failures++;
        $display("FAIL latency %0d ticks from falling edge", tick - fall_tick);
      end
      if (use_max) n_max++; else n_min++;
      if (n_valid == 70) treset_req = 1'b1;
      if (p > REF) n_pos++; else if (p < REF) n_neg++; else n_zero++;
    end
  end

  // Total reset while the signal runs: one cycle low, a few cycles after a
  // result and far from the next one.
  logic treset_req = 1'b0;
  int   treset_wait = 0;
  always @(posedge clk_ph[0]) begin
    if (treset_req) begin
      treset_wait++;
      if (treset_wait == 3) total_reset_n <= 1'b0;
      if (treset_wait == 4) begin
        total_reset_n <= 1'b1;
        exp_total      = 0;
        n_treset++;
        treset_req     = 1'b0;
      end
    end
  end

  task automatic expect_seen(input string what, input int n);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    exp_total     = 0;
    sel_last      = '0;
    rst_n         = 1'b0;
    mea           = 1'b0;
    total_reset_n = 1'b1;
    wait_ticks(41);
    rst_n = 1'b1;
    wait_ticks(200);
    for (int i = 0; i < 8; i++)
      for (int n = 0; n < 8; n++) period(511 - 9 * i);
    for (int n = 0; n < 8; n++) period(REF);
    for (int n = 0; n < 8; n++) period(REF);
    for (int n = 0; n < 120; n++) period($urandom_range(427, 640));
    mea = 1'b1;
    wait_ticks(400);
    mea = 1'b0;
    fall_tick = tick;
    wait_ticks(400);
    checks++;
    if (n_valid != n_periods - 1 || exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results for %0d periods", n_valid, n_periods);
    end
    expect_seen("results", n_valid);
    expect_seen("save/reset sequences", n_seq);
    expect_seen("minimum branch", n_min);
    expect_seen("maximum-minus-one branch", n_max);
    expect_seen("fraction wrap-around", n_wrap);
    expect_seen("total reset", n_treset);
    expect_seen("target receding (P > ref)", n_pos);
    expect_seen("target approaching (P < ref)", n_neg);
    expect_seen("target still (P = ref)", n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
