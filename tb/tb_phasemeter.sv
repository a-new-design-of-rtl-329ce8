// Testbench of one phasemeter, with the ideal eight-phase clock source.
// A phase step is 1/8 clock period (2 ticks); the measurement signal is
// given periods of P steps, its edges on odd ticks. First the sweep of the
// document's gate-level simulation (P = 511, 502, ..., 448 steps of a
// 512-step reference period, expected integral 0x3D..0x36 and fraction
// 7..0), then random periods of 427..640 steps (a +-0.8 MHz Doppler shift on
// a 4 MHz reference). Each result must give integral = P/8 - 2 and
// fraction = P mod 8, the eight counters must hold P/8 - 2 or P/8 - 1 with
// exactly P mod 8 of them at the higher value, and one result must come per
// period.
module tb_phasemeter;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int CNT_W = 32;

  logic [7:0]       clk_ph;
  int               tick;
  logic             rst_n, mea;
  logic             valid, use_max;
  logic [CNT_W-1:0] integral;
  logic [2:0]       fraction, sel;
  logic [CNT_W-1:0] count_regs [8];
  int               checks = 0, failures = 0, n_valid = 0, n_periods = 0;
  int               exp_q [$];

  pll8_model u_pll (.clk_ph(clk_ph), .tick(tick));
  phasemeter #(.CNT_W(CNT_W)) dut (
    .clk_ph(clk_ph), .rst_n(rst_n), .mea(mea), .valid(valid), .integral(integral),
    .fraction(fraction), .sel(sel), .use_max(use_max), .count_regs(count_regs)
  );

  task automatic wait_ticks(input int n);
    repeat (n) @(tick);
  endtask

  // One period of P phase steps, starting with a rising edge.
  task automatic period(input int p);
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
    wait_ticks(400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_ph[0]) begin
    if (valid && rst_n) begin
      int p, hi_n;
      // The first period after reset gives no result.
      if (n_valid == 0) void'(exp_q.pop_front());
      n_valid++;
      p = exp_q.pop_front();
      checks++;
      if (int'(integral) != p / 8 - 2 || int'(fraction) != p % 8) begin
        failures++;
        $display("FAIL period %0d: integral %0h fraction %0d, expected %0h %0d",
                 p, integral, fraction, p / 8 - 2, p % 8);
      end
      hi_n = 0;
      for (int k = 0; k < 8; k++) begin
        if (int'(count_regs[k]) == p / 8 - 1) hi_n++;
        else if (int'(count_regs[k]) != p / 8 - 2) hi_n = -100;
      end
      checks++;
      if (hi_n != p % 8) begin
        failures++;
        $display("FAIL period %0d: counters do not split %0d/%0d", p, p % 8, 8 - p % 8);
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    mea   = 1'b0;
    wait_ticks(41);
    rst_n = 1'b1;
    wait_ticks(200);                 // odd tick
    for (int i = 0; i < 8; i++)
      for (int n = 0; n < 6; n++) period(511 - 9 * i);
    for (int n = 0; n < 60; n++) period($urandom_range(427, 640));
    // A last rising edge closes the last period.
    mea = 1'b1;
    wait_ticks(400);
    mea = 1'b0;
    wait_ticks(400);
    checks++;
    if (n_valid != n_periods - 1 || exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results for %0d periods", n_valid, n_periods);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
