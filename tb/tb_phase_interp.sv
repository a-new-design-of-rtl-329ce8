// Testbench of the octonary phase interpolator.
// The ideal eight-phase clock source runs; the measurement signal rises on
// random odd ticks. The expected phase location is the position of the edge
// within the clk_ph[0] period in phase steps, floor((tick mod 16) / 2), and
// the expected pattern has clk_ph[k] high exactly when that location minus k
// is 0..3 modulo 8. Both the eight-sample and the four-sample form are
// checked.
module tb_phase_interp;
  timeunit 1ps;
  timeprecision 1ps;

  logic [7:0] clk_ph;
  int         tick;
  logic       rst_n, mea;
  logic [7:0] pattern, pattern4;
  logic [2:0] sel, sel4;
  int         checks = 0, failures = 0;

  pll8_model u_pll (.clk_ph(clk_ph), .tick(tick));
  phase_interp dut (.rst_n(rst_n), .mea(mea), .clk_ph(clk_ph), .pattern(pattern), .sel(sel));
  phase_interp #(.FOUR_SAMPLES(1'b1)) dut4 (
    .rst_n(rst_n), .mea(mea), .clk_ph(clk_ph), .pattern(pattern4), .sel(sel4));

  task automatic wait_ticks(input int n);
    repeat (n) @(tick);
  endtask

  initial begin
    wait_ticks(200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int         loc;
    logic [7:0] exp_pat;
    int         seen [8];
    foreach (seen[i]) seen[i] = 0;
    rst_n = 1'b0;
    mea   = 1'b0;
    wait_ticks(3);
    rst_n = 1'b1;
    if (tick % 2 == 0) wait_ticks(1);
    for (int n = 0; n < 300; n++) begin
      wait_ticks(2 * ($urandom_range(3, 40)));   // stays on odd ticks
      loc = (tick % 16) / 2;
      mea = 1'b1;
      wait_ticks(1);
      for (int k = 0; k < 8; k++) exp_pat[k] = ((loc - k + 8) % 8) < 4;
      checks++;
      if (sel !== 3'(loc) || pattern !== exp_pat) begin
        failures++;
        $display("FAIL tick %0d: sel %0d pattern %b, expected %0d %b", tick, sel, pattern, loc, exp_pat);
      end
      checks++;
      if (sel4 !== 3'(loc) || pattern4 !== exp_pat) begin
        failures++;
        $display("FAIL four-sample form, tick %0d: sel %0d pattern %b", tick, sel4, pattern4);
      end
      seen[loc]++;
      wait_ticks(2 * ($urandom_range(3, 40)));
      mea = 1'b0;
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL phase location %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
