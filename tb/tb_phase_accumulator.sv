// Testbench of the phase accumulator.
// Random integral and fractional parts around a reference word are applied
// with valid; a software model forms (integral + 2) * 8 + fraction minus the
// reference, and the running sum. total_reset_n is pulsed now and then and
// must clear the sum. Outputs must follow valid by exactly one cycle.
module tb_phase_accumulator;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int CNT_W = 32, ACC_W = 32;

  logic                    clk = 1'b0, rst_n, total_reset_n, valid;
  logic [CNT_W-1:0]        integral;
  logic [2:0]              fraction;
  logic [CNT_W+2:0]        ref_word, meas_word;
  logic signed [ACC_W-1:0] count_sub, total_count;
  logic                    out_valid;
  int                      checks = 0, failures = 0, n_reset = 0, n_neg = 0, n_pos = 0;
  logic signed [ACC_W-1:0] exp_sub, exp_total;

  always #5 clk = ~clk;

  phase_accumulator #(.CNT_W(CNT_W), .ACC_W(ACC_W)) dut (
    .clk(clk), .rst_n(rst_n), .total_reset_n(total_reset_n), .valid(valid),
    .integral(integral), .fraction(fraction), .ref_word(ref_word),
    .meas_word(meas_word), .count_sub(count_sub), .total_count(total_count), .out_valid(out_valid)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, rw;
    rst_n = 1'b0; total_reset_n = 1'b1; valid = 1'b0;
    integral = '0; fraction = '0; ref_word = 35'd512;
    exp_total = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      #1;
      valid         = ($urandom_range(0, 2) != 0);
      total_reset_n = ($urandom_range(0, 60) != 0);
      rw            = (n < 1500) ? 512 : $urandom_range(60, 600);
      ref_word      = 35'(rw);
      p             = rw + $urandom_range(0, 400) - 200;
      if (p < 16) p = 16;
      integral      = CNT_W'(p / 8 - 2);
      fraction      = 3'(p % 8);
      exp_sub       = ACC_W'(p - rw);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== valid) begin
        failures++;
        $display("FAIL out_valid %0b after valid %0b", out_valid, valid);
      end
      if (!total_reset_n) begin
        exp_total = 0;
        n_reset++;
      end else if (valid) begin
        exp_total = exp_total + exp_sub;
      end
      if (valid) begin
        checks++;
        if (count_sub !== exp_sub) begin
          failures++;
          $display("FAIL count_sub %0d expected %0d", count_sub, exp_sub);
        end
        if (exp_sub < 0) n_neg++; else n_pos++;
      end
      checks++;
      if (total_count !== exp_total) begin
        failures++;
        $display("FAIL total_count %0d expected %0d", total_count, exp_total);
      end
      valid = 1'b0;
      total_reset_n = 1'b1;
    end
    checks++;
    if (n_reset == 0 || n_neg == 0 || n_pos == 0) begin
      failures++;
      $display("FAIL not exercised: resets %0d negative %0d positive %0d", n_reset, n_neg, n_pos);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
