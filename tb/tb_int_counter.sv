// Testbench of the counter with save-and-reset control unit.
// A 10 ns clock runs; the measurement signal changes 3 ns after a clock edge
// so that every period is a whole number E of clock cycles. Checks: the saved
// count is E - 2; reg_transfer, reset and sel_ctrl come as single pulses on
// three consecutive cycles; add pulses once per falling edge; the saved count
// appears 4 clock edges after the rising edge (sel_ctrl is seen at the 6th).
module tb_int_counter;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int CNT_W = 16;

  logic             clk = 1'b0, rst_n, mea;
  logic [CNT_W-1:0] count_reg;
  logic             reg_transfer, cnt_reset, sel_ctrl, add;
  int               checks = 0, failures = 0;
  int               exp_q [$];
  int               n_add = 0, n_fall = 0, n_seq = 0;
  int               cyc = 0, rise_cyc = 0;
  logic [1:0]       hist;   // {reset, reg_transfer} of the two cycles before

  always #5 clk = ~clk;

  int_counter #(.CNT_W(CNT_W)) dut (
    .clk(clk), .rst_n(rst_n), .mea(mea), .count_reg(count_reg),
    .reg_transfer(reg_transfer), .cnt_reset(cnt_reset), .sel_ctrl(sel_ctrl), .add(add)
  );

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor, sampled just before each rising edge.
  logic xfer_d1, clr_d1;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (sel_ctrl) begin
        checks++;
        if (!(clr_d1 && hist[0])) begin
          failures++;
          $display("FAIL sequence: sel_ctrl not preceded by reset and reg_transfer");
        end
        n_seq++;
        if (exp_q.size() > 0) begin
          int e;
          e = exp_q.pop_front();
          if (e >= 0) begin
            checks++;
            if (int'(count_reg) != e - 2) begin
              failures++;
              $display("FAIL count_reg %0d, period %0d cycles, expected %0d", count_reg, e, e - 2);
            end
            checks++;
            if (cyc - rise_cyc != 6) begin
              failures++;
              $display("FAIL latency %0d", cyc - rise_cyc);
            end
          end
        end
      end
      if (reg_transfer && (cnt_reset || sel_ctrl)) begin
        failures++;
        $display("FAIL strobes overlap");
      end
      if (add) n_add++;
    end
    hist    = {clr_d1, xfer_d1};
    xfer_d1 = reg_transfer;
    clr_d1  = cnt_reset;
  end

  initial begin
    int hi, lo, e;
    xfer_d1 = 1'b0;
    clr_d1  = 1'b0;
    rst_n = 1'b0;
    mea   = 1'b0;
    repeat (3) @(posedge clk);
    #3 rst_n = 1'b1;
    repeat (5) @(posedge clk);
    // First rising edge: its saved count covers the time since reset.
    exp_q.push_back(-1);
    for (int n = 0; n < 200; n++) begin
      hi = $urandom_range(4, 40);
      lo = $urandom_range(4, 40);
      if (n % 50 == 0) begin hi = 4; lo = 4; end     // shortest legal period
      e = hi + lo;
      #3 mea = 1'b1;
      rise_cyc = cyc;
      repeat (hi) @(posedge clk);
      #3 mea = 1'b0;
      n_fall++;
      repeat (lo) @(posedge clk);
      exp_q.push_back(e);
    end
    #3 mea = 1'b1;
    rise_cyc = cyc;
    repeat (10) @(posedge clk);
    checks++;
    if (n_add != n_fall) begin
      failures++;
      $display("FAIL %0d add pulses for %0d falling edges", n_add, n_fall);
    end
    checks++;
    if (n_seq != 201) begin
      failures++;
      $display("FAIL %0d save/reset sequences, expected 201", n_seq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
