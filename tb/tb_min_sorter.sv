// Testbench of the minimum sorter.
// For random q and fraction r it builds the eight counter values a period of
// 8q + r phase steps produces (r counters at q + 1, the rest at q, at random
// positions) and checks that the integral part is q. It then flips one
// counter between q and q + 1, the error a metastable edge causes, and
// checks that the result is still q. Both branches (minimum and maximum
// minus one) must be exercised.
module tb_min_sorter;
  localparam int CNT_W = 32;

  logic [CNT_W-1:0] count_regs [8];
  logic [2:0]       fraction;
  logic [CNT_W-1:0] integral, min_val, max_m1;
  logic             use_max;
  int               checks = 0, failures = 0;
  int               n_min = 0, n_max = 0;

  min_sorter #(.CNT_W(CNT_W)) dut (
    .count_regs(count_regs), .fraction(fraction),
    .integral(integral), .min_val(min_val), .max_m1(max_m1), .use_max(use_max)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [CNT_W-1:0] q, input string what);
    #1;
    checks++;
    if (integral !== q) begin
      failures++;
      $display("FAIL %s: fraction %0d, integral %0h, expected %0h", what, fraction, integral, q);
    end
  endtask

  initial begin
    logic [CNT_W-1:0] q;
    int               r, start, victim;
    for (int n = 0; n < 2000; n++) begin
      q = CNT_W'($urandom_range(0, 32'h7fff_fffe)) + 1;
      r = n % 8;
      fraction = 3'(r);
      // The r phases that see one extra edge are consecutive (mod 8).
      start = $urandom_range(0, 7);
      for (int k = 0; k < 8; k++) count_regs[k] = q + (((k - start + 8) % 8) < r ? 1 : 0);
      check(q, "clean");
      checks++;
      if (min_val !== q || (r != 0 && max_m1 !== q)) begin
        failures++;
        $display("FAIL min %0h max-1 %0h for q %0h r %0d", min_val, max_m1, q, r);
      end
      if (use_max) n_max++; else n_min++;
      // One counter flips to the neighbouring value.
      victim = $urandom_range(0, 7);
      // With r = 7 the single counter at q is the one that must not matter.
      if (n % 16 == 7) victim = (start + 7) % 8;
      count_regs[victim] = (count_regs[victim] == q) ? q + 1 : q;
      check(q, "one miscount");
    end
    checks++;
    if (n_min == 0 || n_max == 0) begin
      failures++;
      $display("FAIL branches used: min %0d, max-1 %0d", n_min, n_max);
    end
    $display("min branch %0d times, max-1 branch %0d times", n_min, n_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
