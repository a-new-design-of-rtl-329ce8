// Minimum sorter determination of the integral part.
//
// The eight counters count the same measurement period on eight clock
// phases. If the period is q full clock periods plus r eighths, exactly r of
// the counters see q+1 edges and the other 8-r see q, so the correct
// integral part is the minimum of the eight values, or equally the maximum
// minus one whenever r > 0. A single counter that miscounts by one (a
// metastable sample at the edge) can disturb only the minimum when it is
// alone at the low value, or only the maximum when it is alone at the high
// value. The fractional part r therefore picks the branch that rests on the
// larger group: the minimum for r < 4 (at least five counters at q), the
// maximum minus one for r >= 4 (at least four counters at q+1).
//
// Purely combinational; the caller samples the result when the counters are
// stable.
//
// From the document: taking minimum and maximum minus one and choosing
// between them with the fractional part. The threshold r >= 4 is this
// design's reading of that rule.
module min_sorter
  import hli_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic [CNT_W-1:0] count_regs [N_PHASES],
  input  logic [PH_W-1:0]  fraction,
  output logic [CNT_W-1:0] integral,
  output logic [CNT_W-1:0] min_val,
  output logic [CNT_W-1:0] max_m1,
  output logic             use_max
);

  logic [CNT_W-1:0] max_val;

  always_comb begin
    min_val = count_regs[0];
    max_val = count_regs[0];
    for (int k = 1; k < N_PHASES; k++) begin
      if (count_regs[k] < min_val) min_val = count_regs[k];
      if (count_regs[k] > max_val) max_val = count_regs[k];
    end
    max_m1   = max_val - 1'b1;
    use_max  = fraction[PH_W-1];           // r >= 4
    integral = use_max ? max_m1 : min_val;
  end

endmodule
