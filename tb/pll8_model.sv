// Behavioural model of the eight-phase PLL (not synthesizable).
//
// Stands in for the analog PLL that multiplies the reference by M and
// delivers eight copies of the fast clock, 45 degrees apart. The model is
// ideal and already locked: simulated time is divided into ticks of TICK_PS,
// one fast-clock period is 16 ticks, and clk_ph[k] rises on ticks 16*m + 2*k.
// A phase step (1/8 clock period) is therefore 2 ticks. Testbenches drive
// the interferometer signals on odd ticks, half a phase step away from every
// clock edge, which is how the document's simulations avoid timing
// violations (periods that are whole multiples of 1/512 reference period).
// tick counts the ticks since time zero so that stimuli can be placed on the
// same grid.
module pll8_model #(
  parameter int TICK_PS = 244
) (
  output logic [7:0] clk_ph,
  output int         tick
);
  timeunit 1ps;
  timeprecision 1ps;

  function automatic logic [7:0] levels(input int t);
    logic [7:0] l;
    for (int k = 0; k < 8; k++) l[k] = ((t + 16 - 2 * k) % 16) < 8;
    return l;
  endfunction

  initial begin
    tick   = 0;
    clk_ph = levels(0);
    forever begin
      #(TICK_PS);
      tick   = tick + 1;
      clk_ph = levels(tick);
    end
  end
endmodule
