// Shared constants, types and the phase-location code converter of the
// heterodyne laser interferometer interface.
//
// The interface measures every period of the interferometer measurement
// signal with eight copies of one fast clock, 45 degrees apart. A period is
// expressed in units of 1/8 fast-clock period ("steps"):
//   period_steps = (integral + DEAD_COUNTS) * N_PHASES + fraction
// where integral comes from the counters, DEAD_COUNTS = 2 are the two clock
// cycles each counter spends saving and clearing, and fraction comes from the
// octonary phase interpolator. The constants follow the document; the
// encodings of the state machine are this design's own choice.
package hli_pkg;

  localparam int unsigned N_PHASES    = 8;  // eight phase clocks
  localparam int unsigned PH_W        = 3;  // width of a phase location
  localparam int unsigned DEAD_COUNTS = 2;  // cycles lost to save and reset

  // States of the save-and-reset control unit of one counter.
  typedef enum logic [1:0] {
    S_COUNT = 2'd0,  // S0: idle, counting fast-clock cycles
    S_XFER  = 2'd1,  // S1: reg_transfer, counter value is saved
    S_CLR   = 2'd2,  // S2: reset, counter is cleared
    S_SEL   = 2'd3   // S3: sel_ctrl, phase locations are shifted
  } ctl_state_e;

  // Code converter: the levels of the eight phase clocks sampled at the
  // measurement edge form a run of four ones, rotated by the position of the
  // edge. The phase location is the index k whose clock is high while clock
  // k+1 is still low: the edge fell in the k-th eighth after clk_ph[0] rose.
  // An invalid pattern (only possible under metastability) resolves to the
  // lowest such boundary, or to 0 when there is none.
  function automatic logic [PH_W-1:0] phase_code(input logic [N_PHASES-1:0] p);
    logic [PH_W-1:0] loc;
    logic            found;
    loc   = '0;
    found = 1'b0;
    for (int k = 0; k < N_PHASES; k++) begin
      if (!found && p[k] && !p[(k + 1) % N_PHASES]) begin
        loc   = PH_W'(k);
        found = 1'b1;
      end
    end
    return loc;
  endfunction

endpackage
