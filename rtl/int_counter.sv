// Integral-part counter with its save-and-reset control unit (int_counter).
//
// One copy runs on each of the eight phase clocks. The measurement signal is
// brought into the clock domain by a two-flop synchroniser. The counter
// counts clock cycles; when a rising edge of the measurement signal is seen,
// the control unit steps through three states, one clock each:
//   S1 reg_transfer  the counter value is saved in count_reg,
//   S2 reset         the counter is cleared,
//   S3 sel_ctrl      the phasemeter shifts present and previous phase location,
// and returns to S0 where it counts. The counter does not count in S1 and S2,
// so count_reg holds the number of clock cycles of the last measurement
// period minus 2. When the synchronised measurement signal falls, add pulses
// for one cycle: by then all eight counters hold stable values, so the
// phasemeter can combine them.
//
// Timing: count_reg updates 4 clock edges after the measurement rising edge
// (2 synchroniser, 1 edge detect, 1 transfer). The measurement signal must
// stay high and low for at least 4 clock cycles each.
//
// From the document: the three pulses, their order, the add on the falling
// edge and the two uncounted cycles. The synchroniser depth, reset values and
// state encoding are this design's choices.
module int_counter
  import hli_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mea,
  output logic [CNT_W-1:0] count_reg,
  output logic             reg_transfer,
  output logic             cnt_reset,
  output logic             sel_ctrl,
  output logic             add
);

  logic [2:0]       msync;     // [0],[1] synchroniser, [2] previous level
  logic             rise, fall;
  logic [CNT_W-1:0] counter;
  ctl_state_e       state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) msync <= '0;
    else        msync <= {msync[1:0], mea};
  end

  assign rise = msync[1] & ~msync[2];
  assign fall = ~msync[1] & msync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_COUNT;
      counter   <= '0;
      count_reg <= '0;
      add       <= 1'b0;
    end else begin
      add <= fall;
      unique case (state)
        S_COUNT: begin
          counter <= counter + 1'b1;
          if (rise) state <= S_XFER;
        end
        S_XFER: begin
          count_reg <= counter;
          state     <= S_CLR;
        end
        S_CLR: begin
          counter <= '0;
          state   <= S_SEL;
        end
        S_SEL: begin
          counter <= counter + 1'b1;
          state   <= S_COUNT;
        end
        default: state <= S_COUNT;
      endcase
    end
  end

  assign reg_transfer = (state == S_XFER);
  assign cnt_reset    = (state == S_CLR);
  assign sel_ctrl     = (state == S_SEL);

  // A new edge while the control unit is still busy means the measurement
  // signal was low for less than the minimum.
  always_ff @(posedge clk) begin
    if (rst_n && rise) begin
      assert (state == S_COUNT)
        else $error("int_counter: measurement edge during save/reset sequence");
    end
  end

endmodule
