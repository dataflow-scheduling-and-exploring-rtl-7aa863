// direct_controller: finite-state controller of the direct implementation.
//
// Six states: S0 waits for strobe; S1..S4 enable one register stage of
// direct_datapath each (ena1..ena4); S5 is the output step, whose action
// "done = 1" takes effect at the edge that returns to S0. ena0, the input
// latch enable, is strobe while in S0.
//
//   S0 : strobe=1           -> ena0, done<=0, go to S1
//        strobe=0, reset=1  -> done<=0, stay
//        strobe=0, reset=0  -> stay
//   S1 (ena1) -> S2 (ena2) -> S3 (ena3) -> S4 (ena4) -> S5 -> S0
//
// Timing: strobe sampled at edge 0, result on OA..OD after edge 4, done high
// after edge 5 until the next strobe or a reset while idle. strobe and reset
// are ignored outside S0. busy is high outside S0.
//
// The state sequence and handshake follow the design; which state drives
// which enable follows the statements it lists per state. rst_n, a power-on
// reset, is an addition of this implementation.
//
// The SYNCASYNCNET lint warning on rst_n stands: it comes from the
// assertions below, which sample rst_n on the clock to disable themselves;
// the logic itself uses rst_n only as an asynchronous reset.
module direct_controller
  import sort4_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       strobe,
  input  logic       reset,
  output logic [4:0] ena,
  output logic       done,
  output logic       busy
);

  step_state_e state, state_next;

  always_comb begin
    unique case (state)
      ST_S0:   state_next = strobe ? ST_S1 : ST_S0;
      ST_S1:   state_next = ST_S2;
      ST_S2:   state_next = ST_S3;
      ST_S3:   state_next = ST_S4;
      ST_S4:   state_next = ST_S5;
      ST_S5:   state_next = ST_S0;
      default: state_next = ST_S0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_S0;
      done  <= 1'b0;
    end else begin
      state <= state_next;
      if (state == ST_S0 && (strobe || reset)) done <= 1'b0;
      else if (state == ST_S5)                 done <= 1'b1;
    end
  end

  always_comb begin
    ena = '0;
    unique case (state)
      ST_S0:   ena[0] = strobe;
      ST_S1:   ena[1] = 1'b1;
      ST_S2:   ena[2] = 1'b1;
      ST_S3:   ena[3] = 1'b1;
      ST_S4:   ena[4] = 1'b1;
      default: ;  // S5: output step
    endcase
  end

  assign busy = (state != ST_S0);

  a_one_enable: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ena));
  a_runs_to_end: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_S0 && strobe) |=> (state == ST_S1) ##5 (state == ST_S0));

endmodule
