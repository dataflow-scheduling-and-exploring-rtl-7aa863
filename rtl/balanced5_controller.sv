// balanced5_controller: finite-state controller of the five-input balanced
// sorting network.
//
// Seven states: S0 waits for strobe; S1..S5 enable one register stage of
// balanced5_datapath each (ena1..ena5); S6 is the output step, whose action
// "done = 1" takes effect at the edge that returns to S0. ena0, the input
// latch enable, is strobe while in S0.
//
//   S0 : strobe=1           -> ena0, done<=0, go to S1
//        strobe=0, reset=1  -> done<=0, stay
//        strobe=0, reset=0  -> stay
//   S1 (ena1) -> ... -> S5 (ena5) -> S6 -> S0
//
// Timing: strobe sampled at edge 0, result on OA..OE after edge 5, done high
// after edge 6 until the next strobe or a reset while idle. strobe and reset
// are ignored outside S0. busy is high outside S0.
//
// The five steps come from the design's balanced schedule. The handshake is
// the one the design uses for its four-input sorters, carried over to this
// network by this implementation, as is the power-on reset rst_n.
//
// The SYNCASYNCNET lint warning on rst_n stands: it comes from the
// assertions below, which sample rst_n on the clock to disable themselves;
// the logic itself uses rst_n only as an asynchronous reset.
module balanced5_controller
  import sort4_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       strobe,
  input  logic       reset,
  output logic [5:0] ena,
  output logic       done,
  output logic       busy
);

  b5_state_e state, state_next;

  always_comb begin
    unique case (state)
      B5_S0:   state_next = strobe ? B5_S1 : B5_S0;
      B5_S1:   state_next = B5_S2;
      B5_S2:   state_next = B5_S3;
      B5_S3:   state_next = B5_S4;
      B5_S4:   state_next = B5_S5;
      B5_S5:   state_next = B5_S6;
      B5_S6:   state_next = B5_S0;
      default: state_next = B5_S0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= B5_S0;
      done  <= 1'b0;
    end else begin
      state <= state_next;
      if (state == B5_S0 && (strobe || reset)) done <= 1'b0;
      else if (state == B5_S6)                 done <= 1'b1;
    end
  end

  always_comb begin
    ena = '0;
    unique case (state)
      B5_S0:   ena[0] = strobe;
      B5_S1:   ena[1] = 1'b1;
      B5_S2:   ena[2] = 1'b1;
      B5_S3:   ena[3] = 1'b1;
      B5_S4:   ena[4] = 1'b1;
      B5_S5:   ena[5] = 1'b1;
      default: ;  // S6: output step
    endcase
  end

  assign busy = (state != B5_S0);

  a_one_enable: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ena));
  a_runs_to_end: assert property (@(posedge clk) disable iff (!rst_n)
    (state == B5_S0 && strobe) |=> (state == B5_S1) ##6 (state == B5_S0));

endmodule
