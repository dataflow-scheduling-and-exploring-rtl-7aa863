// serial_controller: finite-state controller of the serial-schedule sorter.
//
// Eight states: S0 waits for strobe; S1..S6 each issue one sort statement to
// serial_datapath (see the step table there); S7 is the output step, whose
// action "done = 1" takes effect at the edge that returns to S0.
//
//   S0 : strobe=1           -> latch IA..ID, done<=0, go to S1
//        strobe=0, reset=1  -> done<=0, stay
//        strobe=0, reset=0  -> stay
//   S1 -> S2 -> ... -> S6 -> S7 -> S0 (unconditional; done<=1 leaving S7)
//
// Timing: if strobe is sampled at edge 0, the sort results are in A1..D1
// after edge 6 and done is high after edge 7; done then stays high until the
// next strobe or a reset while idle. strobe and reset are ignored outside S0.
// The ctrl output is a Moore function of the state, except ld_in, which is
// strobe in S0. busy is high outside S0.
//
// The state sequence, the strobe/reset/done handshake and the statement per
// state follow the design. rst_n, an asynchronous power-on reset to S0 with
// done low, is an addition of this implementation; the design's own reset
// input only clears done.
//
// The SYNCASYNCNET lint warning on rst_n stands: it comes from the
// assertions below, which sample rst_n on the clock to disable themselves;
// the logic itself uses rst_n only as an asynchronous reset.
module serial_controller
  import sort4_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      strobe,
  input  logic      reset,
  output ser_ctrl_t ctrl,
  output logic      done,
  output logic      busy
);

  ser_state_e state, state_next;

  always_comb begin
    unique case (state)
      SER_S0:  state_next = strobe ? SER_S1 : SER_S0;
      SER_S1:  state_next = SER_S2;
      SER_S2:  state_next = SER_S3;
      SER_S3:  state_next = SER_S4;
      SER_S4:  state_next = SER_S5;
      SER_S5:  state_next = SER_S6;
      SER_S6:  state_next = SER_S7;
      SER_S7:  state_next = SER_S0;
      default: state_next = SER_S0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SER_S0;
      done  <= 1'b0;
    end else begin
      state <= state_next;
      if (state == SER_S0 && (strobe || reset)) done <= 1'b0;
      else if (state == SER_S7)                 done <= 1'b1;
    end
  end

  // Control word per state
  always_comb begin
    ctrl        = '0;
    ctrl.sel1   = SER_IN1_A0;
    ctrl.sel2   = SER_IN2_B0;
    ctrl.sel_b1 = WB_O1;
    ctrl.sel_c1 = WB_O1;
    unique case (state)
      SER_S0: ctrl.ld_in = strobe;
      SER_S1: begin  // (A1,B1) = sort(A0,B0)
        ctrl.sel1 = SER_IN1_A0; ctrl.sel2 = SER_IN2_B0;
        ctrl.en_a1 = 1'b1; ctrl.en_b1 = 1'b1; ctrl.sel_b1 = WB_O2;
      end
      SER_S2: begin  // (C1,D1) = sort(C0,D0)
        ctrl.sel1 = SER_IN1_C0; ctrl.sel2 = SER_IN2_D0;
        ctrl.en_c1 = 1'b1; ctrl.sel_c1 = WB_O1; ctrl.en_d1 = 1'b1;
      end
      SER_S3, SER_S6: begin  // (B1,C1) = sort(B1,C1)
        ctrl.sel1 = SER_IN1_B1; ctrl.sel2 = SER_IN2_C1;
        ctrl.en_b1 = 1'b1; ctrl.sel_b1 = WB_O1;
        ctrl.en_c1 = 1'b1; ctrl.sel_c1 = WB_O2;
      end
      SER_S4: begin  // (A1,B1) = sort(A1,B1)
        ctrl.sel1 = SER_IN1_A1; ctrl.sel2 = SER_IN2_B1;
        ctrl.en_a1 = 1'b1; ctrl.en_b1 = 1'b1; ctrl.sel_b1 = WB_O2;
      end
      SER_S5: begin  // (C1,D1) = sort(C1,D1)
        ctrl.sel1 = SER_IN1_C1; ctrl.sel2 = SER_IN2_D1;
        ctrl.en_c1 = 1'b1; ctrl.sel_c1 = WB_O1; ctrl.en_d1 = 1'b1;
      end
      default: ;  // S7: output step, nothing written
    endcase
  end

  assign busy = (state != SER_S0);

  // A sort, once started, runs through all six steps and the output step.
  a_runs_to_end: assert property (@(posedge clk) disable iff (!rst_n)
    (state == SER_S0 && strobe) |=> (state == SER_S1) ##7 (state == SER_S0));
  // done rises only when leaving the output step.
  a_done_rise: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(done) |-> $past(state) == SER_S7);

endmodule
