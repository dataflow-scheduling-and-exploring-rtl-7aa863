// asap_controller: finite-state controller of the ASAP/ALAP sorter with two
// shared sorting elements.
//
// Six states: S0 waits for strobe; S1..S4 issue the four schedule steps to
// asap_datapath (see the step table there); S5 is the output step, whose
// action "done = 1" takes effect at the edge that returns to S0.
//
//   S0 : strobe=1           -> latch IA..ID, done<=0, go to S1
//        strobe=0, reset=1  -> done<=0, stay
//        strobe=0, reset=0  -> stay
//   S1 -> S2 -> S3 -> S4 -> S5 -> S0 (done<=1 leaving S5)
//
// Timing: strobe sampled at edge 0, results in A1..D1 after edge 4, done high
// after edge 5 until the next strobe or a reset while idle. strobe and reset
// are ignored outside S0. ctrl is a Moore function of the state except ld_in
// (strobe in S0). busy is high outside S0.
//
// State sequence, handshake and statements per state follow the design; the
// power-on reset rst_n is an addition of this implementation.
//
// The SYNCASYNCNET lint warning on rst_n stands: it comes from the
// assertions below, which sample rst_n on the clock to disable themselves;
// the logic itself uses rst_n only as an asynchronous reset.
module asap_controller
  import sort4_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       strobe,
  input  logic       reset,
  output asap_ctrl_t ctrl,
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
    ctrl        = '0;
    ctrl.x_sel1 = X_IN1_A0;
    ctrl.x_sel2 = X_IN2_B0;
    ctrl.sel_b1 = B1_FROM_XO1;
    ctrl.sel_c1 = C1_FROM_XO2;
    unique case (state)
      ST_S0: ctrl.ld_in = strobe;
      ST_S1, ST_S3: begin
        // S1: (A1,B1) = sortX(A0,B0); (C1,D1) = sortY(C0,D0)
        // S3: (A1,B1) = sortX(A1,B1); (C1,D1) = sortY(C1,D1)
        ctrl.x_sel1 = (state == ST_S1) ? X_IN1_A0 : X_IN1_A1;
        ctrl.x_sel2 = (state == ST_S1) ? X_IN2_B0 : X_IN2_B1;
        ctrl.y_sel1 = (state == ST_S3);
        ctrl.y_sel2 = (state == ST_S3);
        ctrl.en_a1  = 1'b1;
        ctrl.en_b1  = 1'b1; ctrl.sel_b1 = B1_FROM_XO2;
        ctrl.en_c1  = 1'b1; ctrl.sel_c1 = C1_FROM_YO1;
        ctrl.en_d1  = 1'b1;
      end
      ST_S2, ST_S4: begin  // (B1,C1) = sortX(B1,C1)
        ctrl.x_sel1 = X_IN1_B1;
        ctrl.x_sel2 = X_IN2_C1;
        ctrl.en_b1  = 1'b1; ctrl.sel_b1 = B1_FROM_XO1;
        ctrl.en_c1  = 1'b1; ctrl.sel_c1 = C1_FROM_XO2;
      end
      default: ;  // S5: output step
    endcase
  end

  assign busy = (state != ST_S0);

  a_runs_to_end: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_S0 && strobe) |=> (state == ST_S1) ##5 (state == ST_S0));
  a_done_rise: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(done) |-> $past(state) == ST_S5);

endmodule
