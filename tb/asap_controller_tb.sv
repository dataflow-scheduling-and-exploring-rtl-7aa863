// asap_controller_tb: self-checking test of the shared ASAP/ALAP controller.
//
// Checks, cycle by cycle, that a strobe in the idle state loads the operands
// and is followed by the four control words of the ASAP/ALAP schedule (expected
// words written out independently below), an output step and the rise of
// done exactly 5 clock edges after the strobe edge. Also checks the
// handshake rules: done holds until reset or the next strobe, reset clears
// done only, strobe and reset are ignored while a sort runs, and back-to-back
// sorts work.
module asap_controller_tb;
  import sort4_pkg::*;

  localparam int unsigned LATENCY = 5;  // strobe edge to done edge

  int checks   = 0;
  int failures = 0;

  logic      clk = 1'b0;
  logic      rst_n, strobe, reset;
  asap_ctrl_t ctrl;
  logic      done, busy;

  asap_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic asap_ctrl_t step_word(int s);
    asap_ctrl_t c = '0;
    case (s)
      1, 3: begin
        c.x_sel1 = (s == 1) ? X_IN1_A0 : X_IN1_A1;
        c.x_sel2 = (s == 1) ? X_IN2_B0 : X_IN2_B1;
        c.y_sel1 = (s == 3); c.y_sel2 = (s == 3);
        c.en_a1 = 1; c.en_b1 = 1; c.en_c1 = 1; c.en_d1 = 1;
        c.sel_b1 = B1_FROM_XO2; c.sel_c1 = C1_FROM_YO1;
      end
      2, 4: begin
        c.x_sel1 = X_IN1_B1; c.x_sel2 = X_IN2_C1;
        c.en_b1 = 1; c.en_c1 = 1;
        c.sel_b1 = B1_FROM_XO1; c.sel_c1 = C1_FROM_XO2;
      end
      default: ;
    endcase
    return c;
  endfunction

  // One sort. noise: raise strobe and reset in the middle of it.
  task automatic run_sort(input bit noise);
    int edges;
    strobe = 1'b1;
    #1;
    check(ctrl.ld_in && !busy, "ld_in with strobe in S0");
    @(posedge clk); #1;
    strobe = 1'b0;
    edges = 0;
    check(!done, "done cleared by strobe");
    for (int s = 1; s <= 4; s++) begin
      if (noise && s == 2) begin strobe = 1'b1; reset = 1'b1; end
      #1;
      check(ctrl == step_word(s) && busy && !done, $sformatf("step %0d word %h", s, ctrl));
      @(posedge clk); #1;
      strobe = 1'b0; reset = 1'b0;
      edges++;
    end
    check(ctrl == '0 && busy && !done, "output step");
    @(posedge clk); #1;
    edges++;
    check(done && !busy && edges == LATENCY, $sformatf("done after %0d edges", edges));
  endtask

  initial begin
    rst_n = 1'b0; strobe = 1'b0; reset = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!done && !busy && ctrl == '0, "idle after power-on reset");
    repeat (3) @(posedge clk);
    #1 check(!done && !busy, "stays idle");

    run_sort(1'b0);
    repeat (4) @(posedge clk);
    #1 check(done && ctrl == '0, "done holds while idle");
    reset = 1'b1;
    @(posedge clk); #1;
    reset = 1'b0;
    check(!done && !busy, "reset clears done");

    run_sort(1'b1);                    // strobe/reset mid-sort are ignored
    run_sort(1'b0);                    // strobe while done is high restarts
    run_sort(1'b0);

    // power-on reset in the middle of a sort
    strobe = 1'b1;
    @(posedge clk); #1;
    strobe = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b0;
    #1 check(!busy && !done, "rst_n aborts a sort");
    @(posedge clk); #1 rst_n = 1'b1;
    run_sort(1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
