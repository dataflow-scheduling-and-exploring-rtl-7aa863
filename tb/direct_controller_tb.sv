// direct_controller_tb: self-checking test of the direct-implementation controller.
//
// Checks, cycle by cycle, that a strobe in the idle state raises ena0 and is
// followed by the stage enables ena1..ena4, one per clock, an output step and
// the rise of done exactly 5 clock edges after the strobe edge. Also checks
// the handshake rules: done holds until reset or the next strobe, reset
// clears done only, strobe and reset are ignored while a sort runs, and
// back-to-back sorts work.
module direct_controller_tb;

  localparam int unsigned LATENCY = 5;  // strobe edge to done edge

  int checks   = 0;
  int failures = 0;

  logic      clk = 1'b0;
  logic      rst_n, strobe, reset;
  logic [4:0] ena;
  logic      done, busy;

  direct_controller dut (.*);

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

  // One sort. noise: raise strobe and reset in the middle of it.
  task automatic run_sort(input bit noise);
    int edges;
    strobe = 1'b1;
    #1;
    check(ena == 5'b00001 && !busy, "ld_in with strobe in S0");
    @(posedge clk); #1;
    strobe = 1'b0;
    edges = 0;
    check(!done, "done cleared by strobe");
    for (int s = 1; s <= 4; s++) begin
      if (noise && s == 2) begin strobe = 1'b1; reset = 1'b1; end
      #1;
      check(ena == 5'(1 << s) && busy && !done, $sformatf("step %0d ena %b", s, ena));
      @(posedge clk); #1;
      strobe = 1'b0; reset = 1'b0;
      edges++;
    end
    check(ena == '0 && busy && !done, "output step");
    @(posedge clk); #1;
    edges++;
    check(done && !busy && edges == LATENCY, $sformatf("done after %0d edges", edges));
  endtask

  initial begin
    rst_n = 1'b0; strobe = 1'b0; reset = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!done && !busy && ena == '0, "idle after power-on reset");
    repeat (3) @(posedge clk);
    #1 check(!done && !busy, "stays idle");

    run_sort(1'b0);
    repeat (4) @(posedge clk);
    #1 check(done && ena == '0, "done holds while idle");
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
