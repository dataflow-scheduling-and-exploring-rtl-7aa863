// direct_datapath_tb: self-checking test of the direct-implementation datapath.
//
// The testbench plays the controller: it loads four operands with ena0 and
// then raises ena1..ena4 on successive clocks. Before ena3 and ena4 the
// outputs (A3, B4, C4, D3) must still hold the previous result; after ena3
// OA and OD must carry the minimum and maximum, and after ena4 all four must
// be the ascending order of the operands, computed independently by sorting
// an array. A second pass skips one enable to check that a stage without
// its enable does not load.
module direct_datapath_tb;

  localparam int unsigned W = 16;

  int checks   = 0;
  int failures = 0;

  logic         clk = 1'b0;
  logic [4:0]   ena;
  logic [W-1:0] IA, IB, IC, ID, OA, OB, OC, OD;

  direct_datapath #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  function automatic logic [W-1:0] mn(logic [W-1:0] p, logic [W-1:0] q);
    return (p < q) ? p : q;
  endfunction
  function automatic logic [W-1:0] mx(logic [W-1:0] p, logic [W-1:0] q);
    return (p < q) ? q : p;
  endfunction

  logic [W-1:0] prev[4];

  // skip: stage whose enable is withheld (0 = none)
  task automatic run_one(input logic [W-1:0] ia, ib, ic, id, input int skip = 0);
    logic [W-1:0] v[4];
    v = '{ia, ib, ic, id};
    v.sort();
    IA = ia; IB = ib; IC = ic; ID = id;
    ena = 5'b00001;
    @(posedge clk); #1;
    for (int s = 1; s <= 4; s++) begin
      ena = (s == skip) ? 5'b0 : 5'(1 << s);
      @(posedge clk); #1;
      if (skip == 0) begin
        if (s < 3)
          check(OA == prev[0] && OB == prev[1] && OC == prev[2] && OD == prev[3],
                $sformatf("stage %0d: outputs changed early", s));
        else if (s == 3)
          check(OA == v[0] && OD == v[3] && OB == prev[1] && OC == prev[2],
                $sformatf("stage 3: got %h %h %h %h", OA, OB, OC, OD));
      end
    end
    ena = '0;
    if (skip == 0) begin
      check(OA == v[0] && OB == v[1] && OC == v[2] && OD == v[3],
            $sformatf("final %h %h %h %h exp %h %h %h %h", OA, OB, OC, OD, v[0], v[1], v[2], v[3]));
      prev = v;
    end else if (skip == 4) begin
      check(OB == prev[1] && OC == prev[2], "stage 4 loaded without ena4");
      prev = '{OA, OB, OC, OD};
    end else begin
      prev = '{OA, OB, OC, OD};
    end
    @(posedge clk); #1;
    check(OA == prev[0] && OB == prev[1] && OC == prev[2] && OD == prev[3], "result held with enables low");
  endtask

  initial begin
    ena = '0;
    IA = '0; IB = '0; IC = '0; ID = '0;
    @(posedge clk); #1;
    prev = '{OA, OB, OC, OD};
    run_one(16'd4, 16'd3, 16'd2, 16'd1);
    run_one(16'd1, 16'd2, 16'd3, 16'd4);
    run_one(16'hFFFF, 16'h0000, 16'hFFFF, 16'h0000);
    run_one(16'd7, 16'd7, 16'd7, 16'd7);
    run_one(16'd9, 16'd8, 16'd6, 16'd5, 4);
    run_one(16'd2, 16'd1, 16'd4, 16'd3);
    for (int k = 0; k < 300; k++)
      run_one(W'($urandom), W'($urandom), W'($urandom), W'($urandom));
    for (int k = 0; k < 300; k++)
      run_one(W'($urandom_range(0, 3)), W'($urandom_range(0, 3)), W'($urandom_range(0, 3)),
              W'($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
