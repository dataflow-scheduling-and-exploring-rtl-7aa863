// balanced5_datapath_tb: self-checking test of the five-input balanced
// network datapath.
//
// The testbench plays the controller, raising ena0..ena5 on successive
// clocks. After every stage it compares the outputs with a reference model
// that evaluates the same sort statements on its own variables: OE must
// change only at stage 4 and OA..OD only at stage 5. After stage 5 the
// outputs must equal the operands sorted by the testbench. Covered: all 120
// orderings of five distinct values, all 32 zero-one patterns, random and
// heavily repeated operands.
module balanced5_datapath_tb;

  localparam int unsigned W = 16;

  int checks   = 0;
  int failures = 0;

  logic         clk = 1'b0;
  logic [5:0]   ena;
  logic [W-1:0] IA, IB, IC, ID, IE, OA, OB, OC, OD, OE;

  balanced5_datapath #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // (lo, hi) = sort(p, q)
  task automatic srt(input logic [W-1:0] p, q, output logic [W-1:0] lo, hi);
    lo = (q < p) ? q : p;
    hi = (q < p) ? p : q;
  endtask

  task automatic run_one(input logic [W-1:0] v[5]);
    logic [W-1:0] a1, b1, c1, d1, b2, c2, d2, e2, a3, b3, c3, d3, b4, c4, d4, e4, a5, b5, c5, d5;
    logic [W-1:0] s[5], prev[5], now[5];
    s = v;
    s.sort();
    prev = '{OA, OB, OC, OD, OE};
    {IA, IB, IC, ID, IE} = {v[0], v[1], v[2], v[3], v[4]};
    ena = 6'b000001;
    @(posedge clk); #1;
    srt(v[0], v[1], a1, b1); srt(v[2], v[3], c1, d1);
    srt(b1, c1, b2, c2);     srt(d1, v[4], d2, e2);
    srt(a1, b2, a3, b3);     srt(c2, d2, c3, d3);
    srt(b3, c3, b4, c4);     srt(d3, e2, d4, e4);
    srt(a3, b4, a5, b5);     srt(c4, d4, c5, d5);
    for (int k = 1; k <= 5; k++) begin
      ena = 6'(1 << k);
      @(posedge clk); #1;
      now = '{OA, OB, OC, OD, OE};
      if (k < 4)       check(now == prev, $sformatf("stage %0d: outputs changed early", k));
      else if (k == 4) check(OE == e4 && OA == prev[0] && OD == prev[3], "stage 4: OE = E4 only");
    end
    ena = '0;
    check(OA == a5 && OB == b5 && OC == c5 && OD == d5 && OE == e4, "model mismatch after stage 5");
    check(OA == s[0] && OB == s[1] && OC == s[2] && OD == s[3] && OE == s[4],
          $sformatf("in %h %h %h %h %h out %h %h %h %h %h", v[0], v[1], v[2], v[3], v[4], OA, OB, OC, OD, OE));
  endtask

  initial begin
    logic [W-1:0] v[5];
    ena = '0;
    {IA, IB, IC, ID, IE} = '0;
    @(posedge clk); #1;
    // all orderings of 1..5
    for (int p = 0; p < 3125; p++) begin
      automatic int x = p;
      automatic bit ok = 1'b1;
      for (int i = 0; i < 5; i++) begin
        v[i] = W'(x % 5 + 1);
        x /= 5;
      end
      for (int i = 0; i < 5; i++)
        for (int j = i + 1; j < 5; j++) if (v[i] == v[j]) ok = 1'b0;
      if (ok) run_one(v);
    end
    for (int p = 0; p < 32; p++) begin
      for (int i = 0; i < 5; i++) v[i] = p[i] ? 16'hFFFF : 16'h0000;
      run_one(v);
    end
    for (int k = 0; k < 300; k++) begin
      for (int i = 0; i < 5; i++) v[i] = (k % 2 == 0) ? W'($urandom) : W'($urandom_range(0, 2));
      run_one(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
