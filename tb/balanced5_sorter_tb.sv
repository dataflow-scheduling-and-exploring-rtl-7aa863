// balanced5_sorter_tb: end-to-end test of the five-input balanced sorter.
//
// Two instances share the handshake: the default one (16-bit, unsigned) and
// an 8-bit signed one fed the low bytes of the same operands. For each sort
// the testbench pulses strobe, counts clock edges to done (must be 6) and
// compares OA..OE with the operands sorted by the testbench. It also changes
// the inputs and pulses strobe and reset while a sort runs (both must be
// ignored), checks that done holds until reset, and covers all 120 orderings
// of five distinct values, equal and extreme operands.
module balanced5_sorter_tb;

  localparam int unsigned LATENCY = 6;  // strobe edge to done edge

  int checks   = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        rst_n, strobe, reset;
  logic [15:0] IA, IB, IC, ID, IE, OA, OB, OC, OD, OE;
  logic        done, busy;
  logic [7:0]  sOA, sOB, sOC, sOD, sOE;
  logic        s_done, s_busy;

  balanced5_sorter dut (.*);

  balanced5_sorter #(.WIDTH(8), .SIGNED(1'b1)) dut_s (
    .clk, .rst_n, .strobe, .reset,
    .IA(IA[7:0]), .IB(IB[7:0]), .IC(IC[7:0]), .ID(ID[7:0]), .IE(IE[7:0]),
    .OA(sOA), .OB(sOB), .OC(sOC), .OD(sOD), .OE(sOE), .done(s_done), .busy(s_busy)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic run_sort(input logic [15:0] v[5], input bit noise = 1'b0);
    logic [15:0] u[5];
    int          sv[5];
    int          edges;
    u = v;
    u.sort();
    for (int i = 0; i < 5; i++) sv[i] = int'($signed(v[i][7:0]));
    for (int i = 1; i < 5; i++)  // insertion sort, signed
      for (int j = i; j > 0 && sv[j-1] > sv[j]; j--) begin
        int t = sv[j];
        sv[j] = sv[j-1];
        sv[j-1] = t;
      end
    {IA, IB, IC, ID, IE} = {v[0], v[1], v[2], v[3], v[4]};
    strobe = 1'b1;
    @(posedge clk); #1;
    strobe = 1'b0;
    edges = 0;
    check(busy && !done && s_busy && !s_done, "busy after strobe");
    while (!done && edges < 50) begin
      if (noise && edges == 2) begin
        {IA, IB, IC, ID, IE} = ~{IA, IB, IC, ID, IE};
        strobe = 1'b1; reset = 1'b1;
      end
      @(posedge clk); #1;
      strobe = 1'b0; reset = 1'b0;
      edges++;
    end
    check(edges == LATENCY, $sformatf("done after %0d edges, expected %0d", edges, LATENCY));
    check(s_done && !busy, "signed instance done together");
    check(OA == u[0] && OB == u[1] && OC == u[2] && OD == u[3] && OE == u[4],
          $sformatf("out %h %h %h %h %h", OA, OB, OC, OD, OE));
    check(int'($signed(sOA)) == sv[0] && int'($signed(sOB)) == sv[1] && int'($signed(sOC)) == sv[2] &&
          int'($signed(sOD)) == sv[3] && int'($signed(sOE)) == sv[4],
          $sformatf("signed out %h %h %h %h %h", sOA, sOB, sOC, sOD, sOE));
  endtask

  initial begin
    logic [15:0] v[5];
    rst_n = 1'b0; strobe = 1'b0; reset = 1'b0;
    {IA, IB, IC, ID, IE} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!done && !busy, "idle after power-on reset");

    v = '{16'd50, 16'd40, 16'd30, 16'd20, 16'd10};
    run_sort(v);
    repeat (5) @(posedge clk);
    #1 check(done && OA == 16'd10 && OE == 16'd50, "done and result hold while idle");
    reset = 1'b1;
    @(posedge clk); #1 reset = 1'b0;
    check(!done && OA == 16'd10, "reset clears done, result kept");

    v = '{16'h1234, 16'h0FFF, 16'h8001, 16'h7FFF, 16'h0080};
    run_sort(v, 1'b1);
    v = '{16'd5, 16'd5, 16'd5, 16'd5, 16'd5};
    run_sort(v);

    for (int p = 0; p < 3125; p++) begin
      automatic int x = p;
      automatic bit ok = 1'b1;
      for (int i = 0; i < 5; i++) begin
        v[i] = 16'((x % 5) * 60 + 7);   // low bytes 07, 43, 7f, bb, f7
        x /= 5;
      end
      for (int i = 0; i < 5; i++)
        for (int j = i + 1; j < 5; j++) if (v[i] == v[j]) ok = 1'b0;
      if (ok) run_sort(v, p % 11 == 0);
    end
    for (int k = 0; k < 300; k++) begin
      for (int i = 0; i < 5; i++) v[i] = (k % 3 == 0) ? 16'($urandom_range(0, 2)) : 16'($urandom);
      run_sort(v, k % 7 == 0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
