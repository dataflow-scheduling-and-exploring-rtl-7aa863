// direct_sorter_tb: end-to-end test of the direct implementation of the ASAP/ALAP schedule.
//
// Two instances are driven with the same handshake: the default one (16-bit,
// unsigned) and an 8-bit signed one fed the low bytes of the same operands.
// For each sort the testbench raises strobe for one cycle, counts clock
// edges until done rises (must be 5 edges) and compares OA..OD with the
// operands sorted by the testbench. It also changes the inputs and pulses
// strobe and reset while a sort runs (both must be ignored), checks that
// done holds until reset, and covers all 24 orderings of four distinct
// values as well as equal and extreme operands.
module direct_sorter_tb;

  localparam int unsigned LATENCY = 5;  // strobe edge to done edge

  int checks   = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        rst_n, strobe, reset;
  logic [15:0] IA, IB, IC, ID, OA, OB, OC, OD;
  logic        done, busy;
  logic [7:0]  sOA, sOB, sOC, sOD;
  logic        s_done, s_busy;

  direct_sorter dut (.*);

  direct_sorter #(.WIDTH(8), .SIGNED(1'b1)) dut_s (
    .clk, .rst_n, .strobe, .reset,
    .IA(IA[7:0]), .IB(IB[7:0]), .IC(IC[7:0]), .ID(ID[7:0]),
    .OA(sOA), .OB(sOB), .OC(sOC), .OD(sOD), .done(s_done), .busy(s_busy)
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

  // noise: disturb inputs, strobe and reset while the sort runs
  task automatic run_sort(input logic [15:0] ia, ib, ic, id, input bit noise = 1'b0);
    logic [15:0] v[4];
    int          sv[4];
    int          edges;
    v  = '{ia, ib, ic, id};
    sv = '{int'($signed(ia[7:0])), int'($signed(ib[7:0])), int'($signed(ic[7:0])), int'($signed(id[7:0]))};
    v.sort();
    for (int i = 1; i < 4; i++)  // insertion sort, signed
      for (int j = i; j > 0 && sv[j-1] > sv[j]; j--) begin
        int t = sv[j];
        sv[j] = sv[j-1];
        sv[j-1] = t;
      end
    IA = ia; IB = ib; IC = ic; ID = id;
    strobe = 1'b1;
    @(posedge clk); #1;
    strobe = 1'b0;
    edges = 0;
    check(busy && !done && s_busy && !s_done, "busy after strobe");
    while (!done && edges < 50) begin
      if (noise && edges == 2) begin
        IA = ~ia; IB = ~ib; IC = 16'h5A5A; ID = 16'h0000;
        strobe = 1'b1; reset = 1'b1;
      end
      @(posedge clk); #1;
      strobe = 1'b0; reset = 1'b0;
      edges++;
    end
    check(edges == LATENCY, $sformatf("done after %0d edges, expected %0d", edges, LATENCY));
    check(s_done && !busy, "signed instance done together");
    check(OA == v[0] && OB == v[1] && OC == v[2] && OD == v[3],
          $sformatf("in %h %h %h %h out %h %h %h %h", ia, ib, ic, id, OA, OB, OC, OD));
    check(int'($signed(sOA)) == sv[0] && int'($signed(sOB)) == sv[1] &&
          int'($signed(sOC)) == sv[2] && int'($signed(sOD)) == sv[3],
          $sformatf("signed out %h %h %h %h", sOA, sOB, sOC, sOD));
  endtask

  initial begin
    logic [15:0] p[4];
    rst_n = 1'b0; strobe = 1'b0; reset = 1'b0;
    IA = '0; IB = '0; IC = '0; ID = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!done && !busy, "idle after power-on reset");

    run_sort(16'd40, 16'd30, 16'd20, 16'd10);
    repeat (5) @(posedge clk);
    #1 check(done && OA == 16'd10 && OD == 16'd40, "done and result hold while idle");
    reset = 1'b1;
    @(posedge clk); #1 reset = 1'b0;
    check(!done && OA == 16'd10, "reset clears done, result kept");

    run_sort(16'h1234, 16'h0FFF, 16'h8001, 16'h7FFF, 1'b1);
    run_sort(16'd5, 16'd5, 16'd5, 16'd5);
    run_sort(16'hFFFF, 16'h0000, 16'h0000, 16'hFFFF);
    run_sort(16'h0080, 16'h007F, 16'h00FF, 16'h0001);  // signed 8-bit order differs

    // every ordering of four distinct values
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 4; c++)
          for (int d = 0; d < 4; d++)
            if (a != b && a != c && a != d && b != c && b != d && c != d)
              run_sort(16'(a * 1000 + 3), 16'(b * 1000 + 3), 16'(c * 1000 + 3), 16'(d * 1000 + 3));

    for (int k = 0; k < 400; k++)
      run_sort(16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom), k % 7 == 0);
    for (int k = 0; k < 200; k++)
      run_sort(16'($urandom_range(0, 2)), 16'($urandom_range(0, 2)), 16'($urandom_range(0, 2)),
               16'($urandom_range(0, 2)));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
