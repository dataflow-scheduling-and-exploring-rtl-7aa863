// sort_element_tb: self-checking test of the two-input sorting element.
//
// Checks a 4-bit unsigned instance exhaustively, a 4-bit signed instance
// exhaustively and a 16-bit unsigned instance on random and corner operands.
// Expected values are min/max and a > b computed in the testbench.
module sort_element_tb;

  int checks   = 0;
  int failures = 0;

  logic [3:0]  a4, b4, x4u, y4u, x4s, y4s;
  logic        gt4u, gt4s;
  logic [15:0] a16, b16, x16, y16;
  logic        gt16;

  sort_element #(.WIDTH(4),  .SIGNED(1'b0)) u_u4  (.a(a4),  .b(b4),  .x(x4u), .y(y4u), .gt(gt4u));
  sort_element #(.WIDTH(4),  .SIGNED(1'b1)) u_s4  (.a(a4),  .b(b4),  .x(x4s), .y(y4s), .gt(gt4s));
  sort_element                              u_u16 (.a(a16), .b(b16), .x(x16), .y(y16), .gt(gt16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic check16(input logic [15:0] a, input logic [15:0] b);
    logic [15:0] lo, hi;
    a16 = a;
    b16 = b;
    #1;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    check(x16 == lo && y16 == hi && gt16 == (a > b),
          $sformatf("w16 a=%h b=%h x=%h y=%h gt=%b", a, b, x16, y16, gt16));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        int si, sj;
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        check(x4u == 4'(i < j ? i : j) && y4u == 4'(i < j ? j : i) && gt4u == (i > j),
              $sformatf("u4 a=%0d b=%0d x=%0d y=%0d", i, j, x4u, y4u));
        si = (i >= 8) ? i - 16 : i;
        sj = (j >= 8) ? j - 16 : j;
        check(x4s == 4'(si < sj ? si : sj) && y4s == 4'(si < sj ? sj : si) && gt4s == (si > sj),
              $sformatf("s4 a=%0d b=%0d x=%h y=%h", si, sj, x4s, y4s));
      end
    end
    check16(16'h0000, 16'hFFFF);
    check16(16'hFFFF, 16'h0000);
    check16(16'h8000, 16'h7FFF);
    check16(16'h1234, 16'h1234);
    for (int k = 0; k < 2000; k++) check16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
