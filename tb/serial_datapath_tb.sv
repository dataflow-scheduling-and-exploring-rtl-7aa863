// serial_datapath_tb: self-checking test of the serial-schedule datapath.
//
// The testbench plays the controller: it latches four random operands, then
// applies the six control words of the serial schedule one per clock, and
// after every step compares A1..D1 (seen on OA..OD) with a reference that
// evaluates the same sort statements on its own variables. It also checks
// that unselected registers hold their value and that the final result is
// the ascending order of the operands.
module serial_datapath_tb;
  import sort4_pkg::*;

  localparam int unsigned W = 16;

  int checks   = 0;
  int failures = 0;

  logic         clk = 1'b0;
  ser_ctrl_t    ctrl;
  logic [W-1:0] IA, IB, IC, ID, OA, OB, OC, OD;

  serial_datapath #(.WIDTH(W)) dut (.*);

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

  // Control word of one sort step: operand sources, registers written and
  // whether B1/C1 take the first or second result.
  function automatic ser_ctrl_t step_word(int s);
    ser_ctrl_t c = '0;
    case (s)
      1: begin c.sel1 = SER_IN1_A0; c.sel2 = SER_IN2_B0; c.en_a1 = 1; c.en_b1 = 1; c.sel_b1 = WB_O2; end
      2: begin c.sel1 = SER_IN1_C0; c.sel2 = SER_IN2_D0; c.en_c1 = 1; c.en_d1 = 1; c.sel_c1 = WB_O1; end
      3, 6: begin c.sel1 = SER_IN1_B1; c.sel2 = SER_IN2_C1; c.en_b1 = 1; c.en_c1 = 1;
                  c.sel_b1 = WB_O1; c.sel_c1 = WB_O2; end
      4: begin c.sel1 = SER_IN1_A1; c.sel2 = SER_IN2_B1; c.en_a1 = 1; c.en_b1 = 1; c.sel_b1 = WB_O2; end
      5: begin c.sel1 = SER_IN1_C1; c.sel2 = SER_IN2_D1; c.en_c1 = 1; c.en_d1 = 1; c.sel_c1 = WB_O1; end
      default: ;
    endcase
    return c;
  endfunction

  task automatic run_one(input logic [W-1:0] ia, ib, ic, id);
    logic [W-1:0] ra, rb, rc, rd, t0, t1;
    logic [W-1:0] v[4];
    IA = ia; IB = ib; IC = ic; ID = id;
    ctrl = '0;
    ctrl.ld_in = 1'b1;
    @(posedge clk); #1;
    ra = OA; rb = OB; rc = OC; rd = OD;  // registers not yet written: keep old
    for (int s = 1; s <= 6; s++) begin
      ctrl = step_word(s);
      @(posedge clk); #1;
      case (s)
        1: begin t0 = mn(ia, ib); t1 = mx(ia, ib); ra = t0; rb = t1; end
        2: begin t0 = mn(ic, id); t1 = mx(ic, id); rc = t0; rd = t1; end
        3, 6: begin t0 = mn(rb, rc); t1 = mx(rb, rc); rb = t0; rc = t1; end
        4: begin t0 = mn(ra, rb); t1 = mx(ra, rb); ra = t0; rb = t1; end
        5: begin t0 = mn(rc, rd); t1 = mx(rc, rd); rc = t0; rd = t1; end
        default: ;
      endcase
      check(OA == ra && OB == rb && OC == rc && OD == rd,
            $sformatf("step %0d: got %h %h %h %h exp %h %h %h %h", s, OA, OB, OC, OD, ra, rb, rc, rd));
    end
    ctrl = '0;
    // Ascending order of the operands, computed independently of the steps.
    v = '{ia, ib, ic, id};
    v.sort();
    check(OA == v[0] && OB == v[1] && OC == v[2] && OD == v[3],
          $sformatf("final %h %h %h %h", OA, OB, OC, OD));
    @(posedge clk); #1;
    check(OA == v[0] && OB == v[1] && OC == v[2] && OD == v[3], "result held with controls idle");
  endtask

  initial begin
    ctrl = '0;
    IA = '0; IB = '0; IC = '0; ID = '0;
    @(posedge clk); #1;
    run_one(16'd4, 16'd3, 16'd2, 16'd1);
    run_one(16'd1, 16'd2, 16'd3, 16'd4);
    run_one(16'hFFFF, 16'h0000, 16'hFFFF, 16'h0000);
    run_one(16'd7, 16'd7, 16'd7, 16'd7);
    for (int k = 0; k < 300; k++)
      run_one(W'($urandom), W'($urandom), W'($urandom), W'($urandom));
    for (int k = 0; k < 300; k++)
      run_one(W'($urandom_range(0, 3)), W'($urandom_range(0, 3)), W'($urandom_range(0, 3)),
              W'($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
