// sort4_top_tb: end-to-end test of the three sorters at their default
// parameters (16-bit unsigned operands).
//
// Design index 0 is the serial sorter, 1 the ASAP/ALAP sorter with shared
// sorting elements, 2 the direct implementation (all four operands), 3 the
// five-input balanced network. Each runs from its own driver process, so
// the four work concurrently and start at staggered times. For every sort
// the driver pulses strobe, counts edges to done (7, 5, 5 and 6) and
// compares the outputs with the operands sorted by the testbench; in
// lock-step rounds all four get the same operands (the five-input one a
// fifth, larger, operand as well) and their results must agree. Each handshake mechanism is counted per design and a
// mechanism that never happened counts as a failure:
//   sorts             completed sorts
//   orderings         distinct input orderings of distinct values (24 or 120)
//   ties              sorts with equal operands
//   busy_strobe       strobe (with new inputs) ignored while a sort runs
//   busy_reset        reset ignored while a sort runs
//   done_hold         done held high across idle cycles
//   reset_clear       done cleared by reset while idle
//   restart           a new sort started while done was still high
module sort4_top_tb;

  localparam int unsigned W = 16;
  localparam int          ND     = 4;
  localparam int          LAT[ND] = '{7, 5, 5, 6};
  localparam int          NIN[ND] = '{4, 4, 4, 5};
  localparam int          NORD[ND] = '{24, 24, 24, 120};
  localparam int          NRAND  = 300;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n;
  logic         strobe[ND], reset[ND], done[ND], busy[ND];
  logic [W-1:0] I[ND][5], O[ND][5];

  // mechanism counters
  int n_sorts[ND], n_ties[ND], n_busy_strobe[ND], n_busy_reset[ND];
  int n_done_hold[ND], n_reset_clear[ND], n_restart[ND];
  bit seen_order[ND][120];

  sort4_top dut (
    .clk, .rst_n,
    .ser_strobe (strobe[0]), .ser_reset (reset[0]),
    .ser_IA (I[0][0]), .ser_IB (I[0][1]), .ser_IC (I[0][2]), .ser_ID (I[0][3]),
    .ser_OA (O[0][0]), .ser_OB (O[0][1]), .ser_OC (O[0][2]), .ser_OD (O[0][3]),
    .ser_done (done[0]), .ser_busy (busy[0]),
    .asap_strobe(strobe[1]), .asap_reset(reset[1]),
    .asap_IA(I[1][0]), .asap_IB(I[1][1]), .asap_IC(I[1][2]), .asap_ID(I[1][3]),
    .asap_OA(O[1][0]), .asap_OB(O[1][1]), .asap_OC(O[1][2]), .asap_OD(O[1][3]),
    .asap_done(done[1]), .asap_busy(busy[1]),
    .dir_strobe (strobe[2]), .dir_reset (reset[2]),
    .dir_IA (I[2][0]), .dir_IB (I[2][1]), .dir_IC (I[2][2]), .dir_ID (I[2][3]),
    .dir_OA (O[2][0]), .dir_OB (O[2][1]), .dir_OC (O[2][2]), .dir_OD (O[2][3]),
    .dir_done (done[2]), .dir_busy (busy[2]),
    .b5_strobe  (strobe[3]), .b5_reset  (reset[3]),
    .b5_IA  (I[3][0]), .b5_IB  (I[3][1]), .b5_IC  (I[3][2]), .b5_ID  (I[3][3]), .b5_IE (I[3][4]),
    .b5_OA  (O[3][0]), .b5_OB  (O[3][1]), .b5_OC  (O[3][2]), .b5_OD  (O[3][3]), .b5_OE (O[3][4]),
    .b5_done  (done[3]), .b5_busy  (busy[3])
  );

  // The four-input sorters have no fifth output.
  assign O[0][4] = '0;
  assign O[1][4] = '0;
  assign O[2][4] = '0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  // Index of the ordering of n distinct values (Lehmer code).
  function automatic int order_index(input logic [W-1:0] v[5], input int n);
    int idx = 0;
    for (int i = 0; i < n; i++) begin
      int smaller = 0;
      for (int j = i + 1; j < n; j++) if (v[j] < v[i]) smaller++;
      idx = idx * (n - i) + smaller;
    end
    return idx;
  endfunction

  function automatic bit distinct(input logic [W-1:0] v[5], input int n);
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++) if (v[i] == v[j]) return 1'b0;
    return 1'b1;
  endfunction

  // Ascending order of the first n values; unused positions are zero.
  function automatic void sort_first(input logic [W-1:0] v[5], input int n, output logic [W-1:0] e[5]);
    e = v;
    for (int i = 1; i < n; i++)
      for (int j = i; j > 0 && e[j-1] > e[j]; j--) begin
        logic [W-1:0] t = e[j];
        e[j] = e[j-1];
        e[j-1] = t;
      end
    for (int i = n; i < 5; i++) e[i] = '0;
  endfunction

  // One sort on design d. mode 0: plain, 1: strobe with new inputs mid-sort,
  // 2: reset mid-sort.
  task automatic run_sort(input int d, input logic [W-1:0] v[5], input int mode);
    logic [W-1:0] e[5];
    int edges;
    bit was_done;
    sort_first(v, NIN[d], e);
    was_done = done[d];
    I[d] = v;
    strobe[d] = 1'b1;
    @(posedge clk); #1;
    strobe[d] = 1'b0;
    edges = 0;
    if (was_done && busy[d] && !done[d]) n_restart[d]++;
    while (!done[d] && edges < 20) begin
      if (edges == 2 && mode == 1) begin
        I[d] = '{~v[4], ~v[3], ~v[2], ~v[1], ~v[0]};
        strobe[d] = 1'b1;
      end
      if (edges == 2 && mode == 2) reset[d] = 1'b1;
      @(posedge clk); #1;
      if (strobe[d]) n_busy_strobe[d]++;
      if (reset[d])  n_busy_reset[d]++;
      strobe[d] = 1'b0;
      reset[d]  = 1'b0;
      edges++;
    end
    check(edges == LAT[d], $sformatf("design %0d: done after %0d edges, expected %0d", d, edges, LAT[d]));
    check(O[d] == e, $sformatf("design %0d: in %h %h %h %h %h out %h %h %h %h %h", d,
                               v[0], v[1], v[2], v[3], v[4], O[d][0], O[d][1], O[d][2], O[d][3], O[d][4]));
    n_sorts[d]++;
    if (distinct(v, NIN[d])) seen_order[d][order_index(v, NIN[d])] = 1'b1;
    else             n_ties[d]++;
  endtask

  task automatic idle_and_reset(input int d, input int cycles);
    repeat (cycles) @(posedge clk);
    #1;
    check(done[d] && !busy[d], $sformatf("design %0d: done held while idle", d));
    n_done_hold[d]++;
    reset[d] = 1'b1;
    @(posedge clk); #1;
    reset[d] = 1'b0;
    check(!done[d], $sformatf("design %0d: reset clears done", d));
    n_reset_clear[d]++;
  endtask

  task automatic driver(input int d);
    logic [W-1:0] v[5];
    int n = NIN[d];
    int np = (n == 4) ? 256 : 3125;
    repeat (d * 3) @(posedge clk);   // staggered starts
    #1;
    // all orderings of n distinct values
    for (int p = 0; p < np; p++) begin
      int x = p;
      for (int i = 0; i < 5; i++) begin
        v[i] = (i < n) ? W'(x % n) * 16'd13107 : '0;
        x /= n;
      end
      if (distinct(v, n)) run_sort(d, v, p % 3);
    end
    idle_and_reset(d, 3);
    v = '{16'd9, 16'd9, 16'd1, 16'd9, 16'd1};
    run_sort(d, v, 0);
    for (int k = 0; k < NRAND; k++) begin
      for (int i = 0; i < 5; i++) v[i] = W'($urandom);
      if (k % 10 == 5) v[1] = v[2];
      run_sort(d, v, k % 4 == 1 ? 1 : (k % 4 == 3 ? 2 : 0));
      if (k % 50 == 0) idle_and_reset(d, 1 + d);
    end
  endtask

  // All four designs, same operands, same edge: results must agree. The
  // five-input network gets a fifth operand larger than the other four.
  task automatic lockstep(input logic [W-1:0] v[5]);
    int edges = 0;
    v[4] = 16'hFFFF;
    for (int d = 0; d < ND; d++) begin
      I[d] = v;
      strobe[d] = 1'b1;
    end
    @(posedge clk); #1;
    for (int d = 0; d < ND; d++) strobe[d] = 1'b0;
    while (!done[0] && edges < 20) begin
      @(posedge clk); #1;
      edges++;
      if (edges == 5) check(done[1] && done[2] && !done[3] && busy[0], "lockstep: ASAP and direct done first");
      if (edges == 6) check(done[3] && busy[0], "lockstep: five-input network done next");
    end
    check(O[0][0:3] == O[1][0:3] && O[1][0:3] == O[2][0:3] && O[2][0:3] == O[3][0:3] && O[3][4] == 16'hFFFF,
          "lockstep: all designs agree");
  endtask

  initial begin
    logic [W-1:0] v[5];
    rst_n = 1'b0;
    for (int d = 0; d < ND; d++) begin
      strobe[d] = 1'b0;
      reset[d]  = 1'b0;
      I[d] = '{default: '0};
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int d = 0; d < ND; d++) check(!done[d] && !busy[d], "idle after power-on reset");

    fork
      driver(0);
      driver(1);
      driver(2);
      driver(3);
    join

    for (int k = 0; k < 50; k++) begin
      v = '{W'($urandom_range(0, 16'hFFFE)), W'($urandom_range(0, 16'hFFFE)), W'($urandom_range(0, 16'hFFFE)),
            W'($urandom_range(0, 16'hFFFE)), '0};
      lockstep(v);
    end

    for (int d = 0; d < ND; d++) begin
      automatic int orders = 0;
      for (int i = 0; i < NORD[d]; i++) orders += int'(seen_order[d][i]);
      $display("design %0d: sorts=%0d orderings=%0d/%0d ties=%0d busy_strobe=%0d busy_reset=%0d done_hold=%0d reset_clear=%0d restart=%0d",
               d, n_sorts[d], orders, NORD[d], n_ties[d], n_busy_strobe[d], n_busy_reset[d],
               n_done_hold[d], n_reset_clear[d], n_restart[d]);
      check(orders == NORD[d], $sformatf("design %0d: not every ordering seen", d));
      check(n_ties[d] > 0 && n_busy_strobe[d] > 0 && n_busy_reset[d] > 0 && n_done_hold[d] > 0 &&
            n_reset_clear[d] > 0 && n_restart[d] > 0, $sformatf("design %0d: a mechanism never happened", d));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
