// serial_datapath: datapath of the serial-schedule four-input sorter.
//
// One sorting element is time-shared by all six sort statements of the serial
// schedule. Register allocation folds the twelve intermediate variables into
// four working registers A1, B1, C1 and D1; A0..D0 latch the operands.
// Per step the controller chooses the element's first operand from
// {A0, C0, A1, B1, C1} and its second from {B0, D0, B1, C1, D1} (two 5-to-1
// multiplexers), and the two write-back multiplexers choose whether B1 and C1
// take the smaller (O1) or the larger (O2) result. A1 is only ever written
// from O1 and D1 only from O2, so they need no multiplexer.
//
// Step  statement                 operands  writes
//  1    (A1,B1) = sort(A0,B0)     A0, B0    A1<=O1, B1<=O2
//  2    (C1,D1) = sort(C0,D0)     C0, D0    C1<=O1, D1<=O2
//  3    (B1,C1) = sort(B1,C1)     B1, C1    B1<=O1, C1<=O2
//  4    (A1,B1) = sort(A1,B1)     A1, B1    A1<=O1, B1<=O2
//  5    (C1,D1) = sort(C1,D1)     C1, D1    C1<=O1, D1<=O2
//  6    (B1,C1) = sort(B1,C1)     B1, C1    B1<=O1, C1<=O2
//
// Interface: ctrl (ser_ctrl_t) from serial_controller, applied to the
// registers at the rising clock edge. OA..OD are wired straight from A1..D1
// and show the sorted result after step 6. Registers have no reset: every one
// is written before it is read in a sort. 8*WIDTH flip-flops in all.
// The multiplexer and register structure follows the design; the select
// encodings come from sort4_pkg.
module serial_datapath
  import sort4_pkg::*;
#(
  parameter int unsigned WIDTH  = 16,
  parameter bit          SIGNED = 1'b0
) (
  input  logic             clk,
  input  ser_ctrl_t        ctrl,
  input  logic [WIDTH-1:0] IA,
  input  logic [WIDTH-1:0] IB,
  input  logic [WIDTH-1:0] IC,
  input  logic [WIDTH-1:0] ID,
  output logic [WIDTH-1:0] OA,
  output logic [WIDTH-1:0] OB,
  output logic [WIDTH-1:0] OC,
  output logic [WIDTH-1:0] OD
);

  logic [WIDTH-1:0] a0, b0, c0, d0;  // input latches
  logic [WIDTH-1:0] a1, b1, c1, d1;  // working registers
  logic [WIDTH-1:0] in1, in2;        // sorting element operands
  logic [WIDTH-1:0] o1, o2;          // sorting element results
  logic             gt_unused;

  // 5-to-1 operand multiplexers
  always_comb begin
    unique case (ctrl.sel1)
      SER_IN1_A0: in1 = a0;
      SER_IN1_C0: in1 = c0;
      SER_IN1_A1: in1 = a1;
      SER_IN1_B1: in1 = b1;
      SER_IN1_C1: in1 = c1;
      default:    in1 = a0;
    endcase
    unique case (ctrl.sel2)
      SER_IN2_B0: in2 = b0;
      SER_IN2_D0: in2 = d0;
      SER_IN2_B1: in2 = b1;
      SER_IN2_C1: in2 = c1;
      SER_IN2_D1: in2 = d1;
      default:    in2 = b0;
    endcase
  end

  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_sort (
    .a (in1),
    .b (in2),
    .x (o1),
    .y (o2),
    .gt(gt_unused)
  );

  always_ff @(posedge clk) begin
    if (ctrl.ld_in) begin
      a0 <= IA;
      b0 <= IB;
      c0 <= IC;
      d0 <= ID;
    end
    if (ctrl.en_a1) a1 <= o1;
    if (ctrl.en_b1) b1 <= (ctrl.sel_b1 == WB_O1) ? o1 : o2;  // 2-to-1 write-back
    if (ctrl.en_c1) c1 <= (ctrl.sel_c1 == WB_O1) ? o1 : o2;  // 2-to-1 write-back
    if (ctrl.en_d1) d1 <= o2;
  end

  assign OA = a1;
  assign OB = b1;
  assign OC = c1;
  assign OD = d1;

endmodule
