// asap_datapath: datapath of the ASAP/ALAP-schedule four-input sorter with
// shared sorting elements.
//
// The ASAP/ALAP schedule has four steps; steps 1 and 3 hold two independent
// sort statements each, so two sorting elements are allocated: sortX carries
// the statements of all four steps and sortY the second statement of steps 1
// and 3. As in the serial datapath, register allocation folds the twelve
// intermediate variables into A1, B1, C1, D1; A0..D0 latch the operands.
//
// Step  sortX                     sortY                     writes
//  1    (A1,B1) = sortX(A0,B0)    (C1,D1) = sortY(C0,D0)    A1,B1 / C1,D1
//  2    (B1,C1) = sortX(B1,C1)                              B1,C1
//  3    (A1,B1) = sortX(A1,B1)    (C1,D1) = sortY(C1,D1)    A1,B1 / C1,D1
//  4    (B1,C1) = sortX(B1,C1)                              B1,C1
//
// Multiplexers: sortX operands from {A0, A1, B1} and {B0, B1, C1} (3-to-1),
// sortY operands from {C0, C1} and {D0, D1} (2-to-1); B1 is written from
// {XO1, XO2} and C1 from {XO2, YO1} (2-to-1). A1 only takes XO1 and D1 only
// YO2.
//
// Interface: ctrl (asap_ctrl_t) from asap_controller, applied at the rising
// clock edge. OA..OD are wired from A1..D1 and hold the sorted result after
// step 4. No register is reset; each is written before it is read.
// 8*WIDTH flip-flops. The structure follows the design; select encodings come
// from sort4_pkg.
module asap_datapath
  import sort4_pkg::*;
#(
  parameter int unsigned WIDTH  = 16,
  parameter bit          SIGNED = 1'b0
) (
  input  logic             clk,
  input  asap_ctrl_t       ctrl,
  input  logic [WIDTH-1:0] IA,
  input  logic [WIDTH-1:0] IB,
  input  logic [WIDTH-1:0] IC,
  input  logic [WIDTH-1:0] ID,
  output logic [WIDTH-1:0] OA,
  output logic [WIDTH-1:0] OB,
  output logic [WIDTH-1:0] OC,
  output logic [WIDTH-1:0] OD
);

  logic [WIDTH-1:0] a0, b0, c0, d0;
  logic [WIDTH-1:0] a1, b1, c1, d1;
  logic [WIDTH-1:0] x_in1, x_in2, y_in1, y_in2;
  logic [WIDTH-1:0] xo1, xo2, yo1, yo2;
  logic             x_gt_unused, y_gt_unused;

  always_comb begin
    unique case (ctrl.x_sel1)
      X_IN1_A0: x_in1 = a0;
      X_IN1_A1: x_in1 = a1;
      X_IN1_B1: x_in1 = b1;
      default:  x_in1 = a0;
    endcase
    unique case (ctrl.x_sel2)
      X_IN2_B0: x_in2 = b0;
      X_IN2_B1: x_in2 = b1;
      X_IN2_C1: x_in2 = c1;
      default:  x_in2 = b0;
    endcase
    y_in1 = ctrl.y_sel1 ? c1 : c0;
    y_in2 = ctrl.y_sel2 ? d1 : d0;
  end

  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_sortx (
    .a (x_in1),
    .b (x_in2),
    .x (xo1),
    .y (xo2),
    .gt(x_gt_unused)
  );

  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_sorty (
    .a (y_in1),
    .b (y_in2),
    .x (yo1),
    .y (yo2),
    .gt(y_gt_unused)
  );

  always_ff @(posedge clk) begin
    if (ctrl.ld_in) begin
      a0 <= IA;
      b0 <= IB;
      c0 <= IC;
      d0 <= ID;
    end
    if (ctrl.en_a1) a1 <= xo1;
    if (ctrl.en_b1) b1 <= (ctrl.sel_b1 == B1_FROM_XO1) ? xo1 : xo2;
    if (ctrl.en_c1) c1 <= (ctrl.sel_c1 == C1_FROM_XO2) ? xo2 : yo1;
    if (ctrl.en_d1) d1 <= yo2;
  end

  assign OA = a1;
  assign OB = b1;
  assign OC = c1;
  assign OD = d1;

endmodule
