// balanced5_datapath: five-input balanced sorting network, one sorting
// element per statement and one register per variable.
//
// The balanced description spreads its data dependences evenly, so its
// as-soon-as-possible and as-late-as-possible schedules coincide: five steps
// of two independent sort statements each, alternating between the pairs
// (A,B),(C,D) and (B,C),(D,E). This is odd-even transposition sorting of five
// values, which needs exactly five such rounds.
//
//   stage 0 (ena0): A0..E0 <= IA..IE
//   stage 1 (ena1): (A1,B1) = sort(A0,B0); (C1,D1) = sort(C0,D0)
//   stage 2 (ena2): (B2,C2) = sort(B1,C1); (D2,E2) = sort(D1,E0)
//   stage 3 (ena3): (A3,B3) = sort(A1,B2); (C3,D3) = sort(C2,D2)
//   stage 4 (ena4): (B4,C4) = sort(B3,C3); (D4,E4) = sort(D3,E2)
//   stage 5 (ena5): (A5,B5) = sort(A3,B4); (C5,D5) = sort(C4,D4)
//   OA = A5; OB = B5; OC = C5; OD = D5; OE = E4
//
// Interface: ena[k] loads the registers of stage k at the rising clock edge;
// with ena0..ena5 on successive edges the result is on OA..OE after the ena5
// edge. No register is reset; each is written before it is read.
// 25*WIDTH flip-flops and ten sorting elements, no multiplexers.
// The statements, their grouping into steps and the output mapping follow
// the design's balanced dataflow description; building it directly, with a
// register per variable and a stage enable per step, is this
// implementation's choice, made the same way as for the four-input direct
// sorter.
module balanced5_datapath #(
  parameter int unsigned WIDTH  = 16,
  parameter bit          SIGNED = 1'b0
) (
  input  logic             clk,
  input  logic [5:0]       ena,
  input  logic [WIDTH-1:0] IA,
  input  logic [WIDTH-1:0] IB,
  input  logic [WIDTH-1:0] IC,
  input  logic [WIDTH-1:0] ID,
  input  logic [WIDTH-1:0] IE,
  output logic [WIDTH-1:0] OA,
  output logic [WIDTH-1:0] OB,
  output logic [WIDTH-1:0] OC,
  output logic [WIDTH-1:0] OD,
  output logic [WIDTH-1:0] OE
);

  logic [WIDTH-1:0] a0, b0, c0, d0, e0;
  logic [WIDTH-1:0] a1, b1, c1, d1;
  logic [WIDTH-1:0] b2, c2, d2, e2;
  logic [WIDTH-1:0] a3, b3, c3, d3;
  logic [WIDTH-1:0] b4, c4, d4, e4;
  logic [WIDTH-1:0] a5, b5, c5, d5;

  // sorting element outputs, named after the variables they produce
  logic [WIDTH-1:0] n_a1, n_b1, n_c1, n_d1;
  logic [WIDTH-1:0] n_b2, n_c2, n_d2, n_e2;
  logic [WIDTH-1:0] n_a3, n_b3, n_c3, n_d3;
  logic [WIDTH-1:0] n_b4, n_c4, n_d4, n_e4;
  logic [WIDTH-1:0] n_a5, n_b5, n_c5, n_d5;
  logic [9:0]       gt_unused;

  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s1ab (
    .a(a0), .b(b0), .x(n_a1), .y(n_b1), .gt(gt_unused[0]));
  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s1cd (
    .a(c0), .b(d0), .x(n_c1), .y(n_d1), .gt(gt_unused[1]));
  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s2bc (
    .a(b1), .b(c1), .x(n_b2), .y(n_c2), .gt(gt_unused[2]));
  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s2de (
    .a(d1), .b(e0), .x(n_d2), .y(n_e2), .gt(gt_unused[3]));
  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s3ab (
    .a(a1), .b(b2), .x(n_a3), .y(n_b3), .gt(gt_unused[4]));
  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s3cd (
    .a(c2), .b(d2), .x(n_c3), .y(n_d3), .gt(gt_unused[5]));
  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s4bc (
    .a(b3), .b(c3), .x(n_b4), .y(n_c4), .gt(gt_unused[6]));
  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s4de (
    .a(d3), .b(e2), .x(n_d4), .y(n_e4), .gt(gt_unused[7]));
  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s5ab (
    .a(a3), .b(b4), .x(n_a5), .y(n_b5), .gt(gt_unused[8]));
  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s5cd (
    .a(c4), .b(d4), .x(n_c5), .y(n_d5), .gt(gt_unused[9]));

  always_ff @(posedge clk) begin
    if (ena[0]) begin
      a0 <= IA; b0 <= IB; c0 <= IC; d0 <= ID; e0 <= IE;
    end
    if (ena[1]) begin
      a1 <= n_a1; b1 <= n_b1; c1 <= n_c1; d1 <= n_d1;
    end
    if (ena[2]) begin
      b2 <= n_b2; c2 <= n_c2; d2 <= n_d2; e2 <= n_e2;
    end
    if (ena[3]) begin
      a3 <= n_a3; b3 <= n_b3; c3 <= n_c3; d3 <= n_d3;
    end
    if (ena[4]) begin
      b4 <= n_b4; c4 <= n_c4; d4 <= n_d4; e4 <= n_e4;
    end
    if (ena[5]) begin
      a5 <= n_a5; b5 <= n_b5; c5 <= n_c5; d5 <= n_d5;
    end
  end

  assign OA = a5;
  assign OB = b5;
  assign OC = c5;
  assign OD = d5;
  assign OE = e4;

endmodule
