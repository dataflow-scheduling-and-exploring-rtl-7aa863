// direct_datapath: datapath of the direct implementation of the ASAP/ALAP
// schedule.
//
// Every sort statement gets its own sorting element and every variable its
// own register, so no multiplexer is needed: the network is a four-stage
// pipeline of six sorting elements between registers.
//
//   stage 0 (ena0): A0..D0 <= IA..ID
//   stage 1 (ena1): (A1,B1) = sort(A0,B0); (C1,D1) = sort(C0,D0)
//   stage 2 (ena2): (B2,C2) = sort(B1,C1)
//   stage 3 (ena3): (A3,B3) = sort(A1,B2); (C3,D3) = sort(C2,D1)
//   stage 4 (ena4): (B4,C4) = sort(B3,C3)
//   OA = A3; OB = B4; OC = C4; OD = D3
//
// Interface: ena[k] loads the registers of stage k at the rising clock edge.
// With ena0..ena4 asserted on successive edges the result is on OA..OD after
// the ena4 edge. No register is reset; each is written before it is read.
// 16*WIDTH flip-flops, six sorting elements. The register, enable and element
// arrangement follows the design.
module direct_datapath #(
  parameter int unsigned WIDTH  = 16,
  parameter bit          SIGNED = 1'b0
) (
  input  logic             clk,
  input  logic [4:0]       ena,
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
  logic [WIDTH-1:0] b2, c2;
  logic [WIDTH-1:0] a3, b3, c3, d3;
  logic [WIDTH-1:0] b4, c4;

  logic [WIDTH-1:0] s1a_x, s1a_y, s1c_x, s1c_y;
  logic [WIDTH-1:0] s2_x, s2_y;
  logic [WIDTH-1:0] s3a_x, s3a_y, s3c_x, s3c_y;
  logic [WIDTH-1:0] s4_x, s4_y;
  logic [5:0]       gt_unused;

  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s1a (
    .a(a0), .b(b0), .x(s1a_x), .y(s1a_y), .gt(gt_unused[0]));
  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s1c (
    .a(c0), .b(d0), .x(s1c_x), .y(s1c_y), .gt(gt_unused[1]));
  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s2 (
    .a(b1), .b(c1), .x(s2_x), .y(s2_y), .gt(gt_unused[2]));
  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s3a (
    .a(a1), .b(b2), .x(s3a_x), .y(s3a_y), .gt(gt_unused[3]));
  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s3c (
    .a(c2), .b(d1), .x(s3c_x), .y(s3c_y), .gt(gt_unused[4]));
  sort_element #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_s4 (
    .a(b3), .b(c3), .x(s4_x), .y(s4_y), .gt(gt_unused[5]));

  always_ff @(posedge clk) begin
    if (ena[0]) begin
      a0 <= IA;
      b0 <= IB;
      c0 <= IC;
      d0 <= ID;
    end
    if (ena[1]) begin
      a1 <= s1a_x;
      b1 <= s1a_y;
      c1 <= s1c_x;
      d1 <= s1c_y;
    end
    if (ena[2]) begin
      b2 <= s2_x;
      c2 <= s2_y;
    end
    if (ena[3]) begin
      a3 <= s3a_x;
      b3 <= s3a_y;
      c3 <= s3c_x;
      d3 <= s3c_y;
    end
    if (ena[4]) begin
      b4 <= s4_x;
      c4 <= s4_y;
    end
  end

  assign OA = a3;
  assign OB = b4;
  assign OC = c4;
  assign OD = d3;

endmodule
