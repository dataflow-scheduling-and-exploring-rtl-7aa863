// sort_element: two-input sorting element, a comparator and a switch.
//
// The comparator (GT) tests a > b; when it is true the switch crosses, so x
// always carries the smaller and y the larger operand, as in
// "if (A0 > B0) then A1 = B0; B1 = A0 else A1 = A0; B1 = B0". Equal operands
// pass straight through. Purely combinational, one comparator delay plus one
// 2-to-1 multiplexer delay from a/b to x/y.
//
// The comparator/switch structure and the ascending order follow the design;
// the operand width (default 16 bits) and the optional two's-complement
// comparison (SIGNED=1, default unsigned) are parameters of this
// implementation.
module sort_element #(
  parameter int unsigned WIDTH  = 16,
  parameter bit          SIGNED = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x,   // min(a, b)
  output logic [WIDTH-1:0] y,   // max(a, b)
  output logic             gt   // a > b: switch crossed
);

  // Comparator
  always_comb begin
    if (SIGNED) gt = $signed(a) > $signed(b);
    else        gt = a > b;
  end

  // Switch element
  always_comb begin
    if (gt) begin
      x = b;
      y = a;
    end else begin
      x = a;
      y = b;
    end
  end

endmodule
