// balanced5_sorter: five-input sorter built directly from the balanced
// dataflow description, whose ASAP and ALAP schedules coincide.
//
// balanced5_datapath holds ten sorting elements in five register stages of
// two elements each (odd-even transposition); balanced5_controller enables
// one stage per clock cycle. It is the five-operand form of the network
// whose four-operand reduction the three four-input sorters implement.
//
// Handshake: hold IA..IE and raise strobe while idle; the operands are latched
// at the edge that samples strobe (edge 0). OA..OE (ascending, OA the
// smallest) are valid after edge 5 and done rises after edge 6 and stays high
// until the next strobe or a reset pulse. The strobe/reset/done handshake is
// the one of the four-input sorters; rst_n is a power-on reset added by this
// implementation. Cost: 25*WIDTH data flip-flops, ten sorting elements.
module balanced5_sorter #(
  parameter int unsigned WIDTH  = 16,
  parameter bit          SIGNED = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             strobe,
  input  logic             reset,
  input  logic [WIDTH-1:0] IA,
  input  logic [WIDTH-1:0] IB,
  input  logic [WIDTH-1:0] IC,
  input  logic [WIDTH-1:0] ID,
  input  logic [WIDTH-1:0] IE,
  output logic [WIDTH-1:0] OA,
  output logic [WIDTH-1:0] OB,
  output logic [WIDTH-1:0] OC,
  output logic [WIDTH-1:0] OD,
  output logic [WIDTH-1:0] OE,
  output logic             done,
  output logic             busy
);

  logic [5:0] ena;

  balanced5_controller u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .strobe(strobe),
    .reset (reset),
    .ena   (ena),
    .done  (done),
    .busy  (busy)
  );

  balanced5_datapath #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_dp (
    .clk(clk),
    .ena(ena),
    .IA (IA),
    .IB (IB),
    .IC (IC),
    .ID (ID),
    .IE (IE),
    .OA (OA),
    .OB (OB),
    .OC (OC),
    .OD (OD),
    .OE (OE)
  );

endmodule
