// direct_sorter: four-input sorter that implements the ASAP/ALAP schedule
// directly, one sorting element per statement and one register per variable.
//
// direct_datapath is a four-stage network of six sorting elements with no
// multiplexers; direct_controller steps through it, enabling one register
// stage per clock cycle. It takes as many cycles as the shared ASAP/ALAP
// sorter and has no multiplexer in any register-to-register path, but it is
// the largest of the three (16*WIDTH flip-flops, six sorting elements).
//
// Handshake: hold IA..ID and raise strobe while idle; the operands are latched
// at the edge that samples strobe (edge 0). OA..OD (ascending) are valid after
// edge 4 and done rises after edge 5 and stays high until the next strobe or
// a reset pulse. rst_n is a power-on reset added by this implementation.
module direct_sorter
#(
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
  output logic [WIDTH-1:0] OA,
  output logic [WIDTH-1:0] OB,
  output logic [WIDTH-1:0] OC,
  output logic [WIDTH-1:0] OD,
  output logic             done,
  output logic             busy
);

  logic [4:0] ena;

  direct_controller u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .strobe(strobe),
    .reset (reset),
    .ena   (ena),
    .done  (done),
    .busy  (busy)
  );

  direct_datapath #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_dp (
    .clk (clk),
    .ena (ena),
    .IA  (IA),
    .IB  (IB),
    .IC  (IC),
    .ID  (ID),
    .OA  (OA),
    .OB  (OB),
    .OC  (OC),
    .OD  (OD)
  );

endmodule
