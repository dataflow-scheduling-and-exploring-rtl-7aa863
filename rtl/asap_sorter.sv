// asap_sorter: four-input sorter built from the ASAP/ALAP schedule, with
// sorting elements shared across steps.
//
// The four schedule steps run one per clock cycle on two sorting elements,
// sortX and sortY (asap_datapath), sequenced by a six-state FSM
// (asap_controller). It trades one extra sorting element against the serial
// sorter for two fewer sort cycles and smaller operand multiplexers.
//
// Handshake: hold IA..ID and raise strobe while idle; the operands are latched
// at the edge that samples strobe (edge 0). OA..OD (ascending, OA the
// smallest) are valid after edge 4 and done rises after edge 5 and stays high
// until the next strobe or a reset pulse. rst_n is a power-on reset added by
// this implementation. Cost: 8*WIDTH data flip-flops, two sorting elements,
// two 3-to-1 and four 2-to-1 multiplexers.
module asap_sorter
  import sort4_pkg::*;
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

  asap_ctrl_t ctrl;

  asap_controller u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .strobe(strobe),
    .reset (reset),
    .ctrl  (ctrl),
    .done  (done),
    .busy  (busy)
  );

  asap_datapath #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_dp (
    .clk (clk),
    .ctrl(ctrl),
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
