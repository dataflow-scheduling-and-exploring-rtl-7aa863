// serial_sorter: four-input sorter built from the serial schedule.
//
// Six sort statements run one per clock cycle on a single shared sorting
// element (serial_datapath), sequenced by an eight-state FSM
// (serial_controller). Cheapest in sorting elements, slowest in cycles.
//
// Handshake: hold IA..ID and raise strobe while done/idle; the operands are
// latched at the edge that samples strobe (edge 0). OA..OD (ascending, OA the
// smallest) are valid after edge 6 and done rises after edge 7 and stays high
// until the next strobe or a reset pulse. rst_n is a power-on reset added by
// this implementation. Cost: 8*WIDTH data flip-flops, one sorting element, two
// 5-to-1 and two 2-to-1 multiplexers.
module serial_sorter
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

  ser_ctrl_t ctrl;

  serial_controller u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .strobe(strobe),
    .reset (reset),
    .ctrl  (ctrl),
    .done  (done),
    .busy  (busy)
  );

  serial_datapath #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_dp (
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
