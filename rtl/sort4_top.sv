// sort4_top: the three four-input sorters and the five-input balanced
// network side by side.
//
// The same function, sorting four WIDTH-bit operands into ascending order,
// is implemented three ways from two schedules of one dataflow description:
//   ser_*  serial schedule, one shared sorting element, 7 cycles to done
//   asap_* ASAP/ALAP schedule, two shared sorting elements, 5 cycles to done
//   dir_*  ASAP/ALAP schedule implemented directly, six sorting elements,
//          5 cycles to done
// next to the five-operand network from which the four-operand descriptions
// are reduced:
//   b5_*   balanced five-input schedule implemented directly, ten sorting
//          elements, 6 cycles to done
// Each sorter has its own strobe/reset/done handshake and its own operand and
// result ports, so they can be run independently or together and their cost
// compared after synthesis. clk and the power-on reset rst_n (active low,
// asynchronous, added by this implementation) are shared.
module sort4_top #(
  parameter int unsigned WIDTH  = 16,
  parameter bit          SIGNED = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  // serial sorter
  input  logic             ser_strobe,
  input  logic             ser_reset,
  input  logic [WIDTH-1:0] ser_IA,
  input  logic [WIDTH-1:0] ser_IB,
  input  logic [WIDTH-1:0] ser_IC,
  input  logic [WIDTH-1:0] ser_ID,
  output logic [WIDTH-1:0] ser_OA,
  output logic [WIDTH-1:0] ser_OB,
  output logic [WIDTH-1:0] ser_OC,
  output logic [WIDTH-1:0] ser_OD,
  output logic             ser_done,
  output logic             ser_busy,
  // ASAP/ALAP sorter with shared sorting elements
  input  logic             asap_strobe,
  input  logic             asap_reset,
  input  logic [WIDTH-1:0] asap_IA,
  input  logic [WIDTH-1:0] asap_IB,
  input  logic [WIDTH-1:0] asap_IC,
  input  logic [WIDTH-1:0] asap_ID,
  output logic [WIDTH-1:0] asap_OA,
  output logic [WIDTH-1:0] asap_OB,
  output logic [WIDTH-1:0] asap_OC,
  output logic [WIDTH-1:0] asap_OD,
  output logic             asap_done,
  output logic             asap_busy,
  // direct implementation of the ASAP/ALAP schedule
  input  logic             dir_strobe,
  input  logic             dir_reset,
  input  logic [WIDTH-1:0] dir_IA,
  input  logic [WIDTH-1:0] dir_IB,
  input  logic [WIDTH-1:0] dir_IC,
  input  logic [WIDTH-1:0] dir_ID,
  output logic [WIDTH-1:0] dir_OA,
  output logic [WIDTH-1:0] dir_OB,
  output logic [WIDTH-1:0] dir_OC,
  output logic [WIDTH-1:0] dir_OD,
  output logic             dir_done,
  output logic             dir_busy,
  // five-input balanced network
  input  logic             b5_strobe,
  input  logic             b5_reset,
  input  logic [WIDTH-1:0] b5_IA,
  input  logic [WIDTH-1:0] b5_IB,
  input  logic [WIDTH-1:0] b5_IC,
  input  logic [WIDTH-1:0] b5_ID,
  input  logic [WIDTH-1:0] b5_IE,
  output logic [WIDTH-1:0] b5_OA,
  output logic [WIDTH-1:0] b5_OB,
  output logic [WIDTH-1:0] b5_OC,
  output logic [WIDTH-1:0] b5_OD,
  output logic [WIDTH-1:0] b5_OE,
  output logic             b5_done,
  output logic             b5_busy
);

  serial_sorter #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_serial (
    .clk   (clk),
    .rst_n (rst_n),
    .strobe(ser_strobe),
    .reset (ser_reset),
    .IA    (ser_IA),
    .IB    (ser_IB),
    .IC    (ser_IC),
    .ID    (ser_ID),
    .OA    (ser_OA),
    .OB    (ser_OB),
    .OC    (ser_OC),
    .OD    (ser_OD),
    .done  (ser_done),
    .busy  (ser_busy)
  );

  asap_sorter #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_asap (
    .clk   (clk),
    .rst_n (rst_n),
    .strobe(asap_strobe),
    .reset (asap_reset),
    .IA    (asap_IA),
    .IB    (asap_IB),
    .IC    (asap_IC),
    .ID    (asap_ID),
    .OA    (asap_OA),
    .OB    (asap_OB),
    .OC    (asap_OC),
    .OD    (asap_OD),
    .done  (asap_done),
    .busy  (asap_busy)
  );

  direct_sorter #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_direct (
    .clk   (clk),
    .rst_n (rst_n),
    .strobe(dir_strobe),
    .reset (dir_reset),
    .IA    (dir_IA),
    .IB    (dir_IB),
    .IC    (dir_IC),
    .ID    (dir_ID),
    .OA    (dir_OA),
    .OB    (dir_OB),
    .OC    (dir_OC),
    .OD    (dir_OD),
    .done  (dir_done),
    .busy  (dir_busy)
  );

  balanced5_sorter #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_balanced5 (
    .clk   (clk),
    .rst_n (rst_n),
    .strobe(b5_strobe),
    .reset (b5_reset),
    .IA    (b5_IA),
    .IB    (b5_IB),
    .IC    (b5_IC),
    .ID    (b5_ID),
    .IE    (b5_IE),
    .OA    (b5_OA),
    .OB    (b5_OB),
    .OC    (b5_OC),
    .OD    (b5_OD),
    .OE    (b5_OE),
    .done  (b5_done),
    .busy  (b5_busy)
  );

endmodule
