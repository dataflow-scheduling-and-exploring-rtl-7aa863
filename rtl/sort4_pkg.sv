// sort4_pkg: types shared by the sorters (three four-input designs and the
// five-input balanced network).
//
// The sorters take four operands IA..ID, order them with two-input sorting
// elements and present them ascending on OA..OD. Each design splits into a
// datapath and a finite-state controller; the controller-to-datapath control
// words and the controller state encodings are defined here so that the
// datapath, the controller and their testbenches agree on them.
//
// Operand multiplexer sources and write-back sources follow the datapath
// drawings of the design (serial: one sorting element with 5-to-1 operand
// multiplexers; ASAP/ALAP: sortX with 3-to-1 and sortY with 2-to-1 operand
// multiplexers). Encodings are this implementation's choice.
package sort4_pkg;

  // ---------------------------------------------------------------- serial
  // Operand sources of the single sorting element.
  typedef enum logic [2:0] {
    SER_IN1_A0 = 3'd0,
    SER_IN1_C0 = 3'd1,
    SER_IN1_A1 = 3'd2,
    SER_IN1_B1 = 3'd3,
    SER_IN1_C1 = 3'd4
  } ser_in1_sel_e;

  typedef enum logic [2:0] {
    SER_IN2_B0 = 3'd0,
    SER_IN2_D0 = 3'd1,
    SER_IN2_B1 = 3'd2,
    SER_IN2_C1 = 3'd3,
    SER_IN2_D1 = 3'd4
  } ser_in2_sel_e;

  // Write-back source of B1 and C1: first (smaller) or second (larger) output.
  typedef enum logic {
    WB_O1 = 1'b0,
    WB_O2 = 1'b1
  } wb_sel_e;

  typedef struct packed {
    logic         ld_in;   // latch IA..ID into A0..D0
    ser_in1_sel_e sel1;
    ser_in2_sel_e sel2;
    logic         en_a1;   // A1 <= O1
    logic         en_b1;   // B1 <= sel_b1
    logic         en_c1;   // C1 <= sel_c1
    logic         en_d1;   // D1 <= O2
    wb_sel_e      sel_b1;
    wb_sel_e      sel_c1;
  } ser_ctrl_t;

  // Idle, six sort steps, output step.
  typedef enum logic [2:0] {
    SER_S0 = 3'd0,
    SER_S1 = 3'd1,
    SER_S2 = 3'd2,
    SER_S3 = 3'd3,
    SER_S4 = 3'd4,
    SER_S5 = 3'd5,
    SER_S6 = 3'd6,
    SER_S7 = 3'd7
  } ser_state_e;

  // ------------------------------------------------------------ ASAP/ALAP
  typedef enum logic [1:0] {
    X_IN1_A0 = 2'd0,
    X_IN1_A1 = 2'd1,
    X_IN1_B1 = 2'd2
  } x_in1_sel_e;

  typedef enum logic [1:0] {
    X_IN2_B0 = 2'd0,
    X_IN2_B1 = 2'd1,
    X_IN2_C1 = 2'd2
  } x_in2_sel_e;

  // Write-back source of B1: sortX first or second output.
  typedef enum logic {
    B1_FROM_XO1 = 1'b0,
    B1_FROM_XO2 = 1'b1
  } b1_sel_e;

  // Write-back source of C1: sortX second output or sortY first output.
  typedef enum logic {
    C1_FROM_XO2 = 1'b0,
    C1_FROM_YO1 = 1'b1
  } c1_sel_e;

  typedef struct packed {
    logic       ld_in;     // latch IA..ID into A0..D0
    x_in1_sel_e x_sel1;
    x_in2_sel_e x_sel2;
    logic       y_sel1;    // 0: C0, 1: C1
    logic       y_sel2;    // 0: D0, 1: D1
    logic       en_a1;     // A1 <= sortX O1
    logic       en_b1;     // B1 <= sel_b1
    logic       en_c1;     // C1 <= sel_c1
    logic       en_d1;     // D1 <= sortY O2
    b1_sel_e    sel_b1;
    c1_sel_e    sel_c1;
  } asap_ctrl_t;

  // Shared by the ASAP/ALAP and the direct controller: idle, four sort
  // steps, output step.
  typedef enum logic [2:0] {
    ST_S0 = 3'd0,
    ST_S1 = 3'd1,
    ST_S2 = 3'd2,
    ST_S3 = 3'd3,
    ST_S4 = 3'd4,
    ST_S5 = 3'd5
  } step_state_e;

  // Five-input balanced network: idle, five sort steps, output step.
  typedef enum logic [2:0] {
    B5_S0 = 3'd0,
    B5_S1 = 3'd1,
    B5_S2 = 3'd2,
    B5_S3 = 3'd3,
    B5_S4 = 3'd4,
    B5_S5 = 3'd5,
    B5_S6 = 3'd6
  } b5_state_e;

endpackage
