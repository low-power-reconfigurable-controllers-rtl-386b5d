// rwsn_pkg: types and constants shared by the reconfigurable microtask controller.
//
// The reconfigurable FSM is sized by the triplet (N, n, m): state bits, primary
// inputs and outputs. The defaults below are the largest triplet among the four
// benchmark microtasks the design is evaluated on (Crc8 (6,3,16), receiveData
// (6,3,23), Crc16 (7,4,19), firBasic (7,3,21)), so one fabric holds any of them.
// The LUT size K = 6 follows the design; the datapath is 16 bits wide with a
// 16x16 register file and a 32-bit adder split into four 8-bit clusters.
//
// The meaning of the FSM output bits as datapath controls (mt_ctrl_t) is this
// design's own choice: the FSM's Moore outputs form a horizontal control word.
package rwsn_pkg;

  // Reconfigurable FSM defaults
  parameter int unsigned FSM_N   = 7;   // state register bits
  parameter int unsigned FSM_NIN = 4;   // primary inputs
  parameter int unsigned FSM_M   = 23;  // outputs
  parameter int unsigned LUT_K   = 6;   // next-state LUT inputs
  parameter int unsigned LUT_KOP = 6;   // output LUT inputs

  // Datapath
  parameter int unsigned DATA_W  = 16;  // register file word
  parameter int unsigned RF_DEPTH = 16; // register file entries
  parameter int unsigned RF_AW   = 4;
  parameter int unsigned ADD_W   = 32;  // adder width
  parameter int unsigned ADD_CL  = 4;   // adder clusters
  parameter int unsigned CL_W    = 8;   // bits per adder cluster

  // Adder precision: number of active clusters minus one
  typedef enum logic [1:0] {
    PREC_8  = 2'd0,
    PREC_16 = 2'd1,
    PREC_24 = 2'd2,
    PREC_32 = 2'd3
  } prec_e;

  // Datapath control word carried by the FSM outputs y[22:0] (LSB first):
  //   ra[3:0] rb[7:4] rw[11:8] we[12] wsel[13] cin[14] ext[21:15] done[22]
  parameter int unsigned EXT_W = 7;
  typedef struct packed {
    logic             done;  // task finished (run-to-completion end)
    logic [EXT_W-1:0] ext;   // control lines to sensors / transceiver
    logic             cin;   // adder carry in
    logic             wsel;  // write-back source: 0 adder sum, 1 external data
    logic             we;    // register file write enable
    logic [RF_AW-1:0] rw;    // write register
    logic [RF_AW-1:0] rb;    // operand B register
    logic [RF_AW-1:0] ra;    // operand A register, also the data output
  } mt_ctrl_t;

  parameter int unsigned CTRL_W = $bits(mt_ctrl_t);  // 23

endpackage
