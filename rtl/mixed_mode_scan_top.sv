// mixed_mode_scan_top: mixed mode scan design, a serial scan chain and a
// random access scan (RAS) array built from one common scan cell and run in
// parallel.
//
// The flip-flops of a functional circuit are split into two groups. The
// N_SERIAL flip-flops of the first group form a serial scan chain fed by si0
// and read at finalout. The RAS_ROWS x RAS_COLS flip-flops of the second
// group form a RAS array: a row is read through sense amplifiers onto
// finalout2 and written from the column data pins si_ras (SI1, SI2). Both
// groups use the same scan cell. The two test mode pins pick the mode:
//   00 functional : all flip-flops load the functional logic's next state
//   01 mixed      : per row access, cycle 1 reads the row onto finalout2,
//                   cycle 2 writes si_ras into it and shifts the chain once
//   10 p-random   : the same row read/write cycles, chain holds
//   11 p-serial   : the chain shifts every cycle, RAS array holds
// The RAS row address comes from an internal counter (mode_ctrl), not from
// pins, so the test interface is clk, rst, two mode pins, three scan data pins
// and three user data pins as in the published block diagram. The functional
// logic (cut_logic) is an example of this design's own; the published design
// does not give one, and func_out is this design's addition so the functional
// result can be observed.
//
// State order in the functional logic: bits 0..N_SERIAL-1 are the serial
// cells in chain order, then the RAS cells row by row (row r column c at
// N_SERIAL + r*RAS_COLS + c).
//
// Timing: single clock, rising edge, synchronous active-high reset that
// clears every flip-flop and the row sequencer. finalout is the last chain
// cell; finalout2 changes one cycle after a read step.
module mixed_mode_scan_top
  import mms_pkg::*;
#(
  parameter int unsigned N_IN     = 3,
  parameter int unsigned N_SERIAL = 4,
  parameter int unsigned RAS_ROWS = 4,
  parameter int unsigned RAS_COLS = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                test_mode0,
  input  logic                test_mode1,
  input  logic [N_IN-1:0]     in_data,   // IN1..IN3 user data
  input  logic                si0,       // serial scan input
  input  logic [RAS_COLS-1:0] si_ras,    // RAS column write data (SI1, SI2)
  output logic                finalout,  // serial scan output
  output logic [RAS_COLS-1:0] finalout2, // RAS sensed row
  output logic                func_out   // functional output
);

  localparam int unsigned N_RAS = RAS_ROWS * RAS_COLS;
  localparam int unsigned N_FF  = N_SERIAL + N_RAS;
  localparam int unsigned AW    = (RAS_ROWS > 1) ? $clog2(RAS_ROWS) : 1;

  scan_ctrl_t    ctrl;
  logic [AW-1:0] row_addr;

  logic [N_FF-1:0] state_q;
  logic [N_FF-1:0] state_d;

  mode_ctrl #(.ROWS(RAS_ROWS)) u_mode_ctrl (
    .clk       (clk),
    .rst       (rst),
    .test_mode0(test_mode0),
    .test_mode1(test_mode1),
    .mode      (),
    .ctrl      (ctrl),
    .row_addr  (row_addr),
    .step      ()
  );

  cut_logic #(.N_IN(N_IN), .N_FF(N_FF)) u_cut (
    .in_data (in_data),
    .q       (state_q),
    .d       (state_d),
    .func_out(func_out)
  );

  serial_scan_chain #(.N(N_SERIAL)) u_serial (
    .clk       (clk),
    .rst       (rst),
    .capture_en(ctrl.capture),
    .d         (state_d[N_SERIAL-1:0]),
    .shift_en  (ctrl.shift),
    .si        (si0),
    .q         (state_q[N_SERIAL-1:0]),
    .so        (finalout)
  );

  ras_array #(.ROWS(RAS_ROWS), .COLS(RAS_COLS)) u_ras (
    .clk       (clk),
    .rst       (rst),
    .capture_en(ctrl.capture),
    .d         (state_d[N_FF-1:N_SERIAL]),
    .row_addr  (row_addr),
    .read_en   (ctrl.ras_read),
    .write_en  (ctrl.ras_write),
    .wdata     (si_ras),
    .q         (state_q[N_FF-1:N_SERIAL]),
    .rdata     (finalout2)
  );

endmodule
