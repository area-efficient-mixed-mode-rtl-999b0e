// mms_pkg: types and constants shared by the mixed mode scan design.
//
// The design is run by two test mode pins, test_mode0 and test_mode1. Read as
// the two-bit value {test_mode0, test_mode1} they select one of four modes:
//   00 functional  - every scan cell captures its functional input D
//   01 mixed       - serial part shifts while the RAS part is read and written
//   10 p-random    - only the random access scan (RAS) part is read and written
//   11 p-serial    - only the serial part shifts
// The four modes and their codes follow the published architecture; taking
// test_mode0 as the left (most significant) bit of the code is this design's
// own reading. A RAS row access takes two steps: first the row is read through
// the sense amplifiers, then new stimulus is written into it.
package mms_pkg;

  typedef enum logic [1:0] {
    MODE_FUNCTIONAL = 2'b00,
    MODE_MIXED      = 2'b01,
    MODE_P_RANDOM   = 2'b10,
    MODE_P_SERIAL   = 2'b11
  } test_mode_e;

  typedef enum logic {
    RAS_STEP_READ  = 1'b0,
    RAS_STEP_WRITE = 1'b1
  } ras_step_e;

  // Per-cycle enables that the mode controller hands to the scan parts.
  // At most one of capture / shift / ras_write acts on any one cell.
  typedef struct packed {
    logic capture;    // all cells load functional D
    logic shift;      // serial part shifts one position
    logic ras_read;   // enabled RAS row is sensed onto the RAS outputs
    logic ras_write;  // enabled RAS row is written from the column data
  } scan_ctrl_t;

endpackage
