// mode_ctrl: test mode decoder and RAS row sequencer of the mixed mode design.
//
// The two test mode pins select one of four modes (see mms_pkg). In the
// reduced-control RAS scheme the RAS row address is not a chip input: this
// controller steps through the rows itself, so the test pins stay at clk, rst,
// two mode pins and the scan data pins. Each row access takes two clock
// cycles, a read step then a write step:
//   read step  - the current row is sensed onto the RAS outputs (ras_read)
//   write step - new column data is written into that row (ras_write), and in
//                mixed mode the serial part shifts one position (shift);
//                the row address then advances, wrapping after the last row.
// In p-serial mode the serial part shifts every cycle and the RAS part holds.
// In functional mode every cell captures its D input every cycle. In both of
// those modes the sequencer returns to row 0, read step, so a RAS unload after
// a capture starts at row 0. The four modes and the read-then-write order
// follow the published architecture; the internal row counter, one shift per
// row access in mixed mode and the return to row 0 are this design's choices.
//
// Interface: clk, rst (synchronous, active high), test_mode0, test_mode1;
//   mode (decoded), ctrl (enables, registered state decoded combinationally),
//   row_addr, step.
// Timing: enables are valid in the same cycle the mode pins are; a mode change
// takes effect at once.
module mode_ctrl
  import mms_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  localparam int unsigned AW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       test_mode0,
  input  logic       test_mode1,
  output test_mode_e mode,
  output scan_ctrl_t ctrl,
  output logic [AW-1:0] row_addr,
  output ras_step_e  step
);

  logic ras_active;

  assign mode       = test_mode_e'({test_mode0, test_mode1});
  assign ras_active = (mode == MODE_MIXED) || (mode == MODE_P_RANDOM);

  always_comb begin
    ctrl = '0;
    unique case (mode)
      MODE_FUNCTIONAL: ctrl.capture = 1'b1;
      MODE_P_SERIAL:   ctrl.shift   = 1'b1;
      MODE_P_RANDOM: begin
        ctrl.ras_read  = (step == RAS_STEP_READ);
        ctrl.ras_write = (step == RAS_STEP_WRITE);
      end
      MODE_MIXED: begin
        ctrl.ras_read  = (step == RAS_STEP_READ);
        ctrl.ras_write = (step == RAS_STEP_WRITE);
        ctrl.shift     = (step == RAS_STEP_WRITE);
      end
      default: ctrl = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || !ras_active) begin
      step     <= RAS_STEP_READ;
      row_addr <= '0;
    end else if (step == RAS_STEP_READ) begin
      step <= RAS_STEP_WRITE;
    end else begin
      step     <= RAS_STEP_READ;
      row_addr <= (row_addr == AW'(ROWS - 1)) ? '0 : row_addr + 1'b1;
    end
  end

  // Capture, shift and RAS write never overlap, so no cell sees two loads.
  a_onehot_load: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.capture, ctrl.ras_read, ctrl.ras_write}) &&
    !(ctrl.capture && ctrl.shift))
    else $error("mode_ctrl: overlapping load enables");
  a_row_range: assert property (@(posedge clk) disable iff (rst)
    int'(row_addr) < int'(ROWS))
    else $error("mode_ctrl: row address out of range");

endmodule
