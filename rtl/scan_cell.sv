// scan_cell: the common scan cell used both in the serial scan chain and in
// the random access scan (RAS) array.
//
// One cell type serves both parts, as in the published architecture: it loads
// its functional input D in functional mode, takes its scan input SI when the
// serial part shifts, and takes the column write data when its RAS row is
// written. The published cell is a transmission-gate master/slave flip-flop in
// which the test path enters the master latch beside the functional path, so
// no multiplexer sits in front of D, and a slow scan clock SCK clocks the test
// path. This RTL keeps the cell's function but not its circuit: it is a
// single-clock flip-flop whose three load paths are picked by enables, so a
// synthesis tool builds the selection from ordinary logic. The scan output SO
// is the cell state Q, as in the published cell where SO follows the latch.
//
// Interface: clk (rising edge), rst (synchronous, active high, clears Q),
//   capture_en/d, shift_en/si, ras_we/ras_wd, q (also the scan output).
// Timing: Q changes one clock edge after an enable; with no enable Q holds.
// Priority when several enables are high (the controller never does this):
// capture, then shift, then RAS write.
module scan_cell (
  input  logic clk,
  input  logic rst,
  input  logic capture_en,
  input  logic d,
  input  logic shift_en,
  input  logic si,
  input  logic ras_we,
  input  logic ras_wd,
  output logic q
);

  always_ff @(posedge clk) begin
    if (rst)             q <= 1'b0;
    else if (capture_en) q <= d;
    else if (shift_en)   q <= si;
    else if (ras_we)     q <= ras_wd;
  end

endmodule
