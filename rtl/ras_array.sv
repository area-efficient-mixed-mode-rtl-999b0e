// ras_array: the random access scan (RAS) part of the mixed mode design.
//
// ROWS x COLS common scan cells are arranged like a small memory. A row
// decoder turns row_addr into one-hot row enables. On a write (write_en) the
// enabled row loads wdata, one bit per column; the other rows hold. On a read
// (read_en) each column's read line carries the cell of the enabled row and
// the sense amplifiers latch it onto rdata. In functional mode (capture_en)
// every cell loads its own functional input d. The cells' shift port is not
// used in this part and is tied off.
//
// Interface: clk, rst (synchronous, active high), capture_en with d (row r,
//   column c at bit r*COLS+c), row_addr, read_en, write_en, wdata[COLS-1:0],
//   q (cell states, same bit order), rdata[COLS-1:0] (sensed row).
// Timing: a write takes effect at the next clock edge; rdata shows the row
// read one clock edge after read_en. A read and a write in the same cycle see
// the row before the write. Row-by-row read through sense amplifiers and row
// enables follow the published architecture; the array size, the row decoder
// and the read line structure are this design's choice.
module ras_array #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 2,
  localparam int unsigned AW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 capture_en,
  input  logic [ROWS*COLS-1:0] d,
  input  logic [AW-1:0]        row_addr,
  input  logic                 read_en,
  input  logic                 write_en,
  input  logic [COLS-1:0]      wdata,
  output logic [ROWS*COLS-1:0] q,
  output logic [COLS-1:0]      rdata
);

  logic [ROWS-1:0] row_en;
  logic [COLS-1:0] bitline;

  // Row decoder: one-hot row enable.
  always_comb begin
    for (int r = 0; r < ROWS; r++) row_en[r] = (row_addr == AW'(r));
  end

  // Column read lines: the enabled row's cells, wired-OR over rows.
  always_comb begin
    bitline = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        bitline[c] = bitline[c] | (row_en[r] & q[r*COLS+c]);
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      scan_cell u_cell (
        .clk       (clk),
        .rst       (rst),
        .capture_en(capture_en),
        .d         (d[r*COLS+c]),
        .shift_en  (1'b0),
        .si        (1'b0),
        .ras_we    (write_en & row_en[r]),
        .ras_wd    (wdata[c]),
        .q         (q[r*COLS+c])
      );
    end
  end

  ras_sense_amp #(.COLS(COLS)) u_sense (
    .clk     (clk),
    .rst     (rst),
    .sense_en(read_en),
    .bitline (bitline),
    .dout    (rdata)
  );

endmodule
