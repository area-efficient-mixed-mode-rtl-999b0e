// ras_sense_amp: the column sense amplifiers of the random access scan (RAS)
// array.
//
// A RAS row is read through its column read lines, one line per column. When
// sense_en is high the amplifiers latch the value on every column line and
// hold it on dout until the next sensed read. This models the amplifiers as a
// column-wide register; the published design names the sense amplifier and
// says that the RAS cells are read row by row with it, but gives no circuit.
//
// Interface: clk, rst (synchronous, active high, clears dout), sense_en,
//   bitline[COLS-1:0] (column read lines), dout[COLS-1:0].
// Timing: dout shows the sensed row one clock edge after sense_en.
module ras_sense_amp #(
  parameter int unsigned COLS = 2
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            sense_en,
  input  logic [COLS-1:0] bitline,
  output logic [COLS-1:0] dout
);

  always_ff @(posedge clk) begin
    if (rst)           dout <= '0;
    else if (sense_en) dout <= bitline;
  end

endmodule
