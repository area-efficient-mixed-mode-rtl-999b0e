// scan_ff_tg: behavioural, latch-level model of the transmission-gate scan
// flip-flop with a separate scan clock (testbench use only).
//
// The circuit has a master latch with two entries: the functional input D
// enters while the functional clock CP is low and the scan clock SCK is high;
// the scan input SI enters while SCK is low, through its own gates, so no
// multiplexer sits on the D path. The slave latch drives Q while CP is high.
// A second output latch, transparent while SCK is high, drives the scan output
// SO, so SO follows the master in functional mode and holds while SCK is low.
// Clocking:
//   functional mode - SCK held high, CP toggles: Q takes D at CP's rising edge
//   test (shift)    - CP held high, SCK pulses low: the SCK low phase writes SI
//                     into the master (and through the open slave onto Q); SO
//                     updates when SCK returns high. In a chain, SI of a cell
//                     is SO of the previous one, which holds during SCK low,
//                     so every SCK pulse shifts the chain by one cell.
// CP low together with SCK low is not a legal state of the circuit; the model
// then gives SI priority. The transistors, dynamic storage and electrical
// behaviour are not modelled.
module scan_ff_tg (
  input  logic d,
  input  logic si,
  input  logic cp,
  input  logic sck,
  output logic q,
  output logic so
);

  logic master;

  always_latch begin
    if (!sck)     master <= si;
    else if (!cp) master <= d;
  end

  always_latch begin
    if (cp) q <= master;
  end

  always_latch begin
    if (sck) so <= master;
  end

endmodule
