// cut_logic: the functional logic whose flip-flops are scanned.
//
// The published architecture gives its block-level inputs (three user data
// bits IN1..IN3) but not the logic between its flip-flops, so this is a small
// example circuit of this design's own: the N_FF flip-flops form a ring, and
// each flip-flop's next value is the previous flip-flop's state XORed with one
// user input bit,
//   d[i] = q[(i-1) mod N_FF] ^ in_data[i mod N_IN],
// and the functional output is the parity of all states. It is purely
// combinational; the flip-flops themselves are the scan cells of the serial
// and RAS parts.
//
// Interface: in_data[N_IN-1:0], q[N_FF-1:0] (current states), d[N_FF-1:0]
//   (next states), func_out.
module cut_logic #(
  parameter int unsigned N_IN = 3,
  parameter int unsigned N_FF = 12
) (
  input  logic [N_IN-1:0] in_data,
  input  logic [N_FF-1:0] q,
  output logic [N_FF-1:0] d,
  output logic            func_out
);

  always_comb begin
    for (int i = 0; i < N_FF; i++)
      d[i] = q[(i + N_FF - 1) % N_FF] ^ in_data[i % N_IN];
  end

  assign func_out = ^q;

endmodule
