// serial_scan_chain: the serial (sequential) scan part of the mixed mode
// design, a chain of N common scan cells.
//
// Cell 0 takes the chain's scan input; cell i takes the scan output of cell
// i-1; the last cell drives the chain's scan output. In functional mode each
// cell loads its own functional input d[i]. The cells' RAS write port is not
// used in this part and is tied off.
//
// Interface: clk, rst (synchronous, active high), capture_en with d[N-1:0],
//   shift_en with si; q[N-1:0] are the cell states, so is q[N-1].
// Timing: one shift per clock edge with shift_en high; a bit entering at si
// reaches so after N shifts. The chain length is this design's choice; the
// published text does not give the number of flip-flops.
module serial_scan_chain #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         capture_en,
  input  logic [N-1:0] d,
  input  logic         shift_en,
  input  logic         si,
  output logic [N-1:0] q,
  output logic         so
);

  logic [N-1:0] chain_in;

  always_comb begin
    chain_in[0] = si;
    for (int i = 1; i < N; i++) chain_in[i] = q[i-1];
  end

  for (genvar i = 0; i < N; i++) begin : g_cell
    scan_cell u_cell (
      .clk       (clk),
      .rst       (rst),
      .capture_en(capture_en),
      .d         (d[i]),
      .shift_en  (shift_en),
      .si        (chain_in[i]),
      .ras_we    (1'b0),
      .ras_wd    (1'b0),
      .q         (q[i])
    );
  end

  assign so = q[N-1];

endmodule
