// tb_scan_ff_tg_equiv: checks that the single-clock serial scan chain does
// what a chain of the latch-level transmission-gate scan cells does.
//
// Two chains of N cells see the same random sequence of operations:
//   capture - the RTL chain gets one clk edge with capture_en; the latch chain
//             gets one CP low/high pulse with SCK high
//   shift   - the RTL chain gets one clk edge with shift_en; the latch chain
//             gets one SCK low/high pulse with CP high
//   hold    - the RTL chain gets an edge with no enable; the latch clocks idle
// After every operation the cell states (Q) and the scan outputs must agree,
// and both must match a reference register kept here.
module tb_scan_ff_tg_equiv;
  localparam int unsigned N = 3;

  logic clk = 1'b0;
  logic rst, capture_en, shift_en, si, so;
  logic [N-1:0] d, q, exp_q;

  logic cp, sck;
  logic [N-1:0] tg_q, tg_so, tg_si;

  int checks = 0, failures = 0, n_capture = 0, n_shift = 0, n_hold = 0;

  serial_scan_chain #(.N(N)) u_rtl (.*);

  always_comb begin
    tg_si[0] = si;
    for (int i = 1; i < N; i++) tg_si[i] = tg_so[i-1];
  end

  for (genvar i = 0; i < N; i++) begin : g_tg
    scan_ff_tg u_cell (.d(d[i]), .si(tg_si[i]), .cp(cp), .sck(sck), .q(tg_q[i]), .so(tg_so[i]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_clk();
    #5 clk = 1'b1;
    #5 clk = 1'b0;
  endtask

  task automatic compare(string what);
    checks++;
    if (q !== exp_q || tg_q !== exp_q || so !== exp_q[N-1] || tg_so[N-1] !== exp_q[N-1]) begin
      failures++;
      $display("FAIL %s: rtl q=%b so=%b, latch q=%b so=%b, expected %b",
               what, q, so, tg_q, tg_so[N-1], exp_q);
    end
  endtask

  initial begin
    cp = 1'b1; sck = 1'b1;
    capture_en = 1'b0; shift_en = 1'b0; si = 1'b0; d = '0;
    // Clear the RTL chain with reset and the latch chain with a capture of 0.
    rst = 1'b1; pulse_clk(); rst = 1'b0;
    #5 cp = 1'b0; #5 cp = 1'b1; #5;
    exp_q = '0;
    compare("init");
    for (int i = 0; i < 600; i++) begin
      int unsigned op;
      op = $urandom_range(0, 4);
      d  = N'($urandom);
      si = 1'($urandom);
      if (op <= 1) begin
        capture_en = 1'b1;
        pulse_clk();
        capture_en = 1'b0;
        #5 cp = 1'b0; #5 cp = 1'b1; #5;
        exp_q = d;
        n_capture++;
        compare("capture");
      end else if (op <= 3) begin
        shift_en = 1'b1;
        pulse_clk();
        shift_en = 1'b0;
        #5 sck = 1'b0; #5 sck = 1'b1; #5;
        exp_q = {exp_q[N-2:0], si};
        n_shift++;
        compare("shift");
      end else begin
        pulse_clk();
        #15;
        n_hold++;
        compare("hold");
      end
    end
    if (n_capture == 0 || n_shift == 0 || n_hold == 0) failures++;
    $display("capture=%0d shift=%0d hold=%0d", n_capture, n_shift, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
