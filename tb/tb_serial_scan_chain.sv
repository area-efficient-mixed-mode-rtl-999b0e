// tb_serial_scan_chain: self-checking test of the serial scan chain.
// Runs reset, functional capture of random D words, shifts of random bits
// and idle cycles in random order; a reference shift register kept here
// gives the expected cell states and scan output after each edge. Also checks
// the scan latency: a bit applied at si appears at so after exactly N shifts.
module tb_serial_scan_chain;
  localparam int unsigned N = 5;
  logic clk = 1'b0;
  logic rst, capture_en, shift_en, si, so;
  logic [N-1:0] d, q, exp_q;
  int checks = 0, failures = 0, n_capture = 0, n_shift = 0;

  serial_scan_chain #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== exp_q || so !== exp_q[N-1]) begin
      failures++;
      $display("FAIL %s: q=%b so=%b expected %b", what, q, so, exp_q);
    end
  endtask

  initial begin
    rst = 1'b1; capture_en = 1'b0; shift_en = 1'b0; si = 1'b0; d = '0;
    @(posedge clk); #1;
    exp_q = '0;
    check("reset");
    rst = 1'b0;
    // Latency: a single 1 marched through a cleared chain.
    for (int k = 1; k <= N; k++) begin
      shift_en = 1'b1; si = (k == 1);
      @(posedge clk); #1;
      exp_q = {exp_q[N-2:0], si};
      n_shift++;
      checks++;
      if (so !== (k == N)) begin
        failures++;
        $display("FAIL latency: so=%b after %0d shifts", so, k);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      int unsigned op;
      op = $urandom_range(0, 2);
      capture_en = (op == 0);
      shift_en   = (op == 1);
      si         = 1'($urandom);
      d          = N'($urandom);
      @(posedge clk); #1;
      if (op == 0)      begin exp_q = d; n_capture++; end
      else if (op == 1) begin exp_q = {exp_q[N-2:0], si}; n_shift++; end
      check("random");
    end
    if (n_capture == 0 || n_shift == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
