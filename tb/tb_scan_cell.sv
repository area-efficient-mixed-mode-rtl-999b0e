// tb_scan_cell: self-checking test of the common scan cell.
// Drives random combinations of capture, shift and RAS write (including
// overlaps, to check the priority) and compares Q after every clock edge with
// a reference value computed here from the same stimulus.
module tb_scan_cell;
  logic clk = 1'b0;
  logic rst, capture_en, d, shift_en, si, ras_we, ras_wd, q;
  logic exp_q;
  int checks = 0, failures = 0;
  int n_capture = 0, n_shift = 0, n_write = 0;

  scan_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, exp_q);
    end
  endtask

  initial begin
    {capture_en, d, shift_en, si, ras_we, ras_wd} = '0;
    rst = 1'b1;
    @(posedge clk); #1;
    exp_q = 1'b0;
    check("reset");
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      {capture_en, d, shift_en, si, ras_we, ras_wd} = 6'($urandom);
      if (i % 50 == 17) rst = 1'b1; else rst = 1'b0;
      @(posedge clk); #1;
      if (rst)             exp_q = 1'b0;
      else if (capture_en) begin exp_q = d;      n_capture++; end
      else if (shift_en)   begin exp_q = si;     n_shift++;   end
      else if (ras_we)     begin exp_q = ras_wd; n_write++;   end
      check("random");
    end
    if (n_capture == 0 || n_shift == 0 || n_write == 0) failures++;
    $display("capture=%0d shift=%0d ras_write=%0d", n_capture, n_shift, n_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
