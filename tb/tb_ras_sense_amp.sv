// tb_ras_sense_amp: self-checking test of the RAS column sense amplifiers.
// Random column values with random sense enables; dout must show the value
// present at the last sensed edge and hold otherwise.
module tb_ras_sense_amp;
  localparam int unsigned COLS = 3;
  logic clk = 1'b0;
  logic rst, sense_en;
  logic [COLS-1:0] bitline, dout, exp_dout;
  int checks = 0, failures = 0, n_sense = 0, n_hold = 0;

  ras_sense_amp #(.COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; sense_en = 1'b0; bitline = '1;
    @(posedge clk); #1;
    exp_dout = '0;
    checks++; if (dout !== exp_dout) failures++;
    rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      sense_en = 1'($urandom);
      bitline  = COLS'($urandom);
      @(posedge clk); #1;
      if (sense_en) begin exp_dout = bitline; n_sense++; end else n_hold++;
      checks++;
      if (dout !== exp_dout) begin
        failures++;
        $display("FAIL cycle %0d: dout=%b expected %b", i, dout, exp_dout);
      end
    end
    if (n_sense == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
