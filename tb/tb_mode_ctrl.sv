// tb_mode_ctrl: self-checking test of the mode decoder and row sequencer.
// Holds each mode for a random number of cycles, in random order, and checks
// every cycle the decoded mode, the enables, the row address and the step
// against a reference sequencer kept here. Checks that a full pass over all
// rows in p-random mode takes exactly 2*ROWS cycles.
module tb_mode_ctrl;
  import mms_pkg::*;
  localparam int unsigned ROWS = 3;
  localparam int unsigned AW   = $clog2(ROWS);
  logic clk = 1'b0;
  logic rst, test_mode0, test_mode1;
  test_mode_e mode;
  scan_ctrl_t ctrl, exp_ctrl;
  logic [AW-1:0] row_addr;
  ras_step_e step;
  int exp_row;
  logic exp_write_step;
  int checks = 0, failures = 0;
  int n_mode[4] = '{default: 0};

  mode_ctrl #(.ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    logic [1:0] m;
    logic ras;
    #1;
    m = {test_mode0, test_mode1};
    ras = (m == 2'b01 || m == 2'b10);
    exp_ctrl.capture   = (m == 2'b00);
    exp_ctrl.shift     = (m == 2'b11) || (m == 2'b01 && exp_write_step);
    exp_ctrl.ras_read  = ras && !exp_write_step;
    exp_ctrl.ras_write = ras && exp_write_step;
    checks++;
    if (mode !== test_mode_e'(m) || ctrl !== exp_ctrl ||
        int'(row_addr) != exp_row || step !== ras_step_e'(exp_write_step)) begin
      failures++;
      $display("FAIL mode=%b: ctrl=%b exp %b row=%0d exp %0d step=%b exp %b",
               m, ctrl, exp_ctrl, row_addr, exp_row, step, exp_write_step);
    end
  endtask

  task automatic advance();
    logic [1:0] m;
    m = {test_mode0, test_mode1};
    @(posedge clk); #1;
    if (rst || !(m == 2'b01 || m == 2'b10)) begin
      exp_row = 0; exp_write_step = 1'b0;
    end else if (!exp_write_step) begin
      exp_write_step = 1'b1;
    end else begin
      exp_write_step = 1'b0;
      exp_row = (exp_row == ROWS - 1) ? 0 : exp_row + 1;
    end
  endtask

  initial begin
    rst = 1'b1; test_mode0 = 1'b1; test_mode1 = 1'b0;
    exp_row = 0; exp_write_step = 1'b0;
    advance();
    rst = 1'b0;
    // Cycle count of one full p-random pass.
    begin
      int cycles;
      cycles = 0;
      do begin
        check_now();
        advance();
        cycles++;
      end while (!(exp_row == 0 && !exp_write_step));
      checks++;
      if (cycles != 2 * ROWS) begin
        failures++;
        $display("FAIL pass length %0d, expected %0d", cycles, 2 * ROWS);
      end
      if (row_addr != 0 || step != RAS_STEP_READ) failures++;
    end
    for (int blk = 0; blk < 200; blk++) begin
      int unsigned len;
      len = $urandom_range(1, 9);
      {test_mode0, test_mode1} = 2'($urandom);
      n_mode[{test_mode0, test_mode1}]++;
      for (int k = 0; k < len; k++) begin
        check_now();
        advance();
      end
    end
    for (int m = 0; m < 4; m++) if (n_mode[m] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
