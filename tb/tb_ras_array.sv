// tb_ras_array: self-checking test of the random access scan array.
// Random reads, writes, read+write and functional captures at random rows.
// A reference array kept here gives the expected cell states and the sensed
// row; rdata must show the addressed row one edge after a read, as it was
// before any write in the same cycle.
module tb_ras_array;
  localparam int unsigned ROWS = 5;
  localparam int unsigned COLS = 3;
  localparam int unsigned AW   = $clog2(ROWS);
  logic clk = 1'b0;
  logic rst, capture_en, read_en, write_en;
  logic [ROWS*COLS-1:0] d, q, exp_q;
  logic [AW-1:0] row_addr;
  logic [COLS-1:0] wdata, rdata, exp_rdata;
  int checks = 0, failures = 0;
  int n_read = 0, n_write = 0, n_capture = 0;

  ras_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

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
    if (q !== exp_q || rdata !== exp_rdata) begin
      failures++;
      $display("FAIL %s: q=%b exp %b rdata=%b exp %b", what, q, exp_q, rdata, exp_rdata);
    end
  endtask

  initial begin
    rst = 1'b1; {capture_en, read_en, write_en} = '0;
    d = '0; row_addr = '0; wdata = '0;
    @(posedge clk); #1;
    exp_q = '0; exp_rdata = '0;
    check("reset");
    rst = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      int unsigned op;
      op = $urandom_range(0, 7);
      capture_en = (op == 0);
      read_en    = (op == 1 || op == 2 || op == 3);
      write_en   = (op == 3 || op == 4 || op == 5);
      row_addr   = AW'($urandom_range(0, ROWS - 1));
      wdata      = COLS'($urandom);
      d          = (ROWS*COLS)'($urandom);
      @(posedge clk); #1;
      if (read_en) begin
        for (int c = 0; c < COLS; c++) exp_rdata[c] = exp_q[row_addr*COLS+c];
        n_read++;
      end
      if (capture_en) begin
        exp_q = d; n_capture++;
      end else if (write_en) begin
        for (int c = 0; c < COLS; c++) exp_q[row_addr*COLS+c] = wdata[c];
        n_write++;
      end
      check("random");
    end
    if (n_read == 0 || n_write == 0 || n_capture == 0) failures++;
    $display("read=%0d write=%0d capture=%0d", n_read, n_write, n_capture);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
