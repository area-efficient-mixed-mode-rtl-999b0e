// tb_mixed_mode_scan_top: end-to-end test of the mixed mode scan design at
// its default sizes.
//
// A cycle-level reference model kept here (serial cells, RAS cells, sensed
// row, row counter and step) is advanced with the same pin values as the
// design, and after every clock edge finalout, finalout2 and func_out are
// compared with it. The test runs a normal scan test flow and then random
// mode sequences:
//   1. reset, then p-serial mode with IN=110 and SI0/SI1/SI2=1/0/1 for
//      N_SERIAL cycles: finalout becomes 1 while finalout2 stays 00
//   2. functional mode with random user data
//   3. p-serial load of a pattern and p-random load of every RAS row, with a
//      check that one full RAS pass takes 2*RAS_ROWS cycles
//   4. one functional capture cycle, then a mixed mode unload/load in which
//      both parts work at once
//   5. random mode sequences
// It counts each mechanism (capture, serial shift, RAS read, RAS write,
// concurrent shift and write in mixed mode, row wrap, mode switch) and fails
// if any never happened.
module tb_mixed_mode_scan_top;
  localparam int unsigned N_IN     = 3;
  localparam int unsigned N_SERIAL = 4;
  localparam int unsigned RAS_ROWS = 4;
  localparam int unsigned RAS_COLS = 2;
  localparam int unsigned N_FF     = N_SERIAL + RAS_ROWS * RAS_COLS;

  logic clk = 1'b0;
  logic rst, test_mode0, test_mode1, si0;
  logic [N_IN-1:0] in_data;
  logic [RAS_COLS-1:0] si_ras, finalout2;
  logic finalout, func_out;

  // Reference state: bits 0..N_SERIAL-1 serial chain, then RAS row-major.
  logic [N_FF-1:0] m_state;
  logic [RAS_COLS-1:0] m_sense;
  int m_row;
  logic m_wstep;

  int checks = 0, failures = 0;
  int n_capture = 0, n_shift = 0, n_read = 0, n_write = 0;
  int n_mixed_both = 0, n_wrap = 0, n_switch = 0;
  logic [1:0] prev_mode;

  mixed_mode_scan_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N_FF-1:0] next_func(logic [N_FF-1:0] s, logic [N_IN-1:0] in);
    logic [N_FF-1:0] n;
    for (int i = 0; i < N_FF; i++) n[i] = s[(i == 0) ? N_FF - 1 : i - 1] ^ in[i % N_IN];
    return n;
  endfunction

  // One clock edge on both the design and the model.
  task automatic step_cycle();
    logic [1:0] m;
    logic ras, rd, wr, sh;
    m   = {test_mode0, test_mode1};
    ras = (m == 2'b01 || m == 2'b10);
    rd  = ras && !m_wstep;
    wr  = ras && m_wstep;
    sh  = (m == 2'b11) || (m == 2'b01 && m_wstep);
    if (!rst && m != prev_mode) n_switch++;
    prev_mode = m;
    @(posedge clk); #1;
    if (rst) begin
      m_state = '0; m_sense = '0; m_row = 0; m_wstep = 1'b0;
    end else begin
      logic [N_FF-1:0] s;
      s = m_state;
      if (rd) begin
        for (int c = 0; c < RAS_COLS; c++) m_sense[c] = s[N_SERIAL + m_row*RAS_COLS + c];
        n_read++;
      end
      if (m == 2'b00) begin
        m_state = next_func(s, in_data);
        n_capture++;
      end else begin
        if (sh) begin
          for (int i = N_SERIAL - 1; i > 0; i--) m_state[i] = s[i-1];
          m_state[0] = si0;
          n_shift++;
        end
        if (wr) begin
          for (int c = 0; c < RAS_COLS; c++) m_state[N_SERIAL + m_row*RAS_COLS + c] = si_ras[c];
          n_write++;
        end
        if (sh && wr) n_mixed_both++;
      end
      if (!ras) begin
        m_row = 0; m_wstep = 1'b0;
      end else if (!m_wstep) begin
        m_wstep = 1'b1;
      end else begin
        m_wstep = 1'b0;
        if (m_row == RAS_ROWS - 1) begin m_row = 0; n_wrap++; end
        else m_row++;
      end
    end
    checks++;
    if (finalout !== m_state[N_SERIAL-1] || finalout2 !== m_sense || func_out !== ^m_state) begin
      failures++;
      $display("FAIL t=%0t mode=%b: finalout=%b/%b finalout2=%b/%b func_out=%b/%b",
               $time, m, finalout, m_state[N_SERIAL-1], finalout2, m_sense, func_out, ^m_state);
    end
  endtask

  task automatic set_mode(logic [1:0] m);
    {test_mode0, test_mode1} = m;
  endtask

  initial begin
    rst = 1'b1; set_mode(2'b00); in_data = '0; si0 = 1'b0; si_ras = '0;
    prev_mode = 2'b00;
    step_cycle();
    rst = 1'b0;

    // 1. p-serial with the user/scan data values IN=110, SI=101.
    set_mode(2'b11); in_data = 3'b110; si0 = 1'b1; si_ras = 2'b10;
    repeat (N_SERIAL) step_cycle();
    checks++;
    if (finalout !== 1'b1 || finalout2 !== 2'b00) begin
      failures++;
      $display("FAIL p-serial scenario: finalout=%b finalout2=%b", finalout, finalout2);
    end

    // 2. functional mode.
    set_mode(2'b00);
    repeat (20) begin in_data = N_IN'($urandom); step_cycle(); end

    // 3. p-serial load, then a full p-random pass.
    set_mode(2'b11);
    repeat (N_SERIAL) begin si0 = 1'($urandom); step_cycle(); end
    set_mode(2'b10);
    begin
      int cycles;
      cycles = 0;
      do begin
        si_ras = RAS_COLS'($urandom);
        step_cycle();
        cycles++;
      end while (!(m_row == 0 && !m_wstep));
      checks++;
      if (cycles != 2 * RAS_ROWS) begin
        failures++;
        $display("FAIL RAS pass took %0d cycles, expected %0d", cycles, 2 * RAS_ROWS);
      end
    end

    // 4. capture, then mixed unload/load of both parts at once.
    set_mode(2'b00); in_data = N_IN'($urandom); step_cycle();
    set_mode(2'b01);
    repeat (2 * RAS_ROWS) begin
      si0 = 1'($urandom); si_ras = RAS_COLS'($urandom); step_cycle();
    end

    // 5. random mode sequences.
    for (int blk = 0; blk < 400; blk++) begin
      int unsigned len;
      len = $urandom_range(1, 3 * RAS_ROWS);
      set_mode(2'($urandom));
      if (blk % 97 == 50) rst = 1'b1;
      for (int k = 0; k < len; k++) begin
        in_data = N_IN'($urandom); si0 = 1'($urandom); si_ras = RAS_COLS'($urandom);
        step_cycle();
        rst = 1'b0;
      end
    end

    $display("capture=%0d shift=%0d ras_read=%0d ras_write=%0d mixed_shift_and_write=%0d row_wrap=%0d mode_switch=%0d",
             n_capture, n_shift, n_read, n_write, n_mixed_both, n_wrap, n_switch);
    if (n_capture == 0) begin failures++; $display("FAIL no capture"); end
    if (n_shift == 0)   begin failures++; $display("FAIL no shift"); end
    if (n_read == 0)    begin failures++; $display("FAIL no RAS read"); end
    if (n_write == 0)   begin failures++; $display("FAIL no RAS write"); end
    if (n_mixed_both == 0) begin failures++; $display("FAIL no mixed shift+write"); end
    if (n_wrap == 0)    begin failures++; $display("FAIL no row wrap"); end
    if (n_switch == 0)  begin failures++; $display("FAIL no mode switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
