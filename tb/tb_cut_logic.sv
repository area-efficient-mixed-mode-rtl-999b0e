// tb_cut_logic: self-checking test of the example functional logic.
// For random inputs and states, the next-state vector and the parity output
// are recomputed here bit by bit and compared.
module tb_cut_logic;
  localparam int unsigned N_IN = 3;
  localparam int unsigned N_FF = 7;
  logic [N_IN-1:0] in_data;
  logic [N_FF-1:0] q, d, exp_d;
  logic func_out, exp_out;
  int checks = 0, failures = 0;

  cut_logic #(.N_IN(N_IN), .N_FF(N_FF)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      in_data = N_IN'($urandom);
      q       = N_FF'($urandom);
      #1;
      exp_out = 1'b0;
      for (int b = 0; b < N_FF; b++) begin
        exp_out ^= q[b];
        exp_d[b] = ((b == 0) ? q[N_FF-1] : q[b-1]) ^ in_data[b % N_IN];
      end
      checks++;
      if (d !== exp_d || func_out !== exp_out) begin
        failures++;
        $display("FAIL in=%b q=%b: d=%b/%b out=%b/%b", in_data, q, d, exp_d, func_out, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
