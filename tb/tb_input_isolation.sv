// tb_input_isolation: self-checking test of the isolation multiplexer with
// random system inputs, test patterns and mode.
module tb_input_isolation;
  logic test_mode;
  logic [9:0] sys_in, test_pattern, cut_in;
  int checks = 0, failures = 0;

  input_isolation dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      test_mode = i[0] ^ ($urandom % 2 == 0);
      sys_in = 10'($urandom);
      test_pattern = 10'($urandom);
      #1;
      checks++;
      if (cut_in !== (test_mode ? test_pattern : sys_in)) begin
        failures++;
        $display("FAIL mode=%b sys=%h pat=%h cut=%h", test_mode, sys_in, test_pattern, cut_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
