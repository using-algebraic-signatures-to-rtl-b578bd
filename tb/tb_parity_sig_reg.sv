// tb_parity_sig_reg: self-checking test of the zero-component signature
// register. Streams random words (with random gaps in en), checks every
// cycle against a running XOR kept by the testbench, then checks that clear
// and reset zero the register and that en low holds it.
module tb_parity_sig_reg;
  localparam int W = 6;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [W-1:0] din = '0, sig, expect_q;
  int checks = 0, failures = 0;

  parity_sig_reg #(.IN_W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic [W-1:0] exp, string what);
    checks++;
    if (sig !== exp) begin
      failures++;
      $display("FAIL %s: sig=%h expected %h", what, sig, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_q = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check('0, "after reset");
    for (int i = 0; i < 500; i++) begin
      din = W'($urandom);
      en  = ($urandom % 4) != 0;
      @(posedge clk);
      if (en) expect_q = expect_q ^ din;
      #1 check(expect_q, "stream");
    end
    en = 0; din = '1;
    @(posedge clk); #1 check(expect_q, "hold with en low");
    clear = 1; en = 1;
    @(posedge clk); #1 check('0, "clear has priority");
    clear = 0; din = 6'h2A;
    @(posedge clk); #1 check(6'h2A, "first word after clear");
    rst_n = 0;
    @(posedge clk); #1 check('0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
