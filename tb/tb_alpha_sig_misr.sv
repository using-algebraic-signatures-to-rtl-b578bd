// tb_alpha_sig_misr: self-checking test of the alpha-signature MISR in three
// fields: GF(2^10) with t^10+t^3+1 and 6 inputs (the default), GF(2^4) with
// t^4+t+1 and 4 inputs (the four-bit MISR) and GF(2^8) with
// t^8+t^5+t^3+t^2+1 and 8 inputs. For each it
//  * streams random words and compares the register every cycle with the
//    signature computed from its definition (reference package);
//  * checks single steps of the wiring: a one in the last flip-flop with zero
//    input must land exactly on the taps of phi;
//  * checks the maximal cycle: starting from 1 with zero inputs, the register
//    returns to 1 after exactly 2^N - 1 clocks and not before.
module tb_alpha_sig_misr;
  import sig_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic        clear[3], en[3];
  logic [31:0] din[3];
  logic [31:0] sig[3];
  logic [9:0]  s0;
  logic [3:0]  s1;
  logic [7:0]  s2;

  alpha_sig_misr                                       u0 (.clk, .rst_n, .clear(clear[0]), .en(en[0]), .din(din[0][5:0]), .sig(s0));
  alpha_sig_misr #(.N(4), .PHI(33'h13),  .IN_W(4))     u1 (.clk, .rst_n, .clear(clear[1]), .en(en[1]), .din(din[1][3:0]), .sig(s1));
  alpha_sig_misr #(.N(8), .PHI(33'h12D), .IN_W(8))     u2 (.clk, .rst_n, .clear(clear[2]), .en(en[2]), .din(din[2][7:0]), .sig(s2));

  assign sig[0] = 32'(s0);
  assign sig[1] = 32'(s1);
  assign sig[2] = 32'(s2);

  localparam int          NN[3]  = '{10, 4, 8};
  localparam int          IW[3]  = '{6, 4, 8};
  localparam logic [32:0] PH[3]  = '{33'h409, 33'h13, 33'h12D};

  task automatic check(int u, logic [31:0] exp, string what);
    checks++;
    if (sig[u] !== exp) begin
      failures++;
      $display("FAIL unit %0d %s: sig=%h expected %h", u, what, sig[u], exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] words[];
    int len;
    for (int u = 0; u < 3; u++) begin clear[u] = 0; en[u] = 0; din[u] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int u = 0; u < 3; u++) check(u, 0, "after reset");

    // random streams against the definition
    for (int u = 0; u < 3; u++) begin
      words = new[60];
      len = 0;
      clear[u] = 1;
      @(posedge clk); #1 clear[u] = 0;
      for (int i = 0; i < 60; i++) begin
        din[u] = $urandom & ((32'd1 << IW[u]) - 1);
        en[u]  = ($urandom % 5) != 0;
        @(posedge clk);
        if (en[u]) begin words[len] = din[u]; len++; end
        #1 check(u, ref_sig(words, len, 1, PH[u], NN[u]), "stream");
      end
      en[u] = 0;
    end

    // feedback taps: one in the last flip-flop, zero input
    for (int u = 0; u < 3; u++) begin
      clear[u] = 1; @(posedge clk); #1 clear[u] = 0;
      din[u] = 1; en[u] = 1;
      @(posedge clk); #1 din[u] = 0;
      repeat (NN[u] - 1) @(posedge clk);
      #1 check(u, 32'd1 << (NN[u] - 1), "one reaches last flip-flop");
      @(posedge clk);
      #1 check(u, 32'(PH[u]) & ((32'd1 << NN[u]) - 1), "feedback onto taps of phi");
      en[u] = 0;
    end

    // maximal cycle length
    for (int u = 0; u < 3; u++) begin
      int first_return;
      clear[u] = 1; @(posedge clk); #1 clear[u] = 0;
      din[u] = 1; en[u] = 1;
      @(posedge clk); #1 din[u] = 0;
      first_return = 0;
      for (int c = 1; c <= (1 << NN[u]) - 1; c++) begin
        @(posedge clk); #1;
        if (sig[u] == 1 && first_return == 0) first_return = c;
      end
      checks++;
      if (first_return != (1 << NN[u]) - 1) begin
        failures++;
        $display("FAIL unit %0d: cycle length %0d, expected %0d", u, first_return, (1 << NN[u]) - 1);
      end
      en[u] = 0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
