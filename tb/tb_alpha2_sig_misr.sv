// tb_alpha2_sig_misr: self-checking test of the alpha^2-signature MISR.
//  * GF(2^8), t^8+t^5+t^3+t^2+1 (default): for random states and inputs the
//    next state must satisfy the eight flip-flop equations written out for
//    this field (f0 = f6 ^ in0, f1 = f7 ^ in1, f2 = f0 ^ f6 ^ in2, ...).
//  * GF(2^10), t^10+t^3+1: the worked example, contents (m0..m9) =
//    1001001111 with zero input, must become 1111110011.
//  * Both: random streams against the signature computed from its definition.
module tb_alpha2_sig_misr;
  import sig_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic clear8 = 0, en8 = 0, clear10 = 0, en10 = 0;
  logic [7:0] din8 = 0, sig8;
  logic [9:0] din10 = 0, sig10;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alpha2_sig_misr                                    u8  (.clk, .rst_n, .clear(clear8),  .en(en8),  .din(din8),  .sig(sig8));
  alpha2_sig_misr #(.N(10), .PHI(33'h409), .IN_W(10)) u10 (.clk, .rst_n, .clear(clear10), .en(en10), .din(din10), .sig(sig10));

  function automatic logic [7:0] eq8(logic [7:0] f, logic [7:0] in);
    logic [7:0] r;
    r[0] = f[6] ^ in[0];
    r[1] = f[7] ^ in[1];
    r[2] = f[0] ^ f[6] ^ in[2];
    r[3] = f[1] ^ f[6] ^ f[7] ^ in[3];
    r[4] = f[2] ^ f[7] ^ in[4];
    r[5] = f[3] ^ f[6] ^ in[5];
    r[6] = f[4] ^ f[7] ^ in[6];
    r[7] = f[5] ^ in[7];
    return r;
  endfunction

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    logic [31:0] w8[], w10[];
    logic [7:0] prev;
    int len;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(32'(sig8), 0, "reset");

    // flip-flop equations of GF(2^8)
    en8 = 1;
    din8 = 8'($urandom);
    @(posedge clk); #1;
    for (int i = 0; i < 300; i++) begin
      prev = sig8;
      din8 = 8'($urandom);
      @(posedge clk); #1;
      chk(32'(sig8), 32'(eq8(prev, din8)), "GF8 flip-flop equations");
    end
    en8 = 0;

    // worked example in GF(2^10): load 1001001111 (m0 first) = 10'h3C9
    // as a single word after clear, then one step with zero input.
    clear10 = 1; @(posedge clk); #1 clear10 = 0;
    en10 = 1; din10 = 10'h3C9;
    @(posedge clk); #1;
    chk(32'(sig10), 32'h3C9, "example load");
    din10 = 0;
    @(posedge clk); #1;
    // 1111110011 with m0 first = bits 0..5, 8, 9
    chk(32'(sig10), 32'h33F, "worked example");
    en10 = 0;

    // streams against the definition
    w8 = new[80]; w10 = new[80]; len = 0;
    clear8 = 1; clear10 = 1; @(posedge clk); #1 clear8 = 0; clear10 = 0;
    for (int i = 0; i < 80; i++) begin
      din8 = 8'($urandom); din10 = 10'($urandom);
      en8 = ($urandom % 4) != 0; en10 = en8;
      @(posedge clk);
      if (en8) begin w8[len] = 32'(din8); w10[len] = 32'(din10); len++; end
      #1;
      chk(32'(sig8),  ref_sig(w8,  len, 2, 33'h12D, 8),  "GF8 stream");
      chk(32'(sig10), ref_sig(w10, len, 2, 33'h409, 10), "GF10 stream");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
