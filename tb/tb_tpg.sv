// tb_tpg: self-checking test of the test pattern generator. Checks the
// default 10-bit counter (seed, increment, wrap after 1024 patterns, hold
// with en low, re-init), and a 10-bit LFSR with t^10+t^3+1 and seed 1:
// every step against the reference product pattern * t mod phi, and that
// it visits all 1023 non-zero patterns before repeating.
module tb_tpg;
  import algsig_pkg::*;
  import sig_ref_pkg::*;

  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [9:0] pc, pl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tpg u_cnt (.clk, .rst_n, .init, .en, .pattern(pc));
  tpg #(.KIND(TPG_LFSR), .W(10), .POLY(33'h409), .SEED(32'd1)) u_lfsr (.clk, .rst_n, .init, .en, .pattern(pl));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen[1024];
    logic [9:0] prev;
    int distinct = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(pc == 0 && pl == 1, "seed after reset");
    en = 1;
    for (int i = 1; i <= 1024; i++) begin
      prev = pl;
      @(posedge clk); #1;
      chk(pc == 10'(i), $sformatf("counter step %0d: %0d", i, pc));
      chk(32'(pl) == ref_mul(32'(prev), 32'd2, 33'h409, 10), "lfsr step");
      if (i <= 1023 && !seen[pl]) begin seen[pl] = 1; distinct++; end
    end
    chk(distinct == 1023, $sformatf("lfsr visits %0d distinct patterns", distinct));
    chk(pc == 0, "counter wrapped after 1024");
    en = 0; prev = pc;
    repeat (3) @(posedge clk); #1;
    chk(pc == prev, "hold with en low");
    init = 1; en = 1; @(posedge clk); #1 init = 0;
    chk(pc == 0 && pl == 1, "init reloads the seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
