// tb_bist_top: end-to-end test of the BIST wrapper at its default sizes: a
// 1024 x 8 ROM (registered output) as circuit under test, read through a
// 10-bit address counter and compacted into alpha and alpha^2 signatures
// over GF(2^11).
//
// 1. Normal operation: system inputs must reach the ROM, ROM data must reach
//    the system outputs.
// 2. Golden run: the golden signatures are computed by the reference model
//    from the ROM contents, programmed, and a self-test on the intact ROM
//    must pass, with signatures equal to the reference and bist_done exactly
//    1024 + 1 + 2 cycles after bist_start. While it runs the ROM must see the
//    test patterns, not the system inputs.
// 3. Faulty ROMs: one flipped bit, and two flipped bits in two different
//    words (several random cases); both are within the two-error guarantee of
//    a two-component signature over a field with 2047 >= 1024 non-zero
//    elements, so every one must fail.
// Each mechanism (system mode, isolation during test, pass, fail, capture
// after the last pattern) is counted and must occur.
module tb_bist_top;
  import sig_ref_pkg::*;
  import rom_ref_pkg::*;

  localparam int AW = 10, DW = 8, N = 11, WORDS = 1024;
  localparam logic [32:0] PHI = 33'h805;

  logic clk = 0, rst_n = 0, bist_start = 0;
  logic bist_done, bist_pass, bist_fail, test_mode;
  logic [DW-1:0] golden_par = 0, sig_par, sys_out, cut_out;
  logic [N-1:0]  golden_a1 = 0, golden_a2 = 0, sig_a1, sig_a2;
  logic [AW-1:0] sys_in = 0, cut_in;
  int checks = 0, failures = 0;
  int n_sysmode = 0, n_isolated = 0, n_pass = 0, n_fail = 0, n_tail = 0;

  always #5 clk = ~clk;

  bist_top dut (.*);
  rom_model #(.AW(AW), .DW(DW)) rom (.clk, .addr(cut_in), .data(cut_out));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One self-test; returns the verdict and checks its timing.
  task automatic run_bist(output bit passed);
    int cyc = 0;
    bit tail_seen = 0;
    bist_start = 1;
    while (!bist_done && cyc < 5000) begin
      sys_in = AW'($urandom);
      #2;
      if (test_mode && cut_in != sys_in) n_isolated++;
      if (dut.u_ctrl.ora_en && !dut.u_ctrl.tpg_en) tail_seen = 1;
      @(posedge clk); #1;
      cyc++;
    end
    if (tail_seen) n_tail++;
    chk(cyc == WORDS + 1 + 2, $sformatf("bist_start to bist_done took %0d cycles", cyc));
    chk(bist_pass ^ bist_fail, "exactly one of pass and fail");
    passed = bist_pass;
    if (bist_pass) n_pass++;
    if (bist_fail) n_fail++;
    bist_start = 0;
    @(posedge clk); #1;
    chk(!bist_done && !test_mode, "back to normal operation");
  endtask

  initial begin
    logic [31:0] words[];
    bit passed;
    words = new[WORDS];
    for (int a = 0; a < WORDS; a++) words[a] = rom_word(a, DW);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. normal operation
    for (int i = 0; i < 20; i++) begin
      sys_in = AW'($urandom);
      @(posedge clk); #2;
      chk(!test_mode && cut_in == sys_in, "system input reaches the CUT");
      chk(sys_out == DW'(rom_word(int'(sys_in), DW)) || i == 0, "CUT output reaches the system");
      if (!test_mode && cut_in == sys_in) n_sysmode++;
    end

    // 2. golden run
    golden_a1 = N'(ref_sig(words, WORDS, 1, PHI, N));
    golden_a2 = N'(ref_sig(words, WORDS, 2, PHI, N));
    golden_par = DW'(ref_sig(words, WORDS, 0, PHI, N));  // not used by this configuration
    run_bist(passed);
    chk(passed, "intact ROM passes");
    chk(sig_a1 == golden_a1 && sig_a2 == golden_a2,
        $sformatf("signatures %h %h, reference %h %h", sig_a1, sig_a2, golden_a1, golden_a2));
    chk(sig_par == 0, "parity component not built");

    // 3. faulty ROMs
    for (int t = 0; t < 4; t++) begin
      int a0, a1, b0, b1;
      a0 = $urandom % WORDS; b0 = $urandom % DW;
      rom.flip_bit(a0, b0);
      run_bist(passed);
      chk(!passed, $sformatf("single flip at word %0d bit %0d detected", a0, b0));
      a1 = (a0 + 1 + ($urandom % (WORDS - 1))) % WORDS; b1 = $urandom % DW;
      rom.flip_bit(a1, b1);
      run_bist(passed);
      chk(!passed, $sformatf("flips at words %0d and %0d detected", a0, a1));
      rom.repair();
    end
    // same bit in the first and the last word
    rom.flip_bit(0, 3); rom.flip_bit(WORDS - 1, 3);
    run_bist(passed);
    chk(!passed, "same flip in words 0 and 1023 detected");
    rom.repair();
    run_bist(passed);
    chk(passed, "repaired ROM passes again");

    chk(n_sysmode > 0, "system mode exercised");
    chk(n_isolated > 0, "isolation during test exercised");
    chk(n_pass == 2, $sformatf("%0d passing runs", n_pass));
    chk(n_fail == 9, $sformatf("%0d failing runs", n_fail));
    chk(n_tail == 11, "capture after the last pattern in every run");
    $display("mechanisms: system-mode=%0d isolated=%0d pass=%0d fail=%0d latency-tail=%0d",
             n_sysmode, n_isolated, n_pass, n_fail, n_tail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
