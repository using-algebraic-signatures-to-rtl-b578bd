// tb_rom_workloads: the ROM test case in all sixteen analyzer variants.
//
// Sixteen BIST wrappers, each with its own 1024 x 8 ROM, run side by side:
// fields GF(2^8), GF(2^10), GF(2^11), GF(2^12) (t^8+t^5+t^3+t^2+1,
// t^10+t^3+1, t^11+t^2+1, t^12+t^6+t^4+t+1) times the four analyzer
// configurations (single, double, double alternative, triple). Golden
// signatures come from the reference model. Scenarios, each one full BIST
// run of all sixteen:
//   intact ROM                          every variant passes;
//   one flipped bit                     every variant fails;
//   two / three flipped bits, random    variants with k >= errors and
//                                       2^n - 1 >= 1024 must fail; the
//                                       others are only counted;
//   same bit flipped in words 0 and 255 aliases in the GF(2^8) double
//                                       variants (alpha^255 = 1, parity
//                                       cancels), caught by GF(2^10..12);
//   same bit flipped in words 0 and 1023 aliases in the GF(2^10) double
//                                       variants (alpha^1023 = 1), caught by
//                                       GF(2^11) and GF(2^12).
// Escapes per variant are printed for the random scenarios.
module tb_rom_workloads;
  import algsig_pkg::*;
  import sig_ref_pkg::*;
  import rom_ref_pkg::*;

  localparam int NV = 16, WORDS = 1024, AW = 10, DW = 8;
  localparam int          FN[4]  = '{8, 10, 11, 12};
  localparam logic [32:0] FP[4]  = '{33'h12D, 33'h409, 33'h805, 33'h1053};
  localparam ora_cfg_e    CF[4]  = '{ORA_SINGLE, ORA_DOUBLE, ORA_DOUBLE_ALT, ORA_TRIPLE};
  localparam string       CN[4]  = '{"single", "double", "double alt", "triple"};

  logic clk = 0, rst_n = 0, start = 0;
  logic done[NV], pass[NV];
  bit   verdict[NV];
  logic [31:0] gpar[NV], ga1[NV], ga2[NV];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar v = 0; v < NV; v++) begin : g_v
    localparam int          NF = FN[v / 4];
    localparam logic [32:0] PH = FP[v / 4];
    logic [AW-1:0] cut_in;
    logic [DW-1:0] cut_out, sys_out, sig_par;
    logic [NF-1:0] sig_a1, sig_a2;
    logic          fail, tm;
    bist_top #(.CFG(CF[v % 4]), .N(NF), .PHI(PH)) dut (
      .clk, .rst_n, .bist_start(start), .bist_done(done[v]), .bist_pass(pass[v]),
      .bist_fail(fail), .test_mode(tm),
      .golden_par(gpar[v][DW-1:0]), .golden_a1(ga1[v][NF-1:0]), .golden_a2(ga2[v][NF-1:0]),
      .sig_par, .sig_a1, .sig_a2, .sys_in('0), .sys_out, .cut_in, .cut_out);
    rom_model #(.AW(AW), .DW(DW)) rom (.clk, .addr(cut_in), .data(cut_out));
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Flip the same bits in all sixteen ROMs.
  task automatic flip_all(int a, int b);
    g_v[0].rom.flip_bit(a, b);  g_v[1].rom.flip_bit(a, b);
    g_v[2].rom.flip_bit(a, b);  g_v[3].rom.flip_bit(a, b);
    g_v[4].rom.flip_bit(a, b);  g_v[5].rom.flip_bit(a, b);
    g_v[6].rom.flip_bit(a, b);  g_v[7].rom.flip_bit(a, b);
    g_v[8].rom.flip_bit(a, b);  g_v[9].rom.flip_bit(a, b);
    g_v[10].rom.flip_bit(a, b); g_v[11].rom.flip_bit(a, b);
    g_v[12].rom.flip_bit(a, b); g_v[13].rom.flip_bit(a, b);
    g_v[14].rom.flip_bit(a, b); g_v[15].rom.flip_bit(a, b);
  endtask

  task automatic run_all();
    int cyc = 0;
    start = 1;
    while (!done[0] && cyc < 5000) begin @(posedge clk); #1 cyc++; end
    chk(cyc == WORDS + 3, $sformatf("run took %0d cycles", cyc));
    for (int v = 0; v < NV; v++) begin
      chk(done[v], "all variants done together");
      verdict[v] = pass[v];
    end
    start = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] words[];
    int escapes[NV];
    int n_alias255 = 0, n_alias1023 = 0;
    words = new[WORDS];
    for (int a = 0; a < WORDS; a++) words[a] = rom_word(a, DW);
    for (int v = 0; v < NV; v++) begin
      int n;
      n = FN[v / 4];
      gpar[v] = ora_has_parity(CF[v % 4]) ? ref_sig(words, WORDS, 0, FP[v / 4], n) : 0;
      ga1[v]  = ref_sig(words, WORDS, 1, FP[v / 4], n);
      ga2[v]  = ora_has_alpha2(CF[v % 4]) ? ref_sig(words, WORDS, 2, FP[v / 4], n) : 0;
      escapes[v] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    run_all();
    for (int v = 0; v < NV; v++) chk(verdict[v], $sformatf("variant %0d passes on the intact ROM", v));

    for (int t = 0; t < 3; t++) begin
      int a, b;
      a = $urandom % WORDS;
      b = $urandom % DW;
      flip_all(a, b);
      run_all();
      for (int v = 0; v < NV; v++) chk(!verdict[v], $sformatf("variant %0d: one flip detected", v));
      flip_all(a, b);
    end

    for (int e = 2; e <= 3; e++) begin
      for (int t = 0; t < 6; t++) begin
        int fa[3], fb[3];
        for (int i = 0; i < e; i++) begin
          fa[i] = $urandom % WORDS; fb[i] = $urandom % DW;
          if (i > 0 && fa[i] == fa[i-1] && fb[i] == fb[i-1]) fb[i] = (fb[i] + 1) % DW;
          flip_all(fa[i], fb[i]);
        end
        run_all();
        for (int v = 0; v < NV; v++) begin
          bit guaranteed;
          guaranteed = (ora_components(CF[v % 4]) >= e) && ((1 << FN[v / 4]) - 1 >= WORDS);
          if (verdict[v]) escapes[v]++;
          if (guaranteed) chk(!verdict[v], $sformatf("variant %0d: %0d flips detected", v, e));
        end
        for (int i = e - 1; i >= 0; i--) flip_all(fa[i], fb[i]);
      end
    end

    // error pairs at the period of alpha
    flip_all(0, 5); flip_all(255, 5);
    run_all();
    for (int v = 0; v < NV; v++) begin
      if (v == 1) begin chk(verdict[v], "GF8 double: pair 255 apart aliases"); if (verdict[v]) n_alias255++; end
      if (v >= 4) chk(!verdict[v], $sformatf("variant %0d: pair 255 apart detected", v));
    end
    flip_all(0, 5); flip_all(255, 5);
    flip_all(0, 2); flip_all(1023, 2);
    run_all();
    for (int v = 0; v < NV; v++) begin
      if (v == 5) begin chk(verdict[v], "GF10 double: pair 1023 apart aliases"); if (verdict[v]) n_alias1023++; end
      if (v >= 8) chk(!verdict[v], $sformatf("variant %0d: pair 1023 apart detected", v));
    end
    flip_all(0, 2); flip_all(1023, 2);
    run_all();
    for (int v = 0; v < NV; v++) chk(verdict[v], $sformatf("variant %0d passes after repair", v));

    for (int v = 0; v < NV; v++)
      $display("GF%0d %-10s escapes in 12 random 2/3-flip runs: %0d", FN[v / 4], CN[v % 4], escapes[v]);
    chk(n_alias255 == 1 && n_alias1023 == 1, "both aliasing mechanisms observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
