// tb_rom_escape_rates: Monte-Carlo estimate of how often a faulty 1024 x 8 ROM
// passes the self-test, for all sixteen analyzer variants (GF(2^8), GF(2^10),
// GF(2^11), GF(2^12) times single, double, double alternative, triple).
//
// Sixteen BIST wrappers share one ROM: their address counters run in lock
// step, so the ROM is driven by the first wrapper's addresses and its data is
// broadcast to all. For every number b = 2..10 of flipped bits, RUNS random
// error sets are drawn (b distinct bit positions anywhere in the ROM, several
// may fall in one word), each is applied for one complete BIST run and then
// undone. A variant "escapes" when it reports pass on a faulty ROM.
//
// Checks:
//  * guaranteed cases never escape: b flipped bits touch at most b words, so
//    a variant with k >= b components over a field with 2^n - 1 >= 1024 must
//    catch them all;
//  * the one-component GF(2^8) signature behaves like an 8-bit hash: over
//    all runs its escape rate must lie near 2^-8 (binomial bounds);
//  * the larger fields escape less than GF(2^8) in the single configuration.
// Escape counts per million are printed per variant and b.
module tb_rom_escape_rates;
  import algsig_pkg::*;
  import sig_ref_pkg::*;
  import rom_ref_pkg::*;

  localparam int RUNS = 2000;                 // error sets per b
  localparam int BMIN = 2, BMAX = 10;
  localparam int NV = 16, WORDS = 1024, AW = 10, DW = 8;
  localparam int          FN[4] = '{8, 10, 11, 12};
  localparam logic [32:0] FP[4] = '{33'h12D, 33'h409, 33'h805, 33'h1053};
  localparam ora_cfg_e    CF[4] = '{ORA_SINGLE, ORA_DOUBLE, ORA_DOUBLE_ALT, ORA_TRIPLE};
  localparam string       CN[4] = '{"single", "double", "double alt", "triple"};

  logic clk = 0, rst_n = 0, start = 0;
  logic done[NV], pass[NV];
  logic [31:0] gpar[NV], ga1[NV], ga2[NV];
  logic [AW-1:0] rom_addr;
  logic [DW-1:0] rom_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rom_model #(.AW(AW), .DW(DW)) rom (.clk, .addr(rom_addr), .data(rom_data));

  for (genvar v = 0; v < NV; v++) begin : g_v
    localparam int          NF = FN[v / 4];
    localparam logic [32:0] PH = FP[v / 4];
    logic [AW-1:0] cut_in;
    logic [DW-1:0] sys_out, sig_par;
    logic [NF-1:0] sig_a1, sig_a2;
    logic          fail, tm;
    bist_top #(.CFG(CF[v % 4]), .N(NF), .PHI(PH)) dut (
      .clk, .rst_n, .bist_start(start), .bist_done(done[v]), .bist_pass(pass[v]),
      .bist_fail(fail), .test_mode(tm),
      .golden_par(gpar[v][DW-1:0]), .golden_a1(ga1[v][NF-1:0]), .golden_a2(ga2[v][NF-1:0]),
      .sig_par, .sig_a1, .sig_a2, .sys_in('0), .sys_out, .cut_in, .cut_out(rom_data));
  end
  assign rom_addr = g_v[0].cut_in;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] words[];
    int esc[NV][BMAX+1];
    int total[NV];
    int n_guaranteed = 0, n_runs = 0;
    words = new[WORDS];
    for (int a = 0; a < WORDS; a++) words[a] = rom_word(a, DW);
    for (int v = 0; v < NV; v++) begin
      int n;
      n = FN[v / 4];
      gpar[v] = ora_has_parity(CF[v % 4]) ? ref_sig(words, WORDS, 0, FP[v / 4], n) : 0;
      ga1[v]  = ref_sig(words, WORDS, 1, FP[v / 4], n);
      ga2[v]  = ora_has_alpha2(CF[v % 4]) ? ref_sig(words, WORDS, 2, FP[v / 4], n) : 0;
      total[v] = 0;
      for (int b = 0; b <= BMAX; b++) esc[v][b] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int b = BMIN; b <= BMAX; b++) begin
      for (int r = 0; r < RUNS; r++) begin
        int pos[$];
        int cyc;
        pos.delete();
        while (pos.size() < b) begin
          int p;
          bit seen;
          p = $urandom % (WORDS * DW);
          seen = 0;
          foreach (pos[j]) if (pos[j] == p) seen = 1;
          if (!seen) pos.push_back(p);
        end
        foreach (pos[j]) rom.flip_bit(pos[j] / DW, pos[j] % DW);
        start = 1;
        cyc = 0;
        while (!done[0] && cyc < 5000) begin @(posedge clk); #1 cyc++; end
        n_runs++;
        for (int v = 0; v < NV; v++) begin
          if (!done[v]) begin failures++; $display("FAIL variant %0d not done", v); end
          if (pass[v]) begin esc[v][b]++; total[v]++; end
          if (ora_components(CF[v % 4]) >= b && (1 << FN[v / 4]) - 1 >= WORDS) begin
            n_guaranteed++;
            if (pass[v]) begin
              failures++;
              $display("FAIL variant %0d escaped %0d flipped bits", v, b);
            end
          end
        end
        checks++;
        start = 0;
        foreach (pos[j]) rom.flip_bit(pos[j] / DW, pos[j] % DW);
        @(posedge clk); #1;
      end
    end
    checks++;   // the guaranteed cases above, as one check
    chk(n_guaranteed > 0, "guaranteed cases exercised");

    $display("escapes per million runs (%0d error sets per b):", RUNS);
    $write("%-16s", "variant");
    for (int b = BMIN; b <= BMAX; b++) $write(" %8s", $sformatf("b=%0d", b));
    $write("\n");
    for (int v = 0; v < NV; v++) begin
      $write("%-16s", $sformatf("GF%0d %s", FN[v / 4], CN[v % 4]));
      for (int b = BMIN; b <= BMAX; b++) $write(" %8.1f", 1.0e6 * esc[v][b] / RUNS);
      $write("\n");
    end

    // GF(2^8) single: an 8-bit signature, escape probability about 2^-8.
    begin
      real expect_n, sd;
      expect_n = real'(n_runs) / 256.0;
      sd = $sqrt(expect_n);
      chk(real'(total[0]) > expect_n - 5.0 * sd && real'(total[0]) < expect_n + 5.0 * sd,
          $sformatf("GF8 single escapes %0d, expected about %0.1f", total[0], expect_n));
    end
    chk(total[4] < total[0] && total[8] < total[0] && total[12] < total[0],
        "larger fields escape less often than GF(2^8) (single)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
