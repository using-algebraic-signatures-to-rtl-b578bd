// tb_alg_sig_ora: self-checking test of the composite-signature analyzer.
//
// Five analyzers run side by side on the same stream of 8-bit words: the
// default (GF(2^11), alpha + alpha^2) and the four configurations over
// GF(2^8). For each trial a random good stream is fed, the signatures are
// compared with the reference values, and those values are used as the
// golden signature (match must be high). Then the same stream is fed with
// e erroneous words at random distinct positions, e = 1..k where k is the
// number of components; with at most 255 words the field is large enough,
// so every such stream must be detected (match low). Unused components must
// read zero, and a wrong golden value in any built component must clear
// match.
module tb_alg_sig_ora;
  import algsig_pkg::*;
  import sig_ref_pkg::*;

  localparam int NU = 5;
  localparam int LEN = 200;              // < 2^8 - 1 words

  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [7:0] din = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [31:0] sp[NU], s1[NU], s2[NU], gp[NU], g1[NU], g2[NU];
  logic        match[NU];

  localparam ora_cfg_e    CF[NU] = '{ORA_DOUBLE_ALT, ORA_SINGLE, ORA_DOUBLE, ORA_DOUBLE_ALT, ORA_TRIPLE};
  localparam int          NN[NU] = '{11, 8, 8, 8, 8};
  localparam logic [32:0] PH[NU] = '{33'h805, 33'h12D, 33'h12D, 33'h12D, 33'h12D};

  for (genvar u = 0; u < NU; u++) begin : g_u
    logic [7:0]       o_p;
    logic [NN[u]-1:0] o_1, o_2;
    if (u == 0) begin : g_def
      alg_sig_ora dut (.clk, .rst_n, .clear, .en, .din,
        .golden_par(gp[u][7:0]), .golden_a1(g1[u][NN[u]-1:0]), .golden_a2(g2[u][NN[u]-1:0]),
        .sig_par(o_p), .sig_a1(o_1), .sig_a2(o_2), .match(match[u]));
    end else begin : g_cfg
      alg_sig_ora #(.CFG(CF[u]), .N(NN[u]), .PHI(PH[u]), .IN_W(8)) dut (.clk, .rst_n, .clear, .en, .din,
        .golden_par(gp[u][7:0]), .golden_a1(g1[u][NN[u]-1:0]), .golden_a2(g2[u][NN[u]-1:0]),
        .sig_par(o_p), .sig_a1(o_1), .sig_a2(o_2), .match(match[u]));
    end
    assign sp[u] = 32'(o_p);
    assign s1[u] = 32'(o_1);
    assign s2[u] = 32'(o_2);
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic feed(const ref logic [31:0] w[]);
    clear = 1; @(posedge clk); #1 clear = 0;
    for (int i = 0; i < LEN; i++) begin
      din = w[i][7:0]; en = 1;
      @(posedge clk); #1;
      // idle cycles must not change anything
      if ((i % 7) == 3) begin en = 0; @(posedge clk); #1; end
    end
    en = 0;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] good[], bad[];
    int detected[NU];
    good = new[LEN]; bad = new[LEN];
    for (int u = 0; u < NU; u++) begin gp[u] = 0; g1[u] = 0; g2[u] = 0; detected[u] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    for (int trial = 0; trial < 12; trial++) begin
      for (int i = 0; i < LEN; i++) good[i] = 32'($urandom & 8'hFF);
      feed(good);
      for (int u = 0; u < NU; u++) begin
        logic [31:0] e1, e2, ep;
        ep = ora_has_parity(CF[u]) ? ref_sig(good, LEN, 0, PH[u], NN[u]) : 0;
        e1 = ref_sig(good, LEN, 1, PH[u], NN[u]);
        e2 = ora_has_alpha2(CF[u]) ? ref_sig(good, LEN, 2, PH[u], NN[u]) : 0;
        chk(sp[u] == ep, $sformatf("unit %0d parity sig %h vs %h", u, sp[u], ep));
        chk(s1[u] == e1, $sformatf("unit %0d alpha sig %h vs %h", u, s1[u], e1));
        chk(s2[u] == e2, $sformatf("unit %0d alpha2 sig %h vs %h", u, s2[u], e2));
        gp[u] = ep; g1[u] = e1; g2[u] = e2;
      end
      #1;
      for (int u = 0; u < NU; u++) chk(match[u] == 1, $sformatf("unit %0d good stream matches", u));
      // every built component takes part in the comparison
      for (int u = 0; u < NU; u++) begin
        logic [31:0] flip;
        flip = 32'd1 << ($urandom % 8);
        g1[u] ^= flip; #1;
        chk(match[u] == 0, $sformatf("unit %0d: wrong golden alpha not flagged", u));
        g1[u] ^= flip;
        if (ora_has_parity(CF[u])) begin
          gp[u] ^= flip; #1;
          chk(match[u] == 0, $sformatf("unit %0d: wrong golden parity not flagged", u));
          gp[u] ^= flip;
        end
        if (ora_has_alpha2(CF[u])) begin
          g2[u] ^= flip; #1;
          chk(match[u] == 0, $sformatf("unit %0d: wrong golden alpha^2 not flagged", u));
          g2[u] ^= flip;
        end
        #1 chk(match[u] == 1, $sformatf("unit %0d: golden restored", u));
      end

      // up to k erroneous words must always be detected
      for (int e = 1; e <= 3; e++) begin
        int pos[$];
        pos.delete();
        bad = new[LEN](good);
        while (pos.size() < e) begin
          int p;
          bit seen;
          p = $urandom % LEN;
          seen = 0;
          foreach (pos[j]) if (pos[j] == p) seen = 1;
          if (!seen) pos.push_back(p);
        end
        foreach (pos[j]) bad[pos[j]] = bad[pos[j]] ^ 32'(1 + ($urandom % 255));
        feed(bad);
        #1;
        for (int u = 0; u < NU; u++) begin
          if (e <= ora_components(CF[u]))
            chk(match[u] == 0, $sformatf("unit %0d: %0d erroneous words not detected", u, e));
          if (!match[u]) detected[u]++;
        end
      end
    end

    // aliasing beyond the guarantee: the same error in two words 255 apart
    // escapes parity + alpha over GF(2^8) (alpha^255 = 1), but not GF(2^11).
    begin
      logic [31:0] good2[], bad2[];
      int L2 = 260;
      good2 = new[L2];
      for (int i = 0; i < L2; i++) good2[i] = 32'($urandom & 8'hFF);
      clear = 1; @(posedge clk); #1 clear = 0;
      for (int i = 0; i < L2; i++) begin din = good2[i][7:0]; en = 1; @(posedge clk); #1; end
      en = 0;
      for (int u = 0; u < NU; u++) begin gp[u] = sp[u]; g1[u] = s1[u]; g2[u] = s2[u]; end
      bad2 = new[L2](good2);
      bad2[2] ^= 32'h10; bad2[257] ^= 32'h10;
      clear = 1; @(posedge clk); #1 clear = 0;
      for (int i = 0; i < L2; i++) begin din = bad2[i][7:0]; en = 1; @(posedge clk); #1; end
      en = 0; #1;
      chk(match[2] == 1, "GF8 double: error pair 255 words apart aliases");
      chk(match[0] == 0, "GF11 double alt: error pair 255 words apart detected");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
