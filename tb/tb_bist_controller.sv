// tb_bist_controller: self-checking test of the BIST test controller for
// CUT latencies 0, 1 and 3 (20 patterns each). For every run it checks the
// sequence INIT (one cycle of tpg_init and ora_clear), exactly N_PATTERNS
// cycles of tpg_en, exactly N_PATTERNS ora_en cycles each CUT_LATENCY cycles
// after its tpg_en cycle, the start-to-done time of N_PATTERNS + latency + 2
// cycles, the pass/fail verdict following ora_match, test_mode and the
// return to idle when bist_start drops.
module tb_bist_controller;
  localparam int NP = 20;
  localparam int NL = 3;
  localparam int LAT[NL] = '{0, 1, 3};

  logic clk = 0, rst_n = 0;
  logic start[NL], match[NL];
  logic tm[NL], ti[NL], te[NL], oc[NL], oe[NL], dn[NL], ps[NL], fl[NL];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar u = 0; u < NL; u++) begin : g_u
    bist_controller #(.N_PATTERNS(NP), .CUT_LATENCY(LAT[u])) dut (
      .clk, .rst_n, .bist_start(start[u]), .ora_match(match[u]),
      .test_mode(tm[u]), .tpg_init(ti[u]), .tpg_en(te[u]), .ora_clear(oc[u]),
      .ora_en(oe[u]), .bist_done(dn[u]), .pass(ps[u]), .fail(fl[u]));
  end

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
    for (int u = 0; u < NL; u++) begin start[u] = 0; match[u] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int u = 0; u < NL; u++) begin
      for (int run = 0; run < 2; run++) begin
        int cyc, n_init, n_en, n_cap, first_en, last_en, first_cap, last_cap;
        bit lag_ok;
        int en_at[$];
        chk(!tm[u] && !dn[u], "idle before start");
        match[u] = run[0];
        start[u] = 1;
        cyc = 0; n_init = 0; n_en = 0; n_cap = 0; lag_ok = 1;
        while (!dn[u] && cyc < 200) begin
          #4;  // sample mid-cycle
          if (ti[u] && oc[u]) n_init++;
          if (te[u]) begin n_en++; en_at.push_back(cyc); end
          if (oe[u]) begin
            n_cap++;
            if (en_at.size() == 0 || en_at[0] + LAT[u] != cyc) lag_ok = 0;
            if (en_at.size() != 0) void'(en_at.pop_front());
          end
          if (!tm[u] && cyc > 0) lag_ok = 0;
          @(posedge clk); #1;
          cyc++;
        end
        chk(n_init == 1, $sformatf("lat %0d: %0d init cycles", LAT[u], n_init));
        chk(n_en == NP, $sformatf("lat %0d: %0d patterns", LAT[u], n_en));
        chk(n_cap == NP, $sformatf("lat %0d: %0d captures", LAT[u], n_cap));
        chk(lag_ok, $sformatf("lat %0d: capture lag / test_mode", LAT[u]));
        chk(cyc == NP + LAT[u] + 2, $sformatf("lat %0d: start to done %0d cycles", LAT[u], cyc));
        chk(dn[u] && tm[u] && ps[u] == run[0] && fl[u] == !run[0], "verdict");
        repeat (3) @(posedge clk);
        #1 chk(dn[u] && !oe[u] && !te[u], "done holds while start is high");
        start[u] = 0;
        @(posedge clk); #1;
        chk(!dn[u] && !tm[u], "back to idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
