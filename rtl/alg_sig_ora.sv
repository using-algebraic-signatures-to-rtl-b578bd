// alg_sig_ora: output response analyzer built from an N-fold composite
// algebraic signature.
//
// The CUT response stream is compacted, one word per accepted cycle, into up
// to three signature components over GF(2^N): the alpha^0 (parity) signature,
// the alpha signature and the alpha^2 signature. CFG selects which are built:
//   ORA_SINGLE      alpha                   (k = 1)
//   ORA_DOUBLE      parity, alpha           (k = 2)
//   ORA_DOUBLE_ALT  alpha, alpha^2          (k = 2)
//   ORA_TRIPLE      parity, alpha, alpha^2  (k = 3)
// With k components over a field whose multiplicative group is at least as
// long as the stream (2^N - 1 >= number of words), any set of at most k
// erroneous words changes the composite signature (Vandermonde argument).
// The registers are generic; only the golden (known-good) signature differs
// from one circuit to the next, so it is a programmable input.
//
// Interface and timing: clear zeroes all components (synchronous); each clk
// edge with en high folds din into every built component. sig_* are the
// register outputs; components not built read as zero. match is
// combinational: high when every built component equals its golden_* input
// (golden_* of components not built are ignored).
//
// The components, their recurrences and the four configurations follow the
// document; the default (GF(2^11), alpha + alpha^2, 8-bit words) is the
// configuration it recommends for a 1024 x 8 ROM. The default polynomial
// t^11+t^2+1 is this design's choice (a primitive trinomial of degree 11).
module alg_sig_ora
  import algsig_pkg::*;
#(
  parameter ora_cfg_e    CFG  = ORA_DOUBLE_ALT,
  parameter int          N    = 11,
  parameter logic [32:0] PHI  = 33'h805,
  parameter int          IN_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            en,
  input  logic [IN_W-1:0] din,
  input  logic [IN_W-1:0] golden_par,
  input  logic [N-1:0]    golden_a1,
  input  logic [N-1:0]    golden_a2,
  output logic [IN_W-1:0] sig_par,
  output logic [N-1:0]    sig_a1,
  output logic [N-1:0]    sig_a2,
  output logic            match
);

  localparam bit HAS_PAR = ora_has_parity(CFG);
  localparam bit HAS_A2  = ora_has_alpha2(CFG);

  logic m_par, m_a1, m_a2;

  // Every configuration has the alpha component.
  alpha_sig_misr #(.N(N), .PHI(PHI), .IN_W(IN_W)) u_a1 (
    .clk, .rst_n, .clear, .en, .din, .sig(sig_a1)
  );
  assign m_a1 = (sig_a1 == golden_a1);

  if (HAS_PAR) begin : g_par
    parity_sig_reg #(.IN_W(IN_W)) u_par (
      .clk, .rst_n, .clear, .en, .din, .sig(sig_par)
    );
    assign m_par = (sig_par == golden_par);
  end else begin : g_no_par
    assign sig_par = '0;
    assign m_par   = 1'b1;
  end

  if (HAS_A2) begin : g_a2
    alpha2_sig_misr #(.N(N), .PHI(PHI), .IN_W(IN_W)) u_a2 (
      .clk, .rst_n, .clear, .en, .din, .sig(sig_a2)
    );
    assign m_a2 = (sig_a2 == golden_a2);
  end else begin : g_no_a2
    assign sig_a2 = '0;
    assign m_a2   = 1'b1;
  end

  assign match = m_par & m_a1 & m_a2;

endmodule
