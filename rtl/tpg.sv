// tpg: test pattern generator for the BIST.
//
// Produces one W-bit test pattern per enabled cycle. Two kinds are offered:
//   TPG_COUNTER  a binary up-counter starting at SEED; over 2^W cycles it
//                visits every pattern once, which is what a ROM test needs
//                (every address read once, in order);
//   TPG_LFSR     a Galois LFSR, pattern <= pattern * t mod POLY, i.e. the
//                same multiply-by-alpha step as the signature registers,
//                without inputs. With POLY primitive of degree W and SEED
//                non-zero it runs through all 2^W - 1 non-zero patterns.
//
// Interface and timing: init (synchronous) loads SEED; each clk edge with en
// high advances the pattern; pattern is the register output, so the pattern
// used in a cycle is the one present during that cycle. rst_n (synchronous,
// active low) also loads SEED.
//
// That the generator is pseudo-random and LFSR based follows the document,
// which does not detail it; the counter mode, the seed handling and the
// default (10-bit counter for the 1024-word ROM) are this design's choices.
module tpg
  import algsig_pkg::*;
#(
  parameter tpg_kind_e   KIND = TPG_COUNTER,
  parameter int          W    = 10,
  parameter logic [32:0] POLY = 33'h409,
  parameter logic [31:0] SEED = 32'd0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         en,
  output logic [W-1:0] pattern
);

  logic [W-1:0]    q, nxt;
  logic [MAXW-1:0] lfsr_nxt;

  initial begin
    assert (W >= 2 && W <= MAXW) else $fatal(1, "W must be 2..32");
    if (KIND == TPG_LFSR)
      assert (W'(SEED) != '0 && POLY[W]) else $fatal(1, "LFSR needs a non-zero seed and a degree-W POLY");
  end

  assign lfsr_nxt = gf_mul_alpha(MAXW'(q), POLY, W);
  assign nxt      = (KIND == TPG_LFSR) ? lfsr_nxt[W-1:0] : q + 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n || init) q <= W'(SEED);
    else if (en)        q <= nxt;
  end

  assign pattern = q;

endmodule
