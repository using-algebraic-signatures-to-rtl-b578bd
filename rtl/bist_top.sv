// bist_top: self-test wrapper around a circuit under test (CUT), with an
// algebraic-signature output response analyzer.
//
// The blocks are those of the classic BIST layout: a test controller, a test
// pattern generator (TPG), input isolation between the system inputs and the
// CUT, and an output response analyzer (ORA). The CUT itself stays outside:
// cut_in drives its inputs and cut_out returns its outputs, which also leave
// as the normal system outputs. The default sizes are those of the ROM test
// case: a 1024 x 8 ROM, addressed by a 10-bit counter, whose 1024 words are
// compacted into an alpha and an alpha^2 signature over GF(2^11).
//
// Operation: raise bist_start. The controller seeds the TPG and clears the
// ORA, applies N_PATTERNS patterns through the isolation mux, captures each
// CUT answer CUT_LATENCY cycles after its pattern, and then raises bist_done
// together with bist_pass or bist_fail, which compare the signatures with the
// golden_* inputs. Those are programmed with the signatures of a known-good
// CUT (read them from sig_* after a run on one, or compute them). Drop
// bist_start to return to normal operation. A run takes
// N_PATTERNS + CUT_LATENCY + 2 cycles from bist_start to bist_done.
//
// The structure follows the document's BIST layout and its recommended ROM
// configuration; the TPG kind, the handshake and the latency handling are
// this design's choices (see the blocks' own headers).
module bist_top
  import algsig_pkg::*;
#(
  parameter ora_cfg_e    CFG         = ORA_DOUBLE_ALT,
  parameter int          N           = 11,
  parameter logic [32:0] PHI         = 33'h805,
  parameter int          OUT_W       = 8,
  parameter int          PAT_W       = 10,
  parameter int          N_PATTERNS  = 1024,
  parameter int          CUT_LATENCY = 1,
  parameter tpg_kind_e   TPG_KIND    = TPG_COUNTER,
  parameter logic [32:0] TPG_POLY    = 33'h409,
  parameter logic [31:0] TPG_SEED    = 32'd0
) (
  input  logic             clk,
  input  logic             rst_n,
  // BIST control
  input  logic             bist_start,
  output logic             bist_done,
  output logic             bist_pass,
  output logic             bist_fail,
  output logic             test_mode,
  // golden signatures (programmed) and the signatures just computed
  input  logic [OUT_W-1:0] golden_par,
  input  logic [N-1:0]     golden_a1,
  input  logic [N-1:0]     golden_a2,
  output logic [OUT_W-1:0] sig_par,
  output logic [N-1:0]     sig_a1,
  output logic [N-1:0]     sig_a2,
  // system side
  input  logic [PAT_W-1:0] sys_in,
  output logic [OUT_W-1:0] sys_out,
  // circuit under test
  output logic [PAT_W-1:0] cut_in,
  input  logic [OUT_W-1:0] cut_out
);

  logic             tpg_init, tpg_en, ora_clear, ora_en, ora_match;
  logic [PAT_W-1:0] pattern;

  bist_controller #(.N_PATTERNS(N_PATTERNS), .CUT_LATENCY(CUT_LATENCY)) u_ctrl (
    .clk, .rst_n, .bist_start, .ora_match,
    .test_mode, .tpg_init, .tpg_en, .ora_clear, .ora_en,
    .bist_done, .pass(bist_pass), .fail(bist_fail)
  );

  tpg #(.KIND(TPG_KIND), .W(PAT_W), .POLY(TPG_POLY), .SEED(TPG_SEED)) u_tpg (
    .clk, .rst_n, .init(tpg_init), .en(tpg_en), .pattern
  );

  input_isolation #(.W(PAT_W)) u_iso (
    .test_mode, .sys_in, .test_pattern(pattern), .cut_in
  );

  alg_sig_ora #(.CFG(CFG), .N(N), .PHI(PHI), .IN_W(OUT_W)) u_ora (
    .clk, .rst_n, .clear(ora_clear), .en(ora_en), .din(cut_out),
    .golden_par, .golden_a1, .golden_a2,
    .sig_par, .sig_a1, .sig_a2, .match(ora_match)
  );

  assign sys_out = cut_out;

endmodule
