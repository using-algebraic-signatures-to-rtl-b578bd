// input_isolation: input isolation circuitry between the system inputs, the
// test pattern generator and the circuit under test.
//
// A W-bit two-way multiplexer: while test_mode is high the CUT sees the test
// pattern, otherwise it sees the normal system input, so the self-test
// cannot be disturbed by (and does not disturb) the surrounding system.
// Purely combinational, no latency.
//
// Its place and role in the BIST follow the document; that it is a plain
// multiplexer selected by the controller's test-mode signal is this design's
// choice.
module input_isolation #(
  parameter int W = 10
) (
  input  logic         test_mode,
  input  logic [W-1:0] sys_in,
  input  logic [W-1:0] test_pattern,
  output logic [W-1:0] cut_in
);

  always_comb cut_in = test_mode ? test_pattern : sys_in;

endmodule
