// bist_controller: BIST test controller.
//
// Sequences one self-test: on bist_start it leaves normal operation, seeds
// the test pattern generator and clears the signature registers (INIT), then
// applies N_PATTERNS patterns, one per cycle (RUN). The CUT answers each
// pattern CUT_LATENCY cycles later, so the analyzer's capture enable is the
// "pattern issued" flag delayed by CUT_LATENCY cycles, and the controller
// waits that long after the last pattern (DRAIN). In DONE it raises
// bist_done and reports the analyzer's comparison as pass or fail; the
// signature registers no longer change, so the verdict is stable.
//
// States and timing:
//   IDLE  test_mode low; goes to INIT while bist_start is high.
//   INIT  one cycle: tpg_init and ora_clear high, test_mode high.
//   RUN   N_PATTERNS cycles: tpg_en high, test_mode high.
//   DRAIN CUT_LATENCY cycles (skipped when 0), test_mode high.
//   DONE  bist_done high, pass = ora_match, fail = !ora_match; back to IDLE
//         once bist_start is low. test_mode stays high so the CUT inputs keep
//         the last pattern until then.
// A run from the cycle bist_start is seen to bist_done therefore takes
// 1 + 1 + N_PATTERNS + CUT_LATENCY cycles.
//
// The controller's role (start, seed the TPG, drive the test, report done and
// pass/fail) follows the document; the state machine, the handshake and the
// latency handling are this design's own.
module bist_controller #(
  parameter int N_PATTERNS  = 1024,
  parameter int CUT_LATENCY = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bist_start,
  input  logic ora_match,
  output logic test_mode,
  output logic tpg_init,
  output logic tpg_en,
  output logic ora_clear,
  output logic ora_en,
  output logic bist_done,
  output logic pass,
  output logic fail
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_RUN, S_DRAIN, S_DONE} state_e;

  localparam int CW = $clog2(N_PATTERNS + CUT_LATENCY + 1);

  state_e        state;
  logic [CW-1:0] cnt;
  logic          issue;

  initial assert (N_PATTERNS >= 1 && CUT_LATENCY >= 0)
    else $fatal(1, "N_PATTERNS must be >= 1, CUT_LATENCY >= 0");

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (bist_start) state <= S_INIT;
        S_INIT: begin
          state <= S_RUN;
          cnt   <= '0;
        end
        S_RUN: begin
          if (cnt == CW'(N_PATTERNS - 1)) begin
            cnt   <= '0;
            state <= (CUT_LATENCY == 0) ? S_DONE : S_DRAIN;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DRAIN: begin
          if (cnt == CW'(CUT_LATENCY - 1)) begin
            cnt   <= '0;
            state <= S_DONE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DONE:  if (!bist_start) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign issue = (state == S_RUN);

  // Capture enable: the issue flag delayed by the CUT latency.
  if (CUT_LATENCY == 0) begin : g_lat0
    assign ora_en = issue;
  end else begin : g_lat
    logic [CUT_LATENCY-1:0] vpipe;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        vpipe <= '0;
      end else begin
        vpipe[0] <= issue;
        for (int i = 1; i < CUT_LATENCY; i++) vpipe[i] <= vpipe[i-1];
      end
    end
    assign ora_en = vpipe[CUT_LATENCY-1];
  end

  assign test_mode = (state != S_IDLE);
  assign tpg_init  = (state == S_INIT);
  assign ora_clear = (state == S_INIT);
  assign tpg_en    = issue;
  assign bist_done = (state == S_DONE);
  assign pass      = bist_done &  ora_match;
  assign fail      = bist_done & ~ora_match;

  // While the test runs the analyzer must never be cleared and captured at once.
  a_no_clear_and_capture: assert property (@(posedge clk) disable iff (!rst_n)
    !(ora_clear && ora_en));
  a_verdict_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    bist_done |-> (pass ^ fail));

endmodule
