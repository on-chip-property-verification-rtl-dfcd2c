// One stage of the assertion error chain: the error flag of one checker.
//
// A synthesized checker reports a failure on fail_i. The cell keeps a sticky
// flag that is ORed into the error chain and that is also one bit of the error
// scan chain:
//   * Normal mode (escen_n = 1): flag <= flag | fail_i. eo = ei & ~flag, so
//     eo is low (error) as soon as any flag upstream or here is set. The head
//     of the chain ties ei to 1.
//   * Scan mode (escen_n = 0): on a cycle with esclk = 1 the flag takes esci,
//     the flag of the previous cell; esco always shows the flag. Shifting N
//     times through an N-cell chain reads every flag out of the last cell and
//     fills the chain with the head's esci (tied to 0), clearing it.
// Failures that occur while escen_n = 0 are not captured (one flip-flop per
// assertion). esclk is a shift strobe sampled on clk, not a separate clock,
// so the chain is one clock domain; the eo/esco polarities (eo active low,
// esco high for a failure) follow the scan waveform and the processor's
// "esci == 1" test. Timing: a failure seen at a clock edge shows on eo and
// esco right after that edge.
module assert_chain_cell (
  input  logic clk,
  input  logic reset_n,
  input  logic fail_i,
  input  logic ei,
  input  logic esci,
  input  logic esclk,
  input  logic escen_n,
  output logic eo,
  output logic esco
);

  logic flag_q;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)              flag_q <= 1'b0;
    else if (!escen_n) begin
      if (esclk)               flag_q <= esci;
    end else if (fail_i)       flag_q <= 1'b1;
  end

  assign eo   = ei & ~flag_q;
  assign esco = flag_q;

endmodule
