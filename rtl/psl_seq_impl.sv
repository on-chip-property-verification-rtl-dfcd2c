// Checker synthesized from the temporal property
//     assert always {e1; e2; e3} |-> e4 @(posedge clk)
//
// The sequence prefix is tracked by a chain of flip-flops, one per sequence
// step but the last: a0 remembers "e1 seen last cycle", a1 remembers "e1 then
// e2 seen on the two previous cycles". In the cycle where e3 completes the
// sequence (e3 & a1), e4 must hold, so the expression e4 | ~(e3 & a1) is
// handed to an always-checker that carries the error-chain interface. The
// structure (AND gate, flip-flop, AND gate, flip-flop, AND gate, OR with an
// inverted input) is the one the property compiles to; resetting a0/a1 with
// reset_n is this design's choice. Chain ports as in assert_chain_cell.
module psl_seq_impl (
  input  logic clk,
  input  logic reset_n,
  input  logic e1,
  input  logic e2,
  input  logic e3,
  input  logic e4,
  input  logic ei,
  input  logic esci,
  input  logic esclk,
  input  logic escen_n,
  output logic eo,
  output logic esco
);

  logic a0, a1;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      a0 <= 1'b0;
      a1 <= 1'b0;
    end else begin
      a0 <= e1;
      a1 <= e2 & a0;
    end
  end

  assert_always_sc u_always (
    .clk, .reset_n, .test_expr(e4 | ~(e3 & a1)),
    .ei, .esci, .esclk, .escen_n, .eo, .esco
  );

endmodule
