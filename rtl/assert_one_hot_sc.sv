// Synthesizable "one hot" checker with the error-chain interface.
//
// test_expr, typically the state register of a one-hot control state machine,
// must have exactly one bit set in every cycle out of reset. WIDTH is this
// design's choice. Chain ports as in assert_chain_cell. Timing: flag set at
// the edge that sees the failure.
module assert_one_hot_sc #(
  parameter int unsigned WIDTH = 4
) (
  input  logic clk,
  input  logic reset_n,
  input  logic [WIDTH-1:0] test_expr,
  input  logic ei,
  input  logic esci,
  input  logic esclk,
  input  logic escen_n,
  output logic eo,
  output logic esco
);

  logic fail;
  // Exactly one bit set: nonzero and no bit shared with value-1.
  assign fail = (test_expr == '0) || ((test_expr & (test_expr - 1'b1)) != '0);

  assert_chain_cell u_cell (
    .clk, .reset_n, .fail_i(fail), .ei, .esci, .esclk, .escen_n, .eo, .esco
  );

endmodule
