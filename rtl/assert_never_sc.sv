// Synthesizable "never" checker with the error-chain interface.
//
// test_expr must never be 1; any cycle out of reset with test_expr = 1 sets
// the error flag (for example concurrent read and write strobes). Chain ports
// as in assert_chain_cell. Timing: flag set at the edge that sees the failure.
module assert_never_sc (
  input  logic clk,
  input  logic reset_n,
  input  logic test_expr,
  input  logic ei,
  input  logic esci,
  input  logic esclk,
  input  logic escen_n,
  output logic eo,
  output logic esco
);

  logic fail;
  assign fail = test_expr;

  assert_chain_cell u_cell (
    .clk, .reset_n, .fail_i(fail), .ei, .esci, .esclk, .escen_n, .eo, .esco
  );

endmodule
