// Synthesizable "always" checker with the error-chain interface.
//
// test_expr must be 1 in every clock cycle out of reset; a cycle with
// test_expr = 0 sets the checker's error flag. The check itself is the usual
// assert_always rule; the ei/esci/esclk/escen_n/eo/esco ports join the flag
// to the error chain and scan chain read by the assertion processor (see
// assert_chain_cell). Timing: combinational check, flag set at the same edge.
module assert_always_sc (
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
  assign fail = !test_expr;

  assert_chain_cell u_cell (
    .clk, .reset_n, .fail_i(fail), .ei, .esci, .esclk, .escen_n, .eo, .esco
  );

endmodule
