// Small combinational example with a white-box assertion on internal nets.
//
// d = (a | b) & (a & c): gate X is an OR of a and b (net xz), gate Y an AND of
// a and c (net yz), gate Z an AND of xz and yz. In the operating mode this
// piece of logic belongs to, input b is redundant (d reduces to a & c), so a
// stuck-at fault on b never reaches d. The white-box assertion watches the
// internal nets instead: xz and yz being 1 together is declared an error
// condition (f1 + f2 > 1) and is checked by a never-checker on the error
// chain. Chain ports as in assert_chain_cell. d is combinational.
module whitebox_example (
  input  logic clk,
  input  logic reset_n,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic d,
  input  logic ei,
  input  logic esci,
  input  logic esclk,
  input  logic escen_n,
  output logic eo,
  output logic esco
);

  logic xz, yz;

  assign xz = a | b;    // gate X
  assign yz = a & c;    // gate Y
  assign d  = xz & yz;  // gate Z

  assert_never_sc u_f1f2 (
    .clk, .reset_n, .test_expr(xz & yz),
    .ei, .esci, .esclk, .escen_n, .eo, .esco
  );

endmodule
