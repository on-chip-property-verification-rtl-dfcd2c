// Synthesizable "no underflow" checker with the error-chain interface.
//
// test_expr is a counter. When its previous value was MIN, the new value must
// not be below MIN or at or above MAX (a wrap from MIN downwards, e.g.
// 0 -> 15 with the full-range defaults). Semantics are
// those of the common assert_no_underflow checker; WIDTH, MIN and MAX
// defaults are this design's choice. Chain ports as in assert_chain_cell.
// The first cycle after reset has no previous value and is not checked.
module assert_no_underflow_sc #(
  parameter int unsigned WIDTH = 4,
  parameter logic [WIDTH-1:0] MIN = '0,
  parameter logic [WIDTH-1:0] MAX = '1
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

  logic [WIDTH-1:0] prev_q;
  logic             valid_q;
  logic             fail;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      prev_q  <= '0;
      valid_q <= 1'b0;
    end else begin
      prev_q  <= test_expr;
      valid_q <= 1'b1;
    end
  end

  assign fail = valid_q && (prev_q == MIN) && (test_expr != MIN)
             && ((test_expr < MIN) || (test_expr >= MAX));

  assert_chain_cell u_cell (
    .clk, .reset_n, .fail_i(fail), .ei, .esci, .esclk, .escen_n, .eo, .esco
  );

endmodule
