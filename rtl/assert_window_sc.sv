// Synthesizable "window" checker with the error-chain interface.
//
// A start_event opens a window from the next cycle on; inside the window
// test_expr must be 1 in every cycle, up to and including the cycle of
// end_event, which closes it. Used to check that a division has completed
// before the next enable. Semantics are those of the common assert_window
// checker; chain ports as in assert_chain_cell.
module assert_window_sc (
  input  logic clk,
  input  logic reset_n,
  input  logic start_event,
  input  logic test_expr,
  input  logic end_event,
  input  logic ei,
  input  logic esci,
  input  logic esclk,
  input  logic escen_n,
  output logic eo,
  output logic esco
);

  logic open_q;
  logic fail;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)                  open_q <= 1'b0;
    else if (open_q && end_event)  open_q <= 1'b0;
    else if (!open_q && start_event) open_q <= 1'b1;
  end

  assign fail = open_q && !test_expr;

  assert_chain_cell u_cell (
    .clk, .reset_n, .fail_i(fail), .ei, .esci, .esclk, .escen_n, .eo, .esco
  );

endmodule
