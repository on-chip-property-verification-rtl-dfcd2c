// Synthesizable "time" checker with the error-chain interface.
//
// After a start_event, test_expr must be 1 in each of the next NUM_CKS
// cycles (an acknowledge held four cycles after an interrupt trigger is the
// default use, hence NUM_CKS = 4). A start_event while a check is running is
// ignored. Semantics are those of the common assert_time checker; chain ports
// as in assert_chain_cell.
module assert_time_sc #(
  parameter int unsigned NUM_CKS = 4
) (
  input  logic clk,
  input  logic reset_n,
  input  logic start_event,
  input  logic test_expr,
  input  logic ei,
  input  logic esci,
  input  logic esclk,
  input  logic escen_n,
  output logic eo,
  output logic esco
);

  localparam int unsigned CW = $clog2(NUM_CKS + 1);

  logic [CW-1:0] left_q;   // cycles still to check
  logic          fail;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)              left_q <= '0;
    else if (left_q != '0)     left_q <= left_q - 1'b1;
    else if (start_event)      left_q <= CW'(NUM_CKS);
  end

  assign fail = (left_q != '0) && !test_expr;

  assert_chain_cell u_cell (
    .clk, .reset_n, .fail_i(fail), .ei, .esci, .esclk, .escen_n, .eo, .esco
  );

endmodule
