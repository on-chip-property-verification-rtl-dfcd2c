// Synthesizable "frame" checker with the error-chain interface.
//
// After a start_event, test_expr must become 1 no earlier than MIN_CKS and no
// later than MAX_CKS cycles later (cycle 1 is the cycle after start_event).
// A test_expr before MIN_CKS, or none by MAX_CKS, is a failure; the first
// test_expr ends the frame. A start_event inside a frame is ignored.
// Semantics are those of the common assert_frame checker; MIN_CKS and
// MAX_CKS defaults are this design's choice. Chain ports as in
// assert_chain_cell.
module assert_frame_sc #(
  parameter int unsigned MIN_CKS = 0,
  parameter int unsigned MAX_CKS = 8
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

  localparam int unsigned CW = $clog2(MAX_CKS + 2);

  logic          busy_q;
  logic [CW-1:0] cyc_q;    // cycles since start_event, in the frame
  logic [CW-1:0] cyc_now;
  logic          fail;

  assign cyc_now = cyc_q + 1'b1;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      busy_q <= 1'b0;
      cyc_q  <= '0;
    end else if (busy_q) begin
      if (test_expr || cyc_now >= CW'(MAX_CKS)) busy_q <= 1'b0;
      cyc_q <= cyc_now;
    end else if (start_event) begin
      busy_q <= 1'b1;
      cyc_q  <= '0;
    end
  end

  assign fail = busy_q && ( (test_expr && cyc_now < CW'(MIN_CKS))
                         || (!test_expr && cyc_now >= CW'(MAX_CKS)) );

  assert_chain_cell u_cell (
    .clk, .reset_n, .fail_i(fail), .ei, .esci, .esclk, .escen_n, .eo, .esco
  );

endmodule
