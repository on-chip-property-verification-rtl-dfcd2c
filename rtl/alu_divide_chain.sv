// Assertions of the divider level of the ALU hierarchy, chained through it.
//
// The divider level carries three checkers: an always-rule on the divider
// (always2), a frame check that a divide completes within MAX_CKS cycles of
// its enable (frame), and a no-underflow check on the divider's counter
// (u_flow). Inserting them changes the level's interface: the error chain
// (ei -> eo) and the scan chain (esci -> esco) enter the level, run through
// always2, frame and u_flow in that order over the internal nets eo_t1/esco_t1
// and eo_t2/esco_t2, and leave it. u_flow is therefore read first by the
// assertion processor, then frame, then always2. The order and net names are
// the ALU example's; the watched signals, MAX_CKS and counter width are this
// design's choices. Timing as in assert_chain_cell.
module alu_divide_chain #(
  parameter int unsigned MAX_CKS   = 8,
  parameter int unsigned CNT_WIDTH = 4
) (
  input  logic                 clk,
  input  logic                 reset_n,
  input  logic                 div_rule_ok,
  input  logic                 div_en,
  input  logic                 div_done,
  input  logic [CNT_WIDTH-1:0] div_cnt,
  input  logic                 ei,
  input  logic                 esci,
  input  logic                 esclk,
  input  logic                 escen_n,
  output logic                 eo,
  output logic                 esco
);

  logic eo_t1, esco_t1, eo_t2, esco_t2;

  assert_always_sc assert_always2 (
    .clk, .reset_n, .test_expr(div_rule_ok),
    .ei, .esci, .esclk, .escen_n, .eo(eo_t1), .esco(esco_t1)
  );

  assert_frame_sc #(.MIN_CKS(0), .MAX_CKS(MAX_CKS)) assert_frame (
    .clk, .reset_n, .start_event(div_en), .test_expr(div_done),
    .ei(eo_t1), .esci(esco_t1), .esclk, .escen_n, .eo(eo_t2), .esco(esco_t2)
  );

  assert_no_underflow_sc #(.WIDTH(CNT_WIDTH)) assert_u_flow (
    .clk, .reset_n, .test_expr(div_cnt),
    .ei(eo_t2), .esci(esco_t2), .esclk, .escen_n, .eo, .esco
  );

endmodule
