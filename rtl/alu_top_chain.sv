// Assertions of the ALU top level, chained through the ALU hierarchy.
//
// The ALU top level carries one checker of its own, always1, which requires
// a valid opcode at the ALU in every cycle, and contains the divider level
// (alu_divide_chain). The error and scan chains enter at ei/esci, pass
// always1, reach the divider level over eo_t1/esco_t1 and leave through its
// eo/esco. Read from the processor end, the sequence is u_flow (1), frame
// (2), always2 (3), always1 (4). Hierarchy, order and net names are the ALU
// example's; the watched signals are this design's choice. Timing as in
// assert_chain_cell.
module alu_top_chain #(
  parameter int unsigned MAX_CKS   = 8,
  parameter int unsigned CNT_WIDTH = 4
) (
  input  logic                 clk,
  input  logic                 reset_n,
  input  logic                 alu_opcode_valid,
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

  logic eo_t1, esco_t1;

  assert_always_sc assert_always1 (
    .clk, .reset_n, .test_expr(alu_opcode_valid),
    .ei, .esci, .esclk, .escen_n, .eo(eo_t1), .esco(esco_t1)
  );

  alu_divide_chain #(.MAX_CKS(MAX_CKS), .CNT_WIDTH(CNT_WIDTH)) alu_divide (
    .clk, .reset_n, .div_rule_ok, .div_en, .div_done, .div_cnt,
    .ei(eo_t1), .esci(esco_t1), .esclk, .escen_n, .eo, .esco
  );

endmodule
