// Assertion-monitored subsystem: chained on-chip assertions and the
// assertion processor that reads them.
//
// Twelve synthesized checkers watch signals of two monitored cores (an 8-bit
// processor's ALU, divider, interrupt logic and stack, and an I2C controller)
// plus a temporal property and a small example circuit. The cores themselves
// are outside this design: the signals the checkers watch are inputs here.
// Every checker has one error flag; the flags are linked into one error
// chain (eo, active low) and one scan chain, whose far end enters the
// assertion processor. When eo falls the processor scans the chain, finds the
// failing checkers by position and halts, resets or interrupts.
//
// Chain order, from the head (ei tied to 1, esci tied to 0) to the
// processor, with the sequence number the processor reports:
//   12 psl_seq_impl          {e1;e2;e3} |-> e4                      (IRQ)
//   11 whitebox_example      never (xz & yz) inside d=(a|b)&(a&c)   (IRQ)
//   10 assert_one_hot_sc     I2C control state is one-hot           (HALT)
//    9 assert_never_sc       I2C read and write never together      (RESET)
//    8 assert_always_sc      I2C interrupt request rule holds       (IRQ)
//    7 assert_window_sc      no new divide enable before done       (IRQ)
//    6 assert_time_sc        ack held 4 cycles after an interrupt   (IRQ)
//    5 assert_no_overflow_sc stack pointer never wraps upwards      (RESET)
//    4 always1  (alu_top_chain)     ALU opcode always valid     (HALT)
//    3 always2  (alu_divide_chain)  divider rule                (RESET)
//    2 frame    (alu_divide_chain)  divide done within 8 cycles (IRQ)
//    1 u_flow   (alu_divide_chain)  divider counter never wraps (IRQ)
// Numbers 1-4 and their order are the ALU example's; the others, the
// severities in brackets and the choice of watched signals are this design's.
// Outputs follow assertion_processor; see its header for the timing.
module onchip_verif_top
  import ap_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // 8-bit processor: ALU and divider
  input  logic       alu_opcode_valid,
  input  logic       div_rule_ok,
  input  logic       div_en,
  input  logic       div_done,
  input  logic [3:0] div_cnt,
  // 8-bit processor: interrupts and stack
  input  logic       int_trig,
  input  logic       int_ack,
  input  logic [7:0] sp,
  // I2C controller
  input  logic [3:0] i2c_state,
  input  logic       i2c_rd,
  input  logic       i2c_wr,
  input  logic       i2c_irq_ok,
  // temporal property {e1;e2;e3} |-> e4
  input  logic       e1,
  input  logic       e2,
  input  logic       e3,
  input  logic       e4,
  // example circuit
  input  logic       wb_a,
  input  logic       wb_b,
  input  logic       wb_c,
  output logic       wb_d,
  // assertion processor
  input  logic       irq_ack,
  output logic       halt,
  output logic       chip_rst_n,
  output logic       sw_irq,
  output logic [3:0] error_no,
  output logic [2:0] error_prio,
  output logic [2:0] action,
  output logic       chain_eo,
  output logic       scan_busy
);

  localparam int unsigned N = 12;

  // SEVERITY[k-1] is the action class of sequence number k.
  localparam logic [N-1:0][2:0] SEVERITY = {
    SEV_IRQ,    // 12 psl
    SEV_IRQ,    // 11 white-box example
    SEV_HALT,   // 10 I2C one-hot
    SEV_RESET,  //  9 I2C rd/wr
    SEV_IRQ,    //  8 I2C irq
    SEV_IRQ,    //  7 divide window
    SEV_IRQ,    //  6 interrupt ack time
    SEV_RESET,  //  5 stack overflow
    SEV_HALT,   //  4 ALU opcode
    SEV_RESET,  //  3 divider rule
    SEV_IRQ,    //  2 divide frame
    SEV_IRQ     //  1 divider underflow
  };

  // Chain nets: position p (0 = head) reads eo_c[p]/esco_c[p] and drives
  // eo_c[p+1]/esco_c[p+1].
  // Positions 8-11 are inside u_alu_top; its output is position N.
  logic [N:0] eo_c;
  logic [N:0] esco_c;
  logic       escen_n, esclk;
  logic       chk_rst_n;

  assign eo_c[0]   = 1'b1;
  assign esco_c[0] = 1'b0;
  assign chk_rst_n = rst_n;

  psl_seq_impl u_psl (
    .clk, .reset_n(chk_rst_n), .e1, .e2, .e3, .e4,
    .ei(eo_c[0]), .esci(esco_c[0]), .esclk, .escen_n,
    .eo(eo_c[1]), .esco(esco_c[1])
  );

  whitebox_example u_wb (
    .clk, .reset_n(chk_rst_n), .a(wb_a), .b(wb_b), .c(wb_c), .d(wb_d),
    .ei(eo_c[1]), .esci(esco_c[1]), .esclk, .escen_n,
    .eo(eo_c[2]), .esco(esco_c[2])
  );

  assert_one_hot_sc #(.WIDTH(4)) u_i2c_onehot (
    .clk, .reset_n(chk_rst_n), .test_expr(i2c_state),
    .ei(eo_c[2]), .esci(esco_c[2]), .esclk, .escen_n,
    .eo(eo_c[3]), .esco(esco_c[3])
  );

  assert_never_sc u_i2c_rdwr (
    .clk, .reset_n(chk_rst_n), .test_expr(i2c_rd & i2c_wr),
    .ei(eo_c[3]), .esci(esco_c[3]), .esclk, .escen_n,
    .eo(eo_c[4]), .esco(esco_c[4])
  );

  assert_always_sc u_i2c_irq (
    .clk, .reset_n(chk_rst_n), .test_expr(i2c_irq_ok),
    .ei(eo_c[4]), .esci(esco_c[4]), .esclk, .escen_n,
    .eo(eo_c[5]), .esco(esco_c[5])
  );

  assert_window_sc u_div_window (
    .clk, .reset_n(chk_rst_n),
    .start_event(div_en), .test_expr(!div_en), .end_event(div_done),
    .ei(eo_c[5]), .esci(esco_c[5]), .esclk, .escen_n,
    .eo(eo_c[6]), .esco(esco_c[6])
  );

  assert_time_sc #(.NUM_CKS(4)) u_int_ack (
    .clk, .reset_n(chk_rst_n), .start_event(int_trig), .test_expr(int_ack),
    .ei(eo_c[6]), .esci(esco_c[6]), .esclk, .escen_n,
    .eo(eo_c[7]), .esco(esco_c[7])
  );

  assert_no_overflow_sc #(.WIDTH(8)) u_stack (
    .clk, .reset_n(chk_rst_n), .test_expr(sp),
    .ei(eo_c[7]), .esci(esco_c[7]), .esclk, .escen_n,
    .eo(eo_c[8]), .esco(esco_c[8])
  );

  // ALU example: alu_top holds assert_always1 and the alu_divide level,
  // which holds assert_always2, assert_frame and assert_u_flow.
  alu_top_chain #(.MAX_CKS(8), .CNT_WIDTH(4)) u_alu_top (
    .clk, .reset_n(chk_rst_n), .alu_opcode_valid, .div_rule_ok,
    .div_en, .div_done, .div_cnt,
    .ei(eo_c[8]), .esci(esco_c[8]), .esclk, .escen_n,
    .eo(eo_c[N]), .esco(esco_c[N])
  );

  assertion_processor #(
    .N_ASSERT(N), .NUM_ACTIONS(3), .SEVERITY(SEVERITY), .RESET_CYCLES(4)
  ) u_ap (
    .clk, .rst_n,
    .eo_i(eo_c[N]), .esci_i(esco_c[N]),
    .escen_n_o(escen_n), .esclk_o(esclk),
    .irq_ack_i(irq_ack),
    .halt_o(halt), .chip_rst_n_o(chip_rst_n), .sw_irq_o(sw_irq),
    .error_no_o(error_no), .error_prio_o(error_prio), .action_o(action),
    .busy_o(scan_busy)
  );

  assign chain_eo = eo_c[N];

endmodule
