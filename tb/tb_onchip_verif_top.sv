// End-to-end testbench for onchip_verif_top, at its default (and only)
// configuration.
//
// Starting from a legal state of every monitored signal, the test breaks the
// rule of each of the twelve chained checkers in turn and checks that the
// assertion processor scans the chain, reports the checker's sequence number
// and takes the action of its severity (interrupt, hardware reset, halt).
// It also checks a double failure (the later number is reported and the more
// severe action taken), a failure raised during a scan (not captured), the
// example circuit's output, the halt and its release by reset. Every
// mechanism is counted; one that never happened counts as a failure.
module tb_onchip_verif_top;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       alu_opcode_valid, div_rule_ok, div_en, div_done;
  logic [3:0] div_cnt;
  logic       int_trig, int_ack;
  logic [7:0] sp;
  logic [3:0] i2c_state;
  logic       i2c_rd, i2c_wr, i2c_irq_ok;
  logic       e1, e2, e3, e4;
  logic       wb_a, wb_b, wb_c, wb_d;
  logic       irq_ack = 1'b0;
  logic       halt, chip_rst_n, sw_irq, chain_eo, scan_busy;
  logic [3:0] error_no;
  logic [2:0] error_prio;
  logic [2:0] action;

  int checks = 0, failures = 0;
  int seen_seq[1:12];
  int n_halt = 0, n_reset = 0, n_irq = 0, n_double = 0, n_drop = 0, n_scans = 0;

  onchip_verif_top dut (.*);

  typedef enum int { A_HALT, A_RESET, A_IRQ } act_t;

  always @(negedge scan_busy) if (rst_n) n_scans++;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic legal();
    alu_opcode_valid = 1; div_rule_ok = 1; div_en = 0; div_done = 0;
    div_cnt = 4'd5; int_trig = 0; int_ack = 0; sp = 8'd10;
    i2c_state = 4'b0001; i2c_rd = 0; i2c_wr = 0; i2c_irq_ok = 1;
    e1 = 0; e2 = 0; e3 = 0; e4 = 0; wb_a = 0; wb_b = 0; wb_c = 0;
  endtask

  // Wait for the processor's action and check it.
  task automatic expect_action(input string what, input int exp_no, input act_t exp_act);
    int w = 0, rw = 0;
    while (!halt && chip_rst_n && !sw_irq && w < 200) begin
      @(negedge clk);
      w++;
    end
    check({what, ": sequence number"}, int'(error_no), exp_no);
    check({what, ": halt"},  int'(halt),        int'(exp_act == A_HALT));
    check({what, ": reset"}, int'(!chip_rst_n), int'(exp_act == A_RESET));
    check({what, ": irq"},   int'(sw_irq),      int'(exp_act == A_IRQ));
    if (error_no == 4'(exp_no) && exp_no >= 1 && exp_no <= 12) seen_seq[exp_no]++;
    case (exp_act)
      A_HALT:  if (halt) n_halt++;
      A_RESET: if (!chip_rst_n) n_reset++;
      A_IRQ:   if (sw_irq) n_irq++;
      default: ;
    endcase
    if (sw_irq) begin
      @(negedge clk) irq_ack = 1'b1;
      @(negedge clk) irq_ack = 1'b0;
    end
    while (!chip_rst_n && rw < 20) begin
      @(negedge clk);
      rw++;
    end
    repeat (4) @(negedge clk);
    check({what, ": chain clear"}, int'(chain_eo), 1);
    check({what, ": processor idle"}, int'(scan_busy), 0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    legal();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (20) @(negedge clk);
    check("legal run: no error", int'(chain_eo), 1);
    check("legal run: no scan", n_scans, 0);

    // example circuit output d = a & c for all inputs without both nets high
    for (int v = 0; v < 8; v++) begin
      @(negedge clk) {wb_a, wb_b, wb_c} = 3'(v);
      #1 check("example d", int'(wb_d), int'(v[2] & v[0]));
      if (v[2] & v[0]) begin
        @(negedge clk) {wb_a, wb_b, wb_c} = 3'b000;
        expect_action("example f1+f2>1", 11, A_IRQ);
      end
    end

    // 1: divider counter wraps 0 -> 15
    @(negedge clk) div_cnt = 4'd0;
    @(negedge clk) div_cnt = 4'd15;
    @(negedge clk) div_cnt = 4'd5;
    expect_action("underflow", 1, A_IRQ);

    // 2: divide never done within 8 cycles; done afterwards closes the window
    @(negedge clk) div_en = 1;
    @(negedge clk) div_en = 0;
    expect_action("frame", 2, A_IRQ);
    @(negedge clk) div_done = 1;
    @(negedge clk) div_done = 0;

    // 3: divider rule
    @(negedge clk) div_rule_ok = 0;
    @(negedge clk) div_rule_ok = 1;
    expect_action("divider rule", 3, A_RESET);

    // 5: stack pointer wraps 255 -> 0
    @(negedge clk) sp = 8'd255;
    @(negedge clk) sp = 8'd0;
    @(negedge clk) sp = 8'd10;
    expect_action("stack overflow", 5, A_RESET);

    // 6: ack dropped in the third cycle after the interrupt trigger
    @(negedge clk) begin int_trig = 1; int_ack = 0; end
    @(negedge clk) begin int_trig = 0; int_ack = 1; end
    @(negedge clk);
    @(negedge clk) int_ack = 0;
    @(negedge clk);
    expect_action("interrupt ack time", 6, A_IRQ);

    // 7: second divide enable before done (done in time for the frame)
    @(negedge clk) div_en = 1;
    @(negedge clk) div_en = 0;
    @(negedge clk) div_en = 1;
    @(negedge clk) div_en = 0;
    @(negedge clk) div_done = 1;
    @(negedge clk) div_done = 0;
    expect_action("divide window", 7, A_IRQ);

    // legal divide: enable, done after 3 cycles
    @(negedge clk) div_en = 1;
    @(negedge clk) div_en = 0;
    repeat (2) @(negedge clk);
    div_done = 1;
    @(negedge clk) div_done = 0;
    repeat (15) @(negedge clk);
    check("legal divide: no error", int'(chain_eo), 1);

    // 8: I2C interrupt rule
    @(negedge clk) i2c_irq_ok = 0;
    @(negedge clk) i2c_irq_ok = 1;
    expect_action("i2c irq", 8, A_IRQ);

    // 9: I2C read and write together
    @(negedge clk) begin i2c_rd = 1; i2c_wr = 1; end
    @(negedge clk) begin i2c_rd = 0; i2c_wr = 0; end
    expect_action("i2c rd/wr", 9, A_RESET);

    // 12: {e1; e2; e3} without e4
    @(negedge clk) e1 = 1;
    @(negedge clk) begin e1 = 0; e2 = 1; end
    @(negedge clk) begin e2 = 0; e3 = 1; end
    @(negedge clk) e3 = 0;
    expect_action("psl sequence", 12, A_IRQ);
    // the same sequence with e4 is legal
    @(negedge clk) e1 = 1;
    @(negedge clk) begin e1 = 0; e2 = 1; end
    @(negedge clk) begin e2 = 0; e3 = 1; e4 = 1; end
    @(negedge clk) begin e3 = 0; e4 = 0; end
    repeat (5) @(negedge clk);
    check("psl sequence with e4: no error", int'(chain_eo), 1);

    // double failure: 1 (irq) and 3 (reset) in one cycle
    @(negedge clk) begin div_cnt = 4'd0; div_rule_ok = 0; end
    @(negedge clk) begin div_cnt = 4'd15; div_rule_ok = 1; end
    @(negedge clk) div_cnt = 4'd5;
    expect_action("double failure", 3, A_RESET);
    if (error_prio == 3'b110) n_double++;
    check("double failure: ORed priority", int'(error_prio), 3'b110);

    // failure during a scan is not captured
    @(negedge clk) i2c_irq_ok = 0;
    @(negedge clk) i2c_irq_ok = 1;
    wait (scan_busy);
    @(negedge clk) div_rule_ok = 0;
    @(negedge clk) div_rule_ok = 1;
    expect_action("failure during scan", 8, A_IRQ);
    repeat (30) @(negedge clk);
    check("failure during scan dropped", int'(chain_eo), 1);
    if (chain_eo && !sw_irq && chip_rst_n) n_drop++;

    // 4: invalid ALU opcode halts
    @(negedge clk) alu_opcode_valid = 0;
    @(negedge clk) alu_opcode_valid = 1;
    expect_action("alu opcode", 4, A_HALT);
    // halted: a new failure is not processed
    @(negedge clk) i2c_irq_ok = 0;
    @(negedge clk) i2c_irq_ok = 1;
    repeat (40) @(negedge clk);
    check("halt holds", int'(halt), 1);
    check("halt: error number kept", int'(error_no), 4);

    // 10: non-one-hot I2C state halts, after a reset
    rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    check("reset releases halt", int'(halt), 0);
    @(negedge clk) i2c_state = 4'b0011;
    @(negedge clk) i2c_state = 4'b0001;
    expect_action("i2c one-hot", 10, A_HALT);

    for (int k = 1; k <= 12; k++) begin
      checks++;
      if (seen_seq[k] == 0) begin
        failures++;
        $display("FAIL assertion %0d never reported", k);
      end
    end
    checks++;
    if (n_halt == 0 || n_reset == 0 || n_irq == 0 || n_double == 0 || n_drop == 0) failures++;
    $display("mechanisms: scans=%0d halt=%0d reset=%0d irq=%0d double=%0d dropped-in-scan=%0d",
             n_scans, n_halt, n_reset, n_irq, n_double, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
