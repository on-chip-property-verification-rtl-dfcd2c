// Self-checking testbench for assertion_processor.
//
// The error chain is modelled here as N = 5 flags: flags[1] is the cell next
// to the processor (sequence number 1), eo = no flag set, and a strobe with
// the chain in scan mode shifts every flag one place towards the processor.
// Failure patterns are injected and the test checks the reported sequence
// number, the ORed severity, the action taken (halt over reset over
// interrupt), the reset pulse width, the interrupt handshake, the number of
// scan strobes, and the latency of 2*N + 2 cycles from flag to action.
module tb_assertion_processor;
  import ap_pkg::*;

  localparam int N = 5;
  // severity of sequence numbers 5..1
  localparam logic [N-1:0][2:0] SEV = {3'b110, SEV_IRQ, SEV_HALT, SEV_RESET, SEV_IRQ};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       irq_ack = 1'b0;
  logic       escen_n, esclk, halt, chip_rst_n, sw_irq, busy;
  logic [2:0] error_no;
  logic [2:0] error_prio;
  logic [2:0] action;
  logic [2:0] last_action = '0;
  int         n_action = 0;
  logic [N:1] flags = '0;
  logic [N:1] pending = '0;
  int         cyc = 0;
  int         strobes = 0;
  int         checks = 0, failures = 0;

  assertion_processor #(.N_ASSERT(N), .SEVERITY(SEV), .RESET_CYCLES(4)) dut (
    .clk, .rst_n, .eo_i(~|flags), .esci_i(flags[1]),
    .escen_n_o(escen_n), .esclk_o(esclk), .irq_ack_i(irq_ack),
    .halt_o(halt), .chip_rst_n_o(chip_rst_n), .sw_irq_o(sw_irq),
    .error_no_o(error_no), .error_prio_o(error_prio), .action_o(action),
    .busy_o(busy)
  );

  always @(posedge clk) if (action != '0) begin
    last_action <= action;
    n_action    <= n_action + 1;
  end

  // chain model
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) flags <= '0;
    else if (!escen_n) begin
      if (esclk) begin
        flags   <= flags >> 1;
        strobes <= strobes + 1;
      end
    end else flags <= flags | pending;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  typedef enum int { A_HALT, A_RESET, A_IRQ } act_t;

  task automatic run_case(input logic [N:1] mask, input int exp_no,
                          input logic [2:0] exp_prio, input act_t exp_act);
    int t0, lat, w;
    strobes = 0;
    n_action = 0;
    @(negedge clk) pending = mask;
    @(posedge clk) t0 = cyc + 1;   // flags are set by this edge
    @(negedge clk) pending = '0;
    while (halt == 1'b0 && chip_rst_n == 1'b1 && sw_irq == 1'b0 && cyc < t0 + 100)
      @(negedge clk);
    lat = cyc - t0;   // clock edges from the flag edge to the action edge
    check("latency (cycles)", lat, 2 * N + 2);
    check("scan strobes", strobes, N);
    check("error number", int'(error_no), exp_no);
    check("error priority", int'(error_prio), int'(exp_prio));
    check("halt", int'(halt), int'(exp_act == A_HALT));
    check("reset", int'(!chip_rst_n), int'(exp_act == A_RESET));
    check("irq", int'(sw_irq), int'(exp_act == A_IRQ));
    check("chain cleared", int'(flags), 0);
    if (exp_act == A_RESET) begin
      w = 0;
      while (!chip_rst_n && w < 50) begin
        @(negedge clk);
        w++;
      end
      check("reset pulse width", w, 4);
    end
    if (exp_act == A_IRQ) begin
      repeat (5) @(negedge clk);
      check("irq held until ack", int'(sw_irq), 1);
      irq_ack = 1'b1;
      @(negedge clk) irq_ack = 1'b0;
      check("irq cleared by ack", int'(sw_irq), 0);
    end
    @(negedge clk);
    check("one action pulse", n_action, 1);
    check("action class", int'(last_action), 1 << int'(exp_act));
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scan protocol: strobe only in scan mode
  always @(posedge clk) if (esclk && escen_n) begin
    failures++;
    $display("FAIL strobe outside scan mode");
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check("idle: no scan", int'(escen_n), 1);

    run_case(5'b00001, 1, SEV_IRQ,   A_IRQ);
    run_case(5'b01000, 4, SEV_IRQ,   A_IRQ);
    run_case(5'b00010, 2, SEV_RESET, A_RESET);
    run_case(5'b10000, 5, 3'b110,    A_RESET);   // reset wins over irq
    run_case(5'b01001, 4, SEV_IRQ,   A_IRQ);     // last failing number read
    run_case(5'b00011, 2, 3'b110,    A_RESET);
    run_case(5'b10100, 5, 3'b111,    A_HALT);    // halt wins

    // halted: new failures start no scan and the halt stays
    @(negedge clk) pending = 5'b00001;
    @(negedge clk) pending = '0;
    repeat (30) begin
      @(negedge clk);
      checks++;
      if (!escen_n || !halt) failures++;
    end
    // reset releases the halt
    rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    check("halt released by reset", int'(halt), 0);
    run_case(5'b00100, 3, SEV_HALT, A_HALT);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
