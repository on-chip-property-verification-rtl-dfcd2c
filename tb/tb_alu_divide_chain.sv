// Self-checking testbench for alu_divide_chain.
//
// For every combination of failing checkers (u_flow, frame, always2) the test
// breaks their rules, checks the level's active-low eo, then scans the chain
// out as the assertion processor would (escen_n low, one esclk strobe per
// bit) and checks that the bits come out in the order u_flow, frame, always2, the
// sequence read from the processor end. The scan must leave the chain clear.
module tb_alu_divide_chain;
  logic clk = 1'b0;
  logic reset_n = 1'b0;
  always #5 clk = ~clk;

  logic       div_rule_ok = 1'b1;
  logic       div_en = 1'b0, div_done = 1'b0;
  logic [3:0] div_cnt = 4'd5;
  logic       ei = 1'b1, esci = 1'b0, esclk = 1'b0, escen_n = 1'b1;
  logic       eo, esco;
  int         checks = 0, failures = 0;

  alu_divide_chain dut (
    .clk, .reset_n, .div_rule_ok, .div_en, .div_done, .div_cnt,
    .ei, .esci, .esclk, .escen_n, .eo, .esco
  );

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mask bit k: make the checker with sequence number k+1 fail
  initial begin
    logic [3-1:0] bits;
    repeat (2) @(negedge clk);
    reset_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int mask = 0; mask < (1 << 3); mask++) begin
      // u_flow: divider counter wraps 0 -> 15
      if (mask[0]) begin
        @(negedge clk) div_cnt = 4'd0;
        @(negedge clk) div_cnt = 4'd15;
        @(negedge clk) div_cnt = 4'd5;
      end
      // frame: an enable without done; otherwise a divide done in time
      @(negedge clk) div_en = 1'b1;
      @(negedge clk) div_en = 1'b0;
      if (!mask[1]) begin
        repeat (2) @(negedge clk);
        div_done = 1'b1;
        @(negedge clk) div_done = 1'b0;
      end
      // always2: divider rule broken for one cycle
      if (mask[2]) begin
        @(negedge clk) div_rule_ok = 1'b0;
        @(negedge clk) div_rule_ok = 1'b1;
      end

      repeat (12) @(negedge clk);
      check("eo", int'(eo), int'(mask == 0));
      // scan out
      escen_n = 1'b0;
      for (int k = 0; k < 3; k++) begin
        @(negedge clk) begin
          bits[k] = esco;
          esclk = 1'b1;
        end
        @(negedge clk) esclk = 1'b0;
      end
      escen_n = 1'b1;
      check("scanned bits in sequence order", int'(bits), mask);
      @(negedge clk);
      check("chain clear after scan", int'(eo), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
