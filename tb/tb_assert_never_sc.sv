// Self-checking testbench for assert_never_sc.
//
// Drives random stimulus, keeps its own model of the checked rule and of the
// sticky error flag, and compares esco (the flag) and eo (= ei & ~flag) after
// every clock edge. Every 37th cycle the flag is cleared with one scan shift
// (escen_n = 0, esclk = 1, esci = 0). The run fails if the rule never fails
// or never passes.
module tb_assert_never_sc;
  logic clk = 1'b0;
  logic reset_n = 1'b0;
  always #5 clk = ~clk;

  logic ei = 1'b1, esci = 1'b0, esclk = 1'b0, escen_n = 1'b1;
  logic eo, esco;
  int checks = 0, failures = 0;
  int n_fail = 0, n_pass = 0;
  bit exp_flag = 1'b0;
  bit f, clr;
  logic te;

  assert_never_sc dut (.clk, .reset_n, .test_expr(te), .ei, .esci, .esclk, .escen_n, .eo, .esco);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    te = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      te = ($urandom % 8) == 0;
      ei  = ($urandom % 4) != 0;
      clr = (i % 37) == 36;
      escen_n = !clr;
      esclk   = clr;
      f = 1'b0;
      f = te;
      if (clr) f = 1'b0;     // failures are not captured during a scan
      if (f) n_fail++; else n_pass++;
      @(posedge clk);

      #1;
      if (clr) exp_flag = 1'b0;
      else if (f) exp_flag = 1'b1;
      checks++;
      if (esco !== exp_flag || eo !== (ei & ~exp_flag)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: esco=%b eo=%b expected flag=%b", i, esco, eo, exp_flag);
      end
    end
    checks++;
    if (n_fail == 0 || n_pass == 0) begin
      failures++;
      $display("rule never failed or never passed: %0d/%0d", n_fail, n_pass);
    end
    $display("rule failures seen: %0d", n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
