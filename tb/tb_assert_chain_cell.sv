// Self-checking testbench for assert_chain_cell.
//
// Three cells form a chain (head ei = 1, esci = 0). The test sets flags by
// pulsing fail_i, checks the active-low error chain, reads the flags back by
// scanning (the cell nearest the output comes out first), checks that the
// scan clears the chain, that flags hold while escen_n = 0 without a strobe,
// and that fail_i is ignored in scan mode.
module tb_assert_chain_cell;
  logic clk = 1'b0;
  logic reset_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] fail = '0;
  logic esclk = 1'b0, escen_n = 1'b1;
  logic [3:0] eo_c, esco_c;
  int checks = 0, failures = 0;

  assign eo_c[0]   = 1'b1;
  assign esco_c[0] = 1'b0;

  for (genvar p = 0; p < 3; p++) begin : g_cell
    assert_chain_cell u_cell (
      .clk, .reset_n, .fail_i(fail[p]), .ei(eo_c[p]), .esci(esco_c[p]),
      .esclk, .escen_n, .eo(eo_c[p+1]), .esco(esco_c[p+1])
    );
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // Pulse fail_i of the cells in mask for one cycle.
  task automatic inject(input logic [2:0] mask);
    @(negedge clk) fail = mask;
    @(negedge clk) fail = '0;
  endtask

  // Scan out three bits; returns them in read order (bit 0 read first).
  task automatic scan(output logic [2:0] bits);
    @(negedge clk) escen_n = 1'b0;
    for (int k = 0; k < 3; k++) begin
      @(negedge clk) begin
        bits[k] = esco_c[3];
        esclk = 1'b1;
      end
      @(negedge clk) esclk = 1'b0;
    end
    escen_n = 1'b1;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] bits;
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;
    check("idle eo", eo_c[3], 1'b1);

    // every single-cell and multi-cell pattern
    for (int m = 1; m < 8; m++) begin
      inject(3'(m));
      @(negedge clk);
      check("eo low after failure", eo_c[3], 1'b0);
      check("eo of cell 0", eo_c[1], !m[0]);
      // the flag stays without further failures
      repeat (3) @(negedge clk);
      check("eo still low", eo_c[3], 1'b0);
      scan(bits);
      // cell 2 (nearest the output) is read first, cell 0 last
      check("scan bit 0 = cell 2", bits[0], m[2]);
      check("scan bit 1 = cell 1", bits[1], m[1]);
      check("scan bit 2 = cell 0", bits[2], m[0]);
      @(negedge clk);
      check("chain cleared by scan", eo_c[3], 1'b1);
    end

    // flags hold in scan mode without a strobe; failures there are ignored
    inject(3'b010);
    @(negedge clk) escen_n = 1'b0;
    fail = 3'b101;
    repeat (3) @(negedge clk);
    fail = '0;
    check("hold: cell 1 flag", esco_c[2], 1'b1);
    check("hold: cell 0 not captured", esco_c[1], 1'b0);
    check("hold: cell 2 not captured", esco_c[3], 1'b0);
    escen_n = 1'b1;
    @(negedge clk);
    check("normal mode: eo low", eo_c[3], 1'b0);

    // reset clears the flags
    reset_n = 1'b0;
    @(negedge clk) reset_n = 1'b1;
    check("reset clears", eo_c[3], 1'b1);
    check("reset clears flag", esco_c[2], 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
