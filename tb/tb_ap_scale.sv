// Scaling testbench: assertion processors with five action classes reading
// chains of 8, 16, 32, 64, 128, 256 and 512 stages, side by side.
//
// Each size gets failures at the first and last sequence numbers, a random
// one, and a random pair. For each, the test checks the reported sequence
// number (the larger of a pair), the ORed classes, the one-hot class chosen
// (lowest set bit) and the 2*N + 2 cycle latency from flag to action. A halt
// (class 0) stops a processor, so each case is followed by a reset.
module tb_ap_scale;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, done = 0;
  localparam int NSIZES = 7;
  localparam int SIZES[NSIZES] = '{8, 16, 32, 64, 128, 256, 512};
  localparam int NA = 5;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar s = 0; s < NSIZES; s++) begin : g_size
    localparam int N = SIZES[s];
    localparam int CW = $clog2(N + 1);
    logic          rst_n = 1'b1;
    logic [N-1:0]  inject = '0;
    logic [CW-1:0] error_no;
    logic [NA-1:0] error_prio, action;
    logic          busy;

    ap_chain_bench #(.N(N), .NA(NA)) u_bench (
      .clk, .rst_n, .inject, .error_no, .error_prio, .action, .busy
    );

    function automatic int cls(int k);
      return k % NA;
    endfunction

    task automatic run(input int ka, input int kb);
      int t, exp_no, lat;
      logic [NA-1:0] exp_prio, exp_act;
      @(negedge clk) rst_n = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      exp_no   = (ka > kb) ? ka : kb;
      exp_prio = (NA'(1) << cls(ka)) | (NA'(1) << cls(kb));
      exp_act  = exp_prio & (~exp_prio + 1'b1);
      inject[N - ka] = 1'b1;
      inject[N - kb] = 1'b1;
      @(negedge clk) inject = '0;
      t = 0;   // clock edges since the edge that set the flags
      while (action == '0 && t < 4 * N + 20) begin
        @(negedge clk);
        t++;
      end
      lat = t;
      checks += 4;
      if (int'(error_no) != exp_no) begin
        failures++;
        $display("N=%0d: error number %0d expected %0d", N, error_no, exp_no);
      end
      if (error_prio != exp_prio) begin
        failures++;
        $display("N=%0d: priority %b expected %b", N, error_prio, exp_prio);
      end
      if (action != exp_act) begin
        failures++;
        $display("N=%0d: action %b expected %b", N, action, exp_act);
      end
      if (lat != 2 * N + 2) begin
        failures++;
        $display("N=%0d: latency %0d expected %0d", N, lat, 2 * N + 2);
      end
    endtask

    initial begin
      int r;
      #1 rst_n = 1'b0;   // reset before the first clock edge
      repeat (2) @(negedge clk);
      run(1, 1);
      run(N, N);
      r = 1 + ($urandom % N);
      run(r, r);
      run(1 + ($urandom % N), 1 + ($urandom % N));
      run(3, N - 1);
      $display("N=%0d done", N);
      done++;
    end
  end

  initial begin
    wait (done == NSIZES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
