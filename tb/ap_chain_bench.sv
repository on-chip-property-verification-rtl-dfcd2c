// Test fixture: an N-stage error chain read by an assertion processor with
// NA action classes. Stage p (0 = chain head) is set by inject[p] and has
// sequence number N - p. The severity of sequence number k is the one-hot
// class (k mod NA).
module ap_chain_bench #(
  parameter int unsigned N  = 8,
  parameter int unsigned NA = 5,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  inject,
  output logic [CW-1:0] error_no,
  output logic [NA-1:0] error_prio,
  output logic [NA-1:0] action,
  output logic          busy
);

  function automatic logic [N-1:0][NA-1:0] sev_table();
    logic [N-1:0][NA-1:0] t;
    for (int k = 1; k <= int'(N); k++) t[k-1] = NA'(1) << (k % int'(NA));
    return t;
  endfunction

  logic [N:0] eo_c, esco_c;
  logic       escen_n, esclk;
  logic       halt, chip_rst_n, sw_irq;

  assign eo_c[0]   = 1'b1;
  assign esco_c[0] = 1'b0;

  for (genvar p = 0; p < N; p++) begin : g_stage
    assert_chain_cell u_cell (
      .clk, .reset_n(rst_n), .fail_i(inject[p]), .ei(eo_c[p]), .esci(esco_c[p]),
      .esclk, .escen_n, .eo(eo_c[p+1]), .esco(esco_c[p+1])
    );
  end

  assertion_processor #(
    .N_ASSERT(N), .NUM_ACTIONS(NA), .SEVERITY(sev_table()), .RESET_CYCLES(2)
  ) u_ap (
    .clk, .rst_n, .eo_i(eo_c[N]), .esci_i(esco_c[N]),
    .escen_n_o(escen_n), .esclk_o(esclk), .irq_ack_i(1'b1),
    .halt_o(halt), .chip_rst_n_o(chip_rst_n), .sw_irq_o(sw_irq),
    .error_no_o(error_no), .error_prio_o(error_prio), .action_o(action),
    .busy_o(busy)
  );

endmodule
