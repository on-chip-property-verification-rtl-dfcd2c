// Assertion processor: finds which chained assertion failed and acts on it.
//
// All assertion flags of the design form one error chain (eo, active low,
// falls when any flag is set) and one scan chain (esco of each cell feeds
// esci of the next). The processor
//   1. waits in IDLE for eo_i to fall;
//   2. scans: it pulls escen_n_o low and reads the chain one bit per two
//      cycles - it samples esci_i with esclk_o low, then raises esclk_o for
//      one cycle, which shifts the chain by one. The k-th bit read (count k)
//      belongs to the assertion with sequence number k, i.e. the one nearest
//      the processor is number 1. After N_ASSERT shifts the chain is empty;
//   3. encodes: every bit read as 1 records its sequence number in error_no
//      (the last one wins) and ORs in its severity vector SEVERITY[k-1];
//   4. dispatches one action, lowest set severity bit first:
//        bit 0  halt the chip: halt_o is set and held until rst_n;
//        bit 1  hardware reset: chip_rst_n_o is pulled low for RESET_CYCLES;
//        bit 2  software interrupt: sw_irq_o is raised until irq_ack_i.
//      error_no_o and error_prio_o report the scan result at that time, and
//      action_o pulses for one cycle with the chosen class as a one-hot
//      vector. With NUM_ACTIONS > 3 (five classes, say) the classes above
//      bit 2 have no action of their own here and are taken through action_o.
// The three-step structure (scan, priority encoding, action) and the three
// actions are the minimal processor of the method; the two-cycle scan step,
// ORing the severities, the reset pulse length and the interrupt handshake
// and the action_o pulse are this design's choices.
// Timing: a flag set at clock edge t gives escen_n_o low after edge t+1, the
// scan occupies 2*N_ASSERT cycles, and the action shows after edge
// t + 2*N_ASSERT + 2. No failure is captured by the chain during a scan.
module assertion_processor
  import ap_pkg::*;
#(
  parameter int unsigned N_ASSERT     = 4,
  parameter int unsigned NUM_ACTIONS  = NUM_ACTIONS_DEFAULT,
  parameter logic [N_ASSERT-1:0][NUM_ACTIONS-1:0] SEVERITY =
      {N_ASSERT{NUM_ACTIONS'(1)}},
  parameter int unsigned RESET_CYCLES = 4,
  localparam int unsigned CW          = $clog2(N_ASSERT + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // chain
  input  logic                   eo_i,
  input  logic                   esci_i,
  output logic                   escen_n_o,
  output logic                   esclk_o,
  // actions
  input  logic                   irq_ack_i,
  output logic                   halt_o,
  output logic                   chip_rst_n_o,
  output logic                   sw_irq_o,
  output logic [CW-1:0]          error_no_o,
  output logic [NUM_ACTIONS-1:0] error_prio_o,
  output logic [NUM_ACTIONS-1:0] action_o,
  output logic                   busy_o
);

  if (NUM_ACTIONS < 3) begin : g_bad_actions
    $error("assertion_processor needs at least three actions");
  end

  typedef enum logic [2:0] {
    S_IDLE, S_SAMPLE, S_SHIFT, S_DISPATCH, S_RESET, S_HALTED
  } state_e;

  localparam int unsigned RCW = $clog2(RESET_CYCLES + 1);

  state_e                 state_q;
  logic [CW-1:0]          count_q;
  logic [CW-1:0]          count_nx;
  logic [CW-1:0]          err_no_q;
  logic [NUM_ACTIONS-1:0] acc_q;
  logic [RCW-1:0]         rst_left_q;

  assign count_nx = count_q + 1'b1;
  assign busy_o   = (state_q == S_SAMPLE) || (state_q == S_SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      escen_n_o    <= 1'b1;
      esclk_o      <= 1'b0;
      count_q      <= '0;
      err_no_q     <= '0;
      acc_q        <= '0;
      rst_left_q   <= '0;
      halt_o       <= 1'b0;
      chip_rst_n_o <= 1'b1;
      sw_irq_o     <= 1'b0;
      error_no_o   <= '0;
      error_prio_o <= '0;
      action_o     <= '0;
    end else begin
      action_o <= '0;
      if (irq_ack_i) sw_irq_o <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (!eo_i) begin
            escen_n_o <= 1'b0;
            count_q   <= '0;
            err_no_q  <= '0;
            acc_q     <= '0;
            state_q   <= S_SAMPLE;
          end
        end
        // Scan detection: read the bit of assertion number count_q + 1.
        S_SAMPLE: begin
          if (esci_i) begin
            err_no_q <= count_nx;
            acc_q    <= acc_q | SEVERITY[count_q];
          end
          count_q <= count_nx;
          esclk_o <= 1'b1;
          state_q <= S_SHIFT;
        end
        S_SHIFT: begin
          esclk_o <= 1'b0;
          if (count_q == CW'(N_ASSERT)) begin
            escen_n_o <= 1'b1;
            state_q   <= S_DISPATCH;
          end else begin
            state_q   <= S_SAMPLE;
          end
        end
        // Priority encoding and error correction.
        S_DISPATCH: begin
          state_q <= S_IDLE;
          if (acc_q != '0) begin
            error_no_o   <= err_no_q;
            error_prio_o <= acc_q;
            action_o     <= acc_q & (~acc_q + 1'b1);   // lowest set bit
            if (acc_q[ACT_HALT]) begin
              halt_o  <= 1'b1;
              state_q <= S_HALTED;
            end else if (acc_q[ACT_HW_RESET]) begin
              chip_rst_n_o <= 1'b0;
              rst_left_q   <= RCW'(RESET_CYCLES - 1);
              state_q      <= S_RESET;
            end else if (acc_q[ACT_SW_IRQ]) begin
              sw_irq_o <= 1'b1;
            end
          end
        end
        S_RESET: begin
          if (rst_left_q == '0) begin
            chip_rst_n_o <= 1'b1;
            state_q      <= S_IDLE;
          end else begin
            rst_left_q <= rst_left_q - 1'b1;
          end
        end
        S_HALTED: ;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Scan protocol: the shift strobe is only given with the chain in scan mode.
  // (Checked out of reset only; rst_n is therefore also read synchronously
  // here, which lint reports as a reset used both ways.)
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_strobe_in_scan: assert (!(esclk_o && escen_n_o))
        else $error("esclk high outside scan mode");
    end
  end

endmodule
