// Shared constants and types of the assertion-processor subsystem.
//
// The assertion processor maps every failed assertion to a small set of
// actions. Each assertion carries a one-hot-style "severity" vector with one
// bit per action; bit positions follow the priority order of the processor's
// decision: bit 0 halts the chip, bit 1 resets it, bit 2 raises a software
// interrupt. When several bits are set the lowest one wins. Three actions is
// the minimal processor; NUM_ACTIONS may be raised to give more classes.
package ap_pkg;

  localparam int unsigned NUM_ACTIONS_DEFAULT = 3;

  // Bit position of each action inside a severity vector.
  typedef enum int unsigned {
    ACT_HALT     = 0,
    ACT_HW_RESET = 1,
    ACT_SW_IRQ   = 2
  } action_e;

  // Severity vectors for the three-action processor.
  localparam logic [2:0] SEV_HALT  = 3'b001;
  localparam logic [2:0] SEV_RESET = 3'b010;
  localparam logic [2:0] SEV_IRQ   = 3'b100;

endpackage
