// pm_pkg: constants and types shared by the run-time power monitor.
//
// The monitor counts toggles on a few selected nets of a system-on-chip, one
// event counter (EC) per net, over a fixed interval of clock cycles, and turns
// the counts into a dynamic-power estimate with a linear model
//   P_dyn = P0 + sum_i w_i * Ev_i.
// Four counters of 12 bits follow the reference configuration; the interval
// length, the coefficient widths and the register map are this design's own
// choices.
package pm_pkg;

  // Reference configuration.
  localparam int unsigned NUM_EC_DEF    = 4;     // four selected nets
  localparam int unsigned EC_W_DEF      = 12;    // 12-bit counters and register
  localparam int unsigned TI_CYCLES_DEF = 1024;  // 20.48 us at 50 MHz

  // Linear model number formats (design choice).
  localparam int unsigned COEF_W = 16;           // signed weight w_i
  localparam int unsigned PWR_W  = 32;           // signed P0 and estimate

  // Wishbone slave: 32-bit data, byte address, word registers.
  localparam int unsigned WB_AW = 8;
  localparam int unsigned WB_DW = 32;

  // Register map, word index (byte address = 4 * index).
  localparam int unsigned REG_STATUS = 0;   // RO: [15:0] interval number, [23:16] NUM_EC, [31] irq flag
  localparam int unsigned REG_POWER  = 1;   // RO: last P_dyn estimate (reading clears irq flag)
  localparam int unsigned REG_P0     = 2;   // RW: constant term P0
  localparam int unsigned REG_IRQEN  = 3;   // RW: [0] interrupt enable
  localparam int unsigned REG_EV0    = 16;  // RO: EV[i] at REG_EV0 + i, i < 16
  localparam int unsigned REG_W0     = 32;  // RW: w[i] at REG_W0 + i (low COEF_W bits, sign-extended on read)
  localparam int unsigned MAX_EC     = 16;  // room in the map for up to 16 counters

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [PWR_W-1:0]  pwr_t;

endpackage
