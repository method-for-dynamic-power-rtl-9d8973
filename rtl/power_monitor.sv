// power_monitor: run-time dynamic-power monitor for an FPGA system-on-chip.
//
// A few nets of the system, chosen off-line because their toggle activity
// correlates best with dynamic power, are each watched by an event counter
// (EC). Every TI_CYCLES clock cycles all counters close their interval at the
// same edge and latch their counts; the power model then computes
//   P_dyn = P0 + sum_i w_i * Ev_i
// with coefficients the processor loaded over the Wishbone bus, and raises a
// ready flag (and irq_o, if enabled). The processor can read the counts and
// the estimate at any time. The defaults follow the reference configuration:
// four ECs of 12 bits on the nets listed in the README. The interval of 1024
// cycles (20.48 us at 50 MHz), the hardware evaluation of the model and the
// register map are this design's choices.
//
// Timing: the counts of interval k are visible in EV[i] one cycle after the
// interval's last cycle; the estimate follows NUM_EC+1 cycles later.
module power_monitor
  import pm_pkg::*;
#(
  parameter int unsigned NUM_EC    = NUM_EC_DEF,
  parameter int unsigned EC_W      = EC_W_DEF,
  parameter int unsigned TI_CYCLES = TI_CYCLES_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_EC-1:0] mon_sig,
  input  logic              wb_cyc_i,
  input  logic              wb_stb_i,
  input  logic              wb_we_i,
  input  logic [WB_AW-1:0]  wb_adr_i,
  input  logic [WB_DW-1:0]  wb_dat_i,
  input  logic [3:0]        wb_sel_i,
  output logic [WB_DW-1:0]  wb_dat_o,
  output logic              wb_ack_o,
  output logic              irq_o
);

  if (TI_CYCLES < NUM_EC + 2) begin : g_bad_ti
    $error("power_monitor: the interval must outlast the model evaluation");
  end

  logic [EC_W-1:0]   ev     [NUM_EC];
  logic [NUM_EC-1:0] sample;
  coef_t             w      [NUM_EC];
  pwr_t              p0;
  pwr_t              power;
  logic              power_valid;
  logic              busy;

  for (genvar i = 0; i < NUM_EC; i++) begin : g_ec
    event_counter #(.W(EC_W), .TI_CYCLES(TI_CYCLES)) u_ec (
      .clk      (clk),
      .rst_n    (rst_n),
      .mon_i    (mon_sig[i]),
      .ev_o     (ev[i]),
      .sample_o (sample[i])
    );
  end

  power_model #(.NUM_EC(NUM_EC), .EC_W(EC_W)) u_model (
    .clk     (clk),
    .rst_n   (rst_n),
    .start_i (sample[0]),
    .ev_i    (ev),
    .w_i     (w),
    .p0_i    (p0),
    .power_o (power),
    .valid_o (power_valid),
    .busy_o  (busy)
  );

  wb_monitor_regs #(.NUM_EC(NUM_EC), .EC_W(EC_W)) u_regs (
    .clk           (clk),
    .rst_n         (rst_n),
    .wb_cyc_i      (wb_cyc_i),
    .wb_stb_i      (wb_stb_i),
    .wb_we_i       (wb_we_i),
    .wb_adr_i      (wb_adr_i),
    .wb_dat_i      (wb_dat_i),
    .wb_sel_i      (wb_sel_i),
    .wb_dat_o      (wb_dat_o),
    .wb_ack_o      (wb_ack_o),
    .sample_i      (sample[0]),
    .ev_i          (ev),
    .power_i       (power),
    .power_valid_i (power_valid),
    .p0_o          (p0),
    .w_o           (w),
    .irq_o         (irq_o)
  );

  // All counters share reset and interval, so they close together.
  a_ec_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    sample[0] |-> &sample);
  // The model finishes well inside one interval.
  a_model_free: assert property (@(posedge clk) disable iff (!rst_n)
    sample[0] |-> !busy);

endmodule
