// wb_monitor_regs: Wishbone slave through which the processor reads the event
// counts and the power estimate and sets the coefficients of the power model.
//
// Registers (32-bit words, byte address = 4 * index, see pm_pkg):
//   0  STATUS  RO  [15:0] number of completed intervals (wraps),
//                  [23:16] NUM_EC, [31] estimate-ready flag
//   1  POWER   RO  latest P_dyn estimate; reading it clears the ready flag
//   2  P0      RW  constant term of the model
//   3  IRQEN   RW  [0] drive irq_o from the ready flag
//   16+i EV[i] RO  events counted on net i in the last interval (zero-extended)
//   32+i W[i]  RW  weight of counter i, low COEF_W bits, sign-extended on read
// Unmapped words read as 0 and ignore writes. Writes honour wb_sel_i.
// Registers are whole words, so wb_adr_i[1:0] is not decoded (lint reports
// those two bits as unused).
//
// Bus timing: Wishbone classic single cycles. A request (cyc & stb) is
// answered with wb_ack_o in the next cycle, with the read data registered in
// the same edge; the write takes effect at that edge too. ack is low for at
// least one cycle between two requests. The register file itself and the map
// are this design's own; the reference system only says that the processor
// retrieves the counter values over its bus.
// Reset (synchronous, active low) clears P0, the weights, IRQEN and the flags.
module wb_monitor_regs
  import pm_pkg::*;
#(
  parameter int unsigned NUM_EC = 4,
  parameter int unsigned EC_W   = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  // Wishbone slave
  input  logic             wb_cyc_i,
  input  logic             wb_stb_i,
  input  logic             wb_we_i,
  input  logic [WB_AW-1:0] wb_adr_i,
  input  logic [WB_DW-1:0] wb_dat_i,
  input  logic [3:0]       wb_sel_i,
  output logic [WB_DW-1:0] wb_dat_o,
  output logic             wb_ack_o,
  // monitor side
  input  logic             sample_i,        // an interval has ended
  input  logic [EC_W-1:0]  ev_i [NUM_EC],
  input  pwr_t             power_i,
  input  logic             power_valid_i,   // power_i has just been updated
  output pwr_t             p0_o,
  output coef_t            w_o  [NUM_EC],
  output logic             irq_o
);

  if (NUM_EC < 1 || NUM_EC > MAX_EC) begin : g_bad_num
    $error("wb_monitor_regs: NUM_EC must lie in 1 .. 16");
  end

  logic [15:0] interval_q;
  logic        ready_q;
  logic        irq_en_q;
  logic        req;
  logic [5:0]  widx;

  assign req  = wb_cyc_i && wb_stb_i && !wb_ack_o;
  assign widx = wb_adr_i[7:2];

  // Apply byte selects to a 32-bit register value.
  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] sel);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = sel[b] ? nw[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  // Read mux.
  logic [31:0] rdata;
  always_comb begin
    rdata = '0;
    if (widx == 6'(REG_STATUS)) begin
      rdata = {ready_q, 7'd0, 8'(NUM_EC), interval_q};
    end else if (widx == 6'(REG_POWER)) begin
      rdata = 32'(power_i);
    end else if (widx == 6'(REG_P0)) begin
      rdata = 32'(p0_o);
    end else if (widx == 6'(REG_IRQEN)) begin
      rdata = {31'd0, irq_en_q};
    end else begin
      for (int i = 0; i < NUM_EC; i++) begin
        if (widx == 6'(REG_EV0 + i)) rdata = 32'(ev_i[i]);
        if (widx == 6'(REG_W0 + i))  rdata = 32'(w_o[i]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb_ack_o   <= 1'b0;
      wb_dat_o   <= '0;
      interval_q <= '0;
      ready_q    <= 1'b0;
      irq_en_q   <= 1'b0;
      p0_o       <= '0;
      for (int i = 0; i < NUM_EC; i++) w_o[i] <= '0;
    end else begin
      wb_ack_o <= req;
      if (sample_i) interval_q <= interval_q + 1'b1;

      if (req) begin
        wb_dat_o <= rdata;
        if (wb_we_i) begin
          if (widx == 6'(REG_P0))    p0_o     <= pwr_t'(merge(32'(p0_o), wb_dat_i, wb_sel_i));
          if (widx == 6'(REG_IRQEN) && wb_sel_i[0]) irq_en_q <= wb_dat_i[0];
          for (int i = 0; i < NUM_EC; i++) begin
            if (widx == 6'(REG_W0 + i)) w_o[i] <= coef_t'(merge(32'(w_o[i]), wb_dat_i, wb_sel_i));
          end
        end
      end

      // A new estimate sets the flag; reading POWER clears it (set wins).
      if (power_valid_i)                               ready_q <= 1'b1;
      else if (req && !wb_we_i && widx == 6'(REG_POWER)) ready_q <= 1'b0;
    end
  end

  assign irq_o = ready_q && irq_en_q;

  // Wishbone classic rule: ack only answers a live request.
  a_ack_follows_req: assert property (@(posedge clk) disable iff (!rst_n)
    wb_ack_o |-> $past(wb_cyc_i && wb_stb_i));

endmodule
