// event_counter: one event counter (EC) of the run-time power monitor.
//
// An event is a change of the monitored net's value between two rising clock
// edges. The block keeps the value seen at the previous edge, counts every
// edge at which the net differs from it, and, after TI_CYCLES clock cycles,
// copies the count into the snapshot register ev_o and restarts the count.
// This matches the reference EC: two W-bit counters (events, and cycles in the
// interval) and one W-bit register; the flop holding the previous value of
// the net is the only addition.
//
// Interface: mon_i is a net synchronous to clk. ev_o holds the number of
// events of the last completed interval; sample_o pulses for one cycle in the
// cycle ev_o takes a new value. The first interval ends TI_CYCLES cycles after
// reset is released. Because at most one event is counted per cycle, a count
// never exceeds TI_CYCLES, which must therefore fit in W bits.
// Reset (synchronous, active low) clears both counters, the register and the
// previous value (0), so a net that is 1 when reset ends counts one event.
module event_counter #(
  parameter int unsigned W         = 12,
  parameter int unsigned TI_CYCLES = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mon_i,
  output logic [W-1:0] ev_o,
  output logic         sample_o
);

  if (TI_CYCLES < 2 || TI_CYCLES > (2**W - 1)) begin : g_bad_ti
    $error("event_counter: TI_CYCLES must lie in 2 .. 2**W-1");
  end

  logic         mon_q;     // value of the net at the previous edge
  logic         toggle;
  logic [W-1:0] ev_cnt;    // events in the current interval
  logic [W-1:0] ti_cnt;    // cycles elapsed in the current interval
  logic         last;

  assign toggle = mon_i ^ mon_q;
  assign last   = (ti_cnt == W'(TI_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mon_q    <= 1'b0;
      ev_cnt   <= '0;
      ti_cnt   <= '0;
      ev_o     <= '0;
      sample_o <= 1'b0;
    end else begin
      mon_q    <= mon_i;
      sample_o <= last;
      if (last) begin
        ev_o   <= ev_cnt + W'(toggle);
        ev_cnt <= '0;
        ti_cnt <= '0;
      end else begin
        ev_cnt <= ev_cnt + W'(toggle);
        ti_cnt <= ti_cnt + 1'b1;
      end
    end
  end

endmodule
