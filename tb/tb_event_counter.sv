// tb_event_counter: self-checking test of event_counter.
//
// Instance dut runs at the default size (12-bit, 1024-cycle interval). Its
// input is driven at falling edges, interval by interval, with random toggles
// of varying density, with a toggle at every cycle (the largest count) and
// with a constant value (no events). The testbench counts the events itself
// from the values it applied and, at every falling edge, checks that sample_o
// pulses exactly at the end of each interval with the expected count in ev_o.
// Instance dut_max uses the largest legal interval, 4095 cycles, on a net that
// toggles every cycle, so its count must be exactly 4095.
module tb_event_counter;
  localparam int unsigned W  = 12;
  localparam int unsigned TI = 1024;
  localparam int unsigned TI_MAX = 4095;
  localparam int unsigned N_INT = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic mon = 1'b0;
  logic mon2 = 1'b0;
  logic [W-1:0] ev, ev2;
  logic sample, sample2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  event_counter dut (.clk(clk), .rst_n(rst_n), .mon_i(mon), .ev_o(ev), .sample_o(sample));
  event_counter #(.W(W), .TI_CYCLES(TI_MAX)) dut_max
    (.clk(clk), .rst_n(rst_n), .mon_i(mon2), .ev_o(ev2), .sample_o(sample2));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (TI * (N_INT + 2) + 2 * TI_MAX) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model: count value changes between consecutive sampled edges.
  int unsigned edge_n = 0;      // active edges since reset release
  int unsigned ref_cnt = 0;     // events in the open interval
  logic        prev = 1'b0;     // value seen at the previous edge
  int unsigned n_full = 0, n_zero = 0;
  int unsigned edge2 = 0;
  int unsigned n_max = 0;

  // dut_max: the net toggles at every edge, so each interval counts TI_MAX.
  always @(negedge clk) begin
    if (rst_n && edge2 > 0) begin
      if (edge2 % TI_MAX == 0) begin
        check(sample2 == 1'b1, "dut_max: sample_o missing at 4095 cycles");
        check(ev2 == W'(TI_MAX), $sformatf("dut_max: ev=%0d expected %0d", ev2, TI_MAX));
        n_max++;
      end else begin
        check(sample2 == 1'b0, "dut_max: sample_o outside interval end");
      end
    end
  end

  initial begin
    int unsigned mode, dens;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N_INT; k++) begin
      mode = (k == 2) ? 1 : (k == 5) ? 2 : 0;
      dens = $urandom_range(1, 99);
      for (int c = 0; c < TI; c++) begin
        // the value applied now is sampled at the next rising edge
        logic nv;
        case (mode)
          1: nv = ~mon;
          2: nv = mon;
          default: nv = ($urandom_range(0, 99) < dens) ? ~mon : mon;
        endcase
        mon  = nv;
        mon2 = ~mon2;
        @(posedge clk);
        edge_n++;
        edge2++;
        if (mon != prev) ref_cnt++;
        prev = mon;
        @(negedge clk);
        if (edge_n % TI == 0) begin
          check(sample == 1'b1, "sample_o missing at interval end");
          check(ev == W'(ref_cnt), $sformatf("interval %0d: ev=%0d expected %0d", k, ev, ref_cnt));
          if (ref_cnt == TI) n_full++;
          if (ref_cnt == 0) n_zero++;
          ref_cnt = 0;
        end else begin
          check(sample == 1'b0, "sample_o outside interval end");
        end
      end
    end
    check(n_max >= 2, "dut_max reached the end of its interval");
    check(n_full == 1 && n_zero == 1, "full-toggle and idle intervals both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
