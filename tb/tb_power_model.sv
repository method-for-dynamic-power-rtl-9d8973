// tb_power_model: self-checking test of power_model.
//
// Two instances: the default four-counter model and a sixteen-counter one.
// Each evaluation drives random counts (including 0 and the 12-bit maximum),
// random signed weights (including the extremes) and a random P0, pulses
// start_i, and checks that valid_o comes exactly NUM_EC+1 cycles later with
// P0 + sum w_i*Ev_i computed here in 64-bit integers and wrapped to 32 bits.
// A second start_i during an evaluation must be ignored.
module tb_power_model;
  import pm_pkg::*;
  localparam int unsigned EC_W = 12;
  localparam int unsigned N_A = 4;
  localparam int unsigned N_B = 16;
  localparam int unsigned N_RUNS = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start_a = 0, start_b = 0;
  logic [EC_W-1:0] ev_a [N_A];
  logic [EC_W-1:0] ev_b [N_B];
  coef_t w_a [N_A];
  coef_t w_b [N_B];
  pwr_t p0_a, p0_b, pw_a, pw_b;
  logic v_a, v_b, busy_a, busy_b;
  int checks = 0, failures = 0;

  power_model dut_a (.clk(clk), .rst_n(rst_n), .start_i(start_a), .ev_i(ev_a), .w_i(w_a),
                     .p0_i(p0_a), .power_o(pw_a), .valid_o(v_a), .busy_o(busy_a));
  power_model #(.NUM_EC(N_B), .EC_W(EC_W)) dut_b (.clk(clk), .rst_n(rst_n), .start_i(start_b),
                     .ev_i(ev_b), .w_i(w_b), .p0_i(p0_b), .power_o(pw_b), .valid_o(v_b),
                     .busy_o(busy_b));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (N_RUNS * 2 * (N_B + 8) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [EC_W-1:0] rnd_ev();
    case ($urandom_range(0, 5))
      0: return '0;
      1: return '1;
      default: return EC_W'($urandom);
    endcase
  endfunction

  function automatic coef_t rnd_w();
    case ($urandom_range(0, 5))
      0: return coef_t'(16'h7fff);
      1: return coef_t'(16'h8000);
      default: return coef_t'($urandom);
    endcase
  endfunction

  int n_restart_ignored = 0;

  initial begin
    longint acc;
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(v_a == 0 && busy_a == 0 && pw_a == 0, "idle after reset");
    for (int r = 0; r < N_RUNS; r++) begin
      // ---- instance A ----
      foreach (ev_a[i]) begin ev_a[i] = rnd_ev(); w_a[i] = rnd_w(); end
      p0_a = pwr_t'($urandom);
      acc = longint'(p0_a);
      foreach (ev_a[i]) acc += longint'(w_a[i]) * longint'(ev_a[i]);
      start_a = 1'b1;
      @(negedge clk);
      start_a = (r % 3 == 0);   // sometimes hold start high: must be ignored
      lat = 1;
      while (!v_a && lat < N_A + 10) begin
        @(negedge clk);
        start_a = 1'b0;
        lat++;
      end
      start_a = 1'b0;
      check(lat == N_A + 1, $sformatf("A: latency %0d expected %0d", lat, N_A + 1));
      check(pw_a == pwr_t'(acc), $sformatf("A: power %0d expected %0d", pw_a, pwr_t'(acc)));
      @(negedge clk);
      check(!v_a && !busy_a, "A: single valid pulse, then idle");
      if (r % 3 == 0) n_restart_ignored++;
      // ---- instance B ----
      foreach (ev_b[i]) begin ev_b[i] = rnd_ev(); w_b[i] = rnd_w(); end
      p0_b = pwr_t'($urandom);
      acc = longint'(p0_b);
      foreach (ev_b[i]) acc += longint'(w_b[i]) * longint'(ev_b[i]);
      start_b = 1'b1;
      @(negedge clk);
      start_b = 1'b0;
      lat = 1;
      while (!v_b && lat < N_B + 10) begin
        @(negedge clk);
        lat++;
      end
      check(lat == N_B + 1, $sformatf("B: latency %0d expected %0d", lat, N_B + 1));
      check(pw_b == pwr_t'(acc), $sformatf("B: power %0d expected %0d", pw_b, pwr_t'(acc)));
      @(negedge clk);
    end
    check(n_restart_ignored > 0, "start during evaluation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
