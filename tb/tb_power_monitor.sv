// tb_power_monitor: end-to-end test of the power monitor at its default size
// (four 12-bit event counters, 1024-cycle interval).
//
// The four monitored nets are driven interval by interval with synthetic
// activity standing in for the workloads of the reference system: a NOP loop
// (little activity), AES (medium), DES (more), plus one idle interval and one
// interval in which every net toggles at every cycle. The toggle densities are
// made up; only their order mirrors the ranking of the workloads.
//
// A processor model on the Wishbone port loads P0 and the weights, enables the
// interrupt and, at each interrupt, reads STATUS, the four counts and POWER.
// The testbench counts the events itself and checks every count, the interval
// number, the estimate P0 + sum w_i*Ev_i, the interrupt latency (NUM_EC+2
// cycles after an interval's last cycle) and that reading POWER clears the
// interrupt. Halfway through it recalibrates the model (P0 and weights scaled
// by 1.15, the gap measured between estimate and board). It checks that the
// mean estimate ranks DES above AES above NOP, and counts every mechanism:
// interval close, model evaluation, interrupt, flag clear, recalibration,
// saturated and idle intervals, each workload.
module tb_power_monitor;
  import pm_pkg::*;
  localparam int unsigned NUM_EC = NUM_EC_DEF;
  localparam int unsigned TI     = TI_CYCLES_DEF;

  typedef enum int {PH_NOP, PH_AES, PH_DES, PH_IDLE, PH_FULL} phase_e;
  // activity schedule, one entry per interval
  localparam int N_SCHED = 40;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #10 clk = ~clk;   // 50 MHz

  logic [NUM_EC-1:0] mon = '0;
  logic        cyc, stb, we, ack, irq;
  logic [7:0]  adr;
  logic [31:0] dat_w, dat_r;
  logic [3:0]  sel;
  int checks = 0, failures = 0;

  power_monitor dut (.clk(clk), .rst_n(rst_n), .mon_sig(mon), .wb_cyc_i(cyc), .wb_stb_i(stb),
                     .wb_we_i(we), .wb_adr_i(adr), .wb_dat_i(dat_w), .wb_sel_i(sel),
                     .wb_dat_o(dat_r), .wb_ack_o(ack), .irq_o(irq));

  wb_master_bfm bfm (.clk(clk), .wb_cyc_o(cyc), .wb_stb_o(stb), .wb_we_o(we), .wb_adr_o(adr),
                     .wb_dat_o(dat_w), .wb_sel_o(sel), .wb_dat_i(dat_r), .wb_ack_i(ack));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat ((N_SCHED + 4) * TI) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic phase_e sched(input int k);
    if (k < 5)  return PH_NOP;
    if (k < 13) return PH_AES;
    if (k == 13) return PH_IDLE;
    if (k < 21) return PH_DES;
    if (k < 25) return PH_NOP;
    if (k == 25) return PH_FULL;
    if (k < 32) return PH_AES;
    return PH_DES;
  endfunction

  // toggle probability in percent, per workload and net
  function automatic int dens(input phase_e p, input int net);
    case (p)
      PH_NOP:  return 4 + 2 * net;
      PH_AES:  return 30 + 5 * net;
      PH_DES:  return 45 + 5 * net;
      PH_IDLE: return 0;
      default: return 100;
    endcase
  endfunction

  // ---------------- reference event counting ----------------
  int unsigned edge_n = 0;
  int unsigned cnt [NUM_EC];
  int unsigned last_cnt [NUM_EC];
  phase_e      last_phase;
  int unsigned n_closed = 0;
  logic [NUM_EC-1:0] prev = '0;
  phase_e cur_phase = PH_NOP;
  bit stim_done = 0;

  initial foreach (cnt[i]) begin cnt[i] = 0; last_cnt[i] = 0; end

  always @(posedge clk) begin
    if (rst_n) begin
      edge_n <= edge_n + 1;
      for (int i = 0; i < NUM_EC; i++) begin
        if (mon[i] != prev[i]) cnt[i] = cnt[i] + 1;
      end
      prev <= mon;
      if ((edge_n + 1) % TI == 0) begin
        last_cnt = cnt;
        foreach (cnt[i]) cnt[i] = 0;
        last_phase = cur_phase;
        n_closed <= n_closed + 1;
      end
    end
  end

  // stimulus: one schedule entry per interval, applied at falling edges
  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N_SCHED; k++) begin
      cur_phase = sched(k);
      for (int c = 0; c < TI; c++) begin
        for (int i = 0; i < NUM_EC; i++)
          if ($urandom_range(0, 99) < dens(cur_phase, i)) mon[i] = ~mon[i];
        @(negedge clk);
      end
    end
    stim_done = 1;
  end

  // interrupt latency: irq must rise NUM_EC+2 edges after an interval's last edge
  int n_irq = 0;
  logic irq_q = 0;
  always @(negedge clk) begin
    irq_q <= irq;
    if (rst_n && irq && !irq_q) begin
      n_irq++;
      check(edge_n % TI == NUM_EC + 2,
            $sformatf("irq rose %0d cycles after interval end, expected %0d", edge_n % TI, NUM_EC + 2));
    end
  end

  // ---------------- processor model ----------------
  longint sum_est [3];
  int     n_est [3];
  int n_eval = 0, n_clear = 0, n_calib = 0, n_full = 0, n_idle = 0;

  task automatic program_model(input int p0, input int w [NUM_EC]);
    int lat;
    bfm.write(8'(4 * REG_P0), 32'(p0), 4'hf, lat);
    for (int i = 0; i < NUM_EC; i++) bfm.write(8'(4 * (REG_W0 + i)), 32'(w[i]), 4'hf, lat);
  endtask

  initial begin
    // model in microwatts: P0 plus weight per event (values chosen for the test)
    int p0;
    int w [NUM_EC];
    int lat;
    logic [31:0] st, ev_rd, pw_rd;
    longint exp_p;
    bit calibrated = 0;
    p0 = 19000;
    foreach (w[i]) w[i] = 8 + 4 * i;
    foreach (n_est[i]) begin n_est[i] = 0; sum_est[i] = 0; end
    wait (rst_n);
    program_model(p0, w);
    bfm.write(8'(4 * REG_IRQEN), 32'h1, 4'h1, lat);
    while (!(stim_done && n_eval == n_closed)) begin
      @(negedge clk);
      if (!irq) continue;
      bfm.read(8'(4 * REG_STATUS), st, lat);
      check(st[31] == 1'b1, "STATUS ready flag set at interrupt");
      check(st[23:16] == 8'(NUM_EC), "STATUS counter number");
      check(st[15:0] == 16'(n_closed), $sformatf("interval number %0d expected %0d", st[15:0], n_closed));
      exp_p = longint'(p0);
      for (int i = 0; i < NUM_EC; i++) begin
        bfm.read(8'(4 * (REG_EV0 + i)), ev_rd, lat);
        check(ev_rd == 32'(last_cnt[i]),
              $sformatf("interval %0d EV%0d=%0d expected %0d", n_closed, i, ev_rd, last_cnt[i]));
        exp_p += longint'(w[i]) * longint'(last_cnt[i]);
      end
      bfm.read(8'(4 * REG_POWER), pw_rd, lat);
      check(pw_rd == 32'(exp_p), $sformatf("interval %0d POWER=%0d expected %0d",
                                           n_closed, $signed(pw_rd), exp_p));
      n_eval++;
      @(negedge clk);
      check(irq == 1'b0, "reading POWER clears the interrupt");
      if (!irq) n_clear++;
      if (last_phase == PH_FULL) begin
        n_full++;
        foreach (last_cnt[i]) check(last_cnt[i] == TI, "saturated interval counts TI events");
      end
      if (last_phase == PH_IDLE) begin
        n_idle++;
        check(pw_rd == 32'(p0), "idle interval estimates P0");
      end
      if (last_phase <= PH_DES && !calibrated) begin
        sum_est[last_phase] += longint'($signed(pw_rd));
        n_est[last_phase]++;
      end
      // recalibrate once, halfway through: scale the model by 1.15
      if (n_eval == N_SCHED / 2 && !calibrated) begin
        p0 = p0 * 115 / 100;
        foreach (w[i]) w[i] = w[i] * 115 / 100;
        program_model(p0, w);
        calibrated = 1;
        n_calib++;
      end
    end
    // mechanisms and workload ranking
    check(n_closed == N_SCHED, $sformatf("%0d intervals closed, expected %0d", n_closed, N_SCHED));
    check(n_eval == N_SCHED, "one estimate read per interval");
    check(n_irq == N_SCHED, "one interrupt per interval");
    check(n_clear == N_SCHED, "interrupt cleared each time");
    check(n_calib == 1 && n_full == 1 && n_idle == 1, "recalibration, saturated and idle intervals");
    check(n_est[PH_NOP] > 0 && n_est[PH_AES] > 0 && n_est[PH_DES] > 0, "all three workloads seen");
    if (n_est[PH_NOP] > 0 && n_est[PH_AES] > 0 && n_est[PH_DES] > 0) begin
      longint m_nop, m_aes, m_des;
      m_nop = sum_est[PH_NOP] / n_est[PH_NOP];
      m_aes = sum_est[PH_AES] / n_est[PH_AES];
      m_des = sum_est[PH_DES] / n_est[PH_DES];
      $display("mean estimate [uW]: NOP %0d  AES %0d  DES %0d", m_nop, m_aes, m_des);
      check(m_des > m_aes && m_aes > m_nop, "estimate ranks DES > AES > NOP");
    end
    $display("mechanisms: intervals=%0d estimates=%0d irqs=%0d clears=%0d calib=%0d full=%0d idle=%0d",
             n_closed, n_eval, n_irq, n_clear, n_calib, n_full, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
