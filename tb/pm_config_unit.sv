// pm_config_unit: one power_monitor configuration with its own stimulus,
// processor model and reference, used by tb_power_monitor_configs.
//
// It drives the NUM_EC nets with a random toggle density per net and per
// interval (including idle and toggle-every-cycle intervals), loads random
// signed weights and P0, and on every interrupt reads STATUS, all counts and
// POWER. Counts are compared with events counted here, the estimate with
// P0 + sum w_i*Ev_i computed here in 64 bits. Results are brought out as
// check and failure counts; done rises after N_INT intervals have been read.
module pm_config_unit #(
  parameter int unsigned NUM_EC    = 4,
  parameter int unsigned TI_CYCLES = 1024,
  parameter int unsigned N_INT     = 6
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import pm_pkg::*;

  logic [NUM_EC-1:0] mon = '0;
  logic        cyc, stb, we, ack, irq;
  logic [7:0]  adr;
  logic [31:0] dat_w, dat_r;
  logic [3:0]  sel;

  power_monitor #(.NUM_EC(NUM_EC), .TI_CYCLES(TI_CYCLES)) dut (
    .clk(clk), .rst_n(rst_n), .mon_sig(mon), .wb_cyc_i(cyc), .wb_stb_i(stb), .wb_we_i(we),
    .wb_adr_i(adr), .wb_dat_i(dat_w), .wb_sel_i(sel), .wb_dat_o(dat_r), .wb_ack_o(ack),
    .irq_o(irq));

  wb_master_bfm bfm (.clk(clk), .wb_cyc_o(cyc), .wb_stb_o(stb), .wb_we_o(we), .wb_adr_o(adr),
                     .wb_dat_o(dat_w), .wb_sel_o(sel), .wb_dat_i(dat_r), .wb_ack_i(ack));

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t [NUM_EC=%0d TI=%0d]: %s", $time, NUM_EC, TI_CYCLES, what);
    end
  endtask

  // reference: events per net, snapshot per closed interval
  int unsigned edge_n = 0;
  int unsigned cnt  [NUM_EC];
  int unsigned snap [int][NUM_EC];
  logic [NUM_EC-1:0] prev = '0;
  int unsigned n_closed = 0;

  initial foreach (cnt[i]) cnt[i] = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      edge_n <= edge_n + 1;
      for (int i = 0; i < NUM_EC; i++) if (mon[i] != prev[i]) cnt[i] = cnt[i] + 1;
      prev <= mon;
      if ((edge_n + 1) % TI_CYCLES == 0) begin
        automatic int key = int'(n_closed) + 1;
        snap[key] = cnt;
        foreach (cnt[i]) cnt[i] = 0;
        n_closed <= n_closed + 1;
      end
    end
  end

  // stimulus
  initial begin
    int d [NUM_EC];
    wait (rst_n);
    @(negedge clk);
    for (int k = 0; k < N_INT + 1; k++) begin
      foreach (d[i]) d[i] = (k == 1) ? 0 : (k == 2) ? 100 : $urandom_range(0, 100);
      for (int c = 0; c < TI_CYCLES; c++) begin
        for (int i = 0; i < NUM_EC; i++) if ($urandom_range(0, 99) < d[i]) mon[i] = ~mon[i];
        @(negedge clk);
      end
    end
  end

  // processor model
  initial begin
    int p0;
    int w [NUM_EC];
    int lat, n;
    logic [31:0] st, rd;
    longint exp_p;
    wait (rst_n);
    p0 = int'($urandom_range(0, 200000)) - 50000;
    foreach (w[i]) w[i] = int'($urandom_range(0, 65535)) - 32768;
    bfm.write(8'(4 * REG_P0), 32'(p0), 4'hf, lat);
    for (int i = 0; i < NUM_EC; i++) bfm.write(8'(4 * (REG_W0 + i)), 32'(w[i]), 4'hf, lat);
    bfm.write(8'(4 * REG_IRQEN), 32'h1, 4'h1, lat);
    for (int k = 0; k < N_INT; k++) begin
      @(negedge clk);
      while (!irq) @(negedge clk);
      bfm.read(8'(4 * REG_STATUS), st, lat);
      n = int'(st[15:0]);
      check(st[23:16] == 8'(NUM_EC), "STATUS counter number");
      check(n == k + 1, $sformatf("interval number %0d expected %0d", n, k + 1));
      exp_p = longint'(p0);
      for (int i = 0; i < NUM_EC; i++) begin
        bfm.read(8'(4 * (REG_EV0 + i)), rd, lat);
        check(rd == 32'(snap[n][i]), $sformatf("interval %0d EV%0d=%0d expected %0d",
                                               n, i, rd, snap[n][i]));
        exp_p += longint'(w[i]) * longint'(snap[n][i]);
      end
      bfm.read(8'(4 * REG_POWER), rd, lat);
      check(rd == 32'(exp_p), $sformatf("interval %0d POWER=%0d expected %0d", n, $signed(rd), exp_p));
    end
    done = 1'b1;
  end
endmodule
