// tb_wb_monitor_regs: self-checking test of the monitor's Wishbone registers.
//
// A bus-functional master writes and reads every register. Checked: the
// one-cycle acknowledge; P0 and weight writes with byte selects, both on the
// outputs to the model and on read-back (weights sign-extended); the event
// counts; the interval number after a known number of sample pulses and the
// counter count in STATUS; the ready flag set by a new estimate and cleared by
// reading POWER; irq_o gated by IRQEN; read-only and unmapped words ignoring
// writes. Expected values are kept here in a shadow copy of the registers.
module tb_wb_monitor_regs;
  import pm_pkg::*;
  localparam int unsigned NUM_EC = 4;
  localparam int unsigned EC_W = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cyc, stb, we, ack;
  logic [7:0]  adr;
  logic [31:0] dat_w, dat_r;
  logic [3:0]  sel;
  logic        sample = 0, pvalid = 0, irq;
  logic [EC_W-1:0] ev [NUM_EC];
  pwr_t        power = '0, p0;
  coef_t       w [NUM_EC];
  int checks = 0, failures = 0;

  wb_master_bfm bfm (.clk(clk), .wb_cyc_o(cyc), .wb_stb_o(stb), .wb_we_o(we), .wb_adr_o(adr),
                     .wb_dat_o(dat_w), .wb_sel_o(sel), .wb_dat_i(dat_r), .wb_ack_i(ack));

  wb_monitor_regs dut (.clk(clk), .rst_n(rst_n), .wb_cyc_i(cyc), .wb_stb_i(stb), .wb_we_i(we),
                       .wb_adr_i(adr), .wb_dat_i(dat_w), .wb_sel_i(sel), .wb_dat_o(dat_r),
                       .wb_ack_o(ack), .sample_i(sample), .ev_i(ev), .power_i(power),
                       .power_valid_i(pvalid), .p0_o(p0), .w_o(w), .irq_o(irq));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] merge(input logic [31:0] o, input logic [31:0] n,
                                        input logic [3:0] s);
    for (int b = 0; b < 4; b++) if (s[b]) o[8*b +: 8] = n[8*b +: 8];
    return o;
  endfunction

  task automatic rd(input int idx, input logic [31:0] exp, input string what);
    logic [31:0] d;
    int lat;
    bfm.read(8'(4 * idx), d, lat);
    check(lat == 1, $sformatf("%s: ack after %0d cycles", what, lat));
    check(d == exp, $sformatf("%s: read %h expected %h", what, d, exp));
  endtask

  task automatic wr(input int idx, input logic [31:0] d, input logic [3:0] s);
    int lat;
    bfm.write(8'(4 * idx), d, s, lat);
    check(lat == 1, $sformatf("write %0d: ack after %0d cycles", idx, lat));
  endtask

  initial begin
    logic [31:0] sh_p0;
    logic [15:0] sh_w [NUM_EC];
    logic [31:0] d;
    foreach (ev[i]) ev[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // reset values
    rd(REG_STATUS, {8'd0, 8'(NUM_EC), 16'd0}, "STATUS after reset");
    rd(REG_P0, 32'd0, "P0 after reset");
    check(irq == 1'b0, "irq low after reset");

    // P0 and weights, full and partial byte writes
    sh_p0 = '0;
    foreach (sh_w[i]) sh_w[i] = '0;
    for (int r = 0; r < 40; r++) begin
      logic [31:0] v;
      logic [3:0] s;
      int i;
      v = $urandom;
      s = 4'($urandom_range(1, 15));
      if (r % 2 == 0) begin
        wr(REG_P0, v, s);
        sh_p0 = merge(sh_p0, v, s);
      end else begin
        i = $urandom_range(0, NUM_EC - 1);
        wr(REG_W0 + i, v, s);
        sh_w[i] = 16'(merge(32'(sh_w[i]), v, s));
      end
    end
    rd(REG_P0, sh_p0, "P0 read-back");
    check(p0 == pwr_t'(sh_p0), "p0_o follows P0");
    for (int i = 0; i < NUM_EC; i++) begin
      rd(REG_W0 + i, {{16{sh_w[i][15]}}, sh_w[i]}, $sformatf("W%0d read-back", i));
      check(w[i] == coef_t'(sh_w[i]), $sformatf("w_o[%0d] follows W%0d", i, i));
    end

    // event counts
    foreach (ev[i]) ev[i] = EC_W'($urandom);
    for (int i = 0; i < NUM_EC; i++) rd(REG_EV0 + i, 32'(ev[i]), $sformatf("EV%0d", i));

    // interval number: 37 sample pulses
    for (int k = 0; k < 37; k++) begin
      @(negedge clk); sample = 1'b1;
      @(negedge clk); sample = 1'b0;
    end
    rd(REG_STATUS, {8'd0, 8'(NUM_EC), 16'd37}, "STATUS interval number");

    // ready flag and interrupt
    power = pwr_t'($urandom);
    @(negedge clk); pvalid = 1'b1;
    @(negedge clk); pvalid = 1'b0;
    check(irq == 1'b0, "irq stays low while IRQEN=0");
    rd(REG_STATUS, {8'h80, 8'(NUM_EC), 16'd37}, "STATUS ready flag");
    wr(REG_IRQEN, 32'h1, 4'h1);
    rd(REG_IRQEN, 32'h1, "IRQEN read-back");
    @(negedge clk);
    check(irq == 1'b1, "irq high with ready and IRQEN");
    rd(REG_POWER, 32'(power), "POWER");
    @(negedge clk);
    check(irq == 1'b0, "reading POWER clears irq");
    rd(REG_STATUS, {8'h00, 8'(NUM_EC), 16'd37}, "STATUS flag cleared");

    // read-only and unmapped words ignore writes
    wr(REG_STATUS, 32'hffff_ffff, 4'hf);
    wr(REG_POWER, 32'h1234_5678, 4'hf);
    wr(REG_EV0, 32'hffff_ffff, 4'hf);
    wr(7, 32'hdead_beef, 4'hf);
    rd(REG_STATUS, {8'h00, 8'(NUM_EC), 16'd37}, "STATUS after write");
    rd(REG_POWER, 32'(power), "POWER after write");
    rd(REG_EV0, 32'(ev[0]), "EV0 after write");
    rd(7, 32'd0, "unmapped word");
    rd(REG_EV0 + NUM_EC, 32'd0, "EV beyond NUM_EC");
    rd(REG_P0, sh_p0, "P0 unchanged by other writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
