// tb_power_monitor_configs: the power monitor in the other configurations
// evaluated for the reference system: linear models with 1, 2, 8 and 16 event
// counters (at the default 1024-cycle interval), and four counters with
// intervals of 100, 1250 and 2500 cycles. Each configuration runs in its own
// pm_config_unit, which checks every count and every estimate of six
// intervals against its own reference; this testbench sums their results.
module tb_power_monitor_configs;
  localparam int N_CFG = 7;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #10 clk = ~clk;

  logic [N_CFG-1:0] done;
  int chk [N_CFG];
  int fail [N_CFG];

  pm_config_unit #(.NUM_EC(1),  .TI_CYCLES(1024)) u_ec1  (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  pm_config_unit #(.NUM_EC(2),  .TI_CYCLES(1024)) u_ec2  (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  pm_config_unit #(.NUM_EC(8),  .TI_CYCLES(1024)) u_ec8  (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  pm_config_unit #(.NUM_EC(16), .TI_CYCLES(1024)) u_ec16 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]));
  pm_config_unit #(.NUM_EC(4),  .TI_CYCLES(100))  u_ti100  (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fail[4]));
  pm_config_unit #(.NUM_EC(4),  .TI_CYCLES(1250)) u_ti1250 (.clk, .rst_n, .done(done[5]), .checks(chk[5]), .failures(fail[5]));
  pm_config_unit #(.NUM_EC(4),  .TI_CYCLES(2500)) u_ti2500 (.clk, .rst_n, .done(done[6]), .checks(chk[6]), .failures(fail[6]));

  function automatic int total(input int a [N_CFG]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin : watchdog
    repeat (2500 * 9) @(posedge clk);
    $display("FAIL: watchdog expired, done=%b", done);
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail) + 1);
    $finish;
  end

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    wait (&done);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail));
    $finish;
  end
endmodule
