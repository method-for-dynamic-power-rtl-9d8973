// wb_master_bfm: Wishbone classic single-cycle master used by the testbenches.
//
// write() and read() drive one request at a falling edge, wait for wb_ack_i,
// then drop cyc/stb. Each returns, in cycles, how long the request waited for
// its acknowledge, so a testbench can check the slave's latency.
module wb_master_bfm (
  input  logic        clk,
  output logic        wb_cyc_o,
  output logic        wb_stb_o,
  output logic        wb_we_o,
  output logic [7:0]  wb_adr_o,
  output logic [31:0] wb_dat_o,
  output logic [3:0]  wb_sel_o,
  input  logic [31:0] wb_dat_i,
  input  logic        wb_ack_i
);
  initial begin
    wb_cyc_o = 1'b0;
    wb_stb_o = 1'b0;
    wb_we_o  = 1'b0;
    wb_adr_o = '0;
    wb_dat_o = '0;
    wb_sel_o = '0;
  end

  task automatic write(input logic [7:0] adr, input logic [31:0] dat,
                       input logic [3:0] sel, output int lat);
    @(negedge clk);
    wb_cyc_o = 1'b1; wb_stb_o = 1'b1; wb_we_o = 1'b1;
    wb_adr_o = adr;  wb_dat_o = dat;  wb_sel_o = sel;
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
      #1;
    end while (!wb_ack_i && lat < 50);
    @(negedge clk);
    wb_cyc_o = 1'b0; wb_stb_o = 1'b0; wb_we_o = 1'b0;
  endtask

  task automatic read(input logic [7:0] adr, output logic [31:0] dat, output int lat);
    @(negedge clk);
    wb_cyc_o = 1'b1; wb_stb_o = 1'b1; wb_we_o = 1'b0;
    wb_adr_o = adr;  wb_sel_o = 4'hf;
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
      #1;
    end while (!wb_ack_i && lat < 50);
    dat = wb_dat_i;
    @(negedge clk);
    wb_cyc_o = 1'b0; wb_stb_o = 1'b0;
  endtask
endmodule
