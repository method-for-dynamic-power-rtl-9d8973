// power_model: evaluates the linear dynamic-power model
//   P_dyn = P0 + sum_{i<NUM_EC} w_i * Ev_i
// over the event counts of the last completed interval.
//
// The model has the reference form: a constant term plus one weighted term per
// event counter, with the weights found off-line by linear regression. Like a
// processor working through the counters, the unit does one multiplication and
// one addition per counter, one counter per clock cycle, reusing a single
// multiplier. Building it as a hardware unit, and the number formats, are this
// design's choices: Ev_i is unsigned EC_W bits, w_i is a signed COEF_W-bit
// integer, P0 and the result are signed PWR_W-bit integers in the same unit
// (for example microwatts). Arithmetic wraps modulo 2**PWR_W; coefficients
// must be scaled so that the sum fits.
//
// Timing: start_i (one cycle) loads P0; the next NUM_EC cycles add one term
// each; power_o takes the result and valid_o pulses NUM_EC+1 cycles after
// start_i. ev_i, w_i and p0_i must hold still while busy_o is high. A start_i
// while busy_o is high is ignored.
module power_model
  import pm_pkg::*;
#(
  parameter int unsigned NUM_EC = 4,
  parameter int unsigned EC_W   = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start_i,
  input  logic [EC_W-1:0] ev_i [NUM_EC],
  input  coef_t           w_i  [NUM_EC],
  input  pwr_t            p0_i,
  output pwr_t            power_o,
  output logic            valid_o,
  output logic            busy_o
);

  localparam int unsigned IDX_W = (NUM_EC > 1) ? $clog2(NUM_EC) : 1;
  localparam int unsigned PROD_W = COEF_W + EC_W + 1;

  if (PROD_W > PWR_W) begin : g_bad_width
    $error("power_model: product wider than the accumulator");
  end

  logic [IDX_W-1:0]        idx;
  pwr_t                    acc;
  logic signed [PROD_W-1:0] prod;
  pwr_t                    sum;

  // One multiply and one add per cycle: weight times zero-extended count.
  always_comb begin
    prod = PROD_W'(w_i[idx]) * $signed({1'b0, ev_i[idx]});
    sum  = acc + PWR_W'(prod);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx     <= '0;
      acc     <= '0;
      power_o <= '0;
      valid_o <= 1'b0;
      busy_o  <= 1'b0;
    end else begin
      valid_o <= 1'b0;
      if (!busy_o) begin
        if (start_i) begin
          acc    <= p0_i;
          idx    <= '0;
          busy_o <= 1'b1;
        end
      end else begin
        acc <= sum;
        if (idx == IDX_W'(NUM_EC - 1)) begin
          power_o <= sum;
          valid_o <= 1'b1;
          busy_o  <= 1'b0;
          idx     <= '0;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule
