// fds: fault detection system.
//
// The chain of the published block diagram: sensor samples go through the 9/7 wavelet
// transform; a multiplexer picks the approximation or the detail sub-band
// (coef_sel); in test mode (tst = 1) a second multiplexer replaces that
// sub-band with the built-in test pattern, which steps once per coefficient;
// the power block estimates the signal power; a one-sample delay (z^-1)
// feeds the power's previous value to the LMS predictor, whose desired
// value is the current power; the prediction error e is the FDS output.
//
// Timing: one coefficient per two input samples; e_valid follows the
// coefficient by two clocks (power, LMS). Input samples must be at least
// four clocks apart, which the 16-clock SPI word guarantees.
// The structure and the order of the blocks follow the document's figures;
// stepping the test pattern at the coefficient rate is this design's reading
// of where the block diagram places the test multiplexer (after the wavelet
// multiplexer, ahead of the power block).
module fds
  import fdd_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  sample_t   sample,
  input  logic      sample_valid,
  input  coef_sel_e coef_sel,
  input  logic      tst,
  input  bus_t      mu,
  input  logic      mu_load,
  output bus_t      e_out,
  output logic      e_valid,
  output bus_t      power_out,
  output logic      tpg_done
);

  bus_t dwt_a, dwt_d, coef, pwr_in, tpg_out, pwr, pwr_delay, lms_y;
  logic dwt_valid, pwr_valid;

  dwt97 u_dwt (
    .clk, .rst,
    .in_sample (sample),
    .in_valid  (sample_valid),
    .a_out     (dwt_a),
    .d_out     (dwt_d),
    .out_valid (dwt_valid)
  );

  tpg u_tpg (
    .clk, .rst,
    .en       (tst && dwt_valid),
    .out      (tpg_out),
    .all_done (tpg_done)
  );

  assign coef   = (coef_sel == SEL_DETAIL) ? dwt_d : dwt_a;
  assign pwr_in = tst ? tpg_out : coef;

  power_est u_power (
    .clk, .rst,
    .in_data   (pwr_in),
    .in_valid  (dwt_valid),
    .out_data  (pwr),
    .out_valid (pwr_valid)
  );

  // z^-1: the power sample before the current one
  always_ff @(posedge clk) begin
    if (rst)            pwr_delay <= '0;
    else if (pwr_valid) pwr_delay <= pwr;
  end

  lms_filter u_lms (
    .clk, .rst,
    .x_in      (pwr_delay),
    .d_in      (pwr),
    .in_valid  (pwr_valid),
    .mu_in     (mu),
    .mu_load,
    .y_out     (lms_y),
    .e_out,
    .out_valid (e_valid)
  );

  assign power_out = pwr;

  // Input samples need at least four clocks between them: the wavelet,
  // power and LMS stages each take one clock per value.
  a_sample_spacing: assert property (
    @(posedge clk) disable iff (rst) sample_valid |=> !sample_valid [*3]);

endmodule
