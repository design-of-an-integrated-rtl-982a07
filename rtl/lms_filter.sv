// lms_filter: 5-tap FIR-LMS adaptive predictor with its error subtractor.
//
// Each valid input brings x (the power signal delayed by one sample) and the
// desired value d (the current power sample). x enters a 5-tap delay line,
// and in the same clock the filter forms
//   y = sum_i w[i]*x[n-i]          (prediction, i = 0..4)
//   e = d - y                      (prediction error, the FDS output)
//   w[i] <= w[i] + mu*e*x[n-i]     (LMS weight update)
// e and y are registered and appear one clock after in_valid, with
// out_valid. A steady signal is predicted well once the weights have
// converged, so e stays near zero; a change in the power signal shows as a
// large error. The weights reset to zero. The step size is held in a
// register of the filter, loaded from mu_in when mu_load is high (once, at
// calibration); it resets to 0, which freezes the weights until it is loaded.
// A load takes effect from the next sample on.
//
// Format: x, d, mu, y and e are 16-bit signed with 11 fractional bits (y and
// e saturate); weights have WF fractional bits in WW bits and saturate.
// The 5 taps, the LMS rule, the step-size register loaded at calibration
// and the 16-bit buses
// follow the document; the weight precision, the single-clock evaluation
// and reset to zero are this design's choices.
module lms_filter
  import fdd_pkg::*;
#(
  parameter int unsigned TAPS = 5,
  parameter int unsigned WW   = 24,  // weight width
  parameter int unsigned WF   = 20   // weight fractional bits
)(
  input  logic clk,
  input  logic rst,
  input  bus_t x_in,
  input  bus_t d_in,
  input  logic in_valid,
  input  bus_t mu_in,
  input  logic mu_load,
  output bus_t y_out,
  output bus_t e_out,
  output logic out_valid
);

  localparam int unsigned UPD_SHIFT = 3 * FRAC_BITS - WF;

  typedef logic signed [WW-1:0] weight_t;

  bus_t    taps     [TAPS];
  bus_t    taps_new [TAPS];
  weight_t w        [TAPS];
  weight_t w_new    [TAPS];
  logic signed [63:0] acc, upd;
  logic signed [31:0] mu_e;
  bus_t    y, e;
  bus_t    mu;      // step-size register

  function automatic weight_t sat_w(input logic signed [63:0] v);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (WW - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (WW - 1));
    if (v > hi)      return weight_t'(hi);
    else if (v < lo) return weight_t'(lo);
    else             return weight_t'(v);
  endfunction

  always_comb begin
    taps_new[0] = x_in;
    for (int i = 1; i < TAPS; i++) taps_new[i] = taps[i-1];
    acc = '0;
    for (int i = 0; i < TAPS; i++) acc = acc + 64'(w[i]) * 64'(taps_new[i]);
    y    = sat_bus(48'(acc >>> WF));
    e    = sat_bus(48'(d_in) - 48'(y));
    mu_e = 32'(mu) * 32'(e);
    for (int i = 0; i < TAPS; i++) begin
      upd      = (64'(mu_e) * 64'(taps_new[i])) >>> UPD_SHIFT;
      w_new[i] = sat_w(64'(w[i]) + upd);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < TAPS; i++) begin
        taps[i] <= '0;
        w[i]    <= '0;
      end
      y_out     <= '0;
      e_out     <= '0;
      out_valid <= 1'b0;
      mu        <= '0;
    end else begin
      if (mu_load) mu <= mu_in;
      out_valid <= in_valid;
      if (in_valid) begin
        taps  <= taps_new;
        w     <= w_new;
        y_out <= y;
        e_out <= e;
      end
    end
  end

endmodule
