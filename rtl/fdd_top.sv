// fdd_top: on-line fault detection and diagnosis core for rotary actuators.
//
// Pins as in the published block diagram: the serial interface (cs_n, sdi, sdo) with the clock
// (clk, which is also the serial clock) and reset (rst), and the test-mode
// pin tst. Sensor samples and the LMS step size arrive as 16-bit SPI words;
// the fault detection system (wavelet, power, LMS predictor) turns each pair
// of samples into a prediction error; the fault detection index counts the
// errors above 0.25 in frames of 256 and the latest count is shifted out on
// sdo with every word. With tst = 1 the built-in test pattern replaces the
// sensor sub-band, so the same chain can be checked in the field.
// At the document's rates (4096 Hz clock, 256 Hz samples) one word is sent
// per sample, a new error value appears every 32 clocks and a new FDI value
// every 8192 clocks (2 s). Synchronous, active-high reset.
// The pins, the three regions and their wiring follow the published block
// diagram; using the serial clock as the core clock is this design's choice,
// which the 16-bit word per 256 Hz sample at 4096 Hz makes possible.
module fdd_top
  import fdd_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic cs_n,
  input  logic sdi,
  output logic sdo,
  input  logic tst
);

  sample_t   sample;
  logic      sample_valid, mu_valid, e_valid, fd_flag, fdi_valid, tpg_done;
  coef_sel_e coef_sel;
  bus_t      mu, e, fdi_val, power;

  fdd_spi u_spi (
    .clk, .rst, .cs_n, .sdi, .sdo,
    .sample_o       (sample),
    .sample_valid_o (sample_valid),
    .coef_sel_o     (coef_sel),
    .mu_o           (mu),
    .mu_valid_o     (mu_valid),
    .fdi_i          (fdi_val)
  );

  fds u_fds (
    .clk, .rst,
    .sample,
    .sample_valid,
    .coef_sel,
    .tst,
    .mu,
    .mu_load   (mu_valid),
    .e_out     (e),
    .e_valid,
    .power_out (power),
    .tpg_done
  );

  fdi u_fdi (
    .clk, .rst,
    .e_in      (e),
    .in_valid  (e_valid),
    .fd_flag,
    .fdi_out   (fdi_val),
    .fdi_valid
  );

endmodule
