// power_est: short-time power of a coefficient stream.
//
// For every input value x (in_valid) the square x*x is formed and a running
// sum over the last 2**WIN_LOG2 squares is kept in a small shift register
// (add the newest square, subtract the one that leaves the window). The
// output is that sum divided by the window length, i.e. the mean power over
// the window, one clock after the input, with out_valid. Until the window has
// filled, the missing squares count as zero.
//
// Format: 16-bit signed inputs with 11 fractional bits; the square is
// scaled back to 11 fractional bits, so an input of full scale (1.0) gives a
// power of 1.0, and the output saturates at the largest 16-bit value. The
// document gives the block's function, a power (energy) estimate over a
// limited time frame, and its 16-bit buses; the window form and its length of
// 2 values are this design's choices. The window is kept short so that the
// built-in test pattern, whose values change at random every coefficient,
// still produces prediction errors above the threshold: with 4 values the
// averaging smooths the pattern so much that the self-test would show almost
// no detections.
module power_est
  import fdd_pkg::*;
#(
  parameter int unsigned WIN_LOG2 = 1
)(
  input  logic clk,
  input  logic rst,
  input  bus_t in_data,
  input  logic in_valid,
  output bus_t out_data,
  output logic out_valid
);

  localparam int unsigned WIN = 1 << WIN_LOG2;
  localparam int unsigned SQ_W  = 2 * BUS_W - FRAC_BITS;   // square, 11 frac bits
  localparam int unsigned SUM_W = SQ_W + WIN_LOG2;

  logic [SQ_W-1:0]  sq_win [WIN];
  logic [SUM_W-1:0] sum;
  logic [SQ_W-1:0]  sq_new;
  logic [SUM_W-1:0] sum_next;
  logic signed [2*BUS_W-1:0] prod;

  assign prod     = in_data * in_data;
  assign sq_new   = SQ_W'(prod >>> FRAC_BITS);
  assign sum_next = sum + SUM_W'(sq_new) - SUM_W'(sq_win[WIN-1]);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < WIN; i++) sq_win[i] <= '0;
      sum       <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sq_win[0] <= sq_new;
        for (int i = 1; i < WIN; i++) sq_win[i] <= sq_win[i-1];
        sum      <= sum_next;
        out_data <= sat_bus(48'(sum_next >> WIN_LOG2));
      end
    end
  end

endmodule
