// dwt97: one-level 9/7 lifting discrete wavelet transform of a sample stream.
//
// Input samples arrive one at a time with in_valid (any spacing). They are
// taken as pairs (even, odd); once per pair the four lifting steps and the
// scaling of the 9/7 (CDF 9/7) wavelet are evaluated and one approximation
// coefficient a and one detail coefficient d come out with out_valid, so each
// sub-band runs at half the input rate (downsampling by 2):
//   d1[n] = o[n]  + ALPHA*(e[n]  + e[n+1])
//   a1[n] = e[n]  + BETA *(d1[n-1] + d1[n])
//   d2[n] = d1[n] + GAMMA*(a1[n] + a1[n+1])
//   a2[n] = a1[n] + DELTA*(d2[n-1] + d2[n])
//   a[n]  = K*a2[n],  d[n] = d2[n]/K
// Because each step needs the next pair, the pair completed at time n yields
// the coefficients of pair n-2: a latency of two pairs plus one clock. Only the
// handful of previous values the steps need are kept (in-place lifting, no
// sample buffer). The constant multiplications are shift-and-add sums over
// the set bits of 12-bit fractional constants, with no multiplier.
// The stream has no start or end: values before the first pair count as zero.
//
// Format: 12-bit signed input (1.0 = 2048), internal values carry GUARD extra
// fractional bits, outputs are 16-bit signed with 11 fractional bits,
// saturated. The 9/7 lifting structure, its place in the chain, the
// shift-add constants and the 16-bit outputs follow the document; the
// constant precision, guard bits, zero start and output scaling are this
// design's choices.
module dwt97
  import fdd_pkg::*;
#(
  parameter int unsigned GUARD = 4   // extra fractional bits inside the lifting
)(
  input  logic    clk,
  input  logic    rst,
  input  sample_t in_sample,
  input  logic    in_valid,
  output bus_t    a_out,
  output bus_t    d_out,
  output logic    out_valid
);

  localparam int unsigned IW = 24;            // internal width
  localparam int unsigned CF = 12;            // fractional bits of the constants
  // Lifting constants rounded to CF fractional bits.
  localparam int ALPHA = -6497;   // -1.586134342
  localparam int BETA  = -217;    // -0.052980118
  localparam int GAMMA = 3616;    //  0.882911076
  localparam int DELTA = 1817;    //  0.443506852
  localparam int KSC   = 4709;    //  1.149604398
  localparam int KINV  = 3563;    //  1/K = 0.869864452

  typedef logic signed [IW-1:0] ival_t;

  // v * c / 2**CF as a sum of shifted copies of v, one per set bit of |c|.
  function automatic ival_t cmul(input ival_t v, input int c);
    logic signed [IW+CF+1:0] acc;
    int unsigned             mag;
    mag = (c < 0) ? -c : c;
    acc = '0;
    for (int i = 0; i < 14; i++)
      if (mag[i]) acc = acc + ((IW+CF+2)'(v) <<< i);
    if (c < 0) acc = -acc;
    return ival_t'(acc >>> CF);
  endfunction

  logic  have_even;
  ival_t even_cur;           // even sample waiting for its odd partner
  ival_t e_prev, o_prev;     // e[n-1], o[n-1]
  ival_t d1_prev;            // d1[n-2]
  ival_t a1_prev;            // a1[n-2]
  ival_t d2_prev;            // d2[n-3]

  ival_t x_in;
  ival_t d1_new, a1_new, d2_new, a2_new, a_sc, d_sc;

  assign x_in = ival_t'(in_sample) <<< GUARD;

  // Lifting for one completed pair; even_cur is e[n].
  always_comb begin
    d1_new = o_prev  + cmul(e_prev + even_cur, ALPHA);   // d1[n-1]
    a1_new = e_prev  + cmul(d1_prev + d1_new, BETA);     // a1[n-1]
    d2_new = d1_prev + cmul(a1_prev + a1_new, GAMMA);    // d2[n-2]
    a2_new = a1_prev + cmul(d2_prev + d2_new, DELTA);    // a2[n-2]
    a_sc   = cmul(a2_new, KSC);
    d_sc   = cmul(d2_new, KINV);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      have_even <= 1'b0;
      even_cur  <= '0;
      e_prev    <= '0;
      o_prev    <= '0;
      d1_prev   <= '0;
      a1_prev   <= '0;
      d2_prev   <= '0;
      a_out     <= '0;
      d_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!have_even) begin
          even_cur  <= x_in;
          have_even <= 1'b1;
        end else begin
          have_even <= 1'b0;
          e_prev    <= even_cur;
          o_prev    <= x_in;
          d1_prev   <= d1_new;
          a1_prev   <= a1_new;
          d2_prev   <= d2_new;
          a_out     <= sat_bus(48'(a_sc >>> GUARD));
          d_out     <= sat_bus(48'(d_sc >>> GUARD));
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule
