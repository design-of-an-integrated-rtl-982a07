// tpg: test pattern generator of the built-in self-test.
//
// An 8-stage LFSR with a primitive feedback polynomial runs through all 255
// non-zero states. A SEED register holds the state each sequence started
// from; a COMPARATOR checks the LFSR's next state against it, and when the
// sequence is about to repeat the seed is incremented by one and loaded into
// the LFSR instead, so successive sequences start at different points and the
// pattern does not cycle. An 8-bit COUNTER counts the completed sequences; after
// 256 of them (65280 patterns) it wraps and all_done pulses. The LFSR steps
// once per cycle in which en is high. The 16-bit output carries the LFSR
// state in bits [10:3] and zeros in bits [15:11] and [2:0].
//
// From the document (its TPG diagram and text): the 8-bit LFSR, seed register,
// comparator against the seed, seed increment by one, 8-bit counter, the
// 255 x 256 pattern count and the output bit placement. This design's own
// choices: the polynomial x^8+x^6+x^5+x^4+1 (Fibonacci form, shifting left),
// the first seed 8'h01, skipping the all-zero seed when the increment wraps,
// the all_done pulse and a synchronous active-high reset.
module tpg
  import fdd_pkg::*;
#(
  parameter logic [7:0] SEED0 = 8'h01
)(
  input  logic clk,
  input  logic rst,
  input  logic en,
  output bus_t out,
  output logic all_done
);

  logic [7:0] lfsr, seed, count;
  logic [7:0] lfsr_next, seed_inc;
  logic       match;

  // x^8 + x^6 + x^5 + x^4 + 1
  assign lfsr_next = {lfsr[6:0], lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3]};
  assign match     = (lfsr_next == seed);
  assign seed_inc  = (seed == 8'hff) ? 8'h01 : seed + 8'd1;
  assign out       = bus_t'({5'b00000, lfsr, 3'b000});

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr     <= SEED0;
      seed     <= SEED0;
      count    <= '0;
      all_done <= 1'b0;
    end else begin
      all_done <= 1'b0;
      if (en) begin
        if (match) begin
          seed  <= seed_inc;
          lfsr  <= seed_inc;
          count <= count + 8'd1;
          if (count == 8'hff) all_done <= 1'b1;
        end else begin
          lfsr <= lfsr_next;
        end
      end
    end
  end

endmodule
