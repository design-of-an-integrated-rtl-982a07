// fdd_spi: SPI slave interface of the core (Control, Serial data and Buffer).
//
// The core runs from one clock, which is also the serial bit clock: at the
// 256 Hz sample rate and 16-bit words the bit rate is exactly the 4096 Hz
// system clock, so the master clocks one word per sample. While cs_n is low,
// sdi is sampled on every rising clock edge, MSB (b15) first; every 16th bit
// completes a word, and cs_n may stay low across words. A word whose b15 is
// 0 carries a 12-bit sensor sample: it appears on sample_o with a one-cycle
// sample_valid_o in the cycle after the last bit. A word whose b15 is 1
// carries the LMS step size mu: it appears on mu_o with a one-cycle
// mu_valid_o, for the step-size register in the LMS filter. Both come from
// the same 12-bit data buffer, so each is only meaningful while its strobe
// is high. Bit b14 of
// either word selects the wavelet sub-band (0 approximation, 1 detail) and
// is kept until the next word. b13 and b12 are ignored.
// During each word, sdo shifts out, MSB first, the FDI value that was
// present when the word began; bit 15 is on sdo before the first edge.
//
// From the document: the pins, the 16-bit word, b15 sample/mu select, b14
// sub-band select, the 12-bit data field and the FDI value on SDO. This
// design's own choices: the encodings of b15 and b14, the shared clock, the
// SDO timing, mu read as an unsigned 12-bit value with 11 fractional bits
// (mu = 0.1 is 205) widened to the 16-bit bus, and
// a synchronous active-high reset.
module fdd_spi
  import fdd_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  // serial pins
  input  logic      cs_n,
  input  logic      sdi,
  output logic      sdo,
  // buffer towards the core
  output sample_t   sample_o,
  output logic      sample_valid_o,
  output coef_sel_e coef_sel_o,
  output bus_t      mu_o,
  output logic      mu_valid_o,
  input  bus_t      fdi_i
);

  logic [3:0]        bit_cnt;
  logic [WORD_W-2:0] rx_sr;
  logic [WORD_W-1:0] tx_sr;
  logic [DATA_W-1:0] data_q;    // data buffer
  cmd_word_t         word;

  assign word = cmd_word_t'({rx_sr, sdi});
  assign sdo      = tx_sr[WORD_W-1];
  assign sample_o = sample_t'(data_q);
  assign mu_o     = bus_t'({4'b0000, data_q});

  always_ff @(posedge clk) begin
    if (rst) begin
      bit_cnt        <= '0;
      rx_sr          <= '0;
      tx_sr          <= '0;
      data_q         <= '0;
      sample_valid_o <= 1'b0;
      coef_sel_o     <= SEL_APPROX;
      mu_valid_o     <= 1'b0;
    end else begin
      sample_valid_o <= 1'b0;
      mu_valid_o     <= 1'b0;
      if (cs_n) begin
        bit_cnt <= '0;
        tx_sr   <= fdi_i;
      end else begin
        bit_cnt <= bit_cnt + 4'd1;
        rx_sr   <= {rx_sr[WORD_W-3:0], sdi};
        if (bit_cnt == 4'(WORD_W - 1)) begin
          // last bit of the word: decode, and load the next SDO word
          tx_sr      <= fdi_i;
          coef_sel_o     <= word.sel;
          data_q         <= word.data;
          sample_valid_o <= (word.kind == CMD_SAMPLE);
          mu_valid_o     <= (word.kind == CMD_MU);
        end else begin
          tx_sr <= {tx_sr[WORD_W-2:0], 1'b0};
        end
      end
    end
  end

  // A word is either a sample or a step size, never both.
  a_one_decode: assert property (
    @(posedge clk) disable iff (rst) !(sample_valid_o && mu_valid_o));

endmodule
