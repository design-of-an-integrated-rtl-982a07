// fdd_pkg: types and constants shared by the fault detection and diagnosis core.
//
// Number format. Every 16-bit data bus of the core (wavelet coefficients, test
// pattern, power, prediction, error) is a signed fixed-point value with
// FRAC_BITS = 11 fractional bits, so 1.0 is the full scale of the 12-bit
// sensor ADC (a 12-bit sample is Q1.11). The SPI word layout, the 12-bit
// sample, the 16-bit buses, the threshold of 0.25 and the frame of 256 samples
// follow the document; the 11-bit fraction is this design's choice, picked
// because the test pattern places its 8 LFSR bits at bus bits [10:3], i.e.
// just under 1.0 of this scale.
package fdd_pkg;

  localparam int unsigned WORD_W    = 16;  // SPI word, b15..b0
  localparam int unsigned DATA_W    = 12;  // sensor sample / mu field, b11..b0
  localparam int unsigned BUS_W     = 16;  // internal data buses
  localparam int unsigned FRAC_BITS = 11;  // fractional bits of a bus value

  typedef logic signed [DATA_W-1:0] sample_t;  // ADC sample, Q1.11
  typedef logic signed [BUS_W-1:0]  bus_t;     // Q5.11 data bus

  // Bit b15 of a command word: what the 12-bit field carries.
  typedef enum logic {
    CMD_SAMPLE = 1'b0,  // sensor sample (operation)
    CMD_MU     = 1'b1   // LMS step size (configuration)
  } cmd_kind_e;

  // Bit b14 of a command word: which wavelet sub-band feeds the power block.
  typedef enum logic {
    SEL_APPROX = 1'b0,  // approximation coefficients (torque / strain signal)
    SEL_DETAIL = 1'b1   // detail coefficients (vibration signal)
  } coef_sel_e;

  typedef struct packed {
    cmd_kind_e            kind;    // b15
    coef_sel_e            sel;     // b14
    logic [1:0]           unused;  // b13..b12
    logic [DATA_W-1:0]    data;    // b11..b0
  } cmd_word_t;

  // Saturate a wide signed value to the 16-bit bus.
  function automatic bus_t sat_bus(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return bus_t'(v);
  endfunction

endpackage
