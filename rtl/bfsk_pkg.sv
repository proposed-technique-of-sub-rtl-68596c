// bfsk_pkg: widths and types shared by the BFSK transmitter.
//
// The DAC takes a 19-bit word: 15 thermometer-coded lines for the four most
// significant bits of the sine sample and the four least significant bits in
// plain binary. The sine sample is therefore 8 bits wide. The PLA geometry
// (8 inputs, 6 outputs, 12 cubes) is the fixed size every PLA of the modulator
// uses. Everything else here (accumulator width, phase truncation) is a choice
// of this implementation.
package bfsk_pkg;

  // DAC input split: 4 MSBs thermometer coded, 4 LSBs binary coded.
  localparam int unsigned THERM_BITS = 4;
  localparam int unsigned BIN_BITS   = 4;
  localparam int unsigned AMP_W      = THERM_BITS + BIN_BITS;   // 8-bit sine sample
  localparam int unsigned THERM_W    = (1 << THERM_BITS) - 1;   // 15 thermometer lines
  localparam int unsigned DAC_W      = THERM_W + BIN_BITS;      // 19 DAC legs

  // Fixed PLA size used throughout the modulator.
  localparam int unsigned PLA_IN    = 8;
  localparam int unsigned PLA_OUT   = 6;
  localparam int unsigned PLA_CUBES = 12;

  // Phase accumulator defaults (implementation choices).
  localparam int unsigned DEF_ACC_W   = 16;  // accumulator width
  localparam int unsigned DEF_PHASE_W = 8;   // phase bits fed to the sine table

  // 19-bit DAC control word: thermometer legs above the binary legs.
  typedef struct packed {
    logic [THERM_W-1:0]  therm;  // therm[i] = 1 when MSB nibble > i
    logic [BIN_BITS-1:0] bin;    // weights 8,4,2,1 of one thermometer leg (16)
  } dac_code_t;

endpackage
