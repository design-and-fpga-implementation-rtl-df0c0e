// modem_pkg: types and constants shared by the baseband modem blocks.
//
// The convolutional code (rate 1/2, constraint length 3, generators
// G1 = 110 and G2 = 111) and the Gray-coded 16-QAM levels -3, -1, +1, +3
// are the modem's own definition. The sample format (8-bit signed fixed
// point with 4 fractional bits, so the level 1.0 is 16) is a choice of this
// implementation: it holds the levels +-3 with headroom for channel noise.
package modem_pkg;

  // Convolutional code
  localparam int unsigned CONV_K  = 3;
  localparam logic [2:0]  CONV_G1 = 3'b110;
  localparam logic [2:0]  CONV_G2 = 3'b111;

  // I/Q sample format
  localparam int unsigned DEF_SAMPLE_W = 8;
  localparam int unsigned DEF_FRAC_W   = 4;

  // Gray mapping of one 2-bit half of a symbol word (first bit in bit 1)
  // to the level -3, -1, +1 or +3:  00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3.
  function automatic int gray_level(logic [1:0] b);
    case (b)
      2'b00:   return -3;
      2'b01:   return -1;
      2'b11:   return 1;
      default: return 3;
    endcase
  endfunction

endpackage
