// mod_pkg: types and constants shared by the BPSK / QPSK / 16-QAM modulator system.
//
// Constellation coordinates and carrier samples are 16-bit two's-complement numbers.
// A coordinate of 1.0 is the value 1024 (0000_0100_0000_0000), as the BPSK mapper in the
// original design prints it; 3.0 is 3072. The carrier peaks at +/-8192, so that a unit
// symbol gives a passband peak of 8192 and an outer 16-QAM level gives 24576.
// The mode code is the one set on the two selector switches: 00 BPSK, 01 QPSK,
// 10 16-QAM. The code 11 is not assigned and selects no modulator (this design's choice).
package mod_pkg;

  localparam int unsigned SAMPLE_W = 16;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Coordinate scale: 1.0 == 2**COORD_FRAC.
  localparam int unsigned COORD_FRAC = 10;
  localparam sample_t     COORD_P1   = sample_t'(1 <<< COORD_FRAC);
  localparam sample_t     COORD_M1   = -COORD_P1;
  localparam sample_t     COORD_P3   = sample_t'(3 <<< COORD_FRAC);
  localparam sample_t     COORD_M3   = -COORD_P3;

  typedef enum logic [1:0] {
    MODE_BPSK  = 2'b00,
    MODE_QPSK  = 2'b01,
    MODE_QAM16 = 2'b10,
    MODE_NONE  = 2'b11
  } mode_e;

  // Bits carried by one symbol in each mode (0 for the unassigned code).
  function automatic int unsigned bits_per_symbol(mode_e m);
    case (m)
      MODE_BPSK:  return 1;
      MODE_QPSK:  return 2;
      MODE_QAM16: return 4;
      default:    return 0;
    endcase
  endfunction

  // One axis of the 16-QAM constellation: the first bit is the sign (0 negative),
  // the second bit selects the outer level. Along the axis -3,-1,+1,+3 the pairs are
  // 01,00,10,11, so neighbours differ in one bit.
  function automatic sample_t qam16_level(logic [1:0] b);
    case (b)
      2'b00:   return COORD_M1;
      2'b01:   return COORD_M3;
      2'b10:   return COORD_P1;
      default: return COORD_P3;
    endcase
  endfunction

endpackage
