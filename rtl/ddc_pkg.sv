// ddc_pkg: widths, types and constant tables shared by the digital
// downconverter (DDC) blocks.
//
// The 8-bit sample width, the 24-bit NCO phase word and the 21 CORDIC
// iterations are the values of the published design. The CORDIC angle table
// is atan(2^-i) expressed in phase units where 2^24 equals one full turn
// (2*pi), rounded to the nearest integer; narrower phase words use the same
// table rounded to fewer bits. The half-band and shaping-filter coefficients
// are this design's own (the published design takes them from a filter
// design tool and does not print them):
//   half-band : maximally flat 11-tap, [3 0 -25 0 150 256 150 0 -25 0 3]/512
//   shaping   : 15-tap Hamming-windowed sinc, cut-off 0.2 cycles/sample,
//               scaled to a sum of 1024 (unity DC gain).
package ddc_pkg;

  localparam int SAMPLE_W    = 8;    // ADC/NCO/output sample width
  localparam int PHASE_W     = 24;   // NCO phase accumulator width
  localparam int CORDIC_ITER = 21;   // CORDIC pipeline stages in the NCO
  localparam int MIX_W       = 16;   // mixer product width
  localparam int FILT_W      = 16;   // word width inside the filter chain

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [MIX_W-1:0]    mix_t;
  typedef logic signed [FILT_W-1:0]   filt_t;

  // One complex baseband sample.
  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  // atan(2^-i) * 2^24 / (2*pi), i = 0 .. 23
  function automatic int unsigned atan24(input int i);
    case (i)
      0:  return 2097152;  1:  return 1238021;  2:  return 654136;
      3:  return 332050;   4:  return 166669;   5:  return 83416;
      6:  return 41718;    7:  return 20860;    8:  return 10430;
      9:  return 5215;     10: return 2608;     11: return 1304;
      12: return 652;      13: return 326;      14: return 163;
      15: return 81;       16: return 41;       17: return 20;
      18: return 10;       19: return 5;        20: return 3;
      21: return 1;        22: return 1;        23: return 0;
      default: return 0;
    endcase
  endfunction

  // The same angle for a phase word of 'width' bits (width <= 24), rounded.
  function automatic int unsigned atan_w(input int i, input int width);
    int unsigned sh;
    sh = 24 - width;
    if (sh == 0) return atan24(i);
    return (atan24(i) + (1 << (sh - 1))) >> sh;
  endfunction

  // Half-band coefficients, taps 0..10, scaled by 512.
  function automatic int hb_coef(input int k);
    case (k)
      0, 10: return 3;
      2, 8:  return -25;
      4, 6:  return 150;
      5:     return 256;
      default: return 0;
    endcase
  endfunction
  localparam int HB_TAPS  = 11;
  localparam int HB_SHIFT = 9;

  // Shaping FIR coefficients, taps 0..14 (symmetric), scaled by 1024.
  function automatic int fir_coef(input int k);
    case (k)
      0, 14: return 2;
      1, 13: return 6;
      2, 12: return 0;
      3, 11: return -34;
      4, 10: return -41;
      5, 9:  return 79;
      6, 8:  return 295;
      7:     return 410;
      default: return 0;
    endcase
  endfunction
  localparam int FIR_TAPS  = 15;
  localparam int FIR_SHIFT = 10;

endpackage
