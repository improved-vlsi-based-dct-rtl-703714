// dsp_pkg: types and constants shared by the DCT/DWT datapath.
//
// Samples are 8-bit two's complement integers. Transform coefficients are
// 8-bit Q1.7 values, cos(m*pi/8) scaled by 128 and truncated toward zero:
// W1N = 118, W2N = 90, W3N = 48, W4N = 0 and W6N = 90 (the magnitude of
// cos(6*pi/8)). These five values and the 8-bit widths follow the published
// simulation of the DCT; the truncation rule that reproduces them is how this
// design derives the rest of the set (W5N, W7N are the magnitudes 48 and 118).
//
// adder_style_e selects the adder used in every add/subtract unit: the
// XOR-MUX ripple adder (the default, the configuration reported as the
// smaller and faster one) or the RCA-BEC carry-select adder.
package dsp_pkg;

  localparam int unsigned DATA_W  = 8;   // sample width
  localparam int unsigned COEF_W  = 8;   // coefficient width, Q1.7

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // cos(m*pi/8) * 128, truncated, as printed in the DCT simulation
  localparam coef_t W1N = 8'sb0111_0110;  // 118
  localparam coef_t W2N = 8'sb0101_1010;  //  90
  localparam coef_t W3N = 8'sb0011_0000;  //  48
  localparam coef_t W4N = 8'sb0000_0000;  //   0
  localparam coef_t W6N = 8'sb0101_1010;  //  90 (magnitude)

  typedef enum logic [0:0] {
    ADDER_XOR_MUX = 1'b0,
    ADDER_RCA_BEC = 1'b1
  } adder_style_e;

  // Magnitude of cos(m*pi/8) in Q1.7 for m = 0..15 (m = 0 gives 127, the
  // largest representable value; the DCT below never uses it).
  function automatic coef_t cos_mag(input int unsigned m);
    int unsigned r;
    r = m % 16;
    if (r > 8) r = 16 - r;          // cos is even about pi
    case (r)
      0, 8:    return 8'sd127;
      1, 7:    return W1N;
      2:       return W2N;
      3, 5:    return W3N;
      6:       return W6N;
      default: return W4N;
    endcase
  endfunction

  // Sign of cos(m*pi/8): 1 when negative.
  function automatic logic cos_neg(input int unsigned m);
    int unsigned r;
    r = m % 16;
    return (r > 4) && (r < 12);
  endfunction

endpackage
