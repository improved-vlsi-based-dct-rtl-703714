// dct4_core: 4-point DCT-II of four parallel samples, direct form.
//
//   y[k] = ( sum_n  c_k * cos((2n+1)*k*pi/8) * x[n] ) / 4,  k = 0..3,
//   c_0 = cos(pi/4) (so the DC row uses W2N), c_k = 1 otherwise.
//
// Every input is multiplied by every coefficient of the transform at once:
// sixteen 8x8 truncated multipliers (trunc_mult), each returning the upper
// 8 bits of the product x[n] * |C[k][n]|, i.e. x*C/2 with C in Q1.7. The
// coefficient magnitudes come from the Q1.7 table W1N..W6N of dsp_pkg and
// the sign of each cosine decides whether its product is added or
// subtracted, so each output row is one chain of three add_sub units
// (SUM_W = 10 bits, wide enough that no row can overflow). The row sum is
// divided by two with an arithmetic shift, giving an 8-bit result that
// approximates 0.354 times the orthonormal DCT. Purely combinational.
//
// The document gives the direct structure (all products formed in parallel,
// summed by adders and subtractors), the 8-bit widths and the coefficient
// values; the output scaling, the adder-chain order and SUM_W are this
// design's choices.
module dct4_core
  import dsp_pkg::*;
#(
  parameter adder_style_e STYLE = ADDER_XOR_MUX
) (
  input  sample_t x [4],
  output sample_t y [4]
);

  localparam int unsigned SUM_W = DATA_W + 2;

  sample_t            prod [4][4];   // [k][n]
  logic               ovf  [4][4];
  logic               unused_co [4][4];

  for (genvar k = 0; k < 4; k++) begin : g_row
    for (genvar n = 0; n < 4; n++) begin : g_col
      localparam int unsigned M    = (k == 0) ? 2 : (2*n + 1) * k;
      localparam coef_t       CMAG = cos_mag(M);
      localparam logic        CNEG = cos_neg(M);

      logic [SUM_W-1:0] part;  // running sum of row k after term n

      trunc_mult #(.N(DATA_W), .STYLE(STYLE)) u_mul (.a(x[n]), .b(CMAG), .p(prod[k][n]));

      if (n == 0) begin : g_first
        assign part            = SUM_W'(prod[k][0]);  // sign-extended
        assign ovf[k][0]       = 1'b0;
        assign unused_co[k][0] = 1'b0;
      end else begin : g_acc
        add_sub #(.W(SUM_W), .STYLE(STYLE)) u_as (
          .a   (g_col[n-1].part),
          .b   (SUM_W'(prod[k][n])),
          .sub (CNEG),
          .y   (part),
          .cout(unused_co[k][n]),
          .ovf (ovf[k][n])
        );
      end
    end

    assign y[k] = sample_t'(g_col[3].part >> 1);
  end

  // the row sums are bounded by design; an overflow would be a wiring error
  always_comb begin
    for (int k = 0; k < 4; k++)
      for (int n = 1; n < 4; n++)
        assert (!ovf[k][n]) else $error("dct4_core: row %0d overflow", k);
  end

endmodule
