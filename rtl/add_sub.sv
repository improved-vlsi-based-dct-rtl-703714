// add_sub: W-bit two's complement adder/subtractor.
//
// y = sub ? a - b : a + b, computed as a + (b ^ {W{sub}}) + sub on the adder
// chosen by STYLE (XOR-MUX ripple adder by default, or RCA-BEC carry-select).
// The result wraps modulo 2^W; cout is the adder's carry out and ovf flags
// signed overflow. Purely
// combinational.
//
// The digital DCT of the document sums its products with "an adder and a
// subtractor"; sharing one adder for both operations through the inverted
// operand is this design's choice.
module add_sub
  import dsp_pkg::*;
#(
  parameter int unsigned  W     = 10,
  parameter adder_style_e STYLE = ADDER_XOR_MUX
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y,
  output logic         cout,
  output logic         ovf
);

  logic [W-1:0] bx;
  assign bx = b ^ {W{sub}};

  if (STYLE == ADDER_RCA_BEC) begin : g_bec
    rca_bec_adder #(.W(W)) u_add (.a(a), .b(bx), .cin(sub), .sum(y), .cout(cout));
  end else begin : g_xm
    xor_mux_adder #(.W(W)) u_add (.a(a), .b(bx), .cin(sub), .sum(y), .cout(cout));
  end

  // signed overflow: operands of equal sign, result of the other sign
  assign ovf = (a[W-1] == bx[W-1]) && (y[W-1] != a[W-1]);

endmodule
