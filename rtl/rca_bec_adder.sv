// rca_bec_adder: W-bit carry-select adder with a binary-to-excess-1
// converter (BEC) in place of the second ripple adder.
//
// The low LO_W bits are added by a plain ripple-carry adder. The high bits
// are added once by a ripple-carry adder with carry-in 0; a BEC forms that
// partial sum plus one, and the carry out of the low part selects between
// the two through a multiplexer. Purely combinational.
//
// The document names the RCA-BEC adder as one of the two adder choices it
// compares for the DCT and DWT; the split point LO_W (half the width by
// default) is this design's choice.
module rca_bec_adder #(
  parameter int unsigned W    = 8,
  parameter int unsigned LO_W = W / 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned HI_W = W - LO_W;

  logic            c_lo;   // carry out of the low part
  logic [HI_W-1:0] s0;     // high part, carry-in 0
  logic            co0;
  logic [HI_W-1:0] s1;     // high part plus one (BEC output)
  logic            co1;

  always_comb begin
    logic c;
    logic t;               // all bits of s0 below the current one are one
    // low part: ripple-carry
    c = cin;
    for (int i = 0; i < LO_W; i++) begin
      sum[i] = a[i] ^ b[i] ^ c;
      c      = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
    end
    c_lo = c;
    // high part: ripple-carry with carry-in 0
    c = 1'b0;
    for (int i = 0; i < HI_W; i++) begin
      s0[i] = a[LO_W+i] ^ b[LO_W+i] ^ c;
      c     = (a[LO_W+i] & b[LO_W+i]) | (c & (a[LO_W+i] ^ b[LO_W+i]));
    end
    co0 = c;
    // binary-to-excess-1 converter: {co1, s1} = {co0, s0} + 1
    t = 1'b1;
    for (int i = 0; i < HI_W; i++) begin
      s1[i] = s0[i] ^ t;
      t     = t & s0[i];
    end
    co1 = co0 | t;
    // carry select
    sum[W-1:LO_W] = c_lo ? s1 : s0;
    cout          = c_lo ? co1 : co0;
  end

endmodule
