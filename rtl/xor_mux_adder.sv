// xor_mux_adder: W-bit ripple-carry adder built from XOR-MUX full adders.
//
// Each bit cell forms the propagate signal p = a ^ b, the sum s = p ^ cin,
// and selects its carry with a 2:1 multiplexer: cout = p ? cin : a (when a
// and b differ the incoming carry passes, when they agree both equal the
// carry out). The cells are chained from bit 0 upward, so the delay grows
// linearly with W. Purely combinational.
//
// The document names the XOR-MUX adder as the arithmetic of its preferred
// DCT/DWT configuration but does not draw the cell; the cell above is the
// usual XOR/MUX full adder and is this design's reading of that name.
module xor_mux_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  always_comb begin
    logic c;  // carry into the current cell
    logic p;  // propagate of the current cell
    c = cin;
    for (int i = 0; i < W; i++) begin
      p      = a[i] ^ b[i];
      sum[i] = p ^ c;
      c      = p ? c : a[i];
    end
    cout = c;
  end

endmodule
