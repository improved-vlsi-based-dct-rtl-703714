// trunc_mult: N x N signed fixed-width multiplier returning the N most
// significant bits of the 2N-bit product, with constant correction.
//
// The partial products follow the Baugh-Wooley form for two's complement
// operands: a_i & b_j for the magnitude bits, the inverted AND for the bits
// that pair one sign bit with a magnitude bit, and the constants 2^N and
// 2^(2N-1). The DROP least significant columns (DROP = N by default: only
// the columns of weight 2^N and above are built) are not formed at all. In
// their place a constant K, the expected value of the dropped columns in
// units of 2^DROP rounded to the nearest integer (each AND bit is one with
// probability 1/4, each inverted one with 3/4), is added at column DROP.
// For N = DROP = 8, K = 2. The output is the upper N bits of the sum:
//   p = floor((a*b - D + K*2^DROP) / 2^N)   (modulo 2^N)
// where D is the value of the dropped partial-product bits. With DROP = 8
// it differs from floor(a*b / 2^N) by -5..+2 units in the last place; a
// smaller DROP keeps guard columns and shrinks the error (DROP = 6: -1..+1).
// The kept part of the array is summed row by row: an (2N-DROP)-bit
// accumulator starts at the constants (2^N, 2^(2N-1), K) and each of the N
// rows is added by its own adder of the style chosen by STYLE (XOR-MUX
// ripple by default, or RCA-BEC), forming a ripple array multiplier on the
// same cells as the rest of the datapath. Combinational.
//
// The document gives the function (a fixed-width multiplier that computes
// only the n most significant bits, with a constant correction) and not the
// circuit; the Baugh-Wooley array, the row-by-row summation, the rounding
// of K and the DROP option are this design's choices.
module trunc_mult
  import dsp_pkg::*;
#(
  parameter int unsigned  N     = 8,
  parameter int unsigned  DROP  = N,            // low columns left out, 1..N
  parameter adder_style_e STYLE = ADDER_XOR_MUX
) (
  input  logic signed [N-1:0] a,
  input  logic signed [N-1:0] b,
  output logic signed [N-1:0] p
);

  localparam int unsigned AW = 2 * N - DROP;   // columns DROP .. 2N-1

  // value of partial-product bit (i, j) is ~(a_i & b_j) when exactly one
  // index is the sign position, a_i & b_j otherwise
  function automatic logic pp_inv(input int unsigned i, input int unsigned j);
    return (i == N - 1) != (j == N - 1);
  endfunction

  // 4 * expected value of the dropped columns, then rounded to units of
  // 2^DROP
  function automatic longint unsigned corr_k();
    longint unsigned e4;
    e4 = 0;
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned j = 0; j < N; j++)
        if (i + j < DROP)
          e4 += (pp_inv(i, j) ? 64'd3 : 64'd1) << (i + j);
    return (e4 + (64'd1 << (DROP + 1))) >> (DROP + 2);
  endfunction

  localparam longint unsigned K = corr_k();

  // Baugh-Wooley constants 2^N and 2^(2N-1) plus the truncation correction,
  // in units of 2^DROP
  localparam logic [AW-1:0] INIT = AW'((64'd1 << (N - DROP)) + (64'd1 << (2*N - 1 - DROP)) + K);

  for (genvar j = 0; j < N; j++) begin : g_row
    logic [AW-1:0] row;   // kept bits of partial-product row j
    logic [AW-1:0] acc;   // running sum after row j
    logic          unused_co;

    always_comb begin
      row = '0;
      for (int unsigned i = 0; i < N; i++)
        if (i + j >= DROP)
          row[i + j - DROP] = (a[i] & b[j]) ^ pp_inv(i, j);
    end

    if (j == 0) begin : g_first
      if (STYLE == ADDER_RCA_BEC) begin : g_bec
        rca_bec_adder #(.W(AW)) u_add (.a(INIT), .b(row), .cin(1'b0), .sum(acc), .cout(unused_co));
      end else begin : g_xm
        xor_mux_adder #(.W(AW)) u_add (.a(INIT), .b(row), .cin(1'b0), .sum(acc), .cout(unused_co));
      end
    end else begin : g_next
      if (STYLE == ADDER_RCA_BEC) begin : g_bec
        rca_bec_adder #(.W(AW)) u_add (.a(g_row[j-1].acc), .b(row), .cin(1'b0), .sum(acc), .cout(unused_co));
      end else begin : g_xm
        xor_mux_adder #(.W(AW)) u_add (.a(g_row[j-1].acc), .b(row), .cin(1'b0), .sum(acc), .cout(unused_co));
      end
    end
  end

  assign p = g_row[N-1].acc[AW-1 -: N];

endmodule
