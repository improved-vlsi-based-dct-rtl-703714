// dwt_fir: one level of the 1-D discrete wavelet transform as a two-band
// FIR analysis filter bank with decimation by two.
//
// Every accepted input sample enters a TAPS-deep delay line (x[0] is the
// newest). After every second sample the low-pass (approximation) and
// high-pass (detail) outputs are formed from the window:
//   approx = sum_k trunc(H[k] * x[k]),   detail = sum_k trunc(G[k] * x[k]),
//   G[k]   = (-1)^k * H[TAPS-1-k]  (quadrature-mirror high-pass),
// where trunc() is the 8x8 truncated multiplier (upper 8 bits of the
// product, i.e. x*h/2 for h in Q1.7) and the sums run through add_sub
// units. Results are registered: out_valid pulses one cycle after the
// second sample of each pair. The default H is the Haar pair
// {W2N, W2N} = 1/sqrt(2) in Q1.7; any Q1.7 wavelet with sum |H| <= 2 can be
// given instead (e.g. a 4-tap Daubechies set) without overflowing 8 bits.
// reset is active low and clears the delay line and the pair phase.
//
// The document builds its DWT from FIR filters using truncated multipliers
// and the same adders as the DCT, but names no wavelet, tap count or
// interface; the Haar default, the QMF derivation of G, the decimation
// phase and the handshake are this design's choices.
module dwt_fir
  import dsp_pkg::*;
#(
  parameter int unsigned  TAPS  = 2,
  parameter coef_t        H [TAPS] = '{W2N, W2N},
  parameter adder_style_e STYLE = ADDER_XOR_MUX
) (
  input  logic    clk,
  input  logic    reset,      // active low
  input  logic    in_valid,
  input  sample_t x_in,
  output logic    out_valid,
  output sample_t approx,
  output sample_t detail
);

  localparam int unsigned ACC_W = DATA_W + $clog2(TAPS) + 1;

  sample_t win [TAPS];        // win[0] = current sample
  sample_t dl  [TAPS-1];      // stored older samples
  logic    phase;             // 1 when the current sample completes a pair

  always_comb begin
    win[0] = x_in;
    for (int k = 1; k < TAPS; k++) win[k] = dl[k-1];
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    localparam coef_t HK = H[k];
    localparam coef_t GK = (k % 2 == 0) ? H[TAPS-1-k] : coef_t'(-H[TAPS-1-k]);

    sample_t          pl, ph;
    logic [ACC_W-1:0] al, ah;   // running sums after tap k
    logic             unused_l, unused_h;

    trunc_mult #(.N(DATA_W), .STYLE(STYLE)) u_ml (.a(win[k]), .b(HK), .p(pl));
    trunc_mult #(.N(DATA_W), .STYLE(STYLE)) u_mh (.a(win[k]), .b(GK), .p(ph));

    if (k == 0) begin : g_first
      assign al = ACC_W'(pl);
      assign ah = ACC_W'(ph);
      assign unused_l = 1'b0;
      assign unused_h = 1'b0;
    end else begin : g_acc
      logic unused_cl, unused_ch;
      add_sub #(.W(ACC_W), .STYLE(STYLE)) u_al (
        .a(g_tap[k-1].al), .b(ACC_W'(pl)), .sub(1'b0), .y(al), .cout(unused_cl), .ovf(unused_l));
      add_sub #(.W(ACC_W), .STYLE(STYLE)) u_ah (
        .a(g_tap[k-1].ah), .b(ACC_W'(ph)), .sub(1'b0), .y(ah), .cout(unused_ch), .ovf(unused_h));
    end
  end

  logic [ACC_W-1:0] sum_l, sum_h;
  assign sum_l = g_tap[TAPS-1].al;
  assign sum_h = g_tap[TAPS-1].ah;

  always_ff @(posedge clk or negedge reset) begin
    if (!reset) begin
      phase     <= 1'b0;
      out_valid <= 1'b0;
      approx    <= '0;
      detail    <= '0;
      for (int k = 0; k < TAPS - 1; k++) dl[k] <= '0;
    end else begin
      out_valid <= in_valid && phase;
      if (in_valid) begin
        phase <= ~phase;
        dl[0] <= x_in;
        for (int k = 1; k < TAPS - 1; k++) dl[k] <= dl[k-1];
        if (phase) begin
          approx <= sample_t'(sum_l);
          detail <= sample_t'(sum_h);
        end
      end
    end
  end

  // the filter sums must fit the 8-bit outputs
  assert property (@(posedge clk) disable iff (!reset)
    in_valid && phase |-> ACC_W'(sample_t'(sum_l)) == sum_l && ACC_W'(sample_t'(sum_h)) == sum_h)
    else $error("dwt_fir: output exceeds %0d bits", DATA_W);

endmodule
