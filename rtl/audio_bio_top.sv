// audio_bio_top: DWT + DCT front end for an audio-band biological signal
// (heart or lung sounds, for instance).
//
// One 8-bit sample stream enters dwt_fir, which splits it into an
// approximation (low band) and a detail (high band) stream at half the
// input rate. The two band streams drive the two lanes of dct4_stream,
// which transforms each band in blocks of four band samples. Every eight
// input samples therefore yield four DCT coefficients of the approximation
// band (dct_approx) and four of the detail band (dct_detail), presented on
// four consecutive cycles with out_valid high and out_k = 0..3. The band
// samples themselves are also brought out (dwt_valid, approx, detail).
// Timing: a pair of input samples gives a band sample one cycle later; the
// fourth band sample of a block gives its first coefficient one cycle
// after that. reset is active low. STYLE selects the adder of every
// arithmetic unit.
//
// The document combines its DWT and DCT into one system for audio
// biological signals but does not say how they are connected; feeding the
// two DWT bands into the two lanes of the DCT is this design's choice.
module audio_bio_top
  import dsp_pkg::*;
#(
  parameter adder_style_e STYLE = ADDER_XOR_MUX
) (
  input  logic       clk,
  input  logic       reset,       // active low
  input  logic       in_valid,
  input  sample_t    audio_in,
  output logic       dwt_valid,
  output sample_t    approx,
  output sample_t    detail,
  output logic       out_valid,
  output logic [1:0] out_k,
  output sample_t    dct_approx,
  output sample_t    dct_detail,
  output logic       block_done
);

  dwt_fir #(.STYLE(STYLE)) u_dwt (
    .clk      (clk),
    .reset    (reset),
    .in_valid (in_valid),
    .x_in     (audio_in),
    .out_valid(dwt_valid),
    .approx   (approx),
    .detail   (detail)
  );

  dct4_stream #(.STYLE(STYLE)) u_dct (
    .clk        (clk),
    .reset      (reset),
    .in_valid   (dwt_valid),
    .data_re    (approx),
    .data_im    (detail),
    .out_valid  (out_valid),
    .out_k      (out_k),
    .data_out_re(dct_approx),
    .data_out_im(dct_detail),
    .block_done (block_done)
  );

endmodule
