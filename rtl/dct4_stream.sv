// dct4_stream: streaming 4-point DCT on a pair of sample streams
// (data_re, data_im), each transformed independently.
//
// Samples arrive one pair per cycle while in_valid is high; gaps are
// allowed. The first three samples of a block are held in a buffer; when
// the fourth is accepted, two dct4_core instances transform the block
// combinationally and the four coefficients of each lane are loaded into
// an output shift register. They leave on data_out_re / data_out_im on the
// following four cycles with out_valid high and out_k = 0, 1, 2, 3, so the
// first coefficient appears one cycle after the last sample of its block.
// A new block can complete every four cycles, which matches one input pair
// per cycle, so the unit never stalls. reset is active low and clears the
// block counter and the output register.
//
// The port names, the 8-bit widths and the active-low reset follow the
// published simulation of the DCT (clk, reset, data_re, data_im,
// data_out_re, data_out_im); in_valid, out_valid, out_k and the blocking of
// the streams into groups of four are this design's choices.
module dct4_stream
  import dsp_pkg::*;
#(
  parameter adder_style_e STYLE = ADDER_XOR_MUX
) (
  input  logic       clk,
  input  logic       reset,        // active low
  input  logic       in_valid,
  input  sample_t    data_re,
  input  sample_t    data_im,
  output logic       out_valid,
  output logic [1:0] out_k,
  output sample_t    data_out_re,
  output sample_t    data_out_im,
  output logic       block_done    // pulses when a block's coefficients load
);

  logic [1:0] in_cnt;
  sample_t    buf_re [3];
  sample_t    buf_im [3];
  sample_t    blk_re [4];
  sample_t    blk_im [4];
  sample_t    coef_re [4];
  sample_t    coef_im [4];
  sample_t    sr_re [4];
  sample_t    sr_im [4];
  logic [2:0] out_left;
  logic       last;

  assign last = in_valid && (in_cnt == 2'd3);

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      blk_re[i] = buf_re[i];
      blk_im[i] = buf_im[i];
    end
    blk_re[3] = data_re;
    blk_im[3] = data_im;
  end

  dct4_core #(.STYLE(STYLE)) u_dct_re (.x(blk_re), .y(coef_re));
  dct4_core #(.STYLE(STYLE)) u_dct_im (.x(blk_im), .y(coef_im));

  always_ff @(posedge clk or negedge reset) begin
    if (!reset) begin
      in_cnt   <= '0;
      out_left <= '0;
      for (int i = 0; i < 3; i++) begin
        buf_re[i] <= '0;
        buf_im[i] <= '0;
      end
      for (int i = 0; i < 4; i++) begin
        sr_re[i] <= '0;
        sr_im[i] <= '0;
      end
    end else begin
      if (in_valid) begin
        in_cnt <= in_cnt + 2'd1;
        if (in_cnt != 2'd3) begin
          buf_re[in_cnt] <= data_re;
          buf_im[in_cnt] <= data_im;
        end
      end
      if (last) begin
        sr_re    <= coef_re;
        sr_im    <= coef_im;
        out_left <= 3'd4;
      end else if (out_left != 3'd0) begin
        for (int i = 0; i < 3; i++) begin
          sr_re[i] <= sr_re[i+1];
          sr_im[i] <= sr_im[i+1];
        end
        out_left <= out_left - 3'd1;
      end
    end
  end

  assign out_valid   = (out_left != 3'd0);
  assign out_k       = 2'(3'd4 - out_left);
  assign data_out_re = sr_re[0];
  assign data_out_im = sr_im[0];
  assign block_done  = last;

  // a new block can only complete once the previous one has nearly drained
  assert property (@(posedge clk) disable iff (!reset) last |-> out_left <= 3'd1)
    else $error("dct4_stream: block completed while %0d coefficients pending", out_left);

endmodule
