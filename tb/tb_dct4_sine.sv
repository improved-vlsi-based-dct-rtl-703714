// tb_dct4_sine: the published DCT simulation scenario. A sine wave drives
// data_re and a cosine wave of the same period drives data_im, one sample
// pair per cycle, for several periods. Every coefficient of both lanes is
// checked bit-exactly against the integer model and within 8 LSB of the
// ideal X_k/4; the DC and first AC coefficients must swing through both
// signs as the window slides along the waves.
module tb_dct4_sine;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
  logic       clk = 0, reset = 0, in_valid = 0;
  sample_t    data_re = '0, data_im = '0;
  logic       out_valid, block_done;
  logic [1:0] out_k;
  sample_t    data_out_re, data_out_im;
  int checks = 0, failures = 0;
  int exp_re[$], exp_im[$];
  real ide_re[$], ide_im[$];
  int pos_dc = 0, neg_dc = 0, pos_ac = 0, neg_ac = 0;

  localparam int PERIOD = 64;
  localparam int AMP    = 100;

  dct4_stream dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (reset && out_valid) begin
    int er, ei;
    real dr, di;
    checks++;
    if (exp_re.size() == 0) failures++;
    else begin
      er = exp_re.pop_front(); ei = exp_im.pop_front();
      dr = real'(data_out_re) - ide_re.pop_front();
      di = real'(data_out_im) - ide_im.pop_front();
      if (int'(data_out_re) != er || int'(data_out_im) != ei) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d got %0d/%0d expected %0d/%0d", out_k, data_out_re, data_out_im, er, ei);
      end
      checks++;
      if (dr > 8.0 || dr < -8.0 || di > 8.0 || di < -8.0) failures++;
      if (out_k == 0) begin if (data_out_re > 10) pos_dc++; if (data_out_re < -10) neg_dc++; end
      if (out_k == 1) begin if (data_out_im > 3)  pos_ac++; if (data_out_im < -3)  neg_ac++; end
    end
  end

  initial begin
    int vr[4], vi[4];
    repeat (2) @(posedge clk);
    #1 reset = 1;
    for (int t = 0; t < 8 * PERIOD; t++) begin
      @(negedge clk);
      in_valid = 1;
      vr[t % 4] = int'($floor(AMP * $sin(2.0 * PI * t / PERIOD) + 0.5));
      vi[t % 4] = int'($floor(AMP * $cos(2.0 * PI * t / PERIOD) + 0.5));
      data_re = sample_t'(vr[t % 4]);
      data_im = sample_t'(vi[t % 4]);
      if (t % 4 == 3)
        for (int k = 0; k < 4; k++) begin
          exp_re.push_back(ref_dct(vr, k)); ide_re.push_back(ideal_dct(vr, k));
          exp_im.push_back(ref_dct(vi, k)); ide_im.push_back(ideal_dct(vi, k));
        end
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_re.size() != 0) failures++;
    checks++;
    if (pos_dc == 0 || neg_dc == 0 || pos_ac == 0 || neg_ac == 0) failures++;
    $display("DC re positive/negative %0d/%0d, first AC im positive/negative %0d/%0d", pos_dc, neg_dc, pos_ac, neg_ac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
