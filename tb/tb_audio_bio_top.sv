// tb_audio_bio_top: end-to-end test of the DWT + DCT front end at its
// default parameters. The stimulus is a synthetic heart-sound-like signal:
// two decaying low-frequency bursts per period ("S1" and "S2") plus a
// higher-frequency murmur and random noise, quantised to 8 bits and fed
// with random idle cycles in the first half and without gaps in the second.
// Checked against the plain-sum models of tb_ref_pkg:
//  - every approximation/detail sample, one cycle after each input pair,
//  - every DCT coefficient of both bands, in order, with the first one a
//    cycle after the fourth band sample of its block.
// Mechanisms counted (each must occur): band samples produced, DCT blocks
// completed, idle input cycles, negative detail samples, coefficients
// produced on a gapless input.
module tb_audio_bio_top;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
  logic       clk = 0, reset = 0, in_valid = 0;
  sample_t    audio_in = '0;
  logic       dwt_valid, out_valid, block_done;
  logic [1:0] out_k;
  sample_t    approx, detail, dct_approx, dct_detail;

  audio_bio_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_band = 0, n_block = 0, n_idle = 0, n_neg_detail = 0, n_gapless_coef = 0;
  bit gapless = 0;

  int exp_band_cycle[$], exp_a[$], exp_d[$];
  int exp_coef_cycle[$], exp_ca[$], exp_cd[$], exp_k[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference pipeline state
  int prev_x, nin = 0, blk_a[4], blk_d[4], nb = 0;

  task automatic feed(input int v);
    int a, d;
    @(negedge clk);
    in_valid = 1;
    audio_in = sample_t'(v);
    if (nin % 2 == 1) begin
      // Haar pair: window {newest, older}, H = {90, 90}, G = {90, -90}
      a = ref_trunc(v, 90) + ref_trunc(prev_x, 90);
      d = ref_trunc(v, 90) + ref_trunc(prev_x, -90);
      exp_band_cycle.push_back(cycle + 1);
      exp_a.push_back(a);
      exp_d.push_back(d);
      blk_a[nb] = a;
      blk_d[nb] = d;
      if (nb == 3) begin
        for (int k = 0; k < 4; k++) begin
          exp_coef_cycle.push_back(cycle + 2 + k);
          exp_ca.push_back(ref_dct(blk_a, k));
          exp_cd.push_back(ref_dct(blk_d, k));
          exp_k.push_back(k);
        end
      end
      nb = (nb + 1) % 4;
    end
    prev_x = v;
    nin++;
  endtask

  always @(negedge clk) if (reset) begin
    if (dwt_valid) begin
      int c, a, d;
      n_band++;
      if (detail < 0) n_neg_detail++;
      checks++;
      if (exp_a.size() == 0) begin
        failures++;
      end else begin
        c = exp_band_cycle.pop_front(); a = exp_a.pop_front(); d = exp_d.pop_front();
        if (c != cycle || int'(approx) != a || int'(detail) != d) begin
          failures++;
          if (failures < 10) $display("FAIL band cycle %0d: %0d/%0d, expected cycle %0d %0d/%0d",
                                      cycle, approx, detail, c, a, d);
        end
      end
    end
    if (block_done) n_block++;
    if (out_valid) begin
      int c, a, d, k;
      if (gapless) n_gapless_coef++;
      checks++;
      if (exp_ca.size() == 0) begin
        failures++;
      end else begin
        c = exp_coef_cycle.pop_front(); a = exp_ca.pop_front(); d = exp_cd.pop_front(); k = exp_k.pop_front();
        if (c != cycle || int'(dct_approx) != a || int'(dct_detail) != d || int'(out_k) != k) begin
          failures++;
          if (failures < 10) $display("FAIL coef cycle %0d k=%0d: %0d/%0d, expected cycle %0d k=%0d %0d/%0d",
                                      cycle, out_k, dct_approx, dct_detail, c, k, a, d);
        end
      end
    end
  end

  // synthetic heart sound at 1 kHz-like sample rate, period 200 samples
  function automatic int heart(input int t);
    real ph, s;
    int  p;
    p  = t % 200;
    s  = 0.0;
    if (p < 30)             s += 70.0 * $exp(-p / 10.0) * $sin(2.0 * PI * p / 12.0);
    if (p >= 70 && p < 95)  s += 50.0 * $exp(-(p - 70) / 8.0) * $sin(2.0 * PI * (p - 70) / 9.0);
    if (p >= 100 && p < 160) s += 15.0 * $sin(2.0 * PI * p / 3.0);
    ph = real'(int'($urandom % 21) - 10);
    s += ph;
    if (s > 127.0) s = 127.0;
    if (s < -128.0) s = -128.0;
    return int'(s);
  endfunction

  initial begin
    prev_x = 0;
    repeat (3) @(posedge clk);
    #1 reset = 1;
    for (int t = 0; t < 6000; t++) begin
      gapless = (t >= 3000);
      if (!gapless && ($urandom % 4 == 0)) begin
        @(negedge clk) in_valid = 0;
        n_idle++;
      end
      feed(heart(t));
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_a.size() != 0 || exp_ca.size() != 0) begin
      failures++;
      $display("FAIL outputs missing: %0d band, %0d coefficients", exp_a.size(), exp_ca.size());
    end
    $display("band samples %0d, DCT blocks %0d, idle input cycles %0d, negative detail %0d, gapless coefficients %0d",
             n_band, n_block, n_idle, n_neg_detail, n_gapless_coef);
    checks++; if (n_band == 0)         begin failures++; $display("FAIL no band samples"); end
    checks++; if (n_block == 0)        begin failures++; $display("FAIL no DCT block"); end
    checks++; if (n_idle == 0)         begin failures++; $display("FAIL no idle cycle"); end
    checks++; if (n_neg_detail == 0)   begin failures++; $display("FAIL no negative detail"); end
    checks++; if (n_gapless_coef == 0) begin failures++; $display("FAIL no gapless coefficients"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
