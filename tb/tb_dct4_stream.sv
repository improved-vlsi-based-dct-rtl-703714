// tb_dct4_stream: drives two random sample streams into the streaming DCT,
// with random idle cycles and with long back-to-back runs, and checks
//  - every coefficient, lane and order (out_k = 0..3) against the model,
//  - the latency: the first coefficient of a block one cycle after the
//    block's fourth sample, the other three on the following cycles,
//  - the reset: no output before the first complete block.
module tb_dct4_stream;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
  logic       clk = 0, reset = 0, in_valid = 0;
  sample_t    data_re = '0, data_im = '0;
  logic       out_valid, block_done;
  logic [1:0] out_k;
  sample_t    data_out_re, data_out_im;
  int checks = 0, failures = 0;
  int cycle = 0, blocks = 0, outputs = 0, back_to_back = 0, idle = 0;

  int exp_re[$], exp_im[$], exp_cycle[$], exp_k[$];

  dct4_stream dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(negedge clk) if (reset) begin
    if (out_valid) begin
      outputs++;
      checks++;
      if (exp_re.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        int er, ei, ec, ek;
        er = exp_re.pop_front(); ei = exp_im.pop_front();
        ec = exp_cycle.pop_front(); ek = exp_k.pop_front();
        if (int'(data_out_re) != er || int'(data_out_im) != ei || int'(out_k) != ek || cycle != ec) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d k=%0d re=%0d im=%0d; expected cycle %0d k=%0d re=%0d im=%0d",
                     cycle, out_k, data_out_re, data_out_im, ec, ek, er, ei);
        end
      end
    end
  end

  initial begin
    int vr[4], vi[4], n;
    bit gaps;
    repeat (3) @(posedge clk);
    checks++;
    if (out_valid) failures++;
    #1 reset = 1;
    n = 0;
    for (int t = 0; t < 4000; t++) begin
      gaps = (t < 2000);                     // first half with gaps, then back to back
      @(negedge clk);
      if (gaps && ($urandom % 3 == 0)) begin
        in_valid = 0;
        idle++;
      end else begin
        in_valid = 1;
        data_re = sample_t'($urandom);
        data_im = sample_t'($urandom);
        vr[n] = int'(data_re);
        vi[n] = int'(data_im);
        if (n == 3) begin
          blocks++;
          if (!gaps) back_to_back++;
          for (int k = 0; k < 4; k++) begin
            exp_re.push_back(ref_dct(vr, k));
            exp_im.push_back(ref_dct(vi, k));
            exp_k.push_back(k);
            exp_cycle.push_back(cycle + 1 + k);
          end
        end
        n = (n + 1) % 4;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (exp_re.size() != 0 || outputs != 4 * blocks) begin
      failures++;
      $display("FAIL %0d coefficients missing", exp_re.size());
    end
    checks++;
    if (idle == 0 || back_to_back == 0) failures++;
    $display("blocks %0d (back to back %0d), idle cycles %0d, coefficients %0d", blocks, back_to_back, idle, outputs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
