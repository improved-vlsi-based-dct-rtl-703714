// tb_dwt_fir: checks the DWT filter bank in its default Haar form and in a
// 4-tap Daubechies form (H = 62, 107, 29, -17 in Q1.7). Random samples with
// random idle cycles are fed in; after every second accepted sample the
// approximation and detail must equal the plain-sum model one cycle later.
// The detail of a constant input must be near zero and its approximation
// near 2*x*0.707/2 (low-pass gain), which checks the filter pair's roles.
module tb_dwt_fir;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
  logic    clk = 0, reset = 0, in_valid = 0;
  sample_t x_in = '0;
  logic    v2, v4;
  sample_t a2, d2, a4, d4;
  int checks = 0, failures = 0, cycle = 0, pairs = 0, idle = 0;

  localparam coef_t D4 [4] = '{8'sd62, 8'sd107, 8'sd29, -8'sd17};

  dwt_fir                               dut_haar (.clk, .reset, .in_valid, .x_in, .out_valid(v2), .approx(a2), .detail(d2));
  dwt_fir #(.TAPS(4), .H(D4))           dut_d4   (.clk, .reset, .in_valid, .x_in, .out_valid(v4), .approx(a4), .detail(d4));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist[4];      // hist[0] = newest accepted sample
  int exp_a2, exp_d2, exp_a4, exp_d4, exp_cycle = -1;

  function automatic int fir(input int h[], input int taps, input bit high);
    int s, c;
    s = 0;
    for (int k = 0; k < taps; k++) begin
      c = high ? ((k % 2 == 0) ? h[taps-1-k] : -h[taps-1-k]) : h[k];
      s += ref_trunc(hist[k], c);
    end
    return s;
  endfunction

  always @(negedge clk) if (reset) begin
    checks++;
    if ((v2 !== (cycle == exp_cycle)) || (v4 !== (cycle == exp_cycle))) begin
      failures++;
      $display("FAIL valid at cycle %0d (expected %0d)", cycle, exp_cycle);
    end else if (v2) begin
      checks++;
      if (int'(a2) != exp_a2 || int'(d2) != exp_d2 || int'(a4) != exp_a4 || int'(d4) != exp_d4) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d haar %0d/%0d (exp %0d/%0d) d4 %0d/%0d (exp %0d/%0d)",
                   cycle, a2, d2, exp_a2, exp_d2, a4, d4, exp_a4, exp_d4);
      end
    end
  end

  task automatic feed(input int v);
    int haar[] = '{90, 90};
    int d4h[]  = '{62, 107, 29, -17};
    @(negedge clk);
    in_valid = 1;
    x_in = sample_t'(v);
    for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    if (pairs % 2 == 1) begin
      exp_a2 = fir(haar, 2, 0); exp_d2 = fir(haar, 2, 1);
      exp_a4 = fir(d4h, 4, 0);  exp_d4 = fir(d4h, 4, 1);
      exp_cycle = cycle + 1;
    end
    pairs++;
  endtask

  initial begin
    hist = '{0, 0, 0, 0};
    repeat (3) @(posedge clk);
    #1 reset = 1;
    for (int t = 0; t < 4000; t++) begin
      if ($urandom % 4 == 0) begin
        @(negedge clk) in_valid = 0;
        idle++;
      end
      feed(int'($signed(8'($urandom))));
    end
    // constant input: detail near 0, approximation near x*0.707
    for (int t = 0; t < 8; t++) feed(100);
    @(negedge clk) in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (d2 > 3 || d2 < -3 || a2 < 66 || a2 > 74) begin
      failures++;
      $display("FAIL constant input: approx %0d detail %0d", a2, d2);
    end
    repeat (3) @(posedge clk);
    $display("samples %0d, idle cycles %0d", pairs, idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
