// tb_trunc_mult: exhaustive check of the 8x8 truncated multiplier. Every
// operand pair is compared bit-exactly with the reference (full product
// minus the dropped partial-product bits, plus the correction 2), and the
// error against the exact floor(a*b/256) must stay within -6..+2 LSB. A
// second instance with two guard columns (DROP = 6) is checked the same way
// and must stay within -1..+1 LSB. A third instance, built on RCA-BEC
// adders, must give the same result as the default one.
module tb_trunc_mult;
  import tb_ref_pkg::*;
  logic signed [7:0] a, b, p, p6, pb;
  int checks = 0, failures = 0;
  longint err_sum = 0;
  int err_min = 100, err_max = -100;

  trunc_mult #(.N(8))            dut  (.a(a), .b(b), .p(p));
  trunc_mult #(.N(8), .DROP(6))  dut6 (.a(a), .b(b), .p(p6));
  trunc_mult #(.N(8), .STYLE(dsp_pkg::ADDER_RCA_BEC)) dutb (.a(a), .b(b), .p(pb));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, exact;
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (int'(p) != ref_trunc(i, j) || pb != p) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d -> %0d, expected %0d", i, j, p, ref_trunc(i, j));
        end
        exact = (i * j) >>> 8;
        e = int'(p) - exact;
        if (e < -128) e += 256;   // wrap at the extremes of the range
        if (e > 127) e -= 256;
        err_sum += longint'(e);
        if (e < err_min) err_min = e;
        if (e > err_max) err_max = e;
        checks++;
        if (e < -6 || e > 2) failures++;
        checks++;
        if (int'(p6) != ref_trunc(i, j, 6)) failures++;
        e = int'(p6) - exact;
        if (e < -128) e += 256;
        if (e > 127) e -= 256;
        checks++;
        if (e < -1 || e > 1) failures++;
      end
    end
    $display("truncation error vs floor(a*b/256): min %0d max %0d mean %f",
             err_min, err_max, real'(err_sum) / 65536.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
