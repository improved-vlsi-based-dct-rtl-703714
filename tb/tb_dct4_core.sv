// tb_dct4_core: checks the combinational 4-point DCT, in both adder
// styles, on corner blocks and random blocks. Each output is compared
// bit-exactly with the integer model of tb_ref_pkg and must also lie within
// 8 LSB (the worst case of four truncated products) of the ideal value X_k/4
// computed with real cosines.
module tb_dct4_core;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
  sample_t x [4];
  sample_t y0 [4];
  sample_t y1 [4];
  int checks = 0, failures = 0;
  real max_dev = 0.0;

  dct4_core #(.STYLE(ADDER_XOR_MUX)) dut_xm  (.x(x), .y(y0));
  dct4_core #(.STYLE(ADDER_RCA_BEC)) dut_bec (.x(x), .y(y1));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_block(input int v[4]);
    int  e;
    real d;
    for (int n = 0; n < 4; n++) x[n] = sample_t'(v[n]);
    #1;
    for (int k = 0; k < 4; k++) begin
      e = ref_dct(v, k);
      checks++;
      if (int'(y0[k]) != e || int'(y1[k]) != e) begin
        failures++;
        if (failures < 10)
          $display("FAIL x={%0d,%0d,%0d,%0d} k=%0d: got %0d/%0d expected %0d",
                   v[0], v[1], v[2], v[3], k, y0[k], y1[k], e);
      end
      d = real'(y0[k]) - ideal_dct(v, k);
      if (d < 0) d = -d;
      if (d > max_dev) max_dev = d;
      checks++;
      if (d > 8.0) failures++;
    end
  endtask

  initial begin
    int v[4];
    int corners[6][4] = '{'{127, 127, 127, 127}, '{-128, -128, -128, -128},
                          '{127, -128, 127, -128}, '{-128, 127, 127, -128},
                          '{127, 127, -128, -128}, '{0, 0, 0, 0}};
    foreach (corners[i]) begin
      for (int n = 0; n < 4; n++) v[n] = corners[i][n];
      check_block(v);
    end
    for (int t = 0; t < 5000; t++) begin
      for (int n = 0; n < 4; n++) v[n] = int'($signed(8'($urandom)));
      check_block(v);
    end
    $display("largest deviation from the ideal DCT/4: %f LSB", max_dev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
