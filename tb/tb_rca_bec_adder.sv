// tb_rca_bec_adder: exhaustive check of the 8-bit RCA-BEC carry-select adder (and a 10-bit instance with a 3-bit low part, checked at random)
// against integer addition, for every a, b and carry-in.
module tb_rca_bec_adder;
  logic [7:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;
  logic [9:0] a2, b2, s2;
  logic       c2, co2;

  rca_bec_adder #(.W(10), .LO_W(3)) dut2 (.a(a2), .b(b2), .cin(c2), .sum(s2), .cout(co2));

  rca_bec_adder #(.W(8)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(j); b = 8'(i); cin = i[8];
        #1;
        checks++;
        if ({cout, sum} != 9'(j + (i & 255) + (i >> 8))) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d + %0d -> %0d", a, b, cin, {cout, sum});
        end
      end
    end
    for (int n = 0; n < 5000; n++) begin
      a2 = 10'($urandom); b2 = 10'($urandom); c2 = 1'($urandom);
      #1;
      checks++;
      if ({co2, s2} != 11'(int'(a2) + int'(b2) + int'(c2))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
