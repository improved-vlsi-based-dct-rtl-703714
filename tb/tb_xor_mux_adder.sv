// tb_xor_mux_adder: exhaustive check of the 8-bit XOR-MUX ripple adder
// against integer addition, for every a, b and carry-in.
module tb_xor_mux_adder;
  logic [7:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  xor_mux_adder #(.W(8)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
