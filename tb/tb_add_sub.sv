// tb_add_sub: checks the 10-bit adder/subtractor in both adder styles
// against integer arithmetic: result modulo 2^10, carry out and signed
// overflow, on edge values and random operands.
module tb_add_sub;
  import dsp_pkg::*;
  logic [9:0] a, b, y0, y1;
  logic       sub, c0, c1, v0, v1;
  int checks = 0, failures = 0;

  add_sub #(.W(10), .STYLE(ADDER_XOR_MUX)) dut_xm  (.a(a), .b(b), .sub(sub), .y(y0), .cout(c0), .ovf(v0));
  add_sub #(.W(10), .STYLE(ADDER_RCA_BEC)) dut_bec (.a(a), .b(b), .sub(sub), .y(y1), .cout(c1), .ovf(v1));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int sa, sb, r, u;
    logic [9:0] ey;
    logic       ec, ev;
    logic [9:0] nb;
    nb = ~b;
    sa = $signed(a);
    sb = $signed(b);
    r  = sub ? sa - sb : sa + sb;
    u  = sub ? int'(a) + int'(nb) + 1 : int'(a) + int'(b);
    ey = 10'(r);
    ec = u[10];
    ev = (r > 511) || (r < -512);
    #1;
    checks++;
    if (y0 !== ey || c0 !== ec || v0 !== ev || y1 !== ey || c1 !== ec || v1 !== ev) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%0d b=%0d sub=%0d: xm=%0d/%0d/%0d bec=%0d/%0d/%0d exp=%0d/%0d/%0d",
                 sa, sb, sub, $signed(y0), c0, v0, $signed(y1), c1, v1, $signed(ey), ec, ev);
    end
  endtask

  initial begin
    int edges[6] = '{0, 1, 511, -512, -1, 256};
    foreach (edges[i]) foreach (edges[j]) for (int s = 0; s < 2; s++) begin
      a = 10'(edges[i]); b = 10'(edges[j]); sub = s[0];
      check_one();
    end
    for (int n = 0; n < 20000; n++) begin
      a = 10'($urandom); b = 10'($urandom); sub = 1'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
