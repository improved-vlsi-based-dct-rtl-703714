// tb_ref_pkg: reference models used by the testbenches.
//
// The models work on plain integers and real numbers, not on the RTL's
// structure: the truncated product is derived from the full product a*b
// minus the value of the dropped partial-product bits, the DCT coefficients
// are recomputed from $cos, and the DWT and DCT are written as plain sums.
package tb_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // wrap an integer to a signed 8-bit value
  function automatic int wrap8(input int v);
    int r;
    r = v & 32'hff;
    return (r >= 128) ? r - 256 : r;
  endfunction

  // 8x8 fixed-width truncated product with `drop` low columns left out and
  // the constant correction K = round(E[dropped] / 2^drop). For drop = 8,
  // E = 576.25 and K = 2.
  function automatic int ref_trunc(input int a, input int b, input int drop = 8);
    int P, D, ai, bj, bitv;
    real E;
    int  K;
    logic [7:0] ua, ub;
    ua = 8'(a);
    ub = 8'(b);
    P  = a * b;
    D  = 0;
    E  = 0.0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        if (i + j < drop) begin
          ai   = int'(ua[i]);
          bj   = int'(ub[j]);
          bitv = ai & bj;
          if ((i == 7) != (j == 7)) bitv = 1 - bitv;
          D += bitv << (i + j);
          E += (((i == 7) != (j == 7)) ? 0.75 : 0.25) * (2.0 ** (i + j));
        end
    K = int'($floor(E / (2.0 ** drop) + 0.5));
    return wrap8((P - D + (K << drop)) >>> 8);
  endfunction

  // Q1.7 magnitude of cos(m*pi/8), truncated toward zero
  function automatic int ref_cmag(input int m);
    real c;
    c = $cos(m * PI / 8.0);
    if (c < 0.0) c = -c;
    if (c > 0.999) return 127;
    return int'($floor(c * 128.0 + 1e-9));
  endfunction

  function automatic bit ref_cneg(input int m);
    return $cos(m * PI / 8.0) < -1e-9;
  endfunction

  // bit-exact model of the 4-point DCT datapath
  function automatic int ref_dct(input int x[4], input int k);
    int s, m;
    s = 0;
    for (int n = 0; n < 4; n++) begin
      m = (k == 0) ? 2 : (2*n + 1) * k;
      if (ref_cneg(m)) s -= ref_trunc(x[n], ref_cmag(m));
      else             s += ref_trunc(x[n], ref_cmag(m));
    end
    return s >>> 1;
  endfunction

  // ideal value the DCT datapath approximates: X_k / 4
  function automatic real ideal_dct(input int x[4], input int k);
    real s, ck;
    s  = 0.0;
    ck = (k == 0) ? $sqrt(0.5) : 1.0;
    for (int n = 0; n < 4; n++) s += x[n] * ck * $cos((2*n + 1) * k * PI / 8.0);
    return s / 4.0;
  endfunction

endpackage
