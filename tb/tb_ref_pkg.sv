// tb_ref_pkg -- integer reference model of the 9/7 NEDA DWT used by the
// testbenches. It computes the filters directly as sums of products with
// the integer coefficients, independent of the distributed-arithmetic
// datapath under test.
package tb_ref_pkg;

  // low pass h0..h4 and high pass g0..g3, element k multiplying r(k+1)
  localparam int LP [5] = '{60, 26, -7, -1, 2};
  localparam int HP [4] = '{55, -29, -2, 4};

  typedef longint lvec_t [$];

  // sample x[m] of a line, zero before its start
  function automatic longint at(input lvec_t x, int m);
    return (m < 0 || m >= x.size()) ? 0 : x[m];
  endfunction

  // low-pass output at sample n (9 taps, r(1) = X(n) + X(n-8))
  function automatic longint lp_at(input lvec_t x, int n);
    longint s = 0;
    for (int k = 0; k < 4; k++) s += LP[k] * (at(x, n - k) + at(x, n - 8 + k));
    s += LP[4] * at(x, n - 4);
    return s;
  endfunction

  // high-pass output at sample n (7 taps, r(1) = X(n) + X(n-6))
  function automatic longint hp_at(input lvec_t x, int n);
    longint s = 0;
    for (int k = 0; k < 3; k++) s += HP[k] * (at(x, n - k) + at(x, n - 6 + k));
    s += HP[3] * at(x, n - 3);
    return s;
  endfunction

  // decimated line transform: outputs at n = 1, 3, .., size-1
  function automatic void line_dwt(input lvec_t x, output lvec_t lo, output lvec_t hi);
    lo = {};
    hi = {};
    for (int n = 1; n < x.size(); n += 2) begin
      lo.push_back(lp_at(x, n));
      hi.push_back(hp_at(x, n));
    end
  endfunction

  // sign-extend the low w bits of v
  function automatic longint sext(longint v, int w);
    longint m = longint'(1) << (w - 1);
    longint u = v & ((longint'(1) << w) - 1);
    return (u ^ m) - m;
  endfunction

endpackage
