// tb_msq_ref_pkg: arithmetic reference for the multi-moduli squarer
// testbenches.  Works on plain integers (128-bit), independent of the Booth
// matrix and CSA structure of the design.
package tb_msq_ref_pkg;

  typedef logic [127:0] u128_t;

  // Expected squarer result for operand a (N+1 bits, a[N] only in mode 3).
  //   mode 0: <a^2> mod 2^n-1 (canonical, 0 .. 2^n-2)
  //   mode 1: <a^2> mod 2^n
  //   mode 2: diminished-one: <(a+1)^2> mod 2^n+1, minus 1
  //   mode 3: normal: <a^2> mod 2^n+1
  function automatic u128_t sq_ref(input int n, input int mode, input u128_t a);
    u128_t m, v;
    case (mode)
      0: begin m = (u128_t'(1) << n) - 1; v = a % m; return (v * v) % m; end
      1: begin m = u128_t'(1) << n;       v = a % m; return (v * v) % m; end
      2: begin m = (u128_t'(1) << n) + 1; v = (a + 1) % m; return ((v * v) % m + m - 1) % m; end
      default: begin m = (u128_t'(1) << n) + 1; v = a % m; return (v * v) % m; end
    endcase
  endfunction

  // Compare a result r (n+1 bits wide, upper bits must be 0 unless mode 3)
  // with the reference; modulo 2^n-1 all ones also stands for 0.
  function automatic bit sq_ok(input int n, input int mode, input u128_t a, input u128_t r);
    u128_t e, ones;
    e = sq_ref(n, mode, a);
    ones = (u128_t'(1) << n) - 1;
    if (mode == 0 && e == 0 && r == ones) return 1'b1;
    return r == e;
  endfunction

  // 1 when the diminished-one result is the (unencodable) zero.
  function automatic bit dim_zero(input int n, input u128_t a);
    u128_t m, v;
    m = (u128_t'(1) << n) + 1;
    v = (a + 1) % m;
    return ((v * v) % m) == 0;
  endfunction

endpackage
