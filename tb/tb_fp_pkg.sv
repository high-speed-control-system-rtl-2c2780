// tb_fp_pkg: helpers for the floating-point testbenches. Decodes single-precision words
// to real and encodes reals, independently of the design's arithmetic.
package tb_fp_pkg;
  function automatic real fp2r(input logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    m = m * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  // unit in the last place of a normal float of magnitude |r|
  function automatic real ulp(input real r);
    real a;
    int  e;
    a = (r < 0.0) ? -r : r;
    if (a == 0.0) return 0.0;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    return 2.0 ** (e - 23);
  endfunction

  function automatic logic [31:0] r2fp(input real r);
    real a;
    int  e;
    longint m;
    if (r == 0.0) return '0;
    a = (r < 0.0) ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    m = longint'((a - 1.0) * 8388608.0 + 0.5);
    if (m >= 64'd8388608) begin m = 0; e++; end
    return {(r < 0.0), 8'(e + 127), m[22:0]};
  endfunction

  function automatic logic [31:0] rand_fp(input int emin, input int emax);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(127 + emin + int'($urandom % 32'(emax - emin + 1)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction
endpackage
