// tb_util_pkg: helpers shared by the testbenches.
//   f32_to_real  - value of an IEEE754 single-precision bit pattern (normal
//                  numbers and zero), computed from its fields.
//   rel_close    - true when got lies within tol (relative) or abs_tol
//                  (absolute) of want.
package tb_util_pkg;

  function automatic real f32_to_real(input logic [31:0] b);
    real m;
    int  ex;
    if (b[30:0] == '0) return 0.0;
    m  = 1.0 + real'(b[22:0]) / 8388608.0;
    ex = int'(b[30:23]) - 127;
    m  = m * (2.0 ** ex);
    return b[31] ? -m : m;
  endfunction

  function automatic bit rel_close(input real got, input real want,
                                   input real tol, input real abs_tol);
    real d;
    d = got - want;
    if (d < 0.0) d = -d;
    if (d <= abs_tol) return 1'b1;
    if (want != 0.0 && d <= tol * ((want < 0.0) ? -want : want)) return 1'b1;
    return 1'b0;
  endfunction

endpackage
