// tb_pea_ref_pkg: reference model shared by the accelerator's testbenches.
//
// poly_ref evaluates c[0] + c[1]*x + ... + c[n]*x^n term by term with 32-bit
// two's-complement arithmetic (int wraps modulo 2**32), a different method
// from the Horner and power-chain hardware, so a shared mistake is unlikely.
package tb_pea_ref_pkg;
  import pea_pkg::*;

  function automatic int poly_ref(coef_vec_t c, int n, int x);
    int sum = 0;
    int p   = 1;
    for (int i = 0; i <= n; i++) begin
      sum += int'(c[i]) * p;
      p   *= x;
    end
    return sum;
  endfunction

  // A random 16-bit signed value, biased towards the extremes now and then.
  function automatic data_t rand_data();
    case ($urandom_range(0, 7))
      0:       return 16'sh7fff;
      1:       return 16'sh8000;
      2:       return data_t'($urandom_range(0, 4)) - 16'sd2;
      default: return data_t'($urandom);
    endcase
  endfunction
endpackage
