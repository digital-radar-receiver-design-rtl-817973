// rx_ref_pkg: reference arithmetic for the receiver testbenches, written
// directly from the definitions rather than from the RTL structure:
//   mixing:  I[n] = x[n]*cos(pi/2*n), Q[n] = x[n]*sin(pi/2*n) (saturated),
//            or I = Q = x in bypass;
//   filter:  y[m] = round(sum_k h_set[k] * v[8m-k] / 2**17), saturated.
package rx_ref_pkg;
  import rx_pkg::*;

  function automatic int sat14(longint v);
    return (v > 8191) ? 8191 : (v < -8192) ? -8192 : int'(v);
  endfunction

  function automatic int mix_i(int x, int n, bit act);
    if (!act) return x;
    case (n % 4)
      0: return x;
      2: return sat14(-longint'(x));
      default: return 0;
    endcase
  endfunction

  function automatic int mix_q(int x, int n, bit act);
    if (!act) return x;
    case (n % 4)
      1: return x;
      3: return sat14(-longint'(x));
      default: return 0;
    endcase
  endfunction

  // Coefficient tables of the two sets; call init_coefs once before filt().
  longint h [2][NTAPS];

  function automatic void init_coefs(real fc0, real fc1);
    for (int k = 0; k < NTAPS; k++) begin
      h[0][k] = longint'(lp_coef(k, fc0));
      h[1][k] = longint'(lp_coef(k, fc1));
    end
  endfunction

  // Decimated output m of stream v; sample n is filtered with set[n].
  function automatic int filt(input int v [$], input bit set [$], input int m);
    longint acc = 0;
    for (int k = 0; k < NTAPS; k++) begin
      int n = 8 * m - k;
      if (n >= 0 && n < v.size()) acc += h[set[n]][k] * longint'(v[n]);
    end
    return sat14((acc + (longint'(1) <<< 16)) >>> 17);
  endfunction
endpackage
