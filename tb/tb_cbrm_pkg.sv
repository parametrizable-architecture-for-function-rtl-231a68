// tb_cbrm_pkg: reference arithmetic for the CBRM testbenches.
//
// lut_entry() gives the value a Convolution-LUT word must hold for a table
// address, worked out from alpha and beta in floating point:
//   round(((s_own ? -1 : 1)*alpha*own + (s_oth ? -1 : 1)*beta*oth) * 2^F)
// with F = N-K-2 fraction bits. ref_eval() computes what one evaluation of
//   res = alpha*own + beta*(+-oth)
// must return bit for bit: the sum over the T digit blocks of the table
// values, block j weighted by 2^(j*K), rounded half away from zero to an
// integer, cut to N bits, with an overflow flag. It uses 64-bit integers, so
// it is exact for N up to 32.
package tb_cbrm_pkg;

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic longint rnd(real x);
    if (x >= 0.0) return longint'($floor(x + 0.5));
    return -longint'($floor(-x + 0.5));
  endfunction

  function automatic longint lut_entry(real alpha, real beta, int n, int k,
                                       longint unsigned addr);
    longint unsigned mask;
    longint unsigned a, b;
    bit sa, sb;
    real v;
    mask = (64'd1 << k) - 1;
    b  = addr & mask;
    a  = (addr >> k) & mask;
    sb = addr[2*k];
    sa = addr[2*k+1];
    v  = (sa ? -alpha : alpha) * real'(a) + (sb ? -beta : beta) * real'(b);
    return rnd(v * (2.0 ** (n - k - 2)));
  endfunction

  function automatic void ref_eval(input real alpha, input real beta,
                                   input int n, input int k,
                                   input bit own_s, input longint unsigned own_m,
                                   input bit oth_s, input longint unsigned oth_m,
                                   output bit res_s, output longint unsigned res_m,
                                   output bit ovf);
    longint acc;
    longint unsigned absacc, rounded, mask;
    int f;
    f = n - k - 2;
    mask = (64'd1 << k) - 1;
    acc = 0;
    for (int j = 0; j < n / k; j++) begin
      longint unsigned addr;
      addr = (longint'(own_s) << (2*k+1)) | (longint'(oth_s) << (2*k))
           | (((own_m >> (j*k)) & mask) << k) | ((oth_m >> (j*k)) & mask);
      acc += lut_entry(alpha, beta, n, k, addr) <<< (j * k);
    end
    absacc  = (acc < 0) ? longint'(-acc) : longint'(acc);
    rounded = (f > 0) ? (absacc + (64'd1 << (f - 1))) >> f : absacc;
    res_m   = (n >= 64) ? rounded : rounded & ((64'd1 << n) - 1);
    ovf     = (n < 64) && ((rounded >> n) != 0);
    res_s   = (acc < 0) && (res_m != 0);
  endfunction

endpackage
