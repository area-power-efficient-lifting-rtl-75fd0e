// dwt_ref_pkg: integer reference arithmetic for the DWT testbenches.
//
// Works on plain integers, independent of the gate-level datapath: a
// sign-magnitude word is turned into an int, the step
// W = X + Bi*Y + Bj*Z is evaluated with each product's magnitude truncated
// by the coefficient's 4 fraction bits, and the sum is wrapped to the 10-bit
// two's complement range and written back as sign-magnitude (-512 -> "-0").
package dwt_ref_pkg;
  import dwt_pkg::*;

  function automatic int sm2int(sm_data_t v);
    return v.sign ? -int'(v.mag) : int'(v.mag);
  endfunction

  function automatic int coef2int(sm_coef_t c);
    return c.sign ? -int'(c.mag) : int'(c.mag);
  endfunction

  // product of a data word and a coefficient, magnitude truncated
  function automatic int ref_prod(sm_data_t v, sm_coef_t c);
    int m;
    m = (int'(v.mag) * int'(c.mag)) / 16;
    return (v.sign ^ c.sign) ? -m : m;
  endfunction

  function automatic sm_data_t int2sm_wrap(int s);
    int w;
    sm_data_t r;
    w = ((s % 1024) + 1024) % 1024;          // 0 .. 1023
    if (w >= 512) w = w - 1024;              // -512 .. 511
    r.sign = (w < 0);
    r.mag  = (w == -512) ? 9'd0 : MAG_W'(w < 0 ? -w : w);
    return r;
  endfunction

  function automatic sm_data_t ref_step(sm_data_t x, sm_data_t y, sm_data_t z,
                                        sm_coef_t bi, sm_coef_t bj);
    return int2sm_wrap(sm2int(x) + ref_prod(y, bi) + ref_prod(z, bj));
  endfunction

  function automatic sm_data_t rand_sm();
    sm_data_t r;
    r = sm_data_t'($urandom);
    return r;
  endfunction

  // the default coefficient values as signed sixteenths, B0 first
  function automatic sm_coef_t ref_coef(int i);
    int vals [8] = '{-6, 2, -5, 9, -3, 7, -2, 11};
    sm_coef_t c;
    c.sign = vals[i] < 0;
    c.mag  = CMAG_W'(vals[i] < 0 ? -vals[i] : vals[i]);
    return c;
  endfunction
endpackage
