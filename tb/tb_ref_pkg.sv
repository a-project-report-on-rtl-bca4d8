// tb_ref_pkg: reference values shared by the testbenches.
//
// HALF holds round(32767 * sin(pi * i / 16)) for i = 0..15, written out as
// numbers so that the testbenches do not reuse the table generator of the
// design. ref_sin(k) and ref_cos(k) give the expected generator output for
// sample k (0..31) of a 32-sample period. ref_ratio(num, den) is the
// expected tan/cot result: trunc(|num| * 2**16 / |den|) with the sign of
// num/den, saturated to +/-(2**31 - 1), and 'inf' set when den is zero.
package tb_ref_pkg;
  localparam int HALF [16] = '{
    0, 6393, 12539, 18204, 23170, 27245, 30273, 32137,
    32767, 32137, 30273, 27245, 23170, 18204, 12539, 6393};

  function automatic int ref_sin(input int k);
    int kk;
    kk = k & 31;
    return (kk < 16) ? HALF[kk] : -HALF[kk - 16];
  endfunction

  function automatic int ref_cos(input int k);
    return ref_sin(k + 8);
  endfunction

  localparam longint RATIO_MAX = (64'sd1 <<< 31) - 1;

  function automatic longint ref_ratio(input longint num, input longint den, output bit inf);
    longint an, ad, q;
    an  = num < 0 ? -num : num;
    ad  = den < 0 ? -den : den;
    inf = (ad == 0);
    q   = inf ? RATIO_MAX : (an <<< 16) / ad;
    if (q > RATIO_MAX) q = RATIO_MAX;
    return ((num < 0) !== (den < 0)) ? -q : q;
  endfunction
endpackage
