// ssd_ref_pkg: reference arithmetic for the testbenches, written in plain
// integer form and independent of the RTL's fixed-point formers.
// Squaring identity used: A^2 = sum_b a_b * (4*(A >> (b+1)) + 1) * 4^b, with
// a_b bit b of A. The part of that sum that falls in group s (bits s*K ..
// s*K+K-1), scaled by 2^(K*(H-1-s)), is the group partial result P_Kg times
// 2^(2*NB) that a processing element gives on output step s.
package ssd_ref_pkg;

  function automatic longint unsigned group_psq(input longint unsigned a,
                                                input int s, input int nb,
                                                input int k);
    longint unsigned t = 0;
    int h = nb / k;
    for (int b = s * k; b < s * k + k; b++)
      if (((a >> b) & 1) == 1)
        t += (4 * (a >> (b + 1)) + 1) << (2 * b);
    return t << (k * (h - 1 - s));
  endfunction

endpackage
