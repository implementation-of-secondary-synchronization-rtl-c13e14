// Reference model of the LTE SSS used by the detector testbenches.
// Written from the LTE definition with integer +/-1 arithmetic, separately
// from the hardware generator.
package sss_ref_pkg;

  // x(i) of the three length-31 base m-sequences (0: s~, 1: c~, 2: z~).
  function automatic int mbit(input int sel, input int idx);
    int x[31];
    for (int i = 0; i < 5; i++) x[i] = int'(i == 4);
    for (int i = 0; i < 26; i++) begin
      case (sel)
        0:       x[i+5] = (x[i+2] + x[i]) % 2;
        1:       x[i+5] = (x[i+3] + x[i]) % 2;
        default: x[i+5] = (x[i+4] + x[i+2] + x[i+1] + x[i]) % 2;
      endcase
    end
    return x[idx % 31];
  endfunction

  function automatic int pm(input int sel, input int idx);
    return 1 - 2 * mbit(sel, idx);
  endfunction

  // Ts,q(k) as +1/-1; sub5 = 0 for subframe 0, 1 for subframe 5.
  function automatic int chip(input int n1, input int n2, input int sub5, input int kk);
    int qp, q, mp, m0, m1, n;
    qp = n1 / 30;
    q  = (n1 + qp * (qp + 1) / 2) / 30;
    mp = n1 + q * (q + 1) / 2;
    m0 = mp % 31;
    m1 = (m0 + mp / 31 + 1) % 31;
    n = kk / 2;
    if (kk % 2 == 0)
      return pm(0, n + (sub5 ? m1 : m0)) * pm(1, n + n2);
    else
      return pm(0, n + (sub5 ? m0 : m1)) * pm(1, n + n2 + 3) * pm(2, n + (sub5 ? m1 % 8 : m0 % 8));
  endfunction

endpackage
