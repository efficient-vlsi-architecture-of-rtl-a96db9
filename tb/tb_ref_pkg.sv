// tb_ref_pkg - reference equations of the LTE constituent code for the
// testbenches, written from the shift-register description (feedback
// 1 + D^2 + D^3, parity 1 + D + D^3) independently of the RTL.
// State packing as in the RTL: state = {r1, r2, r3}, r1 the newest bit.
package tb_ref_pkg;
  function automatic bit [2:0] ref_next(bit [2:0] s, bit u);
    bit r1, r2, r3, a;
    {r1, r2, r3} = s;
    a = u ^ r2 ^ r3;
    return {a, r1, r2};
  endfunction

  function automatic bit ref_par(bit [2:0] s, bit u);
    bit r1, r2, r3, a;
    {r1, r2, r3} = s;
    a = u ^ r2 ^ r3;
    return a ^ r1 ^ r3;
  endfunction

  // systematic bit that drives the register to zero (termination)
  function automatic bit ref_term_bit(bit [2:0] s);
    return s[1] ^ s[0];
  endfunction

  function automatic int ref_pi(int i, int k, int f1, int f2);
    return int'((longint'(f1) * i + longint'(f2) * i * i) % k);
  endfunction

  // xorshift32 pseudo-random generator
  function automatic int unsigned xs32(ref int unsigned st);
    st ^= st << 13;
    st ^= st >> 17;
    st ^= st << 5;
    return st;
  endfunction
endpackage
