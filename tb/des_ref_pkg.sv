// des_ref_pkg: behavioural DES reference for the testbenches.
//
// A plain, unpipelined, loop-based encryption written straight from the DES
// standard: key schedule as a loop over the sixteen rotations, rounds as a
// loop over the Feistel function. It shares the standard's tables with the
// design (des_pkg) but none of its structure; the tables themselves are
// anchored by the published known-answer vectors that the testbenches check.
package des_ref_pkg;
  import des_pkg::*;

  function automatic logic [31:0] ref_f(logic [31:0] r, logic [47:0] k);
    logic [47:0] x;
    logic [31:0] s;
    x = perm_e(r) ^ k;
    for (int j = 0; j < 8; j++) begin
      logic [5:0] six;
      six = x[47 - 6*j -: 6];
      s[31 - 4*j -: 4] = SBOX[j][{six[5], six[0], six[4:1]}];
    end
    return perm_p(s);
  endfunction

  function automatic logic [55:0] ref_rot(logic [55:0] cd, int unsigned n);
    logic [27:0] c, d;
    c = cd[55:28];
    d = cd[27:0];
    for (int i = 0; i < int'(n); i++) begin
      c = {c[26:0], c[27]};
      d = {d[26:0], d[27]};
    end
    return {c, d};
  endfunction

  function automatic logic [63:0] ref_des(logic [63:0] pt, logic [63:0] key);
    logic [55:0] cd;
    logic [63:0] b;
    logic [31:0] l, r, t;
    cd = perm_pc1(key);
    b  = perm_ip(pt);
    l  = b[63:32];
    r  = b[31:0];
    for (int n = 0; n < 16; n++) begin
      cd = ref_rot(cd, SHIFTS[n]);
      t  = r;
      r  = l ^ ref_f(r, perm_pc2(cd));
      l  = t;
    end
    return perm_fp({r, l});
  endfunction

endpackage
