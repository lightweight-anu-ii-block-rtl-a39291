// anu2_ref_pkg: bit-accurate software model of the ANU-II cipher used by the
// testbenches as the expected-value source. It is written independently of
// the RTL: its own copy of the S-box table, rotations written as shift/OR
// expressions, and the 25 rounds as a plain loop.
//   round:      t1 = S(L) ^ (R >>> 3) ^ K[31:0]; t2 = (t1 <<< 10) ^ R ^ K[63:32];
//               (L, R) <- (t2, t1)
//   key update: K <- K <<< 13; K[7:4], K[3:0] through S; K[63:59] ^= round
package anu2_ref_pkg;

  localparam logic [3:0] S_REF [16] = '{
    4'hE, 4'h4, 4'hB, 4'h1, 4'h7, 4'h9, 4'hC, 4'hA,
    4'hD, 4'h2, 4'h0, 4'hF, 4'h8, 4'h5, 4'h3, 4'h6
  };

  function automatic logic [31:0] ref_sub32(logic [31:0] x);
    logic [31:0] y;
    for (int i = 0; i < 8; i++) y[4*i +: 4] = S_REF[x[4*i +: 4]];
    return y;
  endfunction

  function automatic logic [31:0] ref_ror3(logic [31:0] x);
    return (x >> 3) | (x << 29);
  endfunction

  function automatic logic [31:0] ref_rol10(logic [31:0] x);
    return (x << 10) | (x >> 22);
  endfunction

  function automatic logic [127:0] ref_rol13(logic [127:0] x);
    return (x << 13) | (x >> 115);
  endfunction

  function automatic logic [63:0] ref_round(logic [63:0] s, logic [127:0] k);
    logic [31:0] l, r, t1, t2;
    l  = s[63:32];
    r  = s[31:0];
    t1 = ref_sub32(l) ^ ref_ror3(r) ^ k[31:0];
    t2 = ref_rol10(t1) ^ r ^ k[63:32];
    return {t2, t1};
  endfunction

  function automatic logic [127:0] ref_key_update(logic [127:0] k, int rc);
    logic [127:0] n;
    n        = ref_rol13(k);
    n[7:4]   = S_REF[n[7:4]];
    n[3:0]   = S_REF[n[3:0]];
    n[63:59] = n[63:59] ^ 5'(rc);
    return n;
  endfunction

  // Encrypt one block; also returns the key after the last update.
  function automatic logic [63:0] ref_encrypt(logic [63:0] pt, logic [127:0] key,
                                              output logic [127:0] key_last,
                                              input int rounds = 25);
    logic [63:0]  s = pt;
    logic [127:0] k = key;
    for (int i = 0; i < rounds; i++) begin
      s = ref_round(s, k);
      k = ref_key_update(k, i);
    end
    key_last = k;
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom, $urandom};
  endfunction

endpackage
