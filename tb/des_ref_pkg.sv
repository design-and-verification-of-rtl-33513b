// des_ref_pkg -- behavioural DES reference for the testbenches.
//
// A straightforward software-style model of FIPS 46 encryption: bits are
// handled one at a time through 1-based accessor functions, the rounds run
// in a loop with an explicit L/R swap, and the key schedule is computed
// iteratively. It shares only the standard's constant tables with the RTL;
// the tables themselves are checked by the known-answer vectors below, which
// are the classic DES validation set (34 key/plaintext/ciphertext triples).
// It also records the S-box outputs of every round so that a testbench can
// predict the contents of the design's registers.
package des_ref_pkg;
  import des_pkg::*;

  typedef struct packed {
    logic [63:0] key;
    logic [63:0] pt;
    logic [63:0] ct;
  } kat_t;

  localparam int NUM_KAT = 34;

  localparam kat_t KAT [NUM_KAT] = '{
    '{64'h0000000000000000, 64'h0000000000000000, 64'h8ca64de9c1b123a7},
    '{64'hffffffffffffffff, 64'hffffffffffffffff, 64'h7359b2163e4edc58},
    '{64'h3000000000000000, 64'h1000000000000001, 64'h958e6e627a05557b},
    '{64'h1111111111111111, 64'h1111111111111111, 64'hf40379ab9e0ec533},
    '{64'h0123456789abcdef, 64'h1111111111111111, 64'h17668dfc7292532d},
    '{64'h1111111111111111, 64'h0123456789abcdef, 64'h8a5ae1f81ab8f2dd},
    '{64'h0000000000000000, 64'h0000000000000000, 64'h8ca64de9c1b123a7},
    '{64'hfedcba9876543210, 64'h0123456789abcdef, 64'hed39d950fa74bcc4},
    '{64'h7ca110454a1a6e57, 64'h01a1d6d039776742, 64'h690f5b0d9a26939b},
    '{64'h0131d9619dc1376e, 64'h5cd54ca83def57da, 64'h7a389d10354bd271},
    '{64'h07a1133e4a0b2686, 64'h0248d43806f67172, 64'h868ebb51cab4599a},
    '{64'h3849674c2602319e, 64'h51454b582ddf440a, 64'h7178876e01f19b2a},
    '{64'h04b915ba43feb5b6, 64'h42fd443059577fa2, 64'haf37fb421f8c4095},
    '{64'h0113b970fd34f2ce, 64'h059b5e0851cf143a, 64'h86a560f10ec6d85b},
    '{64'h0170f175468fb5e6, 64'h0756d8e0774761d2, 64'h0cd3da020021dc09},
    '{64'h43297fad38e373fe, 64'h762514b829bf486a, 64'hea676b2cb7db2b7a},
    '{64'h07a7137045da2a16, 64'h3bdd119049372802, 64'hdfd64a815caf1a0f},
    '{64'h04689104c2fd3b2f, 64'h26955f6835af609a, 64'h5c513c9c4886c088},
    '{64'h37d06bb516cb7546, 64'h164d5e404f275232, 64'h0a2aeeae3ff4ab77},
    '{64'h1f08260d1ac2465e, 64'h6b056e18759f5cca, 64'hef1bf03e5dfa575a},
    '{64'h584023641aba6176, 64'h004bd6ef09176062, 64'h88bf0db6d70dee56},
    '{64'h025816164629b007, 64'h480d39006ee762f2, 64'ha1f9915541020b56},
    '{64'h49793ebc79b3258f, 64'h437540c8698f3cfa, 64'h6fbf1cafcffd0556},
    '{64'h4fb05e1515ab73a7, 64'h072d43a077075292, 64'h2f22e49bab7ca1ac},
    '{64'h49e95d6d4ca229bf, 64'h02fe55778117f12a, 64'h5a6b612cc26cce4a},
    '{64'h018310dc409b26d6, 64'h1d9d5c5018f728c2, 64'h5f4c038ed12b2e41},
    '{64'h1c587f1c13924fef, 64'h305532286d6f295a, 64'h63fac0d034d9f793},
    '{64'h0101010101010101, 64'h0123456789abcdef, 64'h617b3a0ce8f07100},
    '{64'h1f1f1f1f0e0e0e0e, 64'h0123456789abcdef, 64'hdb958605f8c8c606},
    '{64'he0fee0fef1fef1fe, 64'h0123456789abcdef, 64'hedbfd1c66c29ccc7},
    '{64'h0000000000000000, 64'hffffffffffffffff, 64'h355550b2150e2451},
    '{64'hffffffffffffffff, 64'h0000000000000000, 64'hcaaaaf4deaf1dbae},
    '{64'h0123456789abcdef, 64'h0000000000000000, 64'hd5d44ff720683d0d},
    '{64'hfedcba9876543210, 64'hffffffffffffffff, 64'h2a2bb008df97c2f2}};

  // Standard bit n (1 = most significant) of the low `width` bits of v.
  function automatic bit getb(logic [63:0] v, int width, int n);
    return v[width - n];
  endfunction

  // Generic table permutation: output has `ow` bits, bit i of the output
  // takes standard bit tbl[i-1] of the `iw`-bit input.
  function automatic logic [63:0] ref_perm(logic [63:0] v, int iw, int ow,
                                           const ref byte unsigned tbl []);
    logic [63:0] r = '0;
    for (int i = 1; i <= ow; i++)
      r = (r << 1) | 64'(getb(v, iw, tbl[i-1]));
    return r;
  endfunction

  function automatic logic [63:0] ref_ip(logic [63:0] x);
    byte unsigned t [] = new [64];
    foreach (t[i]) t[i] = IP_T[i];
    return ref_perm(x, 64, 64, t);
  endfunction

  function automatic logic [63:0] ref_fp(logic [63:0] x);
    byte unsigned t [] = new [64];
    foreach (t[i]) t[i] = FP_T[i];
    return ref_perm(x, 64, 64, t);
  endfunction

  function automatic logic [47:0] ref_e(logic [31:0] x);
    byte unsigned t [] = new [48];
    foreach (t[i]) t[i] = E_T[i];
    return 48'(ref_perm(64'(x), 32, 48, t));
  endfunction

  function automatic logic [31:0] ref_p(logic [31:0] x);
    byte unsigned t [] = new [32];
    foreach (t[i]) t[i] = P_T[i];
    return 32'(ref_perm(64'(x), 32, 32, t));
  endfunction

  function automatic logic [55:0] ref_pc1(logic [63:0] key);
    byte unsigned t [] = new [56];
    foreach (t[i]) t[i] = PC1_T[i];
    return 56'(ref_perm(key, 64, 56, t));
  endfunction

  function automatic logic [47:0] ref_pc2(logic [55:0] cd);
    byte unsigned t [] = new [48];
    foreach (t[i]) t[i] = PC2_T[i];
    return 48'(ref_perm(64'(cd), 56, 48, t));
  endfunction

  // S-box look-up written from the row/column definition.
  function automatic logic [3:0] ref_sbox(int box, logic [5:0] b);
    int row = 2 * int'(b[5]) + int'(b[0]);
    int col = int'(b[4:1]);
    return SBOX_T[box][16 * row + col];
  endfunction

  // f without P: the eight S-box outputs for R and K.
  function automatic logic [31:0] ref_s(logic [31:0] r, logic [47:0] k);
    logic [47:0] x = ref_e(r) ^ k;
    logic [31:0] s = '0;
    for (int j = 0; j < 8; j++)
      s = (s << 4) | 32'(ref_sbox(j, x[47 - 6*j -: 6]));
    return s;
  endfunction

  // Round keys K1..K16 (index 0..15) by repeated single-bit rotations.
  function automatic void ref_subkeys(logic [63:0] key, output logic [47:0] ks [16]);
    logic [55:0] cd = ref_pc1(key);
    logic [27:0] c = cd[55:28];
    logic [27:0] d = cd[27:0];
    for (int i = 0; i < 16; i++) begin
      int n = (i == 0 || i == 1 || i == 8 || i == 15) ? 1 : 2;
      for (int s = 0; s < n; s++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
      ks[i] = ref_pc2({c, d});
    end
  endfunction

  // Full encryption; sout[i] receives the S-box outputs of round i+1.
  function automatic logic [63:0] ref_des(logic [63:0] key, logic [63:0] pt,
                                          output logic [31:0] sout [16]);
    logic [47:0] ks [16];
    logic [63:0] x = ref_ip(pt);
    logic [31:0] l = x[63:32];
    logic [31:0] r = x[31:0];
    logic [31:0] t;
    ref_subkeys(key, ks);
    for (int i = 0; i < 16; i++) begin
      sout[i] = ref_s(r, ks[i]);
      t = l ^ ref_p(sout[i]);
      l = r;
      r = t;
    end
    return ref_fp({r, l});
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

endpackage
