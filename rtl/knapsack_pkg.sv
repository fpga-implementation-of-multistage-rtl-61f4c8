// knapsack_pkg: key material and derived sizes of the three-stage
// Merkle-Hellman knapsack cryptosystem.
//
// Each stage j has a secret superincreasing vector alpha (every element
// larger than the sum of the ones before it), an odd modulus m larger than
// the sum of alpha, and a multiplier w = 2^k.  Choosing w as a power of two is
// what lets decryption replace a general modular multiplication by k
// add-and-halve steps.  The public (hard) knapsack is a_i = alpha_i * w mod m;
// it is not stored here but computed at elaboration time by pub_elem(), so the
// encryption ROM and the decryption ROM can never disagree.
//
// The key values are the ones of the published three-stage example
// (N = 10, 15, 19; m = 4093, 44357, 680337; w = 2^9, 2^13, 2^14).  Output
// widths are derived: cipher_w(j) is the number of bits of the largest
// possible stage-j ciphertext (the sum of all public elements), and each must
// fit into the input block of the next stage.
package knapsack_pkg;

  localparam int unsigned NUM_KEY_STAGES = 3;
  localparam int unsigned MAX_N          = 19;

  // Block length (key length) of each stage.
  localparam int unsigned STAGE_N    [NUM_KEY_STAGES] = '{10, 15, 19};
  // Odd modulus of each stage.
  localparam int unsigned STAGE_M    [NUM_KEY_STAGES] = '{4093, 44357, 680337};
  // w = 2^STAGE_KEXP; the Montgomery-style reduction runs STAGE_KEXP steps.
  localparam int unsigned STAGE_KEXP [NUM_KEY_STAGES] = '{9, 13, 14};

  // Secret superincreasing vectors, element 0 first, zero padded to MAX_N.
  localparam int unsigned STAGE_ALPHA [NUM_KEY_STAGES][MAX_N] = '{
    '{3, 5, 11, 25, 52, 105, 212, 430, 871, 1750,
      0, 0, 0, 0, 0, 0, 0, 0, 0},
    '{1, 3, 5, 11, 21, 44, 87, 173, 346, 692, 1384, 2768, 5540, 11084, 22174,
      0, 0, 0, 0},
    '{1, 2, 5, 9, 20, 39, 79, 163, 329, 661, 1325, 2653, 5311, 10627, 21257,
      42519, 85041, 170085, 340173}
  };

  // Selects which vector a key ROM holds.
  typedef enum logic {
    KEY_PUBLIC = 1'b0,  // hard knapsack a_i, used by encryption
    KEY_SECRET = 1'b1   // superincreasing alpha_i, used by decryption
  } key_kind_e;

  // Smallest number of bits that holds the value v (at least 1).
  function automatic int unsigned bits_for(longint unsigned v);
    int unsigned b = 1;
    while ((v >> b) != 0) b++;
    return b;
  endfunction

  function automatic longint unsigned sec_elem(int unsigned s, int unsigned i);
    return longint'(STAGE_ALPHA[s][i]);
  endfunction

  // Public element: a_i = alpha_i * 2^k mod m   (Eq. 4 with w = 2^k).
  function automatic longint unsigned pub_elem(int unsigned s, int unsigned i);
    return (longint'(STAGE_ALPHA[s][i]) << STAGE_KEXP[s]) % longint'(STAGE_M[s]);
  endfunction

  function automatic longint unsigned key_elem(int unsigned s, key_kind_e kind,
                                               int unsigned i);
    return (kind == KEY_SECRET) ? sec_elem(s, i) : pub_elem(s, i);
  endfunction

  // Width of a key element of stage s (public elements are below m).
  function automatic int unsigned key_w(int unsigned s, key_kind_e kind);
    longint unsigned mx = 0;
    for (int unsigned i = 0; i < STAGE_N[s]; i++)
      if (key_elem(s, kind, i) > mx) mx = key_elem(s, kind, i);
    return bits_for(mx);
  endfunction

  // Width of the modulus (and of the reduced value gamma) of stage s.
  function automatic int unsigned mod_w(int unsigned s);
    return bits_for(longint'(STAGE_M[s]));
  endfunction

  // Width of the ciphertext of stage s: bits of the sum of all public elements.
  function automatic int unsigned cipher_w(int unsigned s);
    longint unsigned sum = 0;
    for (int unsigned i = 0; i < STAGE_N[s]; i++) sum += pub_elem(s, i);
    return bits_for(sum);
  endfunction

  // Width of the input of the cascade after the last stage (the ciphertext
  // the whole encryption part produces when it has nstages stages).
  function automatic int unsigned chain_out_w(int unsigned nstages);
    return cipher_w(nstages - 1);
  endfunction

  // Widest word passed between stages of an nstages cascade (plaintext block
  // or ciphertext); the cascades route stage data on buses of this width.
  function automatic int unsigned max_data_w(int unsigned nstages);
    int unsigned mx = 1;
    for (int unsigned s = 0; s < nstages; s++) begin
      if (STAGE_N[s] > mx) mx = STAGE_N[s];
      if (cipher_w(s) > mx) mx = cipher_w(s);
    end
    return mx;
  endfunction

  // Clock cycles from start to ready of one encryption stage: N + 1.
  function automatic int unsigned enc_latency(int unsigned s);
    return STAGE_N[s] + 1;
  endfunction

  // Clock cycles from start to ready of one decryption stage:
  // (k + 1) for the reduction plus (N + 1) for the solver.
  function automatic int unsigned dec_latency(int unsigned s);
    return STAGE_KEXP[s] + STAGE_N[s] + 2;
  endfunction

  function automatic int unsigned max_enc_latency(int unsigned nstages);
    int unsigned mx = 0;
    for (int unsigned s = 0; s < nstages; s++)
      if (enc_latency(s) > mx) mx = enc_latency(s);
    return mx;
  endfunction

  function automatic int unsigned max_dec_latency(int unsigned nstages);
    int unsigned mx = 0;
    for (int unsigned s = 0; s < nstages; s++)
      if (dec_latency(s) > mx) mx = dec_latency(s);
    return mx;
  endfunction

endpackage
