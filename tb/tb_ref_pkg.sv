// Reference model functions for the testbenches: an independent
// re-implementation of the 64-bit keyed mixing function and of the secret
// vectors the blocks expand from their seeds (Mode Enable Vectors, lock keys,
// watermark responses, keystream).
package tb_ref_pkg;
  function automatic longint unsigned ref_mix(longint unsigned seed, int unsigned idx);
    longint unsigned z;
    z = seed + longint'(idx + 1) * 64'h9E3779B97F4A7C15;
    z = z ^ (z >> 30);
    z = z * 64'hBF58476D1CE4E5B9;
    z = z ^ (z >> 27);
    z = z * 64'h94D049BB133111EB;
    return z ^ (z >> 31);
  endfunction

  // Mode Enable Vector `step` of the chain for operation `op`.
  function automatic logic [15:0] ref_mev(longint unsigned seed, int unsigned op, int unsigned step);
    logic [63:0] z;
    z = ref_mix(seed, op * 256 + step);
    if (step == 0) return {z[15:2], op[1:0]};
    return z[15:0];
  endfunction

  // 32-bit word `w` of lock key vector `i`, for keys of nw 64-bit words.
  function automatic logic [31:0] ref_key_word(longint unsigned seed, int unsigned i,
                                               int unsigned nw, int unsigned w);
    logic [63:0] z;
    z = ref_mix(seed, i * nw + w / 2);
    return (w % 2 == 0) ? z[31:0] : z[63:32];
  endfunction

  // Keystream word of the encryption unit.
  function automatic logic [31:0] ref_ks(longint unsigned key, int unsigned tweak);
    logic [63:0] z;
    z = ref_mix(key, tweak);
    return z[31:0] ^ z[63:32];
  endfunction
endpackage
