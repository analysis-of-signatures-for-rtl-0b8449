// tb_obs_model_pkg: reference models used by the observation IP testbenches.
//
// The models are written bit by bit from the algorithm, not from the RTL:
//  - fold():      zero-extend to whole W-bit chunks, then for the chunks from
//                 the most significant down: acc = rotate_right_1(acc) ^ chunk
//  - xor_fold():  the plain XOR fold without rotation (the older compressor),
//                 used to show which inputs it maps to an all-zero word
//  - misr_step(): one shift of the internal-feedback register; stage i takes
//                 stage i+1, stage W-1 takes stage 0, and every exponent e of
//                 the polynomial (0 < e < W) XORs stage 0 into stage W-1-e
// Widths up to 64 bits for words and 2048 bits for input vectors.
package tb_obs_model_pkg;

  typedef logic [2047:0] vec_t;
  typedef logic [63:0]   word_t;

  function automatic word_t fold(vec_t v, int n, int w);
    int    k = (n + w - 1) / w;
    word_t acc = '0;
    word_t chunk;
    word_t rot;
    for (int c = k - 1; c >= 0; c--) begin
      chunk = '0;
      for (int b = 0; b < w; b++) begin
        int idx = c * w + b;
        chunk[b] = (idx < n) ? v[idx] : 1'b0;
      end
      rot = '0;
      for (int b = 0; b < w; b++) rot[b] = acc[(b + 1) % w];
      acc = rot ^ chunk;
    end
    return acc;
  endfunction

  function automatic word_t xor_fold(vec_t v, int n, int w);
    int    k = (n + w - 1) / w;
    word_t acc = '0;
    for (int c = 0; c < k; c++)
      for (int b = 0; b < w; b++)
        if (c * w + b < n) acc[b] = acc[b] ^ v[c * w + b];
    return acc;
  endfunction

  // poly: bit e set for every term x^e with e < w (x^0 included).
  function automatic word_t misr_step(word_t s, word_t d, word_t poly, int w, bit use_data);
    word_t n = '0;
    logic  fb = s[0];
    for (int i = 0; i < w - 1; i++) n[i] = s[i + 1];
    n[w - 1] = 1'b0;
    for (int e = 0; e < w; e++)
      if (poly[e]) n[w - 1 - e] = n[w - 1 - e] ^ fb;
    if (use_data)
      for (int i = 0; i < w; i++) n[i] = n[i] ^ d[i];
    return n;
  endfunction

endpackage
