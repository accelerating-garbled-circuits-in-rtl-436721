// aes_ref_pkg: software-style reference model of AES-128 and of the garbling
// hash, written independently of the RTL for the testbenches.
//
// The S-box is built once by walking the multiplicative group of GF(2^8) with
// generator 3 (p <- 3p, q <- q/3), so that q = p^-1 at every step, and applying
// the affine map; the cipher then works on a byte array in FIPS-197 order.
package aes_ref_pkg;

  byte unsigned sbox_t[256];
  bit           sbox_ready = 0;

  function automatic byte unsigned rl(byte unsigned x, int n);
    return byte'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic void build_sbox();
    byte unsigned p, q, x;
    p = 1; q = 1;
    do begin
      p = p ^ byte'(p << 1) ^ ((p & 8'h80) != 0 ? 8'h1b : 8'h00);
      q = q ^ byte'(q << 1);
      q = q ^ byte'(q << 2);
      q = q ^ byte'(q << 4);
      if ((q & 8'h80) != 0) q = q ^ 8'h09;
      x = q ^ rl(q, 1) ^ rl(q, 2) ^ rl(q, 3) ^ rl(q, 4);
      sbox_t[p] = x ^ 8'h63;
    end while (p != 1);
    sbox_t[0] = 8'h63;
    sbox_ready = 1;
  endfunction

  function automatic byte unsigned mul2(byte unsigned a);
    return byte'(a << 1) ^ ((a & 8'h80) != 0 ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [127:0] aes128(logic [127:0] key, logic [127:0] pt);
    byte unsigned s[16], t[16], w[176];
    byte unsigned tmp[4];
    byte unsigned rc;
    logic [127:0] r;
    if (!sbox_ready) build_sbox();
    for (int i = 0; i < 16; i++) begin
      w[i] = key[127-8*i -: 8];
      s[i] = pt[127-8*i -: 8];
    end
    rc = 1;
    for (int i = 16; i < 176; i += 4) begin
      for (int j = 0; j < 4; j++) tmp[j] = w[i-4+j];
      if (i % 16 == 0) begin
        byte unsigned f;
        f = tmp[0];
        tmp[0] = sbox_t[tmp[1]] ^ rc;
        tmp[1] = sbox_t[tmp[2]];
        tmp[2] = sbox_t[tmp[3]];
        tmp[3] = sbox_t[f];
        rc = mul2(rc);
      end
      for (int j = 0; j < 4; j++) w[i+j] = w[i-16+j] ^ tmp[j];
    end
    for (int i = 0; i < 16; i++) s[i] ^= w[i];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int i = 0; i < 16; i++) s[i] = sbox_t[s[i]];
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++)
          t[4*c+row] = s[4*((c+row)%4)+row];
      if (rnd != 10) begin
        for (int c = 0; c < 4; c++) begin
          byte unsigned x0, x1, x2, x3, all;
          x0 = t[4*c]; x1 = t[4*c+1]; x2 = t[4*c+2]; x3 = t[4*c+3];
          all = x0 ^ x1 ^ x2 ^ x3;
          t[4*c]   = x0 ^ all ^ mul2(x0 ^ x1);
          t[4*c+1] = x1 ^ all ^ mul2(x1 ^ x2);
          t[4*c+2] = x2 ^ all ^ mul2(x2 ^ x3);
          t[4*c+3] = x3 ^ all ^ mul2(x3 ^ x0);
        end
      end
      for (int i = 0; i < 16; i++) s[i] = t[i] ^ w[16*rnd+i];
    end
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = s[i];
    return r;
  endfunction

  // Garbling hash H(X, Y, T) = AES_k(K) ^ K with K = rotl(X,1) ^ rotl(Y,2) ^ T.
  function automatic logic [127:0] gc_hash(logic [127:0] key, logic [127:0] x,
                                           logic [127:0] y, logic [127:0] tw);
    logic [127:0] k;
    k = {x[126:0], x[127]} ^ {y[125:0], y[127:126]} ^ tw;
    return aes128(key, k) ^ k;
  endfunction

  typedef struct {
    logic [127:0] c0;
    logic [127:0] ct[3];
  } garbled_t;

  // Reference garbler for one AND gate (free-XOR, point-and-permute, row reduction).
  function automatic garbled_t garble_and(logic [127:0] key, logic [127:0] a0,
                                          logic [127:0] b0, logic [127:0] delta,
                                          logic [127:0] tw);
    garbled_t g;
    logic [127:0] h[4];
    logic [127:0] la, lb;
    bit pa, pb, va, vb;
    pa = a0[0]; pb = b0[0];
    for (int r = 0; r < 4; r++) begin
      va = bit'(r >> 1) ^ pa;
      vb = bit'(r & 1) ^ pb;
      la = va ? a0 ^ delta : a0;
      lb = vb ? b0 ^ delta : b0;
      h[r] = gc_hash(key, la, lb, tw);
    end
    g.c0 = (pa & pb) ? h[0] ^ delta : h[0];
    for (int r = 1; r < 4; r++) begin
      va = bit'(r >> 1) ^ pa;
      vb = bit'(r & 1) ^ pb;
      g.ct[r-1] = h[r] ^ ((va & vb) ? g.c0 ^ delta : g.c0);
    end
    return g;
  endfunction

  // Reference evaluator: from one label per input and the table, the output label.
  function automatic logic [127:0] eval_and(logic [127:0] key, logic [127:0] la,
                                            logic [127:0] lb, logic [127:0] tw,
                                            logic [127:0] ct[3]);
    int row;
    row = {la[0], lb[0]};
    if (row == 0) return gc_hash(key, la, lb, tw);
    return gc_hash(key, la, lb, tw) ^ ct[row-1];
  endfunction

endpackage
