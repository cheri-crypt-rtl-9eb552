// gcm_ref_pkg: reference AES-128, GHASH and AES-GCM functions for the
// testbenches. Written independently of the RTL: the S-box is found by
// searching for the multiplicative inverse, AES is applied to a whole block
// in one call, and GHASH follows the bit-serial algorithm of the GCM
// specification one bit at a time.
package gcm_ref_pkg;

  function automatic byte unsigned r_mul(byte unsigned a, byte unsigned b);
    byte unsigned p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      b = b >> 1;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic byte unsigned r_sbox(byte unsigned a);
    byte unsigned inv = 0, s;
    for (int c = 1; c < 256; c++)
      if (r_mul(a, 8'(c)) == 8'd1) inv = 8'(c);
    s = 8'h63;
    for (int i = 0; i < 5; i++) begin
      s ^= inv;
      inv = {inv[6:0], inv[7]};
    end
    return s;
  endfunction

  function automatic logic [127:0] ref_aes128(logic [127:0] key, logic [127:0] pt);
    byte unsigned st[16], w[44][4], t[16];
    byte unsigned rc = 1, tmp[4];
    for (int i = 0; i < 16; i++) begin
      st[i]        = pt[127-8*i -: 8];
      w[i/4][i%4]  = key[127-8*i -: 8];
    end
    for (int i = 4; i < 44; i++) begin
      for (int j = 0; j < 4; j++) tmp[j] = w[i-1][j];
      if (i % 4 == 0) begin
        byte unsigned t0 = tmp[0];
        tmp[0] = r_sbox(tmp[1]) ^ rc; tmp[1] = r_sbox(tmp[2]);
        tmp[2] = r_sbox(tmp[3]);      tmp[3] = r_sbox(t0);
        rc = r_mul(rc, 8'h02);
      end
      for (int j = 0; j < 4; j++) w[i][j] = w[i-4][j] ^ tmp[j];
    end
    for (int i = 0; i < 16; i++) st[i] ^= w[i/4][i%4];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) st[i] = r_sbox(st[i]);
      for (int i = 0; i < 16; i++) t[i] = st[(i % 4) + 4*(((i/4) + (i%4)) % 4)];
      if (r != 10)
        for (int c = 0; c < 4; c++)
          for (int rr = 0; rr < 4; rr++)
            st[4*c+rr] = r_mul(t[4*c+rr], 2) ^ r_mul(t[4*c+(rr+1)%4], 3) ^
                         t[4*c+(rr+2)%4] ^ t[4*c+(rr+3)%4];
      else
        for (int i = 0; i < 16; i++) st[i] = t[i];
      for (int i = 0; i < 16; i++) st[i] ^= w[4*r + i/4][i%4];
    end
    for (int i = 0; i < 16; i++) ref_aes128[127-8*i -: 8] = st[i];
  endfunction

  function automatic logic [127:0] ref_gfmul(logic [127:0] x, logic [127:0] y);
    logic [127:0] z = '0, v = y;
    for (int i = 0; i < 128; i++) begin
      if (x[127-i]) z ^= v;
      if (v[0]) v = (v >> 1) ^ (128'hE1 << 120);
      else      v = v >> 1;
    end
    return z;
  endfunction

  // AES-GCM with empty AAD over nblk 128-bit blocks held in data[0..nblk-1].
  // Returns the tag; out[] receives the ciphertext (or plaintext when decrypting).
  function automatic logic [127:0] ref_gcm(logic [127:0] key, logic [95:0] iv,
                                           input logic [127:0] data[], output logic [127:0] out[],
                                           input bit decrypt);
    logic [127:0] h, x, ct;
    int n = data.size();
    out = new[n];
    h = ref_aes128(key, '0);
    x = '0;
    for (int i = 0; i < n; i++) begin
      out[i] = data[i] ^ ref_aes128(key, {iv, 32'(i + 2)});
      ct = decrypt ? data[i] : out[i];
      x = ref_gfmul(x ^ ct, h);
    end
    x = ref_gfmul(x ^ {64'd0, 64'(n * 128)}, h);
    return x ^ ref_aes128(key, {iv, 32'd1});
  endfunction

endpackage
