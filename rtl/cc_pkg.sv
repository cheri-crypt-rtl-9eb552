// cc_pkg: types, constants and arithmetic shared by the memory encryption engine.
//
// Holds the 128-bit uncompressed capability layout (tag, 4 software and 12
// hardware permission bits, 4 reserved bits, a 12-bit object type, 32-bit
// offset, length and base), the simple 32-bit bus used between the pipeline,
// the engine and memory, the request/response bundle of an AES-GCM function,
// the key-table command bundle, and the byte-level AES and GF(2^128)
// arithmetic used by the cipher and the hash unit.
//
// Bus convention (a choice of this design): a command is transferred when
// valid and ready are both high; every command, read or write, produces
// exactly one response, in order. A 128-bit cipher block is built from four
// consecutive 32-bit words with the lowest-addressed word in bits [127:96].
package cc_pkg;

  // ---------------------------------------------------------------- capabilities
  typedef struct packed {
    logic        tag;
    logic [3:0]  sw_perms;   // bit 0 is turned into the encryption permission
    logic [11:0] hw_perms;
    logic [3:0]  rsvd;
    logic [11:0] otype;
    logic [31:0] offset;
    logic [31:0] length;
    logic [31:0] base;
  } cap_t;

  localparam logic [11:0] OTYPE_UNSEALED = 12'hFFF;

  function automatic logic cap_encrypt_perm(cap_t c);
    return c.sw_perms[0];
  endfunction

  // ---------------------------------------------------------------- bus
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
    logic [3:0]  wmask;
  } bus_cmd_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] rdata;
  } bus_rsp_t;

  // ---------------------------------------------------------------- AES-GCM function port
  typedef struct packed {
    logic         key_load;  // pulse: take key, compute hash subkey H
    logic [127:0] key;
    logic         start;     // pulse: begin a batch with iv
    logic [95:0]  iv;
    logic         in_valid;
    logic [127:0] in_data;
    logic         in_last;
    logic         out_ready;
  } gcm_req_t;

  typedef struct packed {
    logic         idle;      // key loaded, no batch running
    logic         in_ready;
    logic         out_valid;
    logic [127:0] out_data;
    logic         tag_valid; // held until the next start or key_load
    logic [127:0] tag;
  } gcm_rsp_t;

  // ---------------------------------------------------------------- key table port
  typedef enum logic [1:0] { KT_GET = 2'd0, KT_GEN = 2'd1, KT_STORE = 2'd2 } kt_cmd_e;

  typedef struct packed {
    logic        valid;      // held until ack
    kt_cmd_e     cmd;
    logic [11:0] otype;
    logic [63:0] iv_count;   // for KT_STORE
  } kt_req_t;

  typedef struct packed {
    logic         ack;       // one-cycle pulse
    logic         hit;       // KT_GET / KT_STORE found the otype
    logic [127:0] key;
    logic [63:0]  iv_count;
  } kt_rsp_t;

  // ---------------------------------------------------------------- AES arithmetic
  function automatic logic [7:0] gf8_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p, x;
    p = '0; x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // S-box computed as the multiplicative inverse a^254 followed by the affine map.
  function automatic logic [7:0] sbox(logic [7:0] a);
    logic [7:0] sq, inv, b;
    sq  = gf8_mul(a, a);          // a^2
    inv = sq;
    for (int i = 0; i < 6; i++) begin
      sq  = gf8_mul(sq, sq);      // a^4 .. a^128
      inv = gf8_mul(inv, sq);
    end
    b = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]};
    return b ^ 8'h63;
  endfunction

  function automatic logic [7:0] get_byte(logic [127:0] s, int i);
    return s[127-8*i -: 8];
  endfunction

  // One AES round: SubBytes, ShiftRows, MixColumns (skipped in the last round), AddRoundKey.
  function automatic logic [127:0] aes_round(logic [127:0] s, logic [127:0] rk, logic last);
    logic [7:0] b [16];
    logic [7:0] t [16];
    logic [127:0] o;
    for (int i = 0; i < 16; i++) b[i] = sbox(get_byte(s, i));
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        t[r + 4*c] = b[r + 4*((c + r) % 4)];
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0, a1, a2, a3;
      a0 = t[4*c]; a1 = t[4*c+1]; a2 = t[4*c+2]; a3 = t[4*c+3];
      if (!last) begin
        t[4*c]   = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
        t[4*c+1] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
        t[4*c+2] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
        t[4*c+3] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
      end
    end
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = t[i];
    return o ^ rk;
  endfunction

  // Next AES-128 round key from the current one and the round constant.
  function automatic logic [127:0] aes_next_key(logic [127:0] k, logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    w0 = k[127:96]; w1 = k[95:64]; w2 = k[63:32]; w3 = k[31:0];
    t = {sbox(w3[23:16]), sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])} ^ {rcon, 24'h0};
    w0 ^= t; w1 ^= w0; w2 ^= w1; w3 ^= w2;
    return {w0, w1, w2, w3};
  endfunction

  // ---------------------------------------------------------------- GCM arithmetic
  // Multiplies the running product by DIG bits of x (most significant first):
  // the bit-serial algorithm of the GCM specification, DIG steps unrolled.
  function automatic logic [255:0] gf128_steps(logic [127:0] z, logic [127:0] v, logic [7:0] xd);
    for (int i = 7; i >= 0; i--) begin
      if (xd[i]) z ^= v;
      v = v[0] ? ((v >> 1) ^ {8'hE1, 120'h0}) : (v >> 1);
    end
    return {z, v};
  endfunction

  // ---------------------------------------------------------------- enclave memory layout
  // Tag/IV address of the batch at batch_addr in an encrypted section with
  // base address base and resized (data-only) length ld:
  //   BN = ld >> Sb, bn = ((batch_addr - base) >> Sb) + 1,
  //   L_Tag = ld + (BN - bn) << St, TagAddr = base + L_Tag.
  function automatic logic [31:0] tag_addr_of(logic [31:0] base, logic [31:0] ld,
                                              logic [31:0] batch_addr, int sb, int st);
    logic [31:0] bn_total, bn;
    bn_total = ld >> sb;
    bn       = ((batch_addr - base) >> sb) + 32'd1;
    return base + ld + ((bn_total - bn) << st);
  endfunction

endpackage
