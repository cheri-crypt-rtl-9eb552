// aes_gcm: one AES-GCM authenticated encryption (DECRYPT=0) or decryption
// (DECRYPT=1) function with a 128-bit key, a 96-bit IV, no additional
// authenticated data and a 128-bit tag, processing one batch of 128-bit blocks.
//
// How it works. A key_load computes the hash subkey H = AES_K(0) once per key
// (the "hash calculation" that precedes the block processing). A batch then
// runs in fixed slots of CLKS_DATA clocks. In slot i the AES cipher encrypts
// counter block IV||i+1 while the GF(2^128) multiplier folds the previous
// ciphertext block into the GHASH accumulator; at the end of the slot the next
// input block is XORed with the key stream. After the block marked in_last a
// final slot encrypts IV||1 (the pre-counter block J0) while the last
// ciphertext block is folded in, and the tag phase of CLKS_AT clocks
// multiplies in the length block and adds AES_K(J0).
// Decryption differs from encryption only in hashing the input rather than
// the output.
//
// Interface (cc_pkg::gcm_req_t / gcm_rsp_t): key_load and start are pulses
// accepted when rsp.idle is high. Input blocks use in_valid/in_ready, output
// blocks out_valid/out_ready; one output block is produced per input block.
// tag_valid rises when the tag is ready and stays high until the next start or
// key_load. The caller compares the tag when decrypting.
//
// Timing: with input available in time and the output drained, the tag
// appears (N+1)*CLKS_DATA + CLKS_AT clocks after the start cycle for a batch
// of N blocks; 70 clocks for a 32-byte batch, the latency the document
// reports. The slot schedule of Fig. 7 (AES ENC of IV1..IVN then IV0 beside
// GF MULT of the ciphertext blocks) follows the document; the exact cycle
// split within the slot is this design's choice.
module aes_gcm #(
  parameter bit DECRYPT   = 1'b0,
  parameter int CLKS_DATA = 16,   // clocks per 128-bit block (document: 16)
  parameter int CLKS_AT   = 22    // clocks for the tag calculation (document: 22)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cc_pkg::gcm_req_t  req,
  output cc_pkg::gcm_rsp_t  rsp
);
  import cc_pkg::*;

  typedef enum logic [2:0] { S_NOKEY, S_HASH, S_READY, S_SLOT, S_FINAL, S_AT, S_TAG } state_e;
  state_e state_q;

  logic [127:0] key_q, h_q, x_q, ct_q, ej0_q, out_q, tag_q;
  logic [95:0]  iv_q;
  logic [31:0]  ctr_q;
  logic [31:0]  nblk_q;
  logic [7:0]   cnt_q;
  logic         out_valid_q;

  // AES cipher
  logic         aes_start, aes_busy, aes_done;
  logic [127:0] aes_key, aes_din, aes_dout;
  // GF multiplier
  logic         gf_start, gf_busy, gf_done;
  logic [127:0] gf_x, gf_z, x_cur;

  aes128_cipher u_aes (.clk, .rst_n, .start(aes_start), .key(aes_key), .din(aes_din),
                       .busy(aes_busy), .done(aes_done), .dout(aes_dout));
  gf128_mul     u_gf  (.clk, .rst_n, .start(gf_start), .x(gf_x), .y(h_q),
                       .busy(gf_busy), .done(gf_done), .z(gf_z));

  logic can_begin, slot_end, accept;
  assign can_begin = (state_q == S_READY) || (state_q == S_TAG);
  assign x_cur     = gf_done ? gf_z : x_q;
  assign slot_end  = (state_q == S_SLOT) && (cnt_q == 8'(CLKS_DATA - 1));
  assign accept    = slot_end && req.in_valid && !aes_busy && (!out_valid_q || req.out_ready);

  always_comb begin
    aes_start = 1'b0;
    aes_key   = key_q;
    aes_din   = {iv_q, ctr_q};
    gf_start  = 1'b0;
    gf_x      = x_cur ^ ct_q;
    if (req.key_load && (can_begin || state_q == S_NOKEY)) begin
      aes_start = 1'b1;
      aes_key   = req.key;
      aes_din   = '0;
    end else if (req.start && can_begin) begin
      aes_start = 1'b1;
      aes_din   = {req.iv, 32'd2};
    end else if (state_q == S_SLOT && cnt_q == 8'd0) begin
      aes_start = 1'b1;
      gf_start  = (nblk_q != 0);
    end else if (state_q == S_FINAL && cnt_q == 8'd0) begin
      aes_start = 1'b1;
      aes_din   = {iv_q, 32'd1};
      gf_start  = 1'b1;
    end else if (state_q == S_AT && cnt_q == 8'd0) begin
      gf_start  = 1'b1;
      gf_x      = x_cur ^ {64'd0, 25'd0, nblk_q, 7'd0};  // len(A)=0 || len(C) in bits
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_NOKEY;
      key_q <= '0; h_q <= '0; x_q <= '0; ct_q <= '0; ej0_q <= '0; out_q <= '0; tag_q <= '0;
      iv_q <= '0; ctr_q <= '0; nblk_q <= '0; cnt_q <= '0; out_valid_q <= 1'b0;
    end else begin
      if (gf_done) x_q <= gf_z;
      if (out_valid_q && req.out_ready) out_valid_q <= 1'b0;
      unique case (state_q)
        S_NOKEY, S_READY, S_TAG: begin
          if (req.key_load) begin
            key_q   <= req.key;
            state_q <= S_HASH;
          end else if (req.start && state_q != S_NOKEY) begin
            iv_q    <= req.iv;
            ctr_q   <= 32'd3;
            nblk_q  <= '0;
            x_q     <= '0;
            ct_q    <= '0;
            cnt_q   <= 8'd1;
            state_q <= S_SLOT;
          end
        end
        S_HASH: if (aes_done) begin
          h_q     <= aes_dout;
          state_q <= S_READY;
        end
        S_SLOT: begin
          if (cnt_q == 8'd0) ctr_q <= ctr_q + 32'd1;
          if (!slot_end) cnt_q <= cnt_q + 8'd1;
          else if (accept) begin
            out_q       <= req.in_data ^ aes_dout;
            out_valid_q <= 1'b1;
            ct_q        <= DECRYPT ? req.in_data : (req.in_data ^ aes_dout);
            nblk_q      <= nblk_q + 32'd1;
            cnt_q       <= 8'd0;
            if (req.in_last) state_q <= S_FINAL;
          end
        end
        S_FINAL: begin
          if (cnt_q == 8'(CLKS_DATA - 1)) begin
            ej0_q   <= aes_dout;
            cnt_q   <= 8'd0;
            state_q <= S_AT;
          end else cnt_q <= cnt_q + 8'd1;
        end
        S_AT: begin
          if (cnt_q == 8'(CLKS_AT - 1)) begin
            tag_q   <= gf_z ^ ej0_q;
            state_q <= S_TAG;
          end else cnt_q <= cnt_q + 8'd1;
        end
        default: state_q <= S_NOKEY;
      endcase
    end
  end

  always_comb begin
    rsp.idle      = can_begin;
    rsp.in_ready  = accept;
    rsp.out_valid = out_valid_q;
    rsp.out_data  = out_q;
    rsp.tag_valid = (state_q == S_TAG);
    rsp.tag       = tag_q;
  end

  // The multiplier and cipher must have finished within their slots.
  initial assert (CLKS_DATA >= 16 && CLKS_AT >= 18)
    else $error("aes_gcm: slot lengths too short for the cipher and multiplier");
endmodule
