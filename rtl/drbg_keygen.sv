// drbg_keygen: key generator, a block-cipher deterministic random bit
// generator in the style of NIST SP 800-90A CTR_DRBG (AES-128, no derivation
// function).
//
// For every request the generator is instantiated afresh: the seed material
// is the entropy input XOR the personalisation string XOR a 64-bit nonce made
// of the object type extended by a request counter, {counter, 20'b0, otype}.
// Instantiate runs the CTR_DRBG update with Key = V = 0:
//   V+1 -> T0 = AES_K(V), V+1 -> T1 = AES_K(V), {K, V} = {T0, T1} ^ seed.
// Generate then produces key = AES_K(V+1), after which the working state is
// cleared (uninstantiate) and the counter is incremented, so a repeated otype
// still yields a new key. The entropy input is a fixed parameter, standing in
// for a real entropy source as in the document's proof of concept.
// The reseed function of the DRBG is not implemented.
//
// Interface: req is held high with otype until ack, a one-cycle pulse with the
// key. Timing: three AES operations of 11 clocks plus 3 clocks of control,
// 36 clocks per key.
module drbg_keygen #(
  parameter logic [255:0] ENTROPY = 256'h5a17_3c9e_81f2_46d0_b7e5_2a9c_03d8_6f41_c2e0_9b37_58a6_1df4_e873_0c25_96bd_4a7f,
  parameter logic [255:0] PERS    = 256'h4348_4552_492d_4372_7970_7420_6b65_7920_6765_6e65_7261_746f_7200_0000_0000_0000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req,
  input  logic [11:0]  otype,
  output logic         ack,
  output logic [127:0] key
);
  typedef enum logic [2:0] { G_IDLE, G_UPD0, G_UPD1, G_GEN, G_ACK } gstate_e;
  gstate_e state_q;

  logic [127:0] k_q, v_q, t0_q;
  logic [255:0] seed_q;
  logic [31:0]  cnt_q;
  logic         aes_start, aes_busy, aes_done, issued_q;
  logic [127:0] aes_dout, v_inc;

  assign v_inc = v_q + 128'd1;

  aes128_cipher u_aes (.clk, .rst_n, .start(aes_start), .key(k_q), .din(v_inc),
                       .busy(aes_busy), .done(aes_done), .dout(aes_dout));

  // one AES operation is launched on entry to each working state
  assign aes_start = (state_q inside {G_UPD0, G_UPD1, G_GEN}) && !issued_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= G_IDLE; k_q <= '0; v_q <= '0; t0_q <= '0; seed_q <= '0;
      cnt_q <= '0; issued_q <= 1'b0; ack <= 1'b0; key <= '0;
    end else begin
      ack <= 1'b0;
      if (aes_start) issued_q <= 1'b1;
      unique case (state_q)
        G_IDLE: if (req) begin
          seed_q   <= ENTROPY ^ PERS ^ {192'd0, cnt_q, 20'd0, otype};
          k_q      <= '0;
          v_q      <= '0;
          issued_q <= 1'b0;
          state_q  <= G_UPD0;
        end
        G_UPD0: if (aes_done) begin
          t0_q     <= aes_dout;
          v_q      <= v_inc;
          issued_q <= 1'b0;
          state_q  <= G_UPD1;
        end
        G_UPD1: if (aes_done) begin
          k_q      <= t0_q ^ seed_q[255:128];
          v_q      <= aes_dout ^ seed_q[127:0];
          issued_q <= 1'b0;
          state_q  <= G_GEN;
        end
        G_GEN: if (aes_done) begin
          key      <= aes_dout;
          ack      <= 1'b1;
          k_q      <= '0;          // uninstantiate
          v_q      <= '0;
          seed_q   <= '0;
          cnt_q    <= cnt_q + 32'd1;
          state_q  <= G_ACK;
        end
        G_ACK: state_q <= G_IDLE;  // lets the requester drop req
        default: state_q <= G_IDLE;
      endcase
    end
  end
endmodule
