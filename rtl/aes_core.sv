// aes_core: the AES core of the engine, one AES-GCM encryption function and
// two AES-GCM decryption functions, so that the instruction cache and the data
// cache can each decrypt a cacheline at the same time while the shared
// encryption function serves sealing and data-cache write-back.
// Each function is an aes_gcm instance (see there for timing).
// The 1 x encryption + 2 x decryption arrangement follows the document.
module aes_core #(
  parameter int CLKS_DATA = 16,
  parameter int CLKS_AT   = 22
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cc_pkg::gcm_req_t enc_req,
  output cc_pkg::gcm_rsp_t enc_rsp,
  input  cc_pkg::gcm_req_t dec_req [2],
  output cc_pkg::gcm_rsp_t dec_rsp [2]
);
  aes_gcm #(.DECRYPT(1'b0), .CLKS_DATA(CLKS_DATA), .CLKS_AT(CLKS_AT))
    u_enc (.clk, .rst_n, .req(enc_req), .rsp(enc_rsp));

  for (genvar i = 0; i < 2; i++) begin : g_dec
    aes_gcm #(.DECRYPT(1'b1), .CLKS_DATA(CLKS_DATA), .CLKS_AT(CLKS_AT))
      u_dec (.clk, .rst_n, .req(dec_req[i]), .rsp(dec_rsp[i]));
  end
endmodule
