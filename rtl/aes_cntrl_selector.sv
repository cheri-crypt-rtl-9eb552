// aes_cntrl_selector: the AESCntrlSelector. The AES core has one encryption
// function, shared by the CSealEncrypt read/write unit (sealing) and the data
// cache (cacheline write-back); the two never need it at the same time.
// cache_sel = 1 gives the function to the data cache, 0 to the seal unit.
// The requests of the owner are forwarded; the other requester sees an idle
// response with every handshake signal low. Combinational.
// The sharing follows the document; the explicit select input is this
// design's choice.
module aes_cntrl_selector (
  input  logic             cache_sel,
  input  cc_pkg::gcm_req_t seal_req,
  output cc_pkg::gcm_rsp_t seal_rsp,
  input  cc_pkg::gcm_req_t cache_req,
  output cc_pkg::gcm_rsp_t cache_rsp,
  output cc_pkg::gcm_req_t enc_req,
  input  cc_pkg::gcm_rsp_t enc_rsp
);
  always_comb begin
    enc_req   = cache_sel ? cache_req : seal_req;
    seal_rsp  = cache_sel ? '0 : enc_rsp;
    cache_rsp = cache_sel ? enc_rsp : '0;
  end
endmodule
