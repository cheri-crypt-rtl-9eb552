// tb_aes_cntrl_selector: random requests from the seal unit and the data
// cache; checks that the encryption function sees exactly the owner's request
// and that only the owner sees the function's response.
module tb_aes_cntrl_selector;
  import cc_pkg::*;
  logic cache_sel;
  gcm_req_t seal_req, cache_req, enc_req;
  gcm_rsp_t seal_rsp, cache_rsp, enc_rsp;
  int checks = 0, failures = 0;

  aes_cntrl_selector dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [511:0] rnd();
    logic [511:0] r;
    for (int i = 0; i < 16; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 500; i++) begin
      cache_sel = i[0] ^ i[3];
      seal_req  = gcm_req_t'(rnd());
      cache_req = gcm_req_t'(rnd());
      enc_rsp   = gcm_rsp_t'(rnd());
      #1;
      checks++;
      if (enc_req !== (cache_sel ? cache_req : seal_req)) begin failures++; $display("FAIL req %0d", i); end
      checks++;
      if ((cache_sel ? cache_rsp : seal_rsp) !== enc_rsp) begin failures++; $display("FAIL owner rsp %0d", i); end
      checks++;
      if ((cache_sel ? seal_rsp : cache_rsp) !== '0) begin failures++; $display("FAIL other rsp %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
