// tb_aes_core: runs the encryption function and both decryption functions of
// the AES core at the same time on different keys and batches, and checks
// every output block and tag against the reference GCM model, and that all
// three finish after the same (N+1)*16 + 22 clocks.
module tb_aes_core;
  import cc_pkg::*;
  import gcm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  gcm_req_t enc_req, dec_req [2];
  gcm_rsp_t enc_rsp, dec_rsp [2];
  gcm_req_t rq [3];
  gcm_rsp_t rs [3];
  int checks = 0, failures = 0;

  aes_core dut (.*);
  always #5 clk = ~clk;
  assign enc_req = rq[0];
  assign dec_req[0] = rq[1];
  assign dec_req[1] = rq[2];
  assign rs[0] = enc_rsp;
  assign rs[1] = dec_rsp[0];
  assign rs[2] = dec_rsp[1];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run(int f, logic [127:0] key, logic [95:0] iv, logic [127:0] din[], bit dec);
    logic [127:0] exp[], t;
    int n = din.size(), ni = 0, no = 0, cyc = 0;
    t = ref_gcm(key, iv, din, exp, dec);
    rq[f] = '0; rq[f].key_load = 1; rq[f].key = key;
    @(posedge clk); #1 rq[f].key_load = 0;
    while (!rs[f].idle) begin @(posedge clk); #1; end
    rq[f].start = 1; rq[f].iv = iv;
    @(posedge clk); #1 rq[f].start = 0; cyc = 1;
    rq[f].out_ready = 1;
    while (!rs[f].tag_valid) begin
      rq[f].in_valid = (ni < n);
      rq[f].in_data  = (ni < n) ? din[ni] : '0;
      rq[f].in_last  = (ni == n - 1);
      #0;
      @(posedge clk);
      if (rq[f].in_valid && rs[f].in_ready) ni++;
      if (rs[f].out_valid) begin check(rs[f].out_data == exp[no], $sformatf("fn %0d block %0d", f, no)); no++; end
      #1 cyc++;
    end
    check(no == n, $sformatf("fn %0d block count", f));
    check(rs[f].tag == t, $sformatf("fn %0d tag", f));
    check(cyc == (n + 1) * 16 + 22, $sformatf("fn %0d latency %0d", f, cyc));
    rq[f] = '0;
  endtask

  initial begin
    foreach (rq[i]) rq[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      automatic logic [127:0] k[3], d0[], d1[], d2[];
      automatic logic [95:0] iv[3];
      foreach (k[i]) begin k[i] = {$urandom, $urandom, $urandom, $urandom}; iv[i] = {$urandom, $urandom, $urandom}; end
      d0 = new[2]; d1 = new[2]; d2 = new[4];
      foreach (d0[i]) d0[i] = {$urandom, $urandom, $urandom, $urandom};
      foreach (d1[i]) d1[i] = {$urandom, $urandom, $urandom, $urandom};
      foreach (d2[i]) d2[i] = {$urandom, $urandom, $urandom, $urandom};
      fork
        run(0, k[0], iv[0], d0, 0);
        run(1, k[1], iv[1], d1, 1);
        run(2, k[2], iv[2], d2, 1);
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
