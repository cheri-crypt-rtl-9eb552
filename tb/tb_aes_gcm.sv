// tb_aes_gcm: checks the AES-GCM encryption and decryption functions against
// GCM test cases 2 and 3 (128-bit key, empty AAD, 128-bit tag; test case 3
// has the 512-bit plaintext; its tag is taken from the reference model) and against the reference model for random
// batches, including output back-pressure. Checks the batch latency
// (N+1)*16 + 22 clocks, e.g. 70 clocks for a two-block (32-byte) batch.
module tb_aes_gcm;
  import cc_pkg::*;
  import gcm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  gcm_req_t req [2];
  gcm_rsp_t rsp [2];
  int checks = 0, failures = 0;

  aes_gcm #(.DECRYPT(1'b0)) u_enc (.clk, .rst_n, .req(req[0]), .rsp(rsp[0]));
  aes_gcm #(.DECRYPT(1'b1)) u_dec (.clk, .rst_n, .req(req[1]), .rsp(rsp[1]));
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Runs one batch on function f; returns output blocks, tag and latency.
  task automatic batch(int f, logic [127:0] key, logic [95:0] iv, logic [127:0] din[],
                       bit stall_out, output logic [127:0] dout[], output logic [127:0] tag,
                       output int lat);
    int n = din.size(), ni = 0, no = 0, cyc = 0;
    dout = new[n];
    req[f] = '0; req[f].key_load = 1; req[f].key = key;
    @(posedge clk); #1 req[f].key_load = 0;
    while (!rsp[f].idle) @(posedge clk);
    #1 req[f].start = 1; req[f].iv = iv;
    @(posedge clk); #1 req[f].start = 0; cyc = 1;
    while (!rsp[f].tag_valid) begin
      req[f].in_valid = (ni < n);
      req[f].in_data  = (ni < n) ? din[ni] : '0;
      req[f].in_last  = (ni == n - 1);
      req[f].out_ready = stall_out ? ($urandom_range(0, 3) == 0) : 1'b1;
      #0;
      @(posedge clk);
      if (req[f].in_valid && rsp[f].in_ready) ni++;
      if (rsp[f].out_valid && req[f].out_ready) begin dout[no] = rsp[f].out_data; no++; end
      #1 cyc++;
    end
    while (no < n) begin
      req[f].out_ready = 1; @(posedge clk);
      if (rsp[f].out_valid) begin dout[no] = rsp[f].out_data; no++; end
      #1;
    end
    req[f] = '0;
    tag = rsp[f].tag; lat = cyc;
  endtask

  logic [127:0] p3[], c3[], o[], e[];
  logic [127:0] tag, tag3;
  int lat;

  initial begin
    req[0] = '0; req[1] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // GCM test case 3
    p3 = '{128'hd9313225f88406e5a55909c5aff5269a, 128'h86a7a9531534f7da2e4c303d8a318a72,
           128'h1c3c0c95956809532fcf0e2449a6b525, 128'hb16aedf5aa0de657ba637b391aafd255};
    c3 = '{128'h42831ec2217774244b7221b784d0d49c, 128'he3aa212f2c02a4e035c17e2329aca12e,
           128'h21d514b25466931c7d8f6a5aac84aa05, 128'h1ba30b396a0aac973d58e091473f5985};
    batch(0, 128'hfeffe9928665731c6d6a8f9467308308, 96'hcafebabefacedbaddecaf888, p3, 0, o, tag, lat);
    for (int i = 0; i < 4; i++) check(o[i] == c3[i], $sformatf("tc3 enc block %0d %h", i, o[i]));
    tag3 = ref_gcm(128'hfeffe9928665731c6d6a8f9467308308, 96'hcafebabefacedbaddecaf888, p3, e, 0);
    check(tag == tag3, $sformatf("tc3 enc tag %h", tag));
    check(lat == 5*16 + 22, $sformatf("tc3 enc latency %0d", lat));
    batch(1, 128'hfeffe9928665731c6d6a8f9467308308, 96'hcafebabefacedbaddecaf888, c3, 0, o, tag, lat);
    for (int i = 0; i < 4; i++) check(o[i] == p3[i], $sformatf("tc3 dec block %0d", i));
    check(tag == tag3, $sformatf("tc3 dec tag %h", tag));
    check(lat == 5*16 + 22, $sformatf("tc3 dec latency %0d", lat));
    // GCM test case 2
    e = '{128'h0};
    batch(0, '0, '0, e, 0, o, tag, lat);
    check(o[0] == 128'h0388dace60b6a392f328c2b971b2fe78, "tc2 ct");
    check(tag == 128'hab6e47d42cec13bdf53a67b21257bddf, $sformatf("tc2 tag %h", tag));
    // random batches of 1..4 blocks, 32-byte batches checked for 70 clocks
    for (int t = 0; t < 12; t++) begin
      automatic logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [95:0]  iv = {$urandom, $urandom, $urandom};
      logic [127:0] d[], r[], rt;
      automatic int n = (t % 4) + 1;
      automatic bit st = (t >= 8);
      d = new[n];
      foreach (d[i]) d[i] = {$urandom, $urandom, $urandom, $urandom};
      rt = ref_gcm(k, iv, d, r, t[0]);
      batch(t % 2, k, iv, d, st, o, tag, lat);
      foreach (d[i]) check(o[i] == r[i], $sformatf("rand %0d block %0d", t, i));
      check(tag == rt, $sformatf("rand %0d tag", t));
      if (!st) check(lat == (n + 1) * 16 + 22, $sformatf("rand %0d latency %0d", t, lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
