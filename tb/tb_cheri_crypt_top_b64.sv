// tb_cheri_crypt_top_b64: the end-to-end test of tb_cheri_crypt_top run with
// 64-byte batches (four AES blocks per batch and per cache line), the second
// batch size the engine is evaluated with; the rest of the configuration is
// the default (4 lines per cache, 3-enclave key table, 32-byte tag/IV
// records). The program is the same seal-and-invoke sequence:
//  1. CSealEncrypt of a 64-byte code section (one batch) and a 128-byte data
//     section (two batches), each followed by one 32-byte record per batch,
//     checked against the reference model; lengths shrink to the data and the
//     IV count runs on from code to data. A plain seal follows.
//  2. CInvokeEncrypt and the enclave body three times: 16 decrypted fetches, a
//     prefetch past the code (bypass), an enclave store and load, an
//     unencrypted increment outside, a load from the second data batch; after
//     each exit the data section must authenticate with a fresh IV.
//  3. A corrupted code word must raise tag_error and empty the key table.
// Every mechanism is counted and must occur at least once. Record addresses
// use the shift form of the tag address with S_b = 6 and S_t = 5.
module tb_cheri_crypt_top_b64;
  import cc_pkg::*;
  import gcm_ref_pkg::*;
  localparam logic [31:0] FIX   = 32'hC4E1_0001;
  localparam logic [31:0] CODE  = 32'h1000, DATA = 32'h1080, OUTS = 32'h1140, RET = 32'h0200;

  logic clk = 0, rst_n = 0;
  bus_cmd_t ibus_cpu_cmd, ibus_mem_cmd, dbus_cpu_cmd, dbus_mem_cmd;
  bus_rsp_t ibus_cpu_rsp, ibus_mem_rsp, dbus_cpu_rsp, dbus_mem_rsp;
  logic ibus_cpu_cmd_ready, ibus_mem_cmd_ready, dbus_cpu_cmd_ready, dbus_mem_cmd_ready;
  logic [31:0] fetch_pcc;
  logic seal_start, seal_done, seal_exc, inv_start, inv_done, inv_exc, stall, tag_error, enclave_active;
  cap_t seal_cap, seal_sealing_cap, seal_result, inv_code_cap, inv_data_cap;
  int checks = 0, failures = 0;

  cheri_crypt_top #(.LB(64)) dut (.*);
  tb_mem_dp u_mem (.clk, .rst_n, .icmd(ibus_mem_cmd), .icmd_ready(ibus_mem_cmd_ready), .irsp(ibus_mem_rsp),
                   .dcmd(dbus_mem_cmd), .dcmd_ready(dbus_mem_cmd_ready), .drsp(dbus_mem_rsp));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int n_i_readline, n_d_readline, n_hit, n_i_bypass, n_d_bypass, n_writeback, n_flush,
      n_tag_error, n_stall, n_keygen, n_seal_plain, n_pt;
  always @(posedge clk) if (rst_n) begin
    n_i_readline += int'(dut.u_icache.ev_readline);
    n_d_readline += int'(dut.u_dcache.ev_readline);
    n_hit        += int'(dut.u_icache.ev_hit) + int'(dut.u_dcache.ev_hit);
    n_i_bypass   += int'(dut.u_icache.ev_bypass);
    n_d_bypass   += int'(dut.u_dcache.ev_bypass);
    n_writeback  += int'(dut.u_dcache.ev_writeback);
    n_flush      += int'(dut.u_icache.ev_flush) + int'(dut.u_dcache.ev_flush);
    n_tag_error  += int'(tag_error);
    n_stall      += int'(stall);
    n_keygen     += int'(dut.u_keys.u_gen.ack);
  end

  // ---------------------------------------------------------------- pipeline bus model
  task automatic ibus_read(logic [31:0] a, output logic [31:0] d);
    ibus_cpu_cmd = '{valid: 1'b1, we: 1'b0, addr: a, wdata: '0, wmask: '0};
    do @(posedge clk); while (!ibus_cpu_cmd_ready);
    #1 ibus_cpu_cmd = '0;
    while (!ibus_cpu_rsp.valid) begin @(posedge clk); #1; end
    d = ibus_cpu_rsp.rdata;
    @(posedge clk); #1;
  endtask

  task automatic dbus_op(bit we, logic [31:0] a, logic [31:0] wd, output logic [31:0] d);
    dbus_cpu_cmd = '{valid: 1'b1, we: we, addr: a, wdata: wd, wmask: 4'hF};
    do @(posedge clk); while (!dbus_cpu_cmd_ready);
    #1 dbus_cpu_cmd = '0;
    while (!dbus_cpu_rsp.valid) begin @(posedge clk); #1; end
    d = dbus_cpu_rsp.rdata;
    @(posedge clk); #1;
  endtask

  // ---------------------------------------------------------------- reference checks
  function automatic logic [127:0] blk(logic [31:0] a);
    return {u_mem.m[a/4], u_mem.m[a/4+1], u_mem.m[a/4+2], u_mem.m[a/4+3]};
  endfunction

  // Decrypts batch b of a section (base, resized length ld) with the stored
  // IV; returns 1 if the stored tag matches, plaintext in pt.
  function automatic bit open_batch(logic [127:0] key, logic [31:0] base, logic [31:0] ld, int b,
                                    output logic [127:0] pt[], output logic [63:0] ivc);
    logic [127:0] ct[], t, ivrec;
    logic [31:0]  ba = base + 64 * b;
    logic [31:0]  ta = tag_addr_of(base, ld, ba, 6, 5);
    ct = new[4];
    for (int k = 0; k < 4; k++) ct[k] = blk(ba + 16 * k);
    ivrec = blk(ta + 16);
    ivc = ivrec[63:0];
    t = ref_gcm(key, ivrec[95:0], ct, pt, 1);
    return (t == blk(ta)) && (ivrec[127:96] == 32'd0) && (ivrec[95:64] == FIX);
  endfunction

  function automatic cap_t mkcap(logic [31:0] base, logic [31:0] len, bit enc);
    cap_t c = '0;
    c.tag = 1'b1; c.sw_perms = {3'b000, enc}; c.hw_perms = 12'hFFF; c.otype = OTYPE_UNSEALED;
    c.base = base; c.length = len;
    return c;
  endfunction

  task automatic do_seal(cap_t c, cap_t s, output cap_t r, output int lat);
    seal_cap = c; seal_sealing_cap = s; seal_start = 1; lat = 0;
    @(posedge clk); #1 seal_start = 0; lat = 1;
    while (!seal_done) begin @(posedge clk); #1 lat++; end
    r = seal_result;
    check(!seal_exc, "seal exception");
  endtask

  logic [31:0] code_pt [16], data_pt [32];
  cap_t code_s, data_s, r;
  logic [127:0] key, pt[];
  logic [63:0] ivc;
  int lat, lat_plain;

  initial begin
    ibus_cpu_cmd = '0; dbus_cpu_cmd = '0; fetch_pcc = RET;
    seal_start = 0; inv_start = 0; seal_cap = '0; seal_sealing_cap = '0; inv_code_cap = '0; inv_data_cap = '0;
    for (int i = 0; i < 32768; i++) u_mem.m[i] = 32'h0;
    for (int i = 0; i < 16; i++) begin code_pt[i] = $urandom; u_mem.m[CODE/4 + i] = code_pt[i]; end
    for (int i = 0; i < 32; i++) begin data_pt[i] = 32'h22222222; u_mem.m[DATA/4 + i] = data_pt[i]; end
    for (int i = 0; i < 16; i++) u_mem.m[OUTS/4 + i] = 32'h66666666;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk); #1;

    // -------- 1. seal code and data
    // otype 4 as in the test program: sealing capability with offset 4
    begin
      automatic cap_t sc = mkcap(0, 32'h1_0000, 0);
      sc.offset = 32'd4;
      do_seal(mkcap(CODE, 96, 1), sc, code_s, lat);
      $display("CSealEncrypt (code, one 64-byte batch): %0d clocks", lat);
      check(code_s.length == 64 && code_s.otype == 12'h004, "code cap resized, otype 4");
      do_seal(mkcap(DATA, 192, 1), sc, data_s, lat);
      $display("CSealEncrypt (data, two 64-byte batches): %0d clocks", lat);
      check(data_s.length == 128 && data_s.otype == 12'h004, "data cap resized, otype 4");
      do_seal(mkcap(OUTS, 64, 0), sc, r, lat_plain);
      check(lat_plain == 1 && r.length == 64 && r.otype == 12'h004, $sformatf("seal without encryption %0d clocks", lat_plain));
      n_seal_plain++;
    end
    // the key of otype 4, read from the key table, opens the sealed memory
    key = '0;
    for (int e = 0; e < 3; e++)
      if (dut.u_keys.tab_q[e].used && dut.u_keys.tab_q[e].otype == 12'h004) key = dut.u_keys.tab_q[e].key;
    check(open_batch(key, CODE, 64, 0, pt, ivc), "code batch authenticates");
    check(ivc == 64'd0, $sformatf("code IV count %0d", ivc));
    for (int i = 0; i < 16; i++) check(pt[i/4][127 - 32*(i%4) -: 32] == code_pt[i], "code plaintext");
    check(u_mem.m[CODE/4] != code_pt[0], "code encrypted in memory");
    for (int b = 0; b < 2; b++) begin
      check(open_batch(key, DATA, 128, b, pt, ivc), $sformatf("data batch %0d authenticates", b));
      check(ivc == 64'(b + 1), $sformatf("data batch %0d IV count %0d", b, ivc));
      check(pt[0] == {4{32'h22222222}}, "data plaintext");
    end

    // -------- 3. invoke and run the enclave three times
    for (int run = 0; run < 3; run++) begin
      automatic logic [31:0] d, outv;
      automatic int ilat;
      inv_code_cap = code_s; inv_data_cap = data_s; inv_start = 1;
      fetch_pcc = CODE;
      @(posedge clk); #1 inv_start = 0; ilat = 1;
      while (!inv_done) begin @(posedge clk); #1 ilat++; end
      check(!inv_exc, "invoke exception");
      fork
        begin  // fetch side
          for (int i = 0; i < 16; i++) begin
            ibus_read(CODE + 4*i, d);
            check(d == code_pt[i], $sformatf("run %0d fetch %0d: %h", run, i, d));
          end
          ibus_read(CODE + 64, d);   // prefetch past the enclave code
          check(d == u_mem.m[(CODE + 64)/4], "prefetch bypassed to memory");
        end
        begin  // data side
          dbus_op(1, DATA, 32'h44, d);
          dbus_op(0, DATA, 0, d);
          check(d == 32'h44, "read back enclave store");
          dbus_op(0, OUTS, 0, outv);
          dbus_op(1, OUTS, outv + 1, d);
          dbus_op(0, DATA + 64 + 8, 0, d);
          check(d == 32'h22222222, "second data batch");
        end
      join
      fetch_pcc = RET;                     // return from the enclave
      repeat (2) @(posedge clk);
      while (enclave_active) @(posedge clk);
      #1;
      check(u_mem.m[OUTS/4] == 32'h66666667 + run, "outside word incremented");
      check(open_batch(key, DATA, 128, 0, pt, ivc), "written-back data batch authenticates");
      check(pt[0][127:96] == 32'h44 && pt[0][95:0] == {3{32'h22222222}}, "written-back plaintext");
      check(ivc == 64'(3 + run), $sformatf("written-back IV count %0d", ivc));
      check(dut.u_dcache.key_q == '0 && dut.u_icache.key_q == '0, "cache keys cleared");
      // pass-through outside the enclave
      dbus_op(0, OUTS, 0, d);
      check(d == 32'h66666667 + run, "pass-through read");
      n_pt++;
    end

    // -------- 4. tampered ciphertext
    u_mem.m[CODE/4 + 3] ^= 32'h0000_0100;
    inv_code_cap = code_s; inv_data_cap = data_s; inv_start = 1; fetch_pcc = CODE;
    @(posedge clk); #1 inv_start = 0;
    while (!inv_done) begin @(posedge clk); #1; end
    ibus_cpu_cmd = '{valid: 1'b1, we: 1'b0, addr: CODE, wdata: '0, wmask: '0};
    while (!tag_error) @(posedge clk);
    #1 ibus_cpu_cmd = '0;
    fetch_pcc = RET;
    repeat (200) @(posedge clk);
    #1;
    check(!dut.u_keys.tab_q[0].used && !dut.u_keys.tab_q[1].used && !dut.u_keys.tab_q[2].used,
          "key table flushed after tag error");
    check(!enclave_active, "caches released after tag error");

    // -------- mechanisms
    $display("mechanisms: i-readline %0d d-readline %0d hits %0d i-bypass %0d d-bypass %0d writeback %0d flush %0d tag-error %0d keygen %0d stall-cycles %0d plain-seal %0d pass-through %0d",
             n_i_readline, n_d_readline, n_hit, n_i_bypass, n_d_bypass, n_writeback, n_flush, n_tag_error,
             n_keygen, n_stall, n_seal_plain, n_pt);
    check(n_i_readline > 0, "instruction readCacheline happened");
    check(n_d_readline > 0, "data readCacheline happened");
    check(n_hit > 0, "cache hits happened");
    check(n_i_bypass > 0, "instruction bypass happened");
    check(n_d_bypass > 0, "data bypass happened");
    check(n_writeback > 0, "writebackCacheline happened");
    check(n_flush > 0, "flush happened");
    check(n_tag_error > 0, "tag error happened");
    check(n_keygen > 0, "key generation happened");
    check(n_stall > 0, "pipeline stall happened");
    check(n_seal_plain > 0 && n_pt > 0, "plain seal and pass-through happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
