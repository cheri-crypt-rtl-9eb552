// tb_enc_cache: the data-cache configuration of the encryption cache on its
// own, with a GCM decryption and encryption function, a stalling memory and a
// key table model. Memory holds a data section of 8 batches (256 bytes at
// 0x400) encrypted by the reference GCM model in the CSealEncrypt layout.
// Checks:
//  - read miss (readCacheline), hits, full-word and byte writes;
//  - a conflicting batch evicts a dirty line (writebackCacheline) and the
//    written data comes back after the line is read again, i.e. the
//    write-back ciphertext, tag and fresh IV decrypt correctly;
//  - accesses outside the section bypass to memory unencrypted;
//  - 300 random accesses against a reference model;
//  - exit when the PCC leaves the code section: every dirty line written
//    back, NextIVCount stored in the key table, line memory and key cleared,
//    every batch in memory authenticates and decrypts to the model contents
//    and every IV count used is distinct;
//  - a modified ciphertext word makes the next line read raise tag_error, and
//    the cache flushes and releases the bus.
module tb_enc_cache;
  import cc_pkg::*;
  import gcm_ref_pkg::*;
  localparam logic [31:0] FIX  = 32'hC4E1_0001;
  localparam logic [31:0] BASE = 32'h400, LD = 32'd256, LC = 32'd512;
  localparam logic [31:0] CODE = 32'h100, CLEN = 32'h100;
  localparam logic [63:0] IVC0 = 64'd100;

  logic clk = 0, rst_n = 0;
  logic inv_valid = 0, inv_ack, cmd_sel, rsp_sel, enc_own, idle, active, tag_error;
  logic ev_hit, ev_bypass, ev_readline, ev_writeback, ev_flush;
  logic [127:0] inv_key;
  logic [31:0] pcc;
  bus_cmd_t cpu_cmd, mem_cmd; logic cpu_cmd_ready, mem_cmd_ready; bus_rsp_t cpu_rsp, mem_rsp;
  gcm_req_t dec_req, enc_req; gcm_rsp_t dec_rsp, enc_rsp;
  kt_req_t kt_req; kt_rsp_t kt_rsp;
  int checks = 0, failures = 0;
  int n_hit = 0, n_bypass = 0, n_readline = 0, n_writeback = 0, n_flush = 0, n_tag_error = 0, n_store = 0;
  logic [63:0] stored_ivc;

  enc_cache #(.IS_DCACHE(1'b1), .LINES(4), .LB(32), .LTIV(32), .FIXED_IV(FIX)) dut (
    .clk, .rst_n, .inv_valid, .inv_otype(12'd5), .inv_key, .inv_iv_count(IVC0),
    .inv_code_base(CODE), .inv_code_len(CLEN), .inv_sec_base(BASE), .inv_sec_len(LD), .inv_ack,
    .pcc, .cpu_cmd, .cpu_cmd_ready, .cpu_rsp, .mem_cmd, .mem_cmd_ready, .mem_rsp,
    .cmd_sel, .rsp_sel, .pt_pending(1'b0), .dec_req, .dec_rsp, .enc_req, .enc_rsp, .enc_own,
    .kt_req, .kt_rsp, .peer_idle(1'b1), .idle, .active, .tag_error,
    .ev_hit, .ev_bypass, .ev_readline, .ev_writeback, .ev_flush);
  aes_gcm #(.DECRYPT(1'b1)) u_dec (.clk, .rst_n, .req(dec_req), .rsp(dec_rsp));
  aes_gcm #(.DECRYPT(1'b0)) u_enc (.clk, .rst_n, .req(enc_req), .rsp(enc_rsp));
  tb_mem #(.WORDS(1024), .STALL(1'b1)) u_mem (.clk, .rst_n, .cmd(mem_cmd), .cmd_ready(mem_cmd_ready), .rsp(mem_rsp));
  always #5 clk = ~clk;

  // key table model: acknowledges a store the clock after the request
  always @(posedge clk) begin
    kt_rsp <= '0;
    if (kt_req.valid && !kt_rsp.ack) begin
      kt_rsp.ack <= 1'b1; kt_rsp.hit <= 1'b1;
      check(kt_req.cmd == KT_STORE && kt_req.otype == 12'd5, "cache only stores to the key table");
      stored_ivc = kt_req.iv_count; n_store++;
    end
  end

  always @(posedge clk) begin
    n_hit += int'(ev_hit); n_bypass += int'(ev_bypass); n_readline += int'(ev_readline);
    n_writeback += int'(ev_writeback); n_flush += int'(ev_flush); n_tag_error += int'(tag_error);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endfunction

  logic [127:0] key;
  logic [31:0] plain [1024];          // model of the section's plaintext and all other words

  function automatic logic [31:0] tag_addr(int n);  // n = 0..7
    return BASE + LC - 32 - 32'(32 * n);
  endfunction

  task automatic build_memory();
    for (int i = 0; i < 1024; i++) begin u_mem.m[i] = $urandom; plain[i] = u_mem.m[i]; end
    for (int n = 0; n < 8; n++) begin
      automatic logic [31:0] da = BASE + 32'(32 * n), ta = tag_addr(n);
      automatic logic [127:0] d[], o[], t;
      d = new[2];
      for (int b = 0; b < 2; b++) d[b] = {plain[da/4+4*b], plain[da/4+4*b+1], plain[da/4+4*b+2], plain[da/4+4*b+3]};
      t = ref_gcm(key, {FIX, 64'(n)}, d, o, 0);
      for (int b = 0; b < 2; b++) {u_mem.m[da/4+4*b], u_mem.m[da/4+4*b+1], u_mem.m[da/4+4*b+2], u_mem.m[da/4+4*b+3]} = o[b];
      {u_mem.m[ta/4], u_mem.m[ta/4+1], u_mem.m[ta/4+2], u_mem.m[ta/4+3]} = t;
      {u_mem.m[ta/4+4], u_mem.m[ta/4+5], u_mem.m[ta/4+6], u_mem.m[ta/4+7]} = {32'd0, FIX, 64'(n)};
    end
  endtask

  task automatic invoke();
    pcc = CODE + 32'h40; inv_key = key;
    @(posedge clk); #1 inv_valid = 1;
    while (!inv_ack) begin @(posedge clk); #1; end
    inv_valid = 0; inv_key = '0;
    while (!(cmd_sel && rsp_sel)) begin @(posedge clk); #1; end
  endtask

  // one pipeline access; returns the read data
  task automatic access(bit we, logic [31:0] addr, logic [31:0] wdata, logic [3:0] wmask,
                        output logic [31:0] rdata);
    cpu_cmd = '0; cpu_cmd.valid = 1; cpu_cmd.we = we; cpu_cmd.addr = addr;
    cpu_cmd.wdata = wdata; cpu_cmd.wmask = we ? wmask : 4'h0;
    // sample the handshake between clock edges
    do @(negedge clk); while (!cpu_cmd_ready);
    @(posedge clk); #1 cpu_cmd = '0;
    while (!cpu_rsp.valid) @(negedge clk);
    rdata = cpu_rsp.rdata;
    @(posedge clk); #1;
  endtask

  task automatic rd(logic [31:0] addr, string what);
    logic [31:0] r;
    access(0, addr, 0, 0, r);
    check(r == plain[addr/4], $sformatf("%s: read %h got %h exp %h", what, addr, r, plain[addr/4]));
  endtask

  task automatic wr(logic [31:0] addr, logic [31:0] v, logic [3:0] m);
    logic [31:0] r;
    access(1, addr, v, m, r);
    for (int b = 0; b < 4; b++) if (m[b]) plain[addr/4][8*b +: 8] = v[8*b +: 8];
    if (!(addr >= BASE && addr < BASE + LD))
      for (int b = 0; b < 4; b++) if (m[b]) check(u_mem.m[addr/4][8*b +: 8] == v[8*b +: 8], "bypass write reached memory");
  endtask

  initial begin
    automatic int h0, w0, r0;
    automatic logic [63:0] ivs [$];
    key = {$urandom, $urandom, $urandom, $urandom};
    cpu_cmd = '0; pcc = 32'h80;
    build_memory();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    check(idle && !cmd_sel && !rsp_sel, "idle in pass-through after reset");
    invoke();
    check(active, "active after invoke");

    r0 = n_readline; h0 = n_hit; rd(BASE + 4, "first read");
    check(n_readline == r0 + 1, "miss reads the line");
    rd(BASE + 8, "hit"); wr(BASE + 12, 32'hDEAD_BEEF, 4'hF); wr(BASE + 16, 32'h0000_00A5, 4'h1);
    rd(BASE + 12, "written word"); rd(BASE + 16, "byte write");
    // the command repeated after the line read is served as a hit too;
    // event pulses are registered, so let the last one arrive
    repeat (2) @(posedge clk);
    #1 check(n_hit == h0 + 6, $sformatf("six hits on a resident line (%0d)", n_hit - h0));
    w0 = n_writeback; r0 = n_readline;
    rd(BASE + 32'h80, "conflicting batch");
    check(n_writeback == w0 + 1 && n_readline == r0 + 1, "dirty victim written back, then line read");
    rd(BASE + 12, "written word after eviction"); rd(BASE + 16, "byte after eviction");
    check(n_readline == r0 + 2, "evicted line read again");
    // bypass
    r0 = n_bypass;
    rd(32'h800, "bypass read"); wr(32'h804, 32'h1234_5678, 4'hF); rd(32'hC00, "bypass read 2");
    check(n_bypass == r0 + 3, "outside the section bypasses");
    // random traffic
    for (int i = 0; i < 300; i++) begin
      automatic logic [31:0] a = (i % 10 == 9) ? 32'h900 + 32'($urandom_range(0, 63) * 4)
                                               : BASE + 32'($urandom_range(0, 63) * 4);
      if ($urandom_range(0, 2) == 0) wr(a, $urandom, 4'($urandom_range(1, 15)));
      else rd(a, "random");
    end
    // leave the enclave
    w0 = n_writeback;
    pcc = 32'h80;
    while (!idle || cmd_sel || rsp_sel) begin @(posedge clk); #1; end
    check(n_store == 1 && stored_ivc == IVC0 + 64'(n_writeback), $sformatf("NextIVCount stored (%0d)", stored_ivc));
    check(dut.key_q == '0, "key erased");
    begin
      automatic int nz = 0;
      foreach (dut.data_q[i]) if (dut.data_q[i] != '0) nz++;
      check(nz == 0, "line memory cleared");
    end
    check(n_flush >= 1, "flush ran");
    // every batch in memory authenticates and holds the model's plaintext
    for (int n = 0; n < 8; n++) begin
      automatic logic [31:0] da = BASE + 32'(32 * n), ta = tag_addr(n);
      automatic logic [127:0] c[], p[], t, st, ivr;
      c = new[2];
      for (int b = 0; b < 2; b++) c[b] = {u_mem.m[da/4+4*b], u_mem.m[da/4+4*b+1], u_mem.m[da/4+4*b+2], u_mem.m[da/4+4*b+3]};
      st  = {u_mem.m[ta/4], u_mem.m[ta/4+1], u_mem.m[ta/4+2], u_mem.m[ta/4+3]};
      ivr = {u_mem.m[ta/4+4], u_mem.m[ta/4+5], u_mem.m[ta/4+6], u_mem.m[ta/4+7]};
      check(ivr[127:96] == 0 && ivr[95:64] == FIX, $sformatf("batch %0d IV record", n));
      t = ref_gcm(key, ivr[95:0], c, p, 1);
      check(t == st, $sformatf("batch %0d tag", n));
      for (int b = 0; b < 2; b++)
        check(p[b] == {plain[da/4+4*b], plain[da/4+4*b+1], plain[da/4+4*b+2], plain[da/4+4*b+3]},
              $sformatf("batch %0d block %0d plaintext", n, b));
      ivs.push_back(ivr[63:0]);
    end
    begin
      automatic int dup = 0;
      for (int i = 0; i < 8; i++) for (int j = i + 1; j < 8; j++) if (ivs[i] == ivs[j]) dup++;
      check(dup == 0, "IV counts distinct");
    end
    for (int i = 0; i < 1024; i++)
      if (!(i >= BASE/4 && i < (BASE + LC)/4)) check(u_mem.m[i] == plain[i], "outside words");
    // tampering: flip a bit of batch 2's ciphertext
    u_mem.m[(BASE + 64)/4 + 5] ^= 32'h0000_0100;
    invoke();
    r0 = n_tag_error;
    cpu_cmd = '0; cpu_cmd.valid = 1; cpu_cmd.addr = BASE + 64;
    while (!tag_error) begin @(posedge clk); #1; end
    cpu_cmd = '0;
    while (!idle || cmd_sel || rsp_sel) begin @(posedge clk); #1; end
    check(n_tag_error == r0 + 1, "tag error on modified ciphertext");
    check(dut.key_q == '0, "key erased after tag error");
    $display("events: hit %0d bypass %0d readline %0d writeback %0d flush %0d tag_error %0d",
             n_hit, n_bypass, n_readline, n_writeback, n_flush, n_tag_error);
    check(n_hit > 0 && n_bypass > 0 && n_readline > 0 && n_writeback > 0 && n_flush > 0 && n_tag_error > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
