// tb_seal_ctrl: CSealEncrypt end to end below the pipeline: the instruction
// control with the read/write unit, a GCM encryption function, the key table
// and a stalling memory. Checks, against the reference GCM model:
//  - a data capability of 128 bytes is encrypted as two batches with tags
//    and IVs stored from the end of the region downwards, the result is sealed
//    with the sealing capability's address and resized to 64 bytes, and the
//    next IV count (2) is stored back in the table;
//  - a second capability with the same otype gets the same key and continues
//    the IV count;
//  - the data bus is not taken while pass-through accesses are pending;
//  - a plain seal answers in one clock and leaves memory untouched;
//  - untagged, already sealed, misaligned and too-long-for-its-tags
//    capabilities raise an exception.
module tb_seal_ctrl;
  import cc_pkg::*;
  import gcm_ref_pkg::*;
  localparam logic [31:0] FIX = 32'hC4E1_0001;
  logic clk = 0, rst_n = 0, start = 0, done, exc, busy, seal_sel, pt_pending = 0;
  cap_t cap, sealing_cap, result;
  kt_req_t kt_req; kt_rsp_t kt_rsp;
  kt_req_t kreq [1]; kt_rsp_t krsp [1];
  logic rw_start, rw_load_key, rw_done;
  logic [127:0] rw_key;
  logic [31:0] rw_batch_addr, rw_tag_addr;
  logic [63:0] rw_iv_count;
  bus_cmd_t cmd; logic cmd_ready; bus_rsp_t rsp;
  gcm_req_t enc_req; gcm_rsp_t enc_rsp;
  int checks = 0, failures = 0;

  seal_ctrl #(.LB(32), .LTIV(32)) dut (.*);
  seal_rw #(.LB(32), .FIXED_IV(FIX)) u_rw (.clk, .rst_n, .start(rw_start), .load_key(rw_load_key),
    .key(rw_key), .batch_addr(rw_batch_addr), .tag_addr(rw_tag_addr), .iv_count(rw_iv_count),
    .done(rw_done), .cmd, .cmd_ready, .rsp, .enc_req, .enc_rsp);
  aes_gcm u_enc (.clk, .rst_n, .req(enc_req), .rsp(enc_rsp));
  key_table #(.ENTRIES(3), .NPORTS(1)) u_kt (.clk, .rst_n, .req(kreq), .rsp(krsp), .flush(1'b0));
  tb_mem #(.WORDS(512), .STALL(1'b1)) u_mem (.clk, .rst_n, .cmd(cmd), .cmd_ready, .rsp);
  assign kreq[0] = kt_req;
  assign kt_rsp  = krsp[0];
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // watch the key table port
  logic [127:0] gen_key; logic [63:0] gen_ivc, stored_ivc; int gens = 0, stores = 0;
  always @(posedge clk) if (kt_rsp.ack) begin
    if (kt_req.cmd == KT_GEN) begin gen_key = kt_rsp.key; gen_ivc = kt_rsp.iv_count; gens++; end
    if (kt_req.cmd == KT_STORE) begin stored_ivc = kt_req.iv_count; stores++; end
  end
  // the bus must stay with the pipeline while pass-through accesses are pending
  always @(posedge clk) if (rst_n && pt_pending) check(!seal_sel, "no bus takeover while pending");

  logic [31:0] orig [512];

  function automatic cap_t mk(logic [31:0] base, logic [31:0] len, bit perm);
    cap_t c = '0;
    c.tag = 1; c.base = base; c.length = len; c.otype = OTYPE_UNSEALED; c.sw_perms[0] = perm;
    c.hw_perms = 12'hFFF;
    return c;
  endfunction

  task automatic seal(cap_t c, logic [11:0] ot, output int cyc);
    sealing_cap = '0; sealing_cap.tag = 1; sealing_cap.base = 32'h0; sealing_cap.offset = 32'(ot);
    cap = c;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0; cyc = 1;
    while (!done) begin @(posedge clk); #1 cyc++; end
  endtask

  // expected contents of an encrypted region of nb batches
  task automatic check_region(logic [31:0] base, logic [31:0] len, int nb, logic [127:0] key,
                              logic [63:0] ivc0, string what);
    for (int n = 0; n < nb; n++) begin
      automatic logic [31:0] da = base + 32'(32 * n), ta = base + len - 32 - 32'(32 * n);
      automatic logic [127:0] d[], o[], t;
      d = new[2];
      for (int b = 0; b < 2; b++)
        d[b] = {orig[da/4+4*b], orig[da/4+4*b+1], orig[da/4+4*b+2], orig[da/4+4*b+3]};
      t = ref_gcm(key, {FIX, ivc0 + 64'(n)}, d, o, 0);
      for (int b = 0; b < 2; b++)
        check({u_mem.m[da/4+4*b], u_mem.m[da/4+4*b+1], u_mem.m[da/4+4*b+2], u_mem.m[da/4+4*b+3]} == o[b],
              $sformatf("%s batch %0d block %0d", what, n, b));
      check({u_mem.m[ta/4], u_mem.m[ta/4+1], u_mem.m[ta/4+2], u_mem.m[ta/4+3]} == t,
            $sformatf("%s batch %0d tag", what, n));
      check({u_mem.m[ta/4+4], u_mem.m[ta/4+5], u_mem.m[ta/4+6], u_mem.m[ta/4+7]} == {32'd0, FIX, ivc0 + 64'(n)},
            $sformatf("%s batch %0d iv", what, n));
      for (int i = 0; i < 8; i++) begin orig[da/4+i] = u_mem.m[da/4+i]; orig[ta/4+i] = u_mem.m[ta/4+i]; end
    end
  endtask

  task automatic untouched(string what);
    automatic int bad = 0;
    for (int i = 0; i < 512; i++) if (u_mem.m[i] != orig[i]) bad++;
    check(bad == 0, $sformatf("%s: %0d words changed", what, bad));
  endtask

  initial begin
    automatic int cyc;
    automatic logic [127:0] k1;
    for (int i = 0; i < 512; i++) begin u_mem.m[i] = $urandom; orig[i] = u_mem.m[i]; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // data region: 128 bytes at 0x100 -> 2 batches; pass-through pending at first
    pt_pending = 1;
    fork
      seal(mk(32'h100, 32'd128, 1), 12'd7, cyc);
      begin repeat (60) @(posedge clk); #1 pt_pending = 0; end
    join
    check(!exc && result.otype == 12'd7 && result.length == 32'd64 && result.base == 32'h100 &&
          result.tag, "sealed data capability");
    check(gens == 1 && gen_ivc == 0, "new key with IV count 0");
    check(stores == 1 && stored_ivc == 64'd2, "next IV count stored");
    k1 = gen_key;
    check_region(32'h100, 32'd128, 2, k1, 64'd0, "data");
    untouched("after data seal");
    $display("data seal: %0d clocks", cyc);
    // code region of the same otype: 64 bytes -> 1 batch, same key, IV count continues
    seal(mk(32'h200, 32'd64, 1), 12'd7, cyc);
    check(!exc && result.otype == 12'd7 && result.length == 32'd32, "sealed code capability");
    check(gens == 2 && gen_key == k1 && gen_ivc == 64'd2, "same key, continued IV count");
    check(stores == 2 && stored_ivc == 64'd3, "next IV count stored again");
    check_region(32'h200, 32'd64, 1, k1, 64'd2, "code");
    untouched("after code seal");
    $display("code seal: %0d clocks", cyc);
    // a third seal of the otype gets a fresh key
    seal(mk(32'h280, 32'd64, 1), 12'd7, cyc);
    check(!exc && gen_key != k1 && gen_ivc == 64'd0, "third use gets a new key");
    check_region(32'h280, 32'd64, 1, gen_key, 64'd0, "third");
    // plain seal
    seal(mk(32'h300, 32'd100, 0), 12'd9, cyc);
    check(!exc && cyc == 1 && result.otype == 12'd9 && result.length == 32'd100, "plain seal in one clock");
    untouched("after plain seal");
    // exceptions
    begin
      automatic cap_t c = mk(32'h300, 32'd128, 1);
      c.tag = 0;
      seal(c, 12'd9, cyc); check(exc, "untagged");
      c = mk(32'h300, 32'd128, 1); c.otype = 12'd3;
      seal(c, 12'd9, cyc); check(exc, "already sealed");
      seal(mk(32'h304, 32'd128, 1), 12'd9, cyc); check(exc, "misaligned base");
      seal(mk(32'h300, 32'd32, 1), 12'd9, cyc); check(exc, "too short for one batch");
      untouched("after rejected seals");
      // 96 bytes: after one batch the tag space would overlap the next batch
      seal(mk(32'h300, 32'd96, 1), 12'd9, cyc); check(exc, "encryption length error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
