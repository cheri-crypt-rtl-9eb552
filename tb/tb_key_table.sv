// tb_key_table: drives the key table through the sequence of the seal and
// invoke flow: genKey twice for one otype (same key, second use), a third
// genKey (new key, NextIVCount reset), getKey, storeNextIVCount, filling the
// table past its three entries, a getKey miss and a flush after a tag error.
// Checks hits, key equality/inequality, NextIVCount and the port routing.
module tb_key_table;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  kt_req_t req [3];
  kt_rsp_t rsp [3];
  int checks = 0, failures = 0;

  key_table dut (.*);
  always #5 clk = ~clk;

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

  task automatic cmd(int port, kt_cmd_e c, logic [11:0] ot, logic [63:0] iv, output kt_rsp_t r, output int cyc);
    cyc = 0;
    req[port] = '{valid: 1'b1, cmd: c, otype: ot, iv_count: iv};
    do begin
      @(posedge clk); #1 cyc++;
      for (int p = 0; p < 3; p++) if (p != port) check(!rsp[p].ack, "ack on wrong port");
    end while (!rsp[port].ack);
    r = rsp[port];
    req[port] = '0;
    @(posedge clk); #1;
  endtask

  kt_rsp_t r;
  int cyc;
  logic [127:0] k1, k2, k7;

  initial begin
    foreach (req[i]) req[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    cmd(0, KT_GEN, 12'h004, 0, r, cyc); k1 = r.key;
    check(r.hit && r.iv_count == 0, "gen new");
    check(cyc > 30, $sformatf("gen new used generator (%0d clks)", cyc));
    cmd(0, KT_STORE, 12'h004, 64'd1, r, cyc);
    check(r.hit, "store hit");
    cmd(0, KT_GEN, 12'h004, 0, r, cyc);
    check(r.key == k1 && r.iv_count == 64'd1, "second gen returns same key and NextIVCount");
    check(cyc <= 3, $sformatf("second gen latency %0d", cyc));
    cmd(0, KT_STORE, 12'h004, 64'd3, r, cyc);
    cmd(1, KT_GET, 12'h004, 0, r, cyc);
    check(r.hit && r.key == k1 && r.iv_count == 64'd3, "get after pair");
    cmd(0, KT_GEN, 12'h004, 0, r, cyc); k2 = r.key;
    check(k2 != k1 && r.iv_count == 0, "third gen makes a new key");
    cmd(1, KT_GET, 12'h004, 0, r, cyc);
    check(r.hit && r.key == k2, "get new key");
    cmd(1, KT_GET, 12'h055, 0, r, cyc);
    check(!r.hit, "get miss");
    cmd(0, KT_GEN, 12'h007, 0, r, cyc); k7 = r.key;
    check(k7 != k2, "otype 7 key differs");
    cmd(0, KT_GEN, 12'h009, 0, r, cyc);
    cmd(2, KT_STORE, 12'h009, 64'd42, r, cyc);
    cmd(1, KT_GET, 12'h009, 0, r, cyc);
    check(r.hit && r.iv_count == 64'd42, "store from port 2");
    // table full (4, 7, 9): otype 11 replaces an entry
    cmd(0, KT_GEN, 12'h00b, 0, r, cyc);
    cmd(1, KT_GET, 12'h00b, 0, r, cyc);
    check(r.hit, "replacement stored");
    cmd(1, KT_GET, 12'h007, 0, r, cyc);
    check(r.hit && r.key == k7, "entry 7 kept");
    cmd(1, KT_GET, 12'h009, 0, r, cyc);
    check(r.hit, "entry 9 kept");
    cmd(1, KT_GET, 12'h004, 0, r, cyc);
    check(!r.hit, "entry 4 replaced");
    flush = 1; @(posedge clk); #1 flush = 0;
    cmd(1, KT_GET, 12'h007, 0, r, cyc);
    check(!r.hit, "flush clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
