// tb_invoke_ctrl: drives CInvokeEncrypt with valid and invalid capability
// pairs against a small key table model (fixed latency, GET only) and two
// cache acknowledgement models with random delays. Checks: exception cases
// (untagged, otype mismatch, unsealed, permission mismatch, unknown otype),
// the two-clock non-encrypted path, the key request contents, the values
// handed to the caches, that done waits for both acknowledgements and that the
// key register is cleared afterwards.
module tb_invoke_ctrl;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  cap_t code_cap, data_cap;
  logic done, exc, busy;
  kt_req_t kt_req;
  kt_rsp_t kt_rsp;
  logic inv_valid;
  logic [11:0] inv_otype;
  logic [127:0] inv_key;
  logic [63:0] inv_iv_count;
  logic [31:0] inv_code_base, inv_code_len, inv_data_base, inv_data_len;
  logic inv_ack_i = 0, inv_ack_d = 0;
  int checks = 0, failures = 0;
  int ack_i_delay, ack_d_delay, gets = 0;

  invoke_ctrl dut (.*);
  always #5 clk = ~clk;

  function automatic logic [127:0] key_of(logic [11:0] ot);
    return {4{20'hA5A5A, ot}};
  endfunction

  // key table model: otypes below 100 are known, answer after 3 clocks
  initial begin
    kt_rsp = '0;
    forever begin
      @(posedge clk);
      #1 kt_rsp = '0;
      if (kt_req.valid) begin
        gets++;
        repeat (2) @(posedge clk);
        #1;
        kt_rsp.ack = 1;
        kt_rsp.hit = kt_req.otype < 100;
        kt_rsp.key = key_of(kt_req.otype);
        kt_rsp.iv_count = 64'(kt_req.otype) * 3;
        @(posedge clk);
        #1 kt_rsp = '0;
      end
    end
  end

  // cache models: acknowledge a pass after a random delay
  always @(posedge clk) begin
    #1;
    inv_ack_i = 0; inv_ack_d = 0;
    if (inv_valid) begin
      if (ack_i_delay == 0) inv_ack_i = 1;
      if (ack_d_delay == 0) inv_ack_d = 1;
      ack_i_delay--; ack_d_delay--;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic cap_t mk(logic [31:0] base, logic [31:0] len, logic [11:0] ot, bit perm);
    cap_t c = '0;
    c.tag = 1; c.base = base; c.length = len; c.otype = ot; c.sw_perms[0] = perm;
    c.hw_perms = 12'hFFF;
    return c;
  endfunction

  // run one invoke; returns the number of clocks until done
  task automatic invoke(cap_t c, cap_t d, output int cyc, output bit e, output bit saw_valid);
    code_cap = c; data_cap = d;
    ack_i_delay = $urandom_range(0, 6); ack_d_delay = $urandom_range(0, 6);
    saw_valid = 0;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0; cyc = 1;
    while (!done) begin
      if (inv_valid) begin
        saw_valid = 1;
        check(inv_otype == c.otype && inv_key == key_of(c.otype) && inv_iv_count == 64'(c.otype) * 3,
              "key and count to caches");
        check(inv_code_base == c.base && inv_code_len == c.length &&
              inv_data_base == d.base && inv_data_len == d.length, "bounds to caches");
      end
      @(posedge clk); #1 cyc++;
    end
    e = exc;
  endtask

  initial begin
    automatic int cyc;
    automatic bit e, v;
    automatic int g0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      automatic logic [11:0] ot = 12'($urandom_range(1, 99));
      automatic cap_t c = mk(32'h1000 + 32'(r) * 32'h400, 32'h100, ot, 1);
      automatic cap_t d = mk(32'h8000 + 32'(r) * 32'h400, 32'h200, ot, 1);
      // valid encrypted invoke
      g0 = gets;
      invoke(c, d, cyc, e, v);
      check(!e && v, $sformatf("valid invoke %0d", r));
      check(gets == g0 + 1, "one key request");
      @(posedge clk); #1;
      check(dut.inv_key == '0, "key register cleared");
      // non-encrypted: same checks, no key, done two clocks after start
      c.sw_perms[0] = 0; d.sw_perms[0] = 0;
      g0 = gets;
      invoke(c, d, cyc, e, v);
      check(!e && !v && cyc == 2 && gets == g0, $sformatf("plain invoke cyc=%0d", cyc));
      c.sw_perms[0] = 1; d.sw_perms[0] = 1;
      // exception cases
      unique case (r % 5)
        0: d.tag = 0;
        1: d.otype = ot + 1;
        2: begin c.otype = OTYPE_UNSEALED; d.otype = OTYPE_UNSEALED; end
        3: d.sw_perms[0] = 0;
        default: begin c.otype = 12'd200 + ot; d.otype = c.otype; end
      endcase
      invoke(c, d, cyc, e, v);
      check(e && !v, $sformatf("exception case %0d", r % 5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
