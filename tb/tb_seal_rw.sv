// tb_seal_rw: encrypts two 32-byte batches of a memory region in place with
// the CSealEncrypt read/write unit and a GCM encryption function, the first
// with a key load, the second reusing the key, on a memory that stalls at
// random. Checks the ciphertext, the tag and the padded IV written at the tag
// address against the reference GCM model, and that nothing else was touched.
module tb_seal_rw;
  import cc_pkg::*;
  import gcm_ref_pkg::*;
  localparam logic [31:0] FIX = 32'hC4E1_0001;
  logic clk = 0, rst_n = 0, start = 0, load_key = 0, done;
  logic [127:0] key;
  logic [31:0] batch_addr, tag_addr;
  logic [63:0] iv_count;
  bus_cmd_t cmd; logic cmd_ready; bus_rsp_t rsp;
  gcm_req_t enc_req; gcm_rsp_t enc_rsp;
  int checks = 0, failures = 0;

  seal_rw #(.LB(32), .FIXED_IV(FIX)) dut (.*);
  aes_gcm u_enc (.clk, .rst_n, .req(enc_req), .rsp(enc_rsp));
  tb_mem #(.WORDS(256), .STALL(1'b1)) u_mem (.clk, .rst_n, .cmd, .cmd_ready, .rsp);
  always #5 clk = ~clk;

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

  logic [31:0] orig [256];

  task automatic run_batch(logic [31:0] ba, logic [31:0] ta, logic [63:0] ivc, bit lk);
    logic [127:0] d[], o[], t;
    int cyc = 0;
    d = new[2];
    for (int b = 0; b < 2; b++)
      d[b] = {orig[ba/4 + 4*b], orig[ba/4 + 4*b + 1], orig[ba/4 + 4*b + 2], orig[ba/4 + 4*b + 3]};
    t = ref_gcm(key, {FIX, ivc}, d, o, 0);
    batch_addr = ba; tag_addr = ta; iv_count = ivc; load_key = lk; start = 1;
    @(posedge clk); #1 start = 0;
    while (!done) begin @(posedge clk); #1 cyc++; end
    $display("batch at %0h done after %0d clocks", ba, cyc);
    for (int b = 0; b < 2; b++)
      check({u_mem.m[ba/4+4*b], u_mem.m[ba/4+4*b+1], u_mem.m[ba/4+4*b+2], u_mem.m[ba/4+4*b+3]} == o[b],
            $sformatf("ciphertext block %0d at %0h", b, ba));
    check({u_mem.m[ta/4], u_mem.m[ta/4+1], u_mem.m[ta/4+2], u_mem.m[ta/4+3]} == t, "tag");
    check({u_mem.m[ta/4+4], u_mem.m[ta/4+5], u_mem.m[ta/4+6], u_mem.m[ta/4+7]} == {32'd0, FIX, ivc}, "iv");
    for (int i = 0; i < 8; i++) begin orig[ba/4 + i] = u_mem.m[ba/4 + i]; orig[ta/4 + i] = u_mem.m[ta/4 + i]; end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin u_mem.m[i] = $urandom; orig[i] = u_mem.m[i]; end
    key = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_batch(32'h100, 32'h160, 64'd0, 1);
    run_batch(32'h120, 32'h140, 64'd1, 0);
    for (int i = 0; i < 256; i++) check(u_mem.m[i] == orig[i], $sformatf("word %0d untouched", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
