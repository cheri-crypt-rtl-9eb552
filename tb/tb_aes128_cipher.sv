// tb_aes128_cipher: checks the iterative AES-128 cipher against the FIPS-197
// example vector, the all-zero key vector of the GCM test set, and the
// reference model for random keys and blocks; checks the 11-clock latency.
module tb_aes128_cipher;
  import gcm_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [127:0] key, din, dout;
  int checks = 0, failures = 0;

  aes128_cipher dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] k, logic [127:0] p, logic [127:0] exp);
    int cyc = 0;
    key = k; din = p; start = 1;
    @(posedge clk); #1 start = 0;
    while (!done) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (dout !== exp) begin failures++; $display("FAIL aes k=%h p=%h got %h exp %h", k, p, dout, exp); end
    checks++;
    if (cyc != 10) begin failures++; $display("FAIL latency %0d", cyc + 1); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run('0, '0, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    for (int i = 0; i < 20; i++) begin
      automatic logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [127:0] p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, ref_aes128(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
