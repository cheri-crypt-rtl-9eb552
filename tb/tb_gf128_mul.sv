// tb_gf128_mul: checks the digit-serial GCM multiplier against two products
// of the GCM test set (test case 2) and the bit-serial reference for random
// operands; checks the 16-clock latency.
module tb_gf128_mul;
  import gcm_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [127:0] x, y, z;
  int checks = 0, failures = 0;

  gf128_mul dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] a, logic [127:0] b, logic [127:0] exp);
    int cyc = 0;
    x = a; y = b; start = 1;
    @(posedge clk); #1 start = 0; cyc = 1;
    while (!done) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (z !== exp) begin failures++; $display("FAIL gf x=%h y=%h got %h exp %h", a, b, z, exp); end
    checks++;
    if (cyc != 16) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(128'h0388dace60b6a392f328c2b971b2fe78, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e,
        128'h5e2ec746917062882c85b0685353deb7);
    run(128'h5e2ec746917062882c85b0685353de37, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e,
        128'hf38cbb1ad69223dcc3457ae5b6b0f885);
    for (int i = 0; i < 30; i++) begin
      automatic logic [127:0] a = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [127:0] b = {$urandom, $urandom, $urandom, $urandom};
      run(a, b, ref_gfmul(a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
