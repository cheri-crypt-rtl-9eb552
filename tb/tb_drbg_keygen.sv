// tb_drbg_keygen: requests keys for several object types, repeating one, and
// compares each key with the CTR_DRBG instantiate/generate sequence computed
// with the reference AES; checks that a repeated otype gives a new key.
module tb_drbg_keygen;
  import gcm_ref_pkg::*;
  localparam logic [255:0] ENT = 256'h0123456789abcdef_fedcba9876543210_0f1e2d3c4b5a6978_8796a5b4c3d2e1f0;
  localparam logic [255:0] PS  = 256'h1111222233334444_5555666677778888_99990000aaaabbbb_ccccddddeeeeffff;
  logic clk = 0, rst_n = 0, req = 0, ack;
  logic [11:0] otype;
  logic [127:0] key, prev;
  int checks = 0, failures = 0;

  drbg_keygen #(.ENTROPY(ENT), .PERS(PS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] model(logic [11:0] ot, int n);
    logic [255:0] seed = ENT ^ PS ^ {192'd0, 32'(n), 20'd0, ot};
    logic [127:0] k, v;
    k = ref_aes128('0, 128'd1) ^ seed[255:128];
    v = ref_aes128('0, 128'd2) ^ seed[127:0];
    return ref_aes128(k, v + 128'd1);
  endfunction

  initial begin
    logic [11:0] ots [6] = '{12'h004, 12'h004, 12'h123, 12'h004, 12'hfff, 12'h000};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    prev = '0;
    for (int i = 0; i < 6; i++) begin
      int cyc;
      cyc = 0;
      otype = ots[i]; req = 1;
      do begin @(posedge clk); #1 cyc++; end while (!ack);
      req = 0;
      checks++;
      if (key !== model(ots[i], i)) begin failures++; $display("FAIL key %0d %h", i, key); end
      checks++;
      if (key == prev) begin failures++; $display("FAIL repeated key"); end
      checks++;
      if (cyc > 40) begin failures++; $display("FAIL latency %0d", cyc); end
      prev = key;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
