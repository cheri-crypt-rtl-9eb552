// tb_bounds_checker: compares both range checks with a 64-bit reference for
// random regions and addresses, including both edges of each region and a
// region that ends exactly at the top of the address space.
module tb_bounds_checker;
  logic [31:0] pcc, addr, code_base, code_len, sec_base, sec_len;
  logic pcc_in, addr_in;
  int checks = 0, failures = 0;

  bounds_checker dut (.*);

  function automatic bit inside_ref(logic [31:0] a, logic [31:0] b, logic [31:0] l);
    longint unsigned aa = a, bb = b, ll = l;
    return (aa >= bb) && (aa < bb + ll);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      code_base = $urandom; code_len = $urandom_range(0, 4096);
      sec_base  = $urandom; sec_len  = $urandom_range(0, 4096);
      unique case (i % 5)
        0: begin pcc = code_base; addr = sec_base; end
        1: begin pcc = code_base + code_len; addr = sec_base + sec_len; end
        2: begin pcc = code_base + code_len - 1; addr = sec_base + sec_len - 1; end
        3: begin pcc = code_base - 1; addr = sec_base - 1; end
        default: begin pcc = code_base + $urandom_range(0, 8192) - 2048; addr = $urandom; end
      endcase
      if (i == 7) begin sec_base = 32'hFFFF_FF00; sec_len = 32'h100; addr = 32'hFFFF_FFFC; end
      #1;
      checks++;
      if (pcc_in !== inside_ref(pcc, code_base, code_len)) begin failures++; $display("FAIL pcc %h", pcc); end
      checks++;
      if (addr_in !== inside_ref(addr, sec_base, sec_len)) begin failures++; $display("FAIL addr %h", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
