// tb_bus_cntrl_selector: drives the pipeline, cache and seal sides with
// random command streams and a random-latency in-order memory model, in each
// of the three routings, and checks that every response reaches the side that
// issued its command, with the right data. Also checks that responses to
// pass-through commands still in flight when the command select switches to
// the cache reach the pipeline, and that pt_pending tracks them until the
// response select may follow.
module tb_bus_cntrl_selector;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_sel = 0, rsp_sel = 0, seal_sel = 0, pt_pending;
  bus_cmd_t cpu_cmd, mem_cmd, cache_cmd, cmem_cmd, seal_cmd;
  logic cpu_cmd_ready, mem_cmd_ready, cache_cmd_ready, cmem_cmd_ready, seal_cmd_ready;
  bus_rsp_t cpu_rsp, mem_rsp, cache_rsp, cmem_rsp, seal_rsp;
  int checks = 0, failures = 0;

  bus_cntrl_selector dut (.*);
  always #5 clk = ~clk;

  // memory model: read data = address ^ tag; in-order queue, random delay
  logic [31:0] mq[$];
  always @(posedge clk) begin
    #1;
    mem_rsp = '0;
    if (mq.size() > 0 && $urandom_range(0, 2) == 0) begin
      mem_rsp.valid = 1; mem_rsp.rdata = mq.pop_front();
    end
    mem_cmd_ready = $urandom_range(0, 3) != 0;
  end
  always @(posedge clk) if (mem_cmd.valid && mem_cmd_ready) mq.push_back(mem_cmd.addr ^ 32'h5A5A_0000);

  // the cache's pipeline port answers immediately with address ^ 1
  assign cache_cmd_ready = 1'b1;
  always @(posedge clk) begin
    cache_rsp <= '0;
    if (cache_cmd.valid) begin cache_rsp.valid <= 1; cache_rsp.rdata <= cache_cmd.addr ^ 32'h1; end
  end

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

  // expected response queues per side
  logic [31:0] exp_cpu[$], exp_cmem[$], exp_seal[$];
  always @(negedge clk) begin
    if (cpu_rsp.valid) begin
      check(exp_cpu.size() > 0 && cpu_rsp.rdata == exp_cpu[0], "cpu response");
      void'(exp_cpu.pop_front());
    end
    if (cmem_rsp.valid) begin
      check(exp_cmem.size() > 0 && cmem_rsp.rdata == exp_cmem[0], "cache memory response");
      void'(exp_cmem.pop_front());
    end
    if (seal_rsp.valid) begin
      check(exp_seal.size() > 0 && seal_rsp.rdata == exp_seal[0], "seal response");
      void'(exp_seal.pop_front());
    end
  end

  // issue n commands from one side; mode 0 cpu->mem, 1 cpu->cache, 2 cache mem port, 3 seal
  task automatic issue(int mode, int n);
    for (int i = 0; i < n; i++) begin
      automatic bus_cmd_t c = '0;
      c.valid = 1; c.addr = $urandom & 32'hFFFF_FFFC; c.we = $urandom_range(0, 1);
      case (mode)
        0: cpu_cmd = c;
        1: cpu_cmd = c;
        2: cmem_cmd = c;
        default: seal_cmd = c;
      endcase
      @(posedge clk);
      while (!(mode == 0 ? cpu_cmd_ready : mode == 1 ? cpu_cmd_ready :
               mode == 2 ? cmem_cmd_ready : seal_cmd_ready)) @(posedge clk);
      case (mode)
        0: exp_cpu.push_back(c.addr ^ 32'h5A5A_0000);
        1: exp_cpu.push_back(c.addr ^ 32'h1);
        2: exp_cmem.push_back(c.addr ^ 32'h5A5A_0000);
        default: exp_seal.push_back(c.addr ^ 32'h5A5A_0000);
      endcase
      #1 cpu_cmd = '0; cmem_cmd = '0; seal_cmd = '0;
    end
  endtask

  task automatic drain();
    while (mq.size() > 0 || exp_cmem.size() > 0 || exp_seal.size() > 0) @(posedge clk);
    repeat (2) @(posedge clk);
    #1;
  endtask

  initial begin
    cpu_cmd = '0; cmem_cmd = '0; seal_cmd = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      // pass-through
      issue(0, 10);
      check(pt_pending == (mq.size() > 0), "pt_pending while commands outstanding");
      // enter the cache routing with pass-through responses still in flight
      #1 cmd_sel = 1;
      while (pt_pending) @(posedge clk);
      #1 rsp_sel = 1;
      issue(2, 6);
      drain();
      check(exp_cpu.size() == 0, "in-flight pass-through responses reached the pipeline");
      issue(1, 8);
      repeat (2) @(posedge clk);
      check(exp_cpu.size() == 0, "cache responses reached the pipeline");
      #1 cmd_sel = 0; rsp_sel = 0;
      // seal owns the memory port
      #1 seal_sel = 1;
      issue(3, 8);
      drain();
      #1 seal_sel = 0;
      check(!pt_pending && exp_cpu.size() == 0 && exp_seal.size() == 0, "all drained");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
