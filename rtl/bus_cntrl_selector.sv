// bus_cntrl_selector: the IbusCntrlSelector / DbusCntrlSelector between the
// pipeline's instruction or data bus and the memory interconnect.
//
// Three routings:
//  - pass-through (no select): pipeline commands and responses go straight
//    to and from memory;
//  - cache (cmd_sel, then rsp_sel): pipeline commands go to the encryption
//    cache and the cache's own memory port drives memory. Commands and
//    responses are switched separately so that responses of pass-through
//    commands still in flight when an enclave is entered reach the pipeline;
//    pt_pending tells the cache when none are left;
//  - seal (seal_sel, data bus only): the CSealEncrypt read/write unit owns
//    the memory port while the pipeline is stalled.
// Every command receives exactly one response, in order (cc_pkg).
// The three routings follow the document; the split of the cache routing into
// a command and a response select follows the controller states of the
// cache (cmdSelect, rspSelect).
module bus_cntrl_selector #(
  parameter int PEND_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_sel,
  input  logic             rsp_sel,
  input  logic             seal_sel,
  output logic             pt_pending,
  // pipeline side
  input  cc_pkg::bus_cmd_t cpu_cmd,
  output logic             cpu_cmd_ready,
  output cc_pkg::bus_rsp_t cpu_rsp,
  // memory side
  output cc_pkg::bus_cmd_t mem_cmd,
  input  logic             mem_cmd_ready,
  input  cc_pkg::bus_rsp_t mem_rsp,
  // cache, pipeline-facing port
  output cc_pkg::bus_cmd_t cache_cmd,
  input  logic             cache_cmd_ready,
  input  cc_pkg::bus_rsp_t cache_rsp,
  // cache, memory-facing port
  input  cc_pkg::bus_cmd_t cmem_cmd,
  output logic             cmem_cmd_ready,
  output cc_pkg::bus_rsp_t cmem_rsp,
  // CSealEncrypt read/write unit
  input  cc_pkg::bus_cmd_t seal_cmd,
  output logic             seal_cmd_ready,
  output cc_pkg::bus_rsp_t seal_rsp
);
  import cc_pkg::*;

  logic [PEND_W-1:0] pend_q;
  logic pt_issue, pt_return;

  always_comb begin
    mem_cmd        = '0;
    cpu_cmd_ready  = 1'b0;
    cache_cmd      = '0;
    cmem_cmd_ready = 1'b0;
    seal_cmd_ready = 1'b0;
    pt_issue       = 1'b0;
    if (seal_sel) begin
      mem_cmd        = seal_cmd;
      seal_cmd_ready = mem_cmd_ready;
    end else if (cmd_sel) begin
      cache_cmd      = cpu_cmd;
      cpu_cmd_ready  = cache_cmd_ready;
      mem_cmd        = cmem_cmd;
      cmem_cmd_ready = mem_cmd_ready;
    end else begin
      mem_cmd        = cpu_cmd;
      cpu_cmd_ready  = mem_cmd_ready;
      pt_issue       = cpu_cmd.valid && mem_cmd_ready;
    end

    seal_rsp  = '0;
    cmem_rsp  = '0;
    cpu_rsp   = '0;
    pt_return = 1'b0;
    if (seal_sel) begin
      seal_rsp = mem_rsp;
    end else if (rsp_sel) begin
      cmem_rsp = mem_rsp;
      cpu_rsp  = cache_rsp;
    end else begin
      cpu_rsp   = mem_rsp;
      pt_return = mem_rsp.valid;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pend_q <= '0;
    else        pend_q <= pend_q + PEND_W'(pt_issue) - PEND_W'(pt_return);

  assign pt_pending = (pend_q != '0);

  // The seal unit and the cache never own the bus together, and the seal unit
  // only takes it once pass-through traffic has drained.
  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(seal_sel && cmd_sel));
  a_seal_drained: assert property (@(posedge clk) disable iff (!rst_n) $rose(seal_sel) |-> !pt_pending);
endmodule
