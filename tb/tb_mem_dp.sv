// tb_mem_dp: behavioural model of the on-chip RAM behind the interconnect,
// for the testbenches only, with an instruction-bus port and a data-bus port
// on one word array of WORDS 32-bit words starting at address 0. Each port
// answers every command with one response one clock later, in order; write
// responses carry zero. The data port wins when both write the same word.
module tb_mem_dp #(
  parameter int WORDS = 32768      // 128 KiB
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cc_pkg::bus_cmd_t icmd,
  output logic             icmd_ready,
  output cc_pkg::bus_rsp_t irsp,
  input  cc_pkg::bus_cmd_t dcmd,
  output logic             dcmd_ready,
  output cc_pkg::bus_rsp_t drsp
);
  logic [31:0] m [WORDS];

  assign icmd_ready = 1'b1;
  assign dcmd_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irsp <= '0; drsp <= '0;
    end else begin
      irsp <= '0;
      drsp <= '0;
      if (icmd.valid) begin
        irsp.valid <= 1'b1;
        if (!icmd.we) irsp.rdata <= m[(icmd.addr >> 2) % WORDS];
        else for (int b = 0; b < 4; b++)
          if (icmd.wmask[b]) m[(icmd.addr >> 2) % WORDS][8*b +: 8] <= icmd.wdata[8*b +: 8];
      end
      if (dcmd.valid) begin
        drsp.valid <= 1'b1;
        if (!dcmd.we) drsp.rdata <= m[(dcmd.addr >> 2) % WORDS];
        else for (int b = 0; b < 4; b++)
          if (dcmd.wmask[b]) m[(dcmd.addr >> 2) % WORDS][8*b +: 8] <= dcmd.wdata[8*b +: 8];
      end
    end
  end
endmodule
