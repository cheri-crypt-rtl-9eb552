// tb_mem: behavioural model of the memory behind the interconnect, for the
// testbenches only. Word-addressed array of WORDS 32-bit words starting at
// address 0, answering every command with one response one clock later, in
// order; write responses carry zero. With STALL set, cmd_ready drops at
// random to exercise back-pressure. Addresses outside the array read zero and
// ignore writes.
module tb_mem #(
  parameter int WORDS = 1024,
  parameter bit STALL = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cc_pkg::bus_cmd_t cmd,
  output logic             cmd_ready,
  output cc_pkg::bus_rsp_t rsp
);
  logic [31:0] m [WORDS];
  logic        rdy_q;
  int          nreads, nwrites;

  assign cmd_ready = STALL ? rdy_q : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp <= '0; rdy_q <= 1'b1; nreads <= 0; nwrites <= 0;
    end else begin
      rdy_q <= ($urandom_range(0, 3) != 0);
      rsp   <= '0;
      if (cmd.valid && cmd_ready) begin
        rsp.valid <= 1'b1;
        if ((cmd.addr >> 2) < WORDS) begin
          if (cmd.we) begin
            nwrites <= nwrites + 1;
            for (int b = 0; b < 4; b++)
              if (cmd.wmask[b]) m[cmd.addr >> 2][8*b +: 8] <= cmd.wdata[8*b +: 8];
          end else begin
            nreads <= nreads + 1;
            rsp.rdata <= m[cmd.addr >> 2];
          end
        end
      end
    end
  end
endmodule
