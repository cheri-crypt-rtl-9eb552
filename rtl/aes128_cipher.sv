// aes128_cipher: iterative AES-128 block encryption, one round per clock.
//
// The round keys are expanded on the fly alongside the state, so only the
// current round key is stored. On the clock edge where start is high the
// input block is combined with the cipher key (round 0); rounds 1 to 10
// follow on the next ten edges. done is high for one cycle, 11 cycles after
// the start cycle, with the ciphertext on dout; dout holds until the next
// start. A start while busy restarts the cipher.
//
// The document specifies AES-128 as the block cipher of its GCM functions;
// the round-per-cycle architecture is this design's choice.
module aes128_cipher (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] din,
  output logic         busy,
  output logic         done,
  output logic [127:0] dout
);
  import cc_pkg::*;

  logic [127:0] state_q, rk_q;
  logic [3:0]   round_q;      // next round to apply, 1..10
  logic [7:0]   rcon_q;
  logic [127:0] rk_next;

  assign rk_next = aes_next_key(rk_q, rcon_q);
  assign dout    = state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rk_q    <= '0;
      round_q <= '0;
      rcon_q  <= 8'h01;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        state_q <= din ^ key;
        rk_q    <= key;
        rcon_q  <= 8'h01;
        round_q <= 4'd1;
        busy    <= 1'b1;
      end else if (busy) begin
        state_q <= aes_round(state_q, rk_next, round_q == 4'd10);
        rk_q    <= rk_next;
        rcon_q  <= xtime(rcon_q);
        round_q <= round_q + 4'd1;
        if (round_q == 4'd10) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
