// gf128_mul: digit-serial multiplier in GF(2^128) with the GCM field
// polynomial and bit order (the "GF MULT" step of GHASH).
//
// z = x * y. Eight bits of x, most significant first, are consumed per clock,
// so a product takes 16 clocks: on the edge where start is high the first
// digit is processed, and done rises in the cycle 16 clocks after the start
// cycle with z valid; z holds until the next start. Eight bits per clock is
// this design's choice, made so that one multiplication fits the 16-clock
// slot in which the AES function processes one block.
module gf128_mul (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] x,
  input  logic [127:0] y,
  output logic         busy,
  output logic         done,
  output logic [127:0] z
);
  import cc_pkg::*;

  logic [127:0] z_q, v_q, x_q;
  logic [3:0]   cnt_q;
  logic [255:0] step_start, step_run;

  assign step_start = gf128_steps('0, y, x[127:120]);
  assign step_run   = gf128_steps(z_q, v_q, x_q[127:120]);
  assign z = z_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z_q <= '0; v_q <= '0; x_q <= '0; cnt_q <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        z_q   <= step_start[255:128];
        v_q   <= step_start[127:0];
        x_q   <= {x[119:0], 8'h00};
        cnt_q <= 4'd1;
        busy  <= 1'b1;
      end else if (busy) begin
        z_q   <= step_run[255:128];
        v_q   <= step_run[127:0];
        x_q   <= {x_q[119:0], 8'h00};
        cnt_q <= cnt_q + 4'd1;
        if (cnt_q == 4'd15) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
