// invoke_ctrl: CInvokeEncrypt instruction control (memory stage).
//
// Checks the sealed code and data capabilities: both tagged, both sealed with
// the same otype, and both with the same encryption permission; otherwise exc
// is raised. Without encryption, done follows two clocks after start and the
// pipeline completes the ordinary domain switch. With encryption, getKey
// fetches the key and NextIVCount of the otype from the key table (a miss is
// an exception), then inv_valid presents key, IV count, otype and the code
// and data section bounds (base and resized length) to both encryption
// caches until each has acknowledged, and done is pulsed. The caches then
// take over the instruction and data buses.
// The checks and the key request follow the document; the handshake with the
// caches is this design's choice.
module invoke_ctrl (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  cc_pkg::cap_t      code_cap,
  input  cc_pkg::cap_t      data_cap,
  output logic              done,
  output logic              exc,
  output logic              busy,
  // key table
  output cc_pkg::kt_req_t   kt_req,
  input  cc_pkg::kt_rsp_t   kt_rsp,
  // to the caches
  output logic              inv_valid,
  output logic [11:0]       inv_otype,
  output logic [127:0]      inv_key,
  output logic [63:0]       inv_iv_count,
  output logic [31:0]       inv_code_base,
  output logic [31:0]       inv_code_len,
  output logic [31:0]       inv_data_base,
  output logic [31:0]       inv_data_len,
  input  logic              inv_ack_i,
  input  logic              inv_ack_d
);
  import cc_pkg::*;

  typedef enum logic [1:0] { V_IDLE, V_GETKEY, V_PASS, V_DONE } vstate_e;
  vstate_e state_q;
  logic    err_q, got_i_q, got_d_q;

  always_comb begin
    kt_req       = '0;
    kt_req.valid = (state_q == V_GETKEY);
    kt_req.cmd   = KT_GET;
    kt_req.otype = inv_otype;
  end

  assign inv_valid = (state_q == V_PASS);
  assign busy      = (state_q != V_IDLE) || start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= V_IDLE; err_q <= 1'b0; got_i_q <= 1'b0; got_d_q <= 1'b0;
      done <= 1'b0; exc <= 1'b0;
      inv_otype <= '0; inv_key <= '0; inv_iv_count <= '0;
      inv_code_base <= '0; inv_code_len <= '0; inv_data_base <= '0; inv_data_len <= '0;
    end else begin
      done <= 1'b0;
      exc  <= 1'b0;
      unique case (state_q)
        V_IDLE: if (start) begin
          inv_otype     <= code_cap.otype;
          inv_code_base <= code_cap.base;
          inv_code_len  <= code_cap.length;
          inv_data_base <= data_cap.base;
          inv_data_len  <= data_cap.length;
          got_i_q <= 1'b0;
          got_d_q <= 1'b0;
          err_q   <= !code_cap.tag || !data_cap.tag || code_cap.otype != data_cap.otype ||
                     code_cap.otype == OTYPE_UNSEALED ||
                     cap_encrypt_perm(code_cap) != cap_encrypt_perm(data_cap);
          if (!code_cap.tag || !data_cap.tag || code_cap.otype != data_cap.otype ||
              code_cap.otype == OTYPE_UNSEALED ||
              cap_encrypt_perm(code_cap) != cap_encrypt_perm(data_cap) || !cap_encrypt_perm(code_cap))
            state_q <= V_DONE;
          else
            state_q <= V_GETKEY;
        end
        V_GETKEY: if (kt_rsp.ack) begin
          inv_key      <= kt_rsp.key;
          inv_iv_count <= kt_rsp.iv_count;
          if (kt_rsp.hit) state_q <= V_PASS;
          else begin
            err_q   <= 1'b1;
            state_q <= V_DONE;
          end
        end
        V_PASS: begin
          if (inv_ack_i) got_i_q <= 1'b1;
          if (inv_ack_d) got_d_q <= 1'b1;
          if ((got_i_q || inv_ack_i) && (got_d_q || inv_ack_d)) state_q <= V_DONE;
        end
        V_DONE: begin
          done    <= 1'b1;
          exc     <= err_q;
          inv_key <= '0;          // the key now lives only in the caches
          state_q <= V_IDLE;
        end
        default: state_q <= V_IDLE;
      endcase
    end
  end
endmodule
