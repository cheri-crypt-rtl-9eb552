// seal_ctrl: CSealEncrypt instruction control (memory stage). Seals a
// capability with the object type of a sealing capability and, when the
// capability's encryption permission is set, first encrypts the memory it
// points to, batch by batch, and shrinks its length to the encrypted data.
//
// Sequence with encryption: genKey for the otype from the key table (which
// returns the key and NextIVCount); wait until no pass-through data-bus
// access is in flight and take the data bus; then for batch n = 1, 2, ...
//   DataAddr_1 = base, TagAddr_1 = base + L_C - L_TIV,
//   DataAddr_n = DataAddr_n-1 + L_b, TagAddr_n = TagAddr_n-1 - L_TIV,
// encrypt the batch with the read/write unit (key loaded for the first batch
// only) using IV count NextIVCount + n - 1. Before a batch, TagAddr must be
// at least DataAddr + L_b, otherwise an encryption length error is raised.
// The loop ends after the batch whose TagAddr equals DataAddr + L_b; the
// resized length is then L_d = n * L_b. Finally storeNextIVCount writes the
// next unused IV count back to the table, the bus is released and done is
// pulsed with the sealed capability (otype set, length L_d).
// Without encryption the sealed capability is returned one clock after start,
// as in the document.
//
// Checks raising exc (this design's choice of checks; the document only says
// hardware checks are made): untagged capability or sealing capability,
// capability already sealed, base not aligned to the batch length, length
// error. The otype is the address (base + offset) of the sealing capability.
// L_TIV is 32 bytes: a full 128-bit tag and a 128-bit padded IV per batch.
module seal_ctrl #(
  parameter int LB   = 32,   // batch length L_b in bytes (document: 32)
  parameter int LTIV = 32    // tag + IV storage per batch in bytes (document: 32)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  cc_pkg::cap_t      cap,
  input  cc_pkg::cap_t      sealing_cap,
  output logic              done,
  output logic              exc,
  output logic              busy,
  output cc_pkg::cap_t      result,
  // key table
  output cc_pkg::kt_req_t   kt_req,
  input  cc_pkg::kt_rsp_t   kt_rsp,
  // data bus ownership
  output logic              seal_sel,
  input  logic              pt_pending,
  // read/write unit
  output logic              rw_start,
  output logic              rw_load_key,
  output logic [127:0]      rw_key,
  output logic [31:0]       rw_batch_addr,
  output logic [31:0]       rw_tag_addr,
  output logic [63:0]       rw_iv_count,
  input  logic              rw_done
);
  import cc_pkg::*;

  typedef enum logic [2:0] { K_IDLE, K_GENKEY, K_WAITBUS, K_CHECK, K_BATCH, K_STORE, K_DONE } kstate_e;
  kstate_e state_q;

  cap_t         cap_q;
  logic [11:0]  otype_q;
  logic [127:0] key_q;
  logic [63:0]  ivc_q;
  logic [31:0]  daddr_q, taddr_q, ld_q;
  logic         first_q, err_q;
  logic [31:0]  seal_addr;
  logic [32:0]  data_end;

  assign seal_addr = sealing_cap.base + sealing_cap.offset;
  assign data_end  = {1'b0, daddr_q} + 33'(LB);

  always_comb begin
    kt_req          = '0;
    kt_req.otype    = otype_q;
    kt_req.iv_count = ivc_q;
    if (state_q == K_GENKEY) begin kt_req.valid = 1'b1; kt_req.cmd = KT_GEN;   end
    if (state_q == K_STORE)  begin kt_req.valid = 1'b1; kt_req.cmd = KT_STORE; end
  end

  assign seal_sel      = state_q inside {K_CHECK, K_BATCH};
  assign rw_key        = key_q;
  assign rw_batch_addr = daddr_q;
  assign rw_tag_addr   = taddr_q;
  assign rw_iv_count   = ivc_q;
  assign rw_load_key   = first_q;
  assign busy          = (state_q != K_IDLE) || start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= K_IDLE; cap_q <= '0; otype_q <= '0; key_q <= '0; ivc_q <= '0;
      daddr_q <= '0; taddr_q <= '0; ld_q <= '0; first_q <= 1'b0; err_q <= 1'b0;
      done <= 1'b0; exc <= 1'b0; result <= '0; rw_start <= 1'b0;
    end else begin
      done     <= 1'b0;
      exc      <= 1'b0;
      rw_start <= 1'b0;
      unique case (state_q)
        K_IDLE: if (start) begin
          cap_q   <= cap;
          otype_q <= seal_addr[11:0];
          err_q   <= !cap.tag || !sealing_cap.tag || cap.otype != OTYPE_UNSEALED;
          daddr_q <= cap.base;
          taddr_q <= cap.base + cap.length - 32'(LTIV);
          ld_q    <= '0;
          first_q <= 1'b1;
          if (!cap.tag || !sealing_cap.tag || cap.otype != OTYPE_UNSEALED || !cap_encrypt_perm(cap)) begin
            // plain seal (or a check failed): answer in one clock
            done   <= 1'b1;
            exc    <= !cap.tag || !sealing_cap.tag || cap.otype != OTYPE_UNSEALED;
            result <= cap;
            result.otype <= seal_addr[11:0];
          end else if (cap.base[$clog2(LB)-1:0] != '0 || cap.length < 32'(LB + LTIV)) begin
            err_q   <= 1'b1;
            state_q <= K_DONE;
          end else
            state_q <= K_GENKEY;
        end
        K_GENKEY: if (kt_rsp.ack) begin
          key_q   <= kt_rsp.key;
          ivc_q   <= kt_rsp.iv_count;
          state_q <= K_WAITBUS;
        end
        K_WAITBUS: if (!pt_pending) state_q <= K_CHECK;
        K_CHECK: begin
          if ({1'b0, taddr_q} < data_end) begin
            err_q   <= 1'b1;      // encryption length error
            state_q <= K_DONE;
          end else begin
            rw_start <= 1'b1;
            state_q  <= K_BATCH;
          end
        end
        K_BATCH: if (rw_done) begin
          first_q <= 1'b0;
          ivc_q   <= ivc_q + 64'd1;
          ld_q    <= ld_q + 32'(LB);
          if ({1'b0, taddr_q} == data_end) state_q <= K_STORE;
          else begin
            daddr_q <= daddr_q + 32'(LB);
            taddr_q <= taddr_q - 32'(LTIV);
            state_q <= K_CHECK;
          end
        end
        K_STORE: if (kt_rsp.ack) state_q <= K_DONE;
        K_DONE: begin
          done   <= 1'b1;
          exc    <= err_q;
          result <= cap_q;
          result.otype <= otype_q;
          if (cap_encrypt_perm(cap_q) && !err_q) result.length <= ld_q;
          state_q <= K_IDLE;
        end
        default: state_q <= K_IDLE;
      endcase
    end
  end
endmodule
