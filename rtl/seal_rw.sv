// seal_rw: the CSealEncrypt read/write unit. Encrypts one batch of a
// capability's memory in place and stores the batch's authentication tag and
// IV, under control of the CSealEncrypt instruction.
//
// Per batch (start pulse with batch address, tag address, key and
// NextIVCount): if load_key is set the key is first loaded into the shared
// encryption function (hash subkey computation). The IV is FIXED_IV (32
// bits) followed by the 64-bit NextIVCount. The state machine then alternates
// between two phases, since one address bus cannot read and write at once:
//  - Read: reads the four 32-bit words of the next 128-bit block and passes
//    the block, flagged as last for the final block of the batch, to the
//    encryption function. It moves on to Write when an encrypted block is
//    waiting (the input side is full) or every block has been read.
//  - Write: writes the encrypted block back as four words at the same
//    address, and returns to Read when no output is waiting and blocks
//    remain to be read.
// When all data is written it writes the 128-bit tag at the tag address and
// the IV, padded to 128 bits with a zero upper word, right after it, waits
// for the last write acknowledgement and pulses done.
// The state sequence Idle, Read, Write, Write Tag & IV, Finish follows the
// document; the phase switching conditions are this design's simplest
// reading of "input nearly full" and "output nearly empty". A phase switch
// waits until every response of the previous phase has returned.
//
// Bus: cc_pkg bus with one response per command. Encryption function port:
// cc_pkg::gcm_req_t / gcm_rsp_t through the AES control selector.
module seal_rw #(
  parameter int          LB       = 32,            // batch length in bytes (document: 32)
  parameter logic [31:0] FIXED_IV = 32'hC4E1_0001  // fixed IV field (value not given)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              load_key,
  input  logic [127:0]      key,
  input  logic [31:0]       batch_addr,
  input  logic [31:0]       tag_addr,
  input  logic [63:0]       iv_count,
  output logic              done,
  output cc_pkg::bus_cmd_t  cmd,
  input  logic              cmd_ready,
  input  cc_pkg::bus_rsp_t  rsp,
  output cc_pkg::gcm_req_t  enc_req,
  input  cc_pkg::gcm_rsp_t  enc_rsp
);
  import cc_pkg::*;

  localparam int NW = LB / 4;    // words per batch
  localparam int NB = LB / 16;   // blocks per batch

  typedef enum logic [3:0] { R_IDLE, R_KEYLOAD, R_KEYWAIT, R_START, R_READ, R_WRITE,
                             R_WTAG, R_ACKS, R_FINISH } rstate_e;
  rstate_e state_q;

  logic [31:0]  baddr_q, taddr_q;
  logic [127:0] key_q;
  logic [95:0]  iv_q;
  logic [15:0]  rd_issued_q, rd_rcvd_q, blk_pushed_q, wr_words_q;
  logic [127:0] asm_q, wbuf_q;
  logic         asm_full_q;
  logic [2:0]   wbuf_cnt_q;
  logic [3:0]   tiv_idx_q;
  logic [15:0]  outst_q;
  logic [255:0] tiv_words;

  logic cmd_fire, take_out, push;

  assign tiv_words = {enc_rsp.tag, 32'd0, iv_q};

  always_comb begin
    cmd     = '0;
    enc_req = '0;
    enc_req.key = key_q;
    enc_req.iv  = iv_q;
    take_out = 1'b0;
    unique case (state_q)
      R_KEYLOAD: enc_req.key_load = 1'b1;
      R_START:   enc_req.start    = enc_rsp.idle;
      R_READ: begin
        // read the words of the block being assembled
        if (!asm_full_q && rd_issued_q < 16'(NW) && rd_issued_q < (blk_pushed_q + 16'd1) * 16'd4) begin
          cmd.valid = 1'b1;
          cmd.addr  = baddr_q + {14'd0, rd_issued_q, 2'b00};
        end
      end
      R_WRITE: begin
        if (wbuf_cnt_q != 0) begin
          cmd.valid = 1'b1;
          cmd.we    = 1'b1;
          cmd.wmask = 4'hF;
          cmd.addr  = baddr_q + {14'd0, wr_words_q, 2'b00};
          cmd.wdata = wbuf_q[127:96];
        end else if (enc_rsp.out_valid) begin
          take_out = 1'b1;
        end
      end
      R_WTAG: begin
        if (enc_rsp.tag_valid && tiv_idx_q < 4'd8) begin
          cmd.valid = 1'b1;
          cmd.we    = 1'b1;
          cmd.wmask = 4'hF;
          cmd.addr  = taddr_q + {26'd0, tiv_idx_q, 2'b00};
          cmd.wdata = tiv_words[255 - 32*tiv_idx_q -: 32];
        end
      end
      default: ;
    endcase
    enc_req.in_valid  = asm_full_q && (state_q inside {R_READ, R_WRITE});
    enc_req.in_data   = asm_q;
    enc_req.in_last   = (blk_pushed_q == 16'(NB - 1));
    enc_req.out_ready = take_out;
  end

  assign cmd_fire = cmd.valid && cmd_ready;
  assign push     = enc_req.in_valid && enc_rsp.in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= R_IDLE; baddr_q <= '0; taddr_q <= '0; key_q <= '0; iv_q <= '0;
      rd_issued_q <= '0; rd_rcvd_q <= '0; blk_pushed_q <= '0; wr_words_q <= '0;
      asm_q <= '0; wbuf_q <= '0; asm_full_q <= 1'b0; wbuf_cnt_q <= '0; tiv_idx_q <= '0;
      outst_q <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      outst_q <= outst_q + 16'(cmd_fire) - 16'(rsp.valid);
      // read data assembly (responses only arrive for reads during the read phase)
      if (state_q == R_READ && rsp.valid) begin
        asm_q     <= {asm_q[95:0], rsp.rdata};
        rd_rcvd_q <= rd_rcvd_q + 16'd1;
        if (rd_rcvd_q[1:0] == 2'd3) asm_full_q <= 1'b1;
      end
      if (push) begin
        asm_full_q   <= 1'b0;
        blk_pushed_q <= blk_pushed_q + 16'd1;
      end
      unique case (state_q)
        R_IDLE: if (start) begin
          baddr_q <= batch_addr; taddr_q <= tag_addr; key_q <= key;
          iv_q    <= {FIXED_IV, iv_count};
          rd_issued_q <= '0; rd_rcvd_q <= '0; blk_pushed_q <= '0; wr_words_q <= '0;
          asm_full_q <= 1'b0; wbuf_cnt_q <= '0; tiv_idx_q <= '0;
          state_q <= load_key ? R_KEYLOAD : R_START;
        end
        R_KEYLOAD: state_q <= R_KEYWAIT;
        R_KEYWAIT: if (enc_rsp.idle) state_q <= R_START;
        R_START:   if (enc_rsp.idle) state_q <= R_READ;
        R_READ: begin
          if (cmd_fire) rd_issued_q <= rd_issued_q + 16'd1;
          if ((enc_rsp.out_valid || (blk_pushed_q + 16'(push)) == 16'(NB)) &&
              outst_q == 16'(rsp.valid) && !cmd_fire)
            state_q <= R_WRITE;
        end
        R_WRITE: begin
          if (take_out) begin
            wbuf_q     <= enc_rsp.out_data;
            wbuf_cnt_q <= 3'd4;
          end else if (cmd_fire) begin
            wbuf_q     <= {wbuf_q[95:0], 32'd0};
            wbuf_cnt_q <= wbuf_cnt_q - 3'd1;
            wr_words_q <= wr_words_q + 16'd1;
          end
          if (wbuf_cnt_q == 0 && !enc_rsp.out_valid && outst_q == 16'(rsp.valid)) begin
            if (wr_words_q == 16'(NW))                                    state_q <= R_WTAG;
            else if (rd_issued_q < 16'(NW))                               state_q <= R_READ;
          end
        end
        R_WTAG: if (cmd_fire) begin
          tiv_idx_q <= tiv_idx_q + 4'd1;
          if (tiv_idx_q == 4'd7) state_q <= R_ACKS;
        end
        R_ACKS: if (outst_q == 16'(rsp.valid)) state_q <= R_FINISH;
        R_FINISH: begin
          done    <= 1'b1;
          state_q <= R_IDLE;
        end
        default: state_q <= R_IDLE;
      endcase
    end
  end
endmodule
