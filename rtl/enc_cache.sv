// enc_cache: transparent encryption cache, used as the instruction cache
// (IS_DCACHE = 0) and as the data cache (IS_DCACHE = 1).
//
// While an encrypted enclave runs, the cache holds the decrypted contents of
// the enclave's code or data section. It is direct mapped with LINES lines;
// each line holds exactly one batch (LB bytes), because a batch is the unit
// that is authenticated with one tag and one IV. The data cache is
// write-back.
//
// Controller (state names of the document's cache controller):
//  waitInvoke      idle, buses in pass-through, until CInvokeEncrypt passes
//                  key, NextIVCount, otype and section bounds (inv_valid);
//                  the key is then loaded into the decryption function (and,
//                  for the data cache, the shared encryption function);
//  waitRspStart    pipeline commands are routed to the cache (cmd_sel);
//                  waits for pass-through responses still in flight;
//  startInvoke     responses are routed too (rsp_sel). Serves one pipeline
//                  command at a time:
//                  - fetch PCC outside the enclave code: leave the enclave;
//                  - address outside this section: bypass, forwarded to
//                    main memory unencrypted;
//                  - hit: read or write the line, answered the next clock,
//                    one command per clock;
//                  - miss with a dirty victim (data cache): writebackCacheline
//                    first (1st priority), then readCacheline;
//                  - miss otherwise: readCacheline (2nd priority);
//  readCacheline   reads the batch's tag and IV (address computed from the
//                  base, resized length and batch address, see cc_pkg), then
//                  streams the batch through the decryption function while
//                  writing plaintext blocks into the line; a tag mismatch
//                  pulses tag_error (the key table is flushed) and the cache
//                  is flushed and released;
//  repeatReadWrite serves the command that missed, now a hit;
//  writebackCacheline encrypts the line with a fresh IV (NextIVCount, then
//                  incremented), writes ciphertext, tag and padded IV;
//  flush           on exit: the data cache first writes back every dirty
//                  line and stores NextIVCount in the key table; the line
//                  memory is then cleared one 32-bit word per clock
//                  (LINES*LB/4 clocks) and the key is erased;
//  waitRspFinish   waits for its own memory traffic and, for the instruction
//                  cache, for the data cache to finish (peer_idle), then
//                  releases the buses.
//
// The structure, states, priorities and exit behaviour follow the document.
// This design's own choices: one outstanding pipeline command at a time;
// in-section writes reaching the instruction cache are acknowledged and
// ignored; a line read fetches tag and IV before the data; memory block
// layout as in cc_pkg (lowest word in bits 127:96).
module enc_cache #(
  parameter bit          IS_DCACHE = 1'b1,
  parameter int          LINES     = 4,             // cache lines (document: 4)
  parameter int          LB        = 32,            // batch / line length in bytes (document: 32)
  parameter int          LTIV      = 32,            // tag + IV bytes per batch (document: 32)
  parameter logic [31:0] FIXED_IV  = 32'hC4E1_0001  // fixed IV field (value not given)
) (
  input  logic              clk,
  input  logic              rst_n,
  // from CInvokeEncrypt
  input  logic              inv_valid,
  input  logic [11:0]       inv_otype,
  input  logic [127:0]      inv_key,
  input  logic [63:0]       inv_iv_count,
  input  logic [31:0]       inv_code_base,
  input  logic [31:0]       inv_code_len,
  input  logic [31:0]       inv_sec_base,
  input  logic [31:0]       inv_sec_len,
  output logic              inv_ack,
  // fetch stage
  input  logic [31:0]       pcc,
  // pipeline-facing bus (through the bus selector)
  input  cc_pkg::bus_cmd_t  cpu_cmd,
  output logic              cpu_cmd_ready,
  output cc_pkg::bus_rsp_t  cpu_rsp,
  // memory-facing bus (through the bus selector)
  output cc_pkg::bus_cmd_t  mem_cmd,
  input  logic              mem_cmd_ready,
  input  cc_pkg::bus_rsp_t  mem_rsp,
  // bus selector control
  output logic              cmd_sel,
  output logic              rsp_sel,
  input  logic              pt_pending,
  // AES core
  output cc_pkg::gcm_req_t  dec_req,
  input  cc_pkg::gcm_rsp_t  dec_rsp,
  output cc_pkg::gcm_req_t  enc_req,
  input  cc_pkg::gcm_rsp_t  enc_rsp,
  output logic              enc_own,
  // key table (NextIVCount store on exit)
  output cc_pkg::kt_req_t   kt_req,
  input  cc_pkg::kt_rsp_t   kt_rsp,
  // the other cache
  input  logic              peer_idle,
  output logic              idle,
  // status and event pulses
  output logic              active,
  output logic              tag_error,
  output logic              ev_hit,
  output logic              ev_bypass,
  output logic              ev_readline,
  output logic              ev_writeback,
  output logic              ev_flush
);
  import cc_pkg::*;

  localparam int NW   = LB / 4;                 // words per line
  localparam int NB   = LB / 16;                // blocks per line
  localparam int SB   = $clog2(LB);
  localparam int ST   = $clog2(LTIV);
  localparam int IW   = (LINES > 1) ? $clog2(LINES) : 1;
  localparam int TAGW = 32 - SB - $clog2(LINES);
  localparam int NBLK = LINES * NB;
  localparam int BW   = $clog2(NBLK);
  localparam int FW   = $clog2(LINES * NW);

  typedef enum logic [3:0] {
    C_RESET, C_WAIT_INVOKE, C_KEYLOAD, C_WAIT_RSP_START, C_START_INVOKE, C_BYPASS,
    C_READ_LINE, C_REPEAT_RW, C_WRITEBACK, C_EXIT_WB, C_STORE_IV, C_FLUSH, C_WAIT_RSP_FINISH
  } cstate_e;
  cstate_e state_q;

  // enclave context
  logic [11:0]  otype_q;
  logic [127:0] key_q;
  logic [63:0]  ivc_q;
  logic [31:0]  code_base_q, code_len_q, sec_base_q, sec_len_q;

  // line storage
  logic [127:0]    data_q  [NBLK];
  logic [TAGW-1:0] ltag_q  [LINES];
  logic            valid_q [LINES];
  logic            dirty_q [LINES];

  // line operation context
  logic [IW-1:0]  op_line_q;
  logic [31:0]    op_addr_q, op_taddr_q;
  logic           exiting_q;
  logic [2:0]     ph_q;              // phase within read/write-back
  logic [15:0]    iss_q, rcv_q, pushed_q, outb_q, wr_q;
  logic [255:0]   ativ_q;
  logic [127:0]   asm_q, wbuf_q;
  logic           asm_full_q;
  logic [2:0]     wbuf_cnt_q;
  logic [15:0]    outst_q;
  logic [FW:0]    fl_q;
  logic [IW:0]    scan_q;
  bus_rsp_t       hit_rsp_q;

  // decode of the current pipeline command
  logic            pcc_in, addr_in;
  logic [IW-1:0]   c_line;
  logic [TAGW-1:0] c_tag;
  logic [$clog2(NW)-1:0] c_word;
  logic            c_hit;
  logic [127:0]    c_blk;
  logic [31:0]     c_rdata;

  bounds_checker u_bounds (.pcc, .addr(cpu_cmd.addr), .code_base(code_base_q), .code_len(code_len_q),
                           .sec_base(sec_base_q), .sec_len(sec_len_q), .pcc_in, .addr_in);

  assign c_line  = cpu_cmd.addr[SB +: IW];
  assign c_tag   = cpu_cmd.addr[31 -: TAGW];
  assign c_word  = cpu_cmd.addr[2 +: $clog2(NW)];
  assign c_hit   = valid_q[c_line] && (ltag_q[c_line] == c_tag);
  assign c_blk   = data_q[{c_line, c_word[$clog2(NW)-1:2]}];
  assign c_rdata = c_blk[127 - 32*c_word[1:0] -: 32];

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] nw, logic [3:0] m);
    for (int b = 0; b < 4; b++) if (m[b]) old[8*b +: 8] = nw[8*b +: 8];
    return old;
  endfunction

  // victim / line addresses
  logic [31:0] miss_batch;
  assign miss_batch = {cpu_cmd.addr[31:SB], {SB{1'b0}}};

  logic serve, exit_now, cmd_fire;
  assign serve    = (state_q inside {C_START_INVOKE, C_REPEAT_RW}) && pcc_in && cpu_cmd.valid && addr_in && c_hit;
  assign exit_now = (state_q == C_START_INVOKE) && !pcc_in;

  // ---------------------------------------------------------------- outputs
  always_comb begin
    mem_cmd       = '0;
    cpu_cmd_ready = 1'b0;
    dec_req       = '0;
    dec_req.key   = key_q;
    dec_req.iv    = ativ_q[95:0];
    enc_req       = '0;
    enc_req.key   = key_q;
    enc_req.iv    = {FIXED_IV, ivc_q};
    kt_req        = '0;
    kt_req.cmd    = KT_STORE;
    kt_req.otype  = otype_q;
    kt_req.iv_count = ivc_q;

    unique case (state_q)
      C_KEYLOAD: begin
        dec_req.key_load = 1'b1;
        enc_req.key_load = IS_DCACHE;
      end
      C_START_INVOKE: begin
        if (serve) cpu_cmd_ready = 1'b1;
        else if (pcc_in && cpu_cmd.valid && !addr_in) begin
          mem_cmd       = cpu_cmd;
          cpu_cmd_ready = mem_cmd_ready;
        end
      end
      C_REPEAT_RW: if (serve) cpu_cmd_ready = 1'b1;
      C_READ_LINE: begin
        if (ph_q == 3'd0 && iss_q < 16'd8) begin
          mem_cmd.valid = 1'b1;
          mem_cmd.addr  = op_taddr_q + {14'd0, iss_q, 2'b00};
        end
        if (ph_q == 3'd1) dec_req.start = dec_rsp.idle;
        if (ph_q == 3'd2 && !asm_full_q && iss_q < 16'(NW) && iss_q < (pushed_q + 16'd1) * 16'd4) begin
          mem_cmd.valid = 1'b1;
          mem_cmd.addr  = op_addr_q + {14'd0, iss_q, 2'b00};
        end
      end
      C_WRITEBACK: begin
        if (ph_q == 3'd0) enc_req.start = enc_rsp.idle;
        if (ph_q == 3'd1 && wbuf_cnt_q != 0) begin
          mem_cmd.valid = 1'b1;
          mem_cmd.we    = 1'b1;
          mem_cmd.wmask = 4'hF;
          mem_cmd.addr  = op_addr_q + {14'd0, wr_q, 2'b00};
          mem_cmd.wdata = wbuf_q[127:96];
        end
        if (ph_q == 3'd2) begin
          mem_cmd.valid = 1'b1;
          mem_cmd.we    = 1'b1;
          mem_cmd.wmask = 4'hF;
          mem_cmd.addr  = op_taddr_q + {14'd0, iss_q, 2'b00};
          mem_cmd.wdata = ativ_q[255 - 32*iss_q[2:0] -: 32];
        end
      end
      C_STORE_IV: kt_req.valid = 1'b1;
      default: ;
    endcase

    // block streams into the AES functions
    dec_req.in_valid  = (state_q == C_READ_LINE) && (ph_q == 3'd2) && asm_full_q;
    dec_req.in_data   = asm_q;
    dec_req.in_last   = (pushed_q == 16'(NB - 1));
    dec_req.out_ready = 1'b1;
    enc_req.in_valid  = (state_q == C_WRITEBACK) && (ph_q == 3'd1) && (pushed_q < 16'(NB));
    enc_req.in_data   = data_q[{op_line_q, pushed_q[BW-IW-1:0]}];
    enc_req.in_last   = (pushed_q == 16'(NB - 1));
    enc_req.out_ready = (state_q == C_WRITEBACK) && (ph_q == 3'd1) && (wbuf_cnt_q == 0);
    if (!IS_DCACHE) enc_req = '0;

    cpu_rsp = (state_q == C_BYPASS) ? mem_rsp : hit_rsp_q;
  end

  assign cmd_fire = mem_cmd.valid && mem_cmd_ready;
  assign cmd_sel  = !(state_q inside {C_RESET, C_WAIT_INVOKE, C_KEYLOAD});
  assign rsp_sel  = cmd_sel && (state_q != C_WAIT_RSP_START);
  assign enc_own  = IS_DCACHE && (state_q != C_RESET) && (state_q != C_WAIT_INVOKE);
  assign idle     = (state_q == C_WAIT_INVOKE) || (state_q == C_WAIT_RSP_FINISH);
  assign active   = cmd_sel;

  // ---------------------------------------------------------------- controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= C_RESET;
      otype_q <= '0; key_q <= '0; ivc_q <= '0;
      code_base_q <= '0; code_len_q <= '0; sec_base_q <= '0; sec_len_q <= '0;
      for (int i = 0; i < NBLK; i++) data_q[i] <= '0;
      for (int i = 0; i < LINES; i++) begin ltag_q[i] <= '0; valid_q[i] <= 1'b0; dirty_q[i] <= 1'b0; end
      op_line_q <= '0; op_addr_q <= '0; op_taddr_q <= '0; exiting_q <= 1'b0; ph_q <= '0;
      iss_q <= '0; rcv_q <= '0; pushed_q <= '0; outb_q <= '0; wr_q <= '0;
      ativ_q <= '0; asm_q <= '0; wbuf_q <= '0; asm_full_q <= 1'b0; wbuf_cnt_q <= '0;
      outst_q <= '0; fl_q <= '0; scan_q <= '0; hit_rsp_q <= '0;
      inv_ack <= 1'b0; tag_error <= 1'b0;
      ev_hit <= 1'b0; ev_bypass <= 1'b0; ev_readline <= 1'b0; ev_writeback <= 1'b0; ev_flush <= 1'b0;
    end else begin
      inv_ack <= 1'b0; tag_error <= 1'b0;
      ev_hit <= 1'b0; ev_bypass <= 1'b0; ev_readline <= 1'b0; ev_writeback <= 1'b0; ev_flush <= 1'b0;
      hit_rsp_q <= '0;
      outst_q <= outst_q + 16'(cmd_fire) - 16'(mem_rsp.valid);

      // a hit: answer next clock; data cache writes update the line
      if (serve) begin
        ev_hit <= 1'b1;
        hit_rsp_q.valid <= 1'b1;
        hit_rsp_q.rdata <= cpu_cmd.we ? 32'd0 : c_rdata;
        if (IS_DCACHE && cpu_cmd.we) begin
          data_q[{c_line, c_word[$clog2(NW)-1:2]}][127 - 32*c_word[1:0] -: 32] <=
            merge(c_rdata, cpu_cmd.wdata, cpu_cmd.wmask);
          dirty_q[c_line] <= 1'b1;
        end
      end

      unique case (state_q)
        C_RESET: state_q <= C_WAIT_INVOKE;

        C_WAIT_INVOKE: if (inv_valid) begin
          otype_q <= inv_otype; key_q <= inv_key; ivc_q <= inv_iv_count;
          code_base_q <= inv_code_base; code_len_q <= inv_code_len;
          sec_base_q  <= inv_sec_base;  sec_len_q  <= inv_sec_len;
          inv_ack <= 1'b1;
          state_q <= C_KEYLOAD;
        end

        C_KEYLOAD: state_q <= C_WAIT_RSP_START;

        C_WAIT_RSP_START:
          if (!pt_pending && dec_rsp.idle && (!IS_DCACHE || enc_rsp.idle)) state_q <= C_START_INVOKE;

        C_START_INVOKE: begin
          if (exit_now) begin
            exiting_q <= 1'b1;
            scan_q    <= '0;
            fl_q      <= '0;
            state_q   <= IS_DCACHE ? C_EXIT_WB : C_FLUSH;
          end else if (pcc_in && cpu_cmd.valid) begin
            if (!addr_in) begin
              if (cmd_fire) begin
                ev_bypass <= 1'b1;
                state_q   <= C_BYPASS;
              end
            end else if (!c_hit) begin
              op_line_q <= c_line;
              iss_q <= '0; rcv_q <= '0; pushed_q <= '0; outb_q <= '0; wr_q <= '0;
              asm_full_q <= 1'b0; wbuf_cnt_q <= '0; ph_q <= '0;
              if (IS_DCACHE && valid_q[c_line] && dirty_q[c_line]) begin
                exiting_q <= 1'b0;
                op_addr_q <= {ltag_q[c_line], c_line, {SB{1'b0}}};
                op_taddr_q <= tag_addr_of(sec_base_q, sec_len_q, {ltag_q[c_line], c_line, {SB{1'b0}}}, SB, ST);
                ev_writeback <= 1'b1;
                state_q <= C_WRITEBACK;
              end else begin
                op_addr_q  <= miss_batch;
                op_taddr_q <= tag_addr_of(sec_base_q, sec_len_q, miss_batch, SB, ST);
                ev_readline <= 1'b1;
                state_q <= C_READ_LINE;
              end
            end
          end
        end

        C_BYPASS: if (mem_rsp.valid) state_q <= C_START_INVOKE;

        C_READ_LINE: begin
          if (cmd_fire) iss_q <= iss_q + 16'd1;
          unique case (ph_q)
            3'd0: begin  // tag and IV
              if (mem_rsp.valid) begin
                ativ_q <= {ativ_q[223:0], mem_rsp.rdata};
                rcv_q  <= rcv_q + 16'd1;
                if (rcv_q == 16'd7) begin ph_q <= 3'd1; iss_q <= '0; rcv_q <= '0; end
              end
            end
            3'd1: if (dec_rsp.idle) ph_q <= 3'd2;
            3'd2: begin  // data through the decryption function
              if (mem_rsp.valid) begin
                asm_q <= {asm_q[95:0], mem_rsp.rdata};
                rcv_q <= rcv_q + 16'd1;
                if (rcv_q[1:0] == 2'd3) asm_full_q <= 1'b1;
              end
              if (dec_req.in_valid && dec_rsp.in_ready) begin
                asm_full_q <= 1'b0;
                pushed_q   <= pushed_q + 16'd1;
              end
              if (dec_rsp.out_valid) begin
                data_q[{op_line_q, outb_q[BW-IW-1:0]}] <= dec_rsp.out_data;
                outb_q <= outb_q + 16'd1;
              end
              if (dec_rsp.tag_valid && outb_q == 16'(NB)) begin
                if (dec_rsp.tag == ativ_q[255:128]) begin
                  valid_q[op_line_q] <= 1'b1;
                  dirty_q[op_line_q] <= 1'b0;
                  ltag_q[op_line_q]  <= op_addr_q[31 -: TAGW];
                  state_q <= C_REPEAT_RW;
                end else begin
                  tag_error <= 1'b1;
                  fl_q      <= '0;
                  state_q   <= C_FLUSH;
                end
              end
            end
            default: ph_q <= 3'd0;
          endcase
        end

        C_REPEAT_RW: state_q <= C_START_INVOKE;

        C_WRITEBACK: begin
          unique case (ph_q)
            3'd0: if (enc_rsp.idle) begin
              ivc_q <= ivc_q + 64'd1;
              ph_q  <= 3'd1;
            end
            3'd1: begin
              if (enc_req.in_valid && enc_rsp.in_ready) pushed_q <= pushed_q + 16'd1;
              if (enc_req.out_ready && enc_rsp.out_valid) begin
                wbuf_q     <= enc_rsp.out_data;
                wbuf_cnt_q <= 3'd4;
              end else if (cmd_fire) begin
                wbuf_q     <= {wbuf_q[95:0], 32'd0};
                wbuf_cnt_q <= wbuf_cnt_q - 3'd1;
                wr_q       <= wr_q + 16'd1;
              end
              if (wr_q == 16'(NW) && enc_rsp.tag_valid) begin
                ativ_q <= {enc_rsp.tag, 32'd0, FIXED_IV, ivc_q - 64'd1};
                iss_q  <= '0;
                ph_q   <= 3'd2;
              end
            end
            3'd2: if (cmd_fire) begin
              iss_q <= iss_q + 16'd1;
              if (iss_q == 16'd7) ph_q <= 3'd3;
            end
            3'd3: if (outst_q == 16'(mem_rsp.valid)) begin
              dirty_q[op_line_q] <= 1'b0;
              iss_q <= '0; rcv_q <= '0; pushed_q <= '0; outb_q <= '0;
              asm_full_q <= 1'b0; ph_q <= '0;
              if (exiting_q) begin
                state_q <= C_EXIT_WB;
              end else begin
                op_addr_q  <= miss_batch;
                op_taddr_q <= tag_addr_of(sec_base_q, sec_len_q, miss_batch, SB, ST);
                ev_readline <= 1'b1;
                state_q <= C_READ_LINE;
              end
            end
            default: ph_q <= 3'd0;
          endcase
        end

        C_EXIT_WB: begin
          if (scan_q == (IW+1)'(LINES)) state_q <= C_STORE_IV;
          else begin
            scan_q <= scan_q + 1'b1;
            if (valid_q[scan_q[IW-1:0]] && dirty_q[scan_q[IW-1:0]]) begin
              op_line_q  <= scan_q[IW-1:0];
              op_addr_q  <= {ltag_q[scan_q[IW-1:0]], scan_q[IW-1:0], {SB{1'b0}}};
              op_taddr_q <= tag_addr_of(sec_base_q, sec_len_q,
                                        {ltag_q[scan_q[IW-1:0]], scan_q[IW-1:0], {SB{1'b0}}}, SB, ST);
              pushed_q <= '0; wr_q <= '0; wbuf_cnt_q <= '0; ph_q <= '0;
              ev_writeback <= 1'b1;
              state_q <= C_WRITEBACK;
            end
          end
        end

        C_STORE_IV: if (kt_rsp.ack) begin
          fl_q    <= '0;
          state_q <= C_FLUSH;
        end

        C_FLUSH: begin
          data_q[fl_q[FW-1:2]][127 - 32*fl_q[1:0] -: 32] <= 32'd0;
          fl_q <= fl_q + 1'b1;
          if (fl_q == (FW+1)'(LINES * NW - 1)) begin
            for (int i = 0; i < LINES; i++) begin valid_q[i] <= 1'b0; dirty_q[i] <= 1'b0; end
            key_q    <= '0;
            ev_flush <= 1'b1;
            state_q  <= C_WAIT_RSP_FINISH;
          end
        end

        C_WAIT_RSP_FINISH:
          if (outst_q == 16'(mem_rsp.valid) && peer_idle) begin
            exiting_q <= 1'b0;
            state_q   <= C_WAIT_INVOKE;
          end

        default: state_q <= C_WAIT_INVOKE;
      endcase
    end
  end

  // The key of an enclave must never survive its exit.
  a_key_cleared: assert property (@(posedge clk) disable iff (!rst_n)
                                  (state_q == C_WAIT_INVOKE) |-> (key_q == '0 || $past(state_q) == C_WAIT_INVOKE));
  initial assert (LB >= LTIV && LB % 16 == 0 && LINES >= 2 && NW >= 4)
    else $error("enc_cache: unsupported geometry");
endmodule
