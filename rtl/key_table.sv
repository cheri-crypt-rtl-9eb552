// key_table: key generation and management unit, a table of per-enclave keys
// held away from addressable memory, together with its key generator.
//
// Each entry holds {used, otype, key, NextIVCount, usedCounter}. Commands
// (cc_pkg::kt_req_t, one requester port each, lowest port first):
//  - KT_GET (CInvokeEncrypt): returns the key and NextIVCount of the otype;
//    hit=0 if the otype has no key.
//  - KT_GEN (CSealEncrypt): if the otype has a key that has been used once,
//    returns it with its NextIVCount and counts the second use. If the otype
//    has no key, or its key has already been used twice, a new key is
//    requested from the generator, stored with NextIVCount reset to zero and
//    usedCounter = 1, and returned. A key therefore serves exactly one
//    code/data capability pair.
//  - KT_STORE (end of CSealEncrypt, enclave exit): stores NextIVCount.
// flush (a failed tag check) clears every entry.
//
// The commands and the table fields follow the document. When the table is
// full a new otype replaces the first entry whose pair is complete
// (usedCounter = 2), else entries in turn; the document does not say.
//
// Interface: a request is held until its one-cycle ack. Timing: GET, STORE and
// a GEN that finds a once-used key take 3 clocks; a GEN that generates takes
// 3 clocks plus the generator's 36.
module key_table #(
  parameter int ENTRIES = 3,   // enclaves the table can hold (document: 3)
  parameter int NPORTS  = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cc_pkg::kt_req_t   req [NPORTS],
  output cc_pkg::kt_rsp_t   rsp [NPORTS],
  input  logic              flush
);
  import cc_pkg::*;

  typedef struct packed {
    logic         used;
    logic [11:0]  otype;
    logic [127:0] key;
    logic [63:0]  next_iv;
    logic [1:0]   used_cnt;
  } entry_t;

  localparam int IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam int PW = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  typedef enum logic [1:0] { T_IDLE, T_LOOKUP, T_GEN, T_ACK } tstate_e;
  tstate_e state_q;

  entry_t         tab_q [ENTRIES];
  logic [PW-1:0]  port_q;
  kt_req_t        cur_q;
  logic           match, free_found, done_found;
  logic [IW-1:0]  match_idx, free_idx, done_idx, rr_q, dest_idx;
  logic           gen_req, gen_ack;
  logic [127:0]   gen_key;
  kt_rsp_t        rsp_q;

  drbg_keygen u_gen (.clk, .rst_n, .req(gen_req), .otype(cur_q.otype), .ack(gen_ack), .key(gen_key));
  assign gen_req = (state_q == T_GEN);

  always_comb begin
    match = 1'b0; match_idx = '0;
    free_found = 1'b0; free_idx = '0;
    done_found = 1'b0; done_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (tab_q[i].used && tab_q[i].otype == cur_q.otype) begin match = 1'b1; match_idx = IW'(i); end
      if (!tab_q[i].used) begin free_found = 1'b1; free_idx = IW'(i); end
      if (tab_q[i].used && tab_q[i].used_cnt >= 2'd2) begin done_found = 1'b1; done_idx = IW'(i); end
    end
    dest_idx = match ? match_idx : free_found ? free_idx : done_found ? done_idx : rr_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= T_IDLE; port_q <= '0; cur_q <= '0; rr_q <= '0; rsp_q <= '0;
      for (int i = 0; i < ENTRIES; i++) tab_q[i] <= '0;
    end else begin
      rsp_q.ack <= 1'b0;
      unique case (state_q)
        T_IDLE: begin
          for (int p = NPORTS - 1; p >= 0; p--)
            if (req[p].valid) begin
              port_q <= PW'(p);
              cur_q  <= req[p];
            end
          for (int p = 0; p < NPORTS; p++)
            if (req[p].valid) state_q <= T_LOOKUP;
        end
        T_LOOKUP: begin
          rsp_q.hit      <= match;
          rsp_q.key      <= tab_q[match_idx].key;
          rsp_q.iv_count <= tab_q[match_idx].next_iv;
          unique case (cur_q.cmd)
            KT_GET: begin
              rsp_q.ack <= 1'b1;
              state_q   <= T_ACK;
            end
            KT_STORE: begin
              if (match) tab_q[match_idx].next_iv <= cur_q.iv_count;
              rsp_q.ack <= 1'b1;
              state_q   <= T_ACK;
            end
            default: begin  // KT_GEN
              if (match && tab_q[match_idx].used_cnt == 2'd1) begin
                tab_q[match_idx].used_cnt <= 2'd2;
                rsp_q.ack <= 1'b1;
                state_q   <= T_ACK;
              end else state_q <= T_GEN;
            end
          endcase
        end
        T_GEN: if (gen_ack) begin
          tab_q[dest_idx] <= '{used: 1'b1, otype: cur_q.otype, key: gen_key, next_iv: '0, used_cnt: 2'd1};
          if (!match && !free_found && !done_found)
            rr_q <= (rr_q == IW'(ENTRIES - 1)) ? '0 : rr_q + 1'b1;
          rsp_q.hit      <= 1'b1;
          rsp_q.key      <= gen_key;
          rsp_q.iv_count <= '0;
          rsp_q.ack      <= 1'b1;
          state_q        <= T_ACK;
        end
        T_ACK: state_q <= T_IDLE;  // requester drops valid after the ack
        default: state_q <= T_IDLE;
      endcase
      if (flush)
        for (int i = 0; i < ENTRIES; i++) tab_q[i].used <= 1'b0;
    end
  end

  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      rsp[p]     = rsp_q;
      rsp[p].ack = rsp_q.ack && (port_q == PW'(p));
    end
endmodule
