// cheri_crypt_top: transparent memory encryption engine for a 32-bit
// CHERI-RISC-V pipeline. It sits between the pipeline's instruction and data
// buses and the memory interconnect, and is driven by two memory-stage
// instructions:
//  - CSealEncrypt (seal_*): seals a capability and, if its encryption
//    permission is set, encrypts the memory behind it in place with AES-GCM,
//    one batch at a time, storing a tag and IV per batch at the top of the
//    capability and shrinking its length to the data (seal_ctrl, seal_rw,
//    key_table, shared encryption function);
//  - CInvokeEncrypt (inv_*): after the usual checks, loads the enclave's key
//    and bounds into the instruction and data encryption caches, which then
//    take over both buses. Enclave fetches and data accesses are served from
//    decrypted cachelines; accesses outside the enclave pass through
//    unencrypted; when the fetch PCC leaves the enclave code the caches write
//    back dirty lines, store NextIVCount, flush and hand the buses back.
//
// The pipeline is stalled (stall) while either instruction runs. A failed tag
// check on any decrypted line raises tag_error (an exception for the
// pipeline) and flushes every key in the key table.
//
// Blocks and connections follow the document's outline design: bus control
// selectors on both buses, instruction and data caches, AES control selector,
// AES core (one encryption and two decryption functions), CSealEncrypt
// read/write unit, key generation and management, and the two instruction
// controls. The pipeline, the CHERI memory tagger and the interconnect with
// its RAM are outside this module: their signals are the ports below.
// Bus and capability formats are defined in cc_pkg.
module cheri_crypt_top #(
  parameter int          LB       = 32,            // batch length in bytes (document: 32)
  parameter int          LTIV     = 32,            // tag + IV bytes per batch (document: 32)
  parameter int          LINES    = 4,             // lines per cache (document: 4)
  parameter int          ENCLAVES = 3,             // key table entries (document: 3)
  parameter logic [31:0] FIXED_IV = 32'hC4E1_0001  // fixed IV field (value not given)
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch stage: instruction bus and PCC
  input  cc_pkg::bus_cmd_t  ibus_cpu_cmd,
  output logic              ibus_cpu_cmd_ready,
  output cc_pkg::bus_rsp_t  ibus_cpu_rsp,
  input  logic [31:0]       fetch_pcc,
  // instruction bus to the interconnect
  output cc_pkg::bus_cmd_t  ibus_mem_cmd,
  input  logic              ibus_mem_cmd_ready,
  input  cc_pkg::bus_rsp_t  ibus_mem_rsp,
  // memory stage (through the memory tagger): data bus
  input  cc_pkg::bus_cmd_t  dbus_cpu_cmd,
  output logic              dbus_cpu_cmd_ready,
  output cc_pkg::bus_rsp_t  dbus_cpu_rsp,
  // data bus to the interconnect
  output cc_pkg::bus_cmd_t  dbus_mem_cmd,
  input  logic              dbus_mem_cmd_ready,
  input  cc_pkg::bus_rsp_t  dbus_mem_rsp,
  // CSealEncrypt
  input  logic              seal_start,
  input  cc_pkg::cap_t      seal_cap,
  input  cc_pkg::cap_t      seal_sealing_cap,
  output logic              seal_done,
  output logic              seal_exc,
  output cc_pkg::cap_t      seal_result,
  // CInvokeEncrypt
  input  logic              inv_start,
  input  cc_pkg::cap_t      inv_code_cap,
  input  cc_pkg::cap_t      inv_data_cap,
  output logic              inv_done,
  output logic              inv_exc,
  // status
  output logic              stall,
  output logic              tag_error,
  output logic              enclave_active
);
  import cc_pkg::*;

  // ---------------------------------------------------------------- nets
  // instruction bus
  bus_cmd_t i_cache_cmd, i_cmem_cmd, i_seal_cmd;
  bus_rsp_t i_cache_rsp, i_cmem_rsp, i_seal_rsp;
  logic     i_cache_cmd_ready, i_cmem_cmd_ready, i_seal_cmd_ready;
  logic     i_cmd_sel, i_rsp_sel, i_pt_pending;
  // data bus
  bus_cmd_t d_cache_cmd, d_cmem_cmd, d_seal_cmd;
  bus_rsp_t d_cache_rsp, d_cmem_rsp, d_seal_rsp;
  logic     d_cache_cmd_ready, d_cmem_cmd_ready, d_seal_cmd_ready;
  logic     d_cmd_sel, d_rsp_sel, d_pt_pending;
  // AES core
  gcm_req_t enc_req, seal_enc_req, cache_enc_req, ic_enc_req;
  gcm_rsp_t enc_rsp, seal_enc_rsp, cache_enc_rsp;
  gcm_req_t dec_req [2];
  gcm_rsp_t dec_rsp [2];
  logic     d_enc_own, i_enc_own;
  // key table: port 0 CSealEncrypt, port 1 CInvokeEncrypt, port 2 data cache
  kt_req_t  kt_req [3];
  kt_rsp_t  kt_rsp [3];
  kt_req_t  ic_kt_req;
  // seal
  logic         seal_sel, seal_busy;
  logic         rw_start, rw_load_key, rw_done;
  logic [127:0] rw_key;
  logic [31:0]  rw_batch_addr, rw_tag_addr;
  logic [63:0]  rw_iv_count;
  // invoke
  logic         inv_busy, inv_valid, inv_ack_i, inv_ack_d;
  logic [11:0]  inv_otype;
  logic [127:0] inv_key;
  logic [63:0]  inv_iv_count;
  logic [31:0]  inv_code_base, inv_code_len, inv_data_base, inv_data_len;
  // caches
  logic i_idle, d_idle, i_active, d_active, i_tag_error, d_tag_error;
  logic i_ev_hit, i_ev_bypass, i_ev_readline, i_ev_writeback, i_ev_flush;
  logic d_ev_hit, d_ev_bypass, d_ev_readline, d_ev_writeback, d_ev_flush;

  // ---------------------------------------------------------------- bus selectors
  bus_cntrl_selector u_ibus_sel (
    .clk, .rst_n, .cmd_sel(i_cmd_sel), .rsp_sel(i_rsp_sel), .seal_sel(1'b0), .pt_pending(i_pt_pending),
    .cpu_cmd(ibus_cpu_cmd), .cpu_cmd_ready(ibus_cpu_cmd_ready), .cpu_rsp(ibus_cpu_rsp),
    .mem_cmd(ibus_mem_cmd), .mem_cmd_ready(ibus_mem_cmd_ready), .mem_rsp(ibus_mem_rsp),
    .cache_cmd(i_cache_cmd), .cache_cmd_ready(i_cache_cmd_ready), .cache_rsp(i_cache_rsp),
    .cmem_cmd(i_cmem_cmd), .cmem_cmd_ready(i_cmem_cmd_ready), .cmem_rsp(i_cmem_rsp),
    .seal_cmd(i_seal_cmd), .seal_cmd_ready(i_seal_cmd_ready), .seal_rsp(i_seal_rsp));
  assign i_seal_cmd = '0;

  bus_cntrl_selector u_dbus_sel (
    .clk, .rst_n, .cmd_sel(d_cmd_sel), .rsp_sel(d_rsp_sel), .seal_sel(seal_sel), .pt_pending(d_pt_pending),
    .cpu_cmd(dbus_cpu_cmd), .cpu_cmd_ready(dbus_cpu_cmd_ready), .cpu_rsp(dbus_cpu_rsp),
    .mem_cmd(dbus_mem_cmd), .mem_cmd_ready(dbus_mem_cmd_ready), .mem_rsp(dbus_mem_rsp),
    .cache_cmd(d_cache_cmd), .cache_cmd_ready(d_cache_cmd_ready), .cache_rsp(d_cache_rsp),
    .cmem_cmd(d_cmem_cmd), .cmem_cmd_ready(d_cmem_cmd_ready), .cmem_rsp(d_cmem_rsp),
    .seal_cmd(d_seal_cmd), .seal_cmd_ready(d_seal_cmd_ready), .seal_rsp(d_seal_rsp));

  // ---------------------------------------------------------------- AES
  aes_cntrl_selector u_aes_sel (
    .cache_sel(d_enc_own), .seal_req(seal_enc_req), .seal_rsp(seal_enc_rsp),
    .cache_req(cache_enc_req), .cache_rsp(cache_enc_rsp), .enc_req, .enc_rsp);

  aes_core u_aes (.clk, .rst_n, .enc_req, .enc_rsp, .dec_req, .dec_rsp);

  // ---------------------------------------------------------------- key generation and management
  key_table #(.ENTRIES(ENCLAVES), .NPORTS(3)) u_keys (
    .clk, .rst_n, .req(kt_req), .rsp(kt_rsp), .flush(tag_error));

  // ---------------------------------------------------------------- CSealEncrypt
  seal_ctrl #(.LB(LB), .LTIV(LTIV)) u_seal_ctrl (
    .clk, .rst_n, .start(seal_start), .cap(seal_cap), .sealing_cap(seal_sealing_cap),
    .done(seal_done), .exc(seal_exc), .busy(seal_busy), .result(seal_result),
    .kt_req(kt_req[0]), .kt_rsp(kt_rsp[0]), .seal_sel, .pt_pending(d_pt_pending),
    .rw_start, .rw_load_key, .rw_key, .rw_batch_addr, .rw_tag_addr, .rw_iv_count, .rw_done);

  seal_rw #(.LB(LB), .FIXED_IV(FIXED_IV)) u_seal_rw (
    .clk, .rst_n, .start(rw_start), .load_key(rw_load_key), .key(rw_key),
    .batch_addr(rw_batch_addr), .tag_addr(rw_tag_addr), .iv_count(rw_iv_count), .done(rw_done),
    .cmd(d_seal_cmd), .cmd_ready(d_seal_cmd_ready), .rsp(d_seal_rsp),
    .enc_req(seal_enc_req), .enc_rsp(seal_enc_rsp));

  // ---------------------------------------------------------------- CInvokeEncrypt
  invoke_ctrl u_inv_ctrl (
    .clk, .rst_n, .start(inv_start), .code_cap(inv_code_cap), .data_cap(inv_data_cap),
    .done(inv_done), .exc(inv_exc), .busy(inv_busy), .kt_req(kt_req[1]), .kt_rsp(kt_rsp[1]),
    .inv_valid, .inv_otype, .inv_key, .inv_iv_count, .inv_code_base, .inv_code_len,
    .inv_data_base, .inv_data_len, .inv_ack_i, .inv_ack_d);

  // ---------------------------------------------------------------- caches
  enc_cache #(.IS_DCACHE(1'b0), .LINES(LINES), .LB(LB), .LTIV(LTIV), .FIXED_IV(FIXED_IV)) u_icache (
    .clk, .rst_n,
    .inv_valid, .inv_otype, .inv_key, .inv_iv_count, .inv_code_base, .inv_code_len,
    .inv_sec_base(inv_code_base), .inv_sec_len(inv_code_len), .inv_ack(inv_ack_i),
    .pcc(fetch_pcc),
    .cpu_cmd(i_cache_cmd), .cpu_cmd_ready(i_cache_cmd_ready), .cpu_rsp(i_cache_rsp),
    .mem_cmd(i_cmem_cmd), .mem_cmd_ready(i_cmem_cmd_ready), .mem_rsp(i_cmem_rsp),
    .cmd_sel(i_cmd_sel), .rsp_sel(i_rsp_sel), .pt_pending(i_pt_pending),
    .dec_req(dec_req[0]), .dec_rsp(dec_rsp[0]), .enc_req(ic_enc_req), .enc_rsp('0), .enc_own(i_enc_own),
    .kt_req(ic_kt_req), .kt_rsp('0), .peer_idle(d_idle), .idle(i_idle), .active(i_active),
    .tag_error(i_tag_error), .ev_hit(i_ev_hit), .ev_bypass(i_ev_bypass), .ev_readline(i_ev_readline),
    .ev_writeback(i_ev_writeback), .ev_flush(i_ev_flush));

  enc_cache #(.IS_DCACHE(1'b1), .LINES(LINES), .LB(LB), .LTIV(LTIV), .FIXED_IV(FIXED_IV)) u_dcache (
    .clk, .rst_n,
    .inv_valid, .inv_otype, .inv_key, .inv_iv_count, .inv_code_base, .inv_code_len,
    .inv_sec_base(inv_data_base), .inv_sec_len(inv_data_len), .inv_ack(inv_ack_d),
    .pcc(fetch_pcc),
    .cpu_cmd(d_cache_cmd), .cpu_cmd_ready(d_cache_cmd_ready), .cpu_rsp(d_cache_rsp),
    .mem_cmd(d_cmem_cmd), .mem_cmd_ready(d_cmem_cmd_ready), .mem_rsp(d_cmem_rsp),
    .cmd_sel(d_cmd_sel), .rsp_sel(d_rsp_sel), .pt_pending(d_pt_pending),
    .dec_req(dec_req[1]), .dec_rsp(dec_rsp[1]), .enc_req(cache_enc_req), .enc_rsp(cache_enc_rsp),
    .enc_own(d_enc_own), .kt_req(kt_req[2]), .kt_rsp(kt_rsp[2]), .peer_idle(1'b1), .idle(d_idle),
    .active(d_active), .tag_error(d_tag_error), .ev_hit(d_ev_hit), .ev_bypass(d_ev_bypass),
    .ev_readline(d_ev_readline), .ev_writeback(d_ev_writeback), .ev_flush(d_ev_flush));

  // ---------------------------------------------------------------- status
  assign stall          = seal_busy || inv_busy;
  assign tag_error      = i_tag_error || d_tag_error;
  assign enclave_active = i_active || d_active;
endmodule
