// widget: one Avalanche node's Widget with its Shared Buffer.
//
// The Widget sits on the workstation's Runway bus as a peer of the
// processors and connects the node to the network. This top wires the
// subsystems of the Widget block diagram together:
//   rim           Runway bus master, Taxiway, coherency response merge,
//                 diff/splice
//   sbm           Shared Buffer bus arbitration and line allocation
//   shared_buffer 256 KB SRAM (2K x 128-byte lines)
//   smcc + meta_cache (2-way, 16 KB)   shared memory cache controller
//   dc   + meta_cache (4-way, 16 KB)   directory controller
//   rsb           release state buffer (delayed write update)
//   mpcc          message passing cache controller
//   ni            network interface
// SB bus clients: 0 RIM, 1 SM-CC metadata, 2 DC metadata, 3 NI send, 4 NI
// receive. Line allocation clients: 0 SM-CC, 1 DC, 2 MP-CC, 3 PPE. RIM
// command clients: 0 SM-CC metadata, 1 SM-CC, 2 DC metadata, 3 DC, 4 MP-CC.
// Snoopers: 0 SM-CC, 1 MP-CC. SB lines 0-127 hold the SM-CC metadata cache,
// 128-255 the DC metadata cache, the rest are allocated on demand.
// The protocol processing engine is not part of this RTL: its SB line
// allocation port is brought out (ppe_*), as are the RSB's processor-side
// ports and the RIM splice port used to merge received updates. ev_* are
// single-cycle activity pulses for measurement. The node number and the
// shared region [sh_base, sh_limit) are boot-time inputs.
// Timing: the Taxiway lags the Runway by one cycle; SB reads return four
// cycles after the request (two of arbitration, two of SRAM read); memory
// latency is whatever the Runway side gives. Taken from the Avalanche
// description: the set of subsystems, the 256 KB SB of 2K 128-byte lines on a
// 64-bit bus, the 80-bit Runway and Taxiway, the four clients that may
// allocate SB lines, the metadata cache sizes and associativities, and four
// concurrent operations in the SM-CC and the DC. This design's own: client
// numbering, the split of the SB between metadata and transfer lines, the
// metadata base addresses in main memory and all bus and message formats.
module widget
  import avl_pkg::*;
#(
  parameter logic [PA_W-1:0] SMCC_MD_BASE = 32'h4000_0000,
  parameter logic [PA_W-1:0] DC_MD_BASE   = 32'h6000_0000,
  parameter logic [3:0]      CLIENT_ID    = 4'hE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NODE_W-1:0]    node_id,
  input  logic [PA_W-1:0]      sh_base,
  input  logic [PA_W-1:0]      sh_limit,
  // Runway
  input  runway_t              rw_in,
  output runway_t              rw_out,
  input  logic                 rw_ready,
  output logic                 coh_valid,
  output coh_resp_t            coh_resp,
  // network link
  output logic                 ltx_valid,
  output logic [DW-1:0]        ltx_data,
  input  logic                 ltx_ready,
  input  logic                 lrx_valid,
  input  logic [DW-1:0]        lrx_data,
  output logic                 lrx_ready,
  // PPE line allocation (PPE not implemented here)
  input  logic                 ppe_al_req,
  output logic                 ppe_al_gnt,
  output logic [SB_LINE_W-1:0] ppe_al_line,
  input  logic                 ppe_fr_req,
  input  logic [SB_LINE_W-1:0] ppe_fr_line,
  output logic                 ppe_fr_ack,
  // release state buffer, processor side
  input  logic                 acq_valid,
  output logic                 acq_ready,
  input  logic [PA_W-1:0]      acq_addr,
  input  logic [255:0]         acq_line,
  input  logic                 rel_req,
  output logic                 rel_done,
  output logic                 dirty_req,
  output logic [PA_W-1:0]      dirty_addr,
  input  logic                 dirty_valid,
  input  logic [255:0]         dirty_line,
  output logic                 upd_valid,
  input  logic                 upd_ready,
  output logic [PA_W-1:0]      upd_addr,
  output logic [7:0]           upd_mask,
  output logic [3:0]           upd_count,
  output logic [255:0]         upd_words,
  // RIM splice
  input  logic [255:0]         splice_base,
  input  logic [255:0]         splice_upd,
  input  logic [7:0]           splice_mask,
  output logic [255:0]         splice_out,
  // activity
  output logic                 ev_lsmsh,
  output logic                 ev_lsmsm,
  output logic                 ev_ldcm,
  output logic                 ev_rdcm,
  output logic                 ev_fwd,
  output logic                 ev_dc_supply,
  output logic                 ev_dc_invfwd,
  output logic                 ev_dc_md_miss,
  output logic                 ev_mp_supply,
  output logic                 ev_mp_evict,
  output logic                 ev_loopback,
  output logic [2:0]           smcc_busy,
  output logic [2:0]           dc_busy,
  output logic [SB_LINE_W:0]   sb_free_count
);
  localparam int unsigned KEY_W = 20;

  runway_t taxi;

  // SBM data clients
  logic    [4:0]     sb_req, sb_gnt, sb_rvalid;
  sb_req_t [4:0]     sb_rq;
  logic    [DW-1:0]  sb_rdata;
  logic              sram_en, sram_we;
  logic [SB_AW-1:0]  sram_addr;
  logic [DW-1:0]     sram_wdata, sram_rdata;

  // allocation clients
  logic [3:0] al_req, al_gnt, fr_req, fr_ack;
  logic [3:0][SB_LINE_W-1:0] fr_line;
  logic [SB_LINE_W-1:0] al_line;

  // RIM command clients
  logic     [4:0] rc_req, rc_ack, rc_done;
  rim_cmd_t [4:0] rc;

  // snoopers
  logic      [1:0] snp_valid;
  coh_resp_t [1:0] snp_resp;

  // NI
  logic [1:0] ntx_req, ntx_done;
  msg_t [1:0] ntx_msg;
  logic [1:0][SB_LINE_W-1:0] ntx_line;
  msg_t rx_msg;
  logic smcc_rx_valid, dc_rx_valid, mpcc_rx_valid;
  logic [SB_LINE_W-1:0] rcv_line;
  logic rcv_valid;

  // metadata ports
  logic sm_md_req, sm_md_we, sm_md_probe, sm_md_hit, sm_md_done;
  logic [KEY_W-1:0] sm_md_key;
  logic [DW-1:0] sm_md_wdata, sm_md_rdata;
  logic dc_md_req, dc_md_we, dc_md_probe, dc_md_hit, dc_md_done;
  logic [KEY_W-1:0] dc_md_key;
  logic [2*DW-1:0] dc_md_wdata, dc_md_rdata;

  logic [255:0] diff_clean, diff_dirty;
  logic [7:0]   diff_mask;

  rim #(.N_CMD(5), .N_SNOOP(2), .CLIENT_ID(CLIENT_ID)) u_rim (
    .clk, .rst_n, .rw_in, .rw_out, .rw_ready, .taxi,
    .snp_valid, .snp_resp, .coh_valid, .coh_resp,
    .cmd_req(rc_req), .cmd(rc), .cmd_ack(rc_ack), .cmd_done(rc_done),
    .sb_req(sb_req[0]), .sb_out(sb_rq[0]), .sb_gnt(sb_gnt[0]), .sb_rvalid(sb_rvalid[0]),
    .sb_rdata(sb_rdata),
    .diff_clean, .diff_dirty, .diff_mask, .splice_base, .splice_upd, .splice_mask, .splice_out);

  sbm #(.N_CLIENTS(5), .N_ALLOC(4), .LINES(2048), .RESERVED(256)) u_sbm (
    .clk, .rst_n, .req(sb_req), .sbreq(sb_rq), .gnt(sb_gnt), .rvalid(sb_rvalid), .rdata(sb_rdata),
    .alloc_req(al_req), .alloc_gnt(al_gnt), .alloc_line(al_line),
    .free_req(fr_req), .free_line(fr_line), .free_ack(fr_ack), .free_count(sb_free_count),
    .sb_en(sram_en), .sb_we(sram_we), .sb_addr(sram_addr), .sb_wdata(sram_wdata),
    .sb_rdata(sram_rdata));

  shared_buffer #(.DEPTH(32768)) u_sb (
    .clk, .en(sram_en), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));

  meta_cache #(.WAYS(2), .SIZE_BYTES(16384), .LINE_BYTES(32), .REC_BEATS(1), .KEY_W(KEY_W),
               .SB_BASE(15'd0), .MEM_BASE(SMCC_MD_BASE)) u_sm_md (
    .clk, .rst_n, .lk_req(sm_md_req), .lk_we(sm_md_we), .lk_key(sm_md_key),
    .lk_wdata(sm_md_wdata), .lk_probe(sm_md_probe), .lk_hit(sm_md_hit), .lk_done(sm_md_done),
    .lk_rdata(sm_md_rdata),
    .sb_req(sb_req[1]), .sb_out(sb_rq[1]), .sb_gnt(sb_gnt[1]), .sb_rvalid(sb_rvalid[1]),
    .sb_rdata(sb_rdata),
    .rim_req(rc_req[0]), .rim_cmd(rc[0]), .rim_ack(rc_ack[0]), .rim_done(rc_done[0]));

  meta_cache #(.WAYS(4), .SIZE_BYTES(16384), .LINE_BYTES(32), .REC_BEATS(2), .KEY_W(KEY_W),
               .SB_BASE(15'd2048), .MEM_BASE(DC_MD_BASE)) u_dc_md (
    .clk, .rst_n, .lk_req(dc_md_req), .lk_we(dc_md_we), .lk_key(dc_md_key),
    .lk_wdata(dc_md_wdata), .lk_probe(dc_md_probe), .lk_hit(dc_md_hit), .lk_done(dc_md_done),
    .lk_rdata(dc_md_rdata),
    .sb_req(sb_req[2]), .sb_out(sb_rq[2]), .sb_gnt(sb_gnt[2]), .sb_rvalid(sb_rvalid[2]),
    .sb_rdata(sb_rdata),
    .rim_req(rc_req[2]), .rim_cmd(rc[2]), .rim_ack(rc_ack[2]), .rim_done(rc_done[2]));

  smcc #(.N_SLOTS(4), .KEY_W(KEY_W)) u_smcc (
    .clk, .rst_n, .node_id, .sh_base, .sh_limit, .taxi,
    .snp_valid(snp_valid[0]), .snp_resp(snp_resp[0]),
    .md_req(sm_md_req), .md_we(sm_md_we), .md_key(sm_md_key), .md_wdata(sm_md_wdata),
    .md_probe(sm_md_probe), .md_hit(sm_md_hit), .md_done(sm_md_done), .md_rdata(sm_md_rdata),
    .rim_req(rc_req[1]), .rim_cmd(rc[1]), .rim_ack(rc_ack[1]), .rim_done(rc_done[1]),
    .al_req(al_req[0]), .al_gnt(al_gnt[0]), .al_line(al_line),
    .fr_req(fr_req[0]), .fr_line(fr_line[0]), .fr_ack(fr_ack[0]),
    .tx_req(ntx_req[0]), .tx_msg(ntx_msg[0]), .tx_line(ntx_line[0]), .tx_done(ntx_done[0]),
    .rx_valid(smcc_rx_valid), .rx_msg,
    .ev_lsmsh, .ev_lsmsm, .ev_ldcm, .ev_rdcm, .ev_fwd, .busy_slots(smcc_busy));

  dc #(.N_SLOTS(4), .KEY_W(KEY_W), .NODES(64)) u_dc (
    .clk, .rst_n, .node_id, .sh_base, .rx_valid(dc_rx_valid), .rx_msg,
    .md_req(dc_md_req), .md_we(dc_md_we), .md_key(dc_md_key), .md_wdata(dc_md_wdata),
    .md_probe(dc_md_probe), .md_hit(dc_md_hit), .md_done(dc_md_done), .md_rdata(dc_md_rdata),
    .rim_req(rc_req[3]), .rim_cmd(rc[3]), .rim_ack(rc_ack[3]), .rim_done(rc_done[3]),
    .al_req(al_req[1]), .al_gnt(al_gnt[1]), .al_line(al_line),
    .fr_req(fr_req[1]), .fr_line(fr_line[1]), .fr_ack(fr_ack[1]),
    .tx_req(ntx_req[1]), .tx_msg(ntx_msg[1]), .tx_line(ntx_line[1]), .tx_done(ntx_done[1]),
    .ev_supply(ev_dc_supply), .ev_invfwd(ev_dc_invfwd), .ev_md_miss(ev_dc_md_miss), .busy_slots(dc_busy));

  mpcc #(.ENTRIES(8)) u_mpcc (
    .clk, .rst_n, .taxi, .snp_valid(snp_valid[1]), .snp_resp(snp_resp[1]),
    .rx_valid(mpcc_rx_valid), .rx_msg, .rcv_line, .rcv_valid,
    .al_req(al_req[2]), .al_gnt(al_gnt[2]), .al_line(al_line),
    .fr_req(fr_req[2]), .fr_line(fr_line[2]), .fr_ack(fr_ack[2]),
    .rim_req(rc_req[4]), .rim_cmd(rc[4]), .rim_ack(rc_ack[4]), .rim_done(rc_done[4]),
    .ev_supply(ev_mp_supply), .ev_evict(ev_mp_evict));

  ni #(.N_TX(2)) u_ni (
    .clk, .rst_n, .node_id, .ltx_valid, .ltx_data, .ltx_ready, .lrx_valid, .lrx_data, .lrx_ready,
    .tx_req(ntx_req), .tx_msg(ntx_msg), .tx_line(ntx_line), .tx_done(ntx_done),
    .rx_msg, .smcc_rx_valid, .dc_rx_valid, .mpcc_rx_valid, .rcv_line, .rcv_valid,
    .sbt_req(sb_req[3]), .sbt_out(sb_rq[3]), .sbt_gnt(sb_gnt[3]), .sbt_rvalid(sb_rvalid[3]),
    .sbt_rdata(sb_rdata),
    .sbr_req(sb_req[4]), .sbr_out(sb_rq[4]), .sbr_gnt(sb_gnt[4]), .ev_loopback);

  rsb #(.ENTRIES(4)) u_rsb (
    .clk, .rst_n, .acq_valid, .acq_ready, .acq_addr, .acq_line, .rel_req, .rel_done,
    .dirty_req, .dirty_addr, .dirty_valid, .dirty_line, .diff_clean, .diff_dirty, .diff_mask,
    .upd_valid, .upd_ready, .upd_addr, .upd_mask, .upd_count, .upd_words);

  // PPE allocation port
  assign al_req[3]   = ppe_al_req;
  assign ppe_al_gnt  = al_gnt[3];
  assign ppe_al_line = al_line;
  assign fr_req[3]   = ppe_fr_req;
  assign fr_line[3]  = ppe_fr_line;
  assign ppe_fr_ack  = fr_ack[3];
endmodule
