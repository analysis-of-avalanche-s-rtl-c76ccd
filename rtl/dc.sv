// dc: Directory Controller (DC).
//
// The DC keeps the global state of every shared block whose home is this
// node. Each block has a two-doubleword record in the DC's metadata cache:
// bits [1:0] global state (free, shared, exclusive), [7:2] owner node and
// [NODES+7:8] the copyset, one bit per node holding a copy. MT_REQ messages
// from SM-CCs (the local one included) wait in a four-entry queue and are
// served by up to N_SLOTS concurrent slots:
//   block free (home memory holds it)  an SB line is allocated, the block is
//       flushed out of local caches and memory into it through the RIM, and
//       sent to the requester as MT_DATA
//   block exclusive at another node   MT_INV_FWD goes to the owner, which
//       invalidates its copy and forwards the block straight to the requester
// Either way the record is then written back with the requester as exclusive
// owner and only member of the copyset (migratory protocol). A request
// waits at the head of the queue while a slot is still serving the same
// block, so each one sees the record its predecessor wrote. Metadata
// lookups are serialised; RIM, line allocation and the NI send port are
// granted to the lowest-numbered slot that wants them. ev_* pulse once per
// request of each kind. The document gives the state kept per block, the
// invalidate-and-forward flow and the four concurrent operations; the record
// layout and sequencing are this design's.
module dc
  import avl_pkg::*;
#(
  parameter int unsigned N_SLOTS = 4,
  parameter int unsigned KEY_W   = 20,
  parameter int unsigned NODES   = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NODE_W-1:0]    node_id,
  input  logic [PA_W-1:0]      sh_base,
  // request messages
  input  logic                 rx_valid,
  input  msg_t                 rx_msg,
  // metadata cache
  output logic                 md_req,
  output logic                 md_we,
  output logic [KEY_W-1:0]     md_key,
  output logic [2*DW-1:0]      md_wdata,
  input  logic                 md_probe,
  input  logic                 md_hit,
  input  logic                 md_done,
  input  logic [2*DW-1:0]      md_rdata,
  // RIM
  output logic                 rim_req,
  output rim_cmd_t             rim_cmd,
  input  logic                 rim_ack,
  input  logic                 rim_done,
  // SB line allocation
  output logic                 al_req,
  input  logic                 al_gnt,
  input  logic [SB_LINE_W-1:0] al_line,
  output logic                 fr_req,
  output logic [SB_LINE_W-1:0] fr_line,
  input  logic                 fr_ack,
  // NI send port
  output logic                 tx_req,
  output msg_t                 tx_msg,
  output logic [SB_LINE_W-1:0] tx_line,
  input  logic                 tx_done,
  // activity
  output logic                 ev_supply,
  output logic                 ev_invfwd,
  output logic                 ev_md_miss,
  output logic [2:0]           busy_slots
);
  localparam int unsigned SW = $clog2(N_SLOTS);

  typedef enum logic [3:0] {
    S_FREE, S_LOOK, S_ALLOC, S_RD, S_TXD, S_TXI, S_MDW, S_FREEL, S_DONE
  } sstate_t;

  typedef struct packed {
    msg_t                 m;
    logic [2*DW-1:0]      rec;
    logic [SB_LINE_W-1:0] line;
    logic                 has_line;
  } slot_t;

  sstate_t st [N_SLOTS];
  slot_t   sl [N_SLOTS];

  msg_t       q [4];
  logic [2:0] q_n;
  logic       push, pop;

  assign push = rx_valid && rx_msg.mtype == MT_REQ;
  a_queue_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (q_n < 3'd4 || pop));

  typedef enum logic [1:0] {D_IDLE, D_MD, D_MDW} dstate_t;
  dstate_t       dst;
  logic [SW-1:0] dslot;
  logic          free_v, mdw_v;
  logic [SW-1:0] free_k, mdw_k;

  always_comb begin
    free_v = 1'b0; free_k = '0;
    mdw_v = 1'b0;  mdw_k = '0;
    for (int k = N_SLOTS - 1; k >= 0; k--) begin
      if (st[k] == S_FREE) begin free_v = 1'b1; free_k = SW'(k); end
      if (st[k] == S_MDW)  begin mdw_v = 1'b1;  mdw_k = SW'(k); end
    end
  end

  logic [PA_W-1:0] key_addr;
  assign key_addr = (dst == D_IDLE) ? {q[0].blk, 7'd0} - sh_base : {sl[dslot].m.blk, 7'd0} - sh_base;
  assign md_key   = key_addr[KEY_W+6:7];
  assign md_req   = (dst != D_IDLE);
  assign md_we    = (dst == D_MDW);
  assign md_wdata = sl[dslot].rec;

  // requests for one block are served one after the other
  logic blk_busy;
  always_comb begin
    blk_busy = 1'b0;
    for (int k = 0; k < N_SLOTS; k++)
      if (st[k] != S_FREE && sl[k].m.blk == q[0].blk) blk_busy = 1'b1;
  end
  assign pop      = (dst == D_IDLE) && !mdw_v && (q_n != 0) && free_v && !blk_busy;

  // shared ports
  logic          rim_busy, rim_acked, tx_busy;
  logic [SW-1:0] rim_own, tx_own;
  logic          rim_want_v, tx_want_v, al_want_v, fr_want_v;
  logic [SW-1:0] rim_want_k, tx_want_k, al_want_k, fr_want_k;

  always_comb begin
    rim_want_v = 1'b0; rim_want_k = '0;
    tx_want_v = 1'b0;  tx_want_k = '0;
    al_want_v = 1'b0;  al_want_k = '0;
    fr_want_v = 1'b0;  fr_want_k = '0;
    for (int k = N_SLOTS - 1; k >= 0; k--) begin
      if (st[k] == S_RD) begin rim_want_v = 1'b1; rim_want_k = SW'(k); end
      if (st[k] == S_TXD || st[k] == S_TXI) begin tx_want_v = 1'b1; tx_want_k = SW'(k); end
      if (st[k] == S_ALLOC) begin al_want_v = 1'b1; al_want_k = SW'(k); end
      if (st[k] == S_FREEL) begin fr_want_v = 1'b1; fr_want_k = SW'(k); end
    end
  end

  assign al_req  = al_want_v;
  assign fr_req  = fr_want_v;
  assign fr_line = sl[fr_want_k].line;
  assign rim_req = rim_busy && !rim_acked;

  always_comb begin
    rim_cmd = '0;
    rim_cmd.op = RC_FLUSH_RD;
    rim_cmd.addr = {sl[rim_own].m.blk, 7'd0};
    rim_cmd.sb_addr = {sl[rim_own].line, 4'd0};
    rim_cmd.beats = 5'd16;
  end

  always_comb begin
    slot_t s;
    s = sl[tx_own];
    tx_req  = tx_busy;
    tx_line = s.line;
    tx_msg  = s.m;
    tx_msg.src = node_id;
    if (st[tx_own] == S_TXI) begin
      tx_msg.mtype = MT_INV_FWD;
      tx_msg.dst = s.rec[7:2];
      tx_msg.has_data = 1'b0;
    end else begin
      tx_msg.mtype = MT_DATA;
      tx_msg.dst = s.m.req_node;
      tx_msg.has_data = 1'b1;
    end
  end

  always_comb begin
    busy_slots = '0;
    for (int k = 0; k < N_SLOTS; k++) if (st[k] != S_FREE) busy_slots = busy_slots + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_n <= '0;
      for (int i = 0; i < 4; i++) q[i] <= '0;
      dst <= D_IDLE;
      dslot <= '0;
      for (int k = 0; k < N_SLOTS; k++) begin
        st[k] <= S_FREE;
        sl[k] <= '0;
      end
      rim_busy <= 1'b0; rim_acked <= 1'b0; rim_own <= '0;
      tx_busy <= 1'b0;  tx_own <= '0;
      {ev_supply, ev_invfwd, ev_md_miss} <= '0;
    end else begin
      logic [2:0] n;
      {ev_supply, ev_invfwd, ev_md_miss} <= '0;
      n = q_n;
      if (pop) begin
        for (int i = 0; i < 3; i++) q[i] <= q[i+1];
        n = n - 1'b1;
      end
      if (push && n < 3'd4) begin q[n[1:0]] <= rx_msg; n = n + 1'b1; end
      q_n <= n;

      case (dst)
        D_IDLE: begin
          if (mdw_v) begin
            dslot <= mdw_k;
            dst <= D_MDW;
          end else if (pop) begin
            dslot <= free_k;
            sl[free_k].m <= q[0];
            sl[free_k].has_line <= 1'b0;
            st[free_k] <= S_LOOK;
            dst <= D_MD;
          end
        end
        D_MD: begin
          if (md_probe && !md_hit) ev_md_miss <= 1'b1;
          if (md_done) begin
            sl[dslot].rec <= md_rdata;
            dst <= D_IDLE;
            if (gstate_t'(md_rdata[1:0]) == GS_EXCLUSIVE && md_rdata[7:2] != sl[dslot].m.req_node) begin
              st[dslot] <= S_TXI;
              ev_invfwd <= 1'b1;
            end else begin
              st[dslot] <= S_ALLOC;
              ev_supply <= 1'b1;
            end
          end
        end
        D_MDW: if (md_done) begin
          st[dslot] <= sl[dslot].has_line ? S_FREEL : S_FREE;
          dst <= D_IDLE;
        end
        default: dst <= D_IDLE;
      endcase

      if (al_gnt) begin
        sl[al_want_k].line <= al_line;
        sl[al_want_k].has_line <= 1'b1;
        st[al_want_k] <= S_RD;
      end
      if (fr_ack) st[fr_want_k] <= S_FREE;

      if (!rim_busy && rim_want_v) begin
        rim_busy <= 1'b1;
        rim_own <= rim_want_k;
      end
      if (rim_ack) rim_acked <= 1'b1;
      if (rim_done) begin
        rim_busy <= 1'b0;
        rim_acked <= 1'b0;
        st[rim_own] <= S_TXD;
      end

      if (!tx_busy && tx_want_v) begin
        tx_busy <= 1'b1;
        tx_own <= tx_want_k;
      end
      if (tx_done) begin
        logic [2*DW-1:0] r;
        r = '0;
        r[1:0] = GS_EXCLUSIVE;
        r[7:2] = sl[tx_own].m.req_node;
        r[8 + int'(sl[tx_own].m.req_node)] = 1'b1;
        tx_busy <= 1'b0;
        sl[tx_own].rec <= r;
        st[tx_own] <= S_MDW;
      end
    end
  end
endmodule
