// smcc: Shared Memory Cache Controller (SM-CC).
//
// The SM-CC watches the Taxiway for coherent reads (RW_RD_SHAR, RW_RD_PRIV)
// by local processors and gives the Runway coherency response the bus
// protocol requires for every one of them, in bus order. Addresses outside the
// contiguous shared region [sh_base, sh_limit) are answered COH_OK at once.
// For a shared address it looks up the block's metadata record (bits [1:0]
// block state, [3:2] page protocol, [9:4] home node) in its metadata cache:
//   tag hit, block valid      COH_OK (exclusive) or COH_SHR (shared); memory
//                             supplies the line (LSMSH)
//   tag miss                  COH_CPY at once, before the record is known;
//                             if the block then proves valid, the SM-CC reads
//                             the 32-byte line from memory into an SB line and
//                             supplies it by cache-to-cache write (LSMSM)
//   block not valid           COH_CPY; an SB receive line is allocated and a
//                             request goes to the home node's DC (the local DC
//                             when this node is home: LDCM, otherwise RDCM).
//                             When the block arrives in the SB it is written
//                             to the local S-COMA page, the missed line is
//                             supplied by cache-to-cache write and the record
//                             is set exclusive (migratory protocol).
// An MT_INV_FWD message from a DC makes this node give up the block: it
// flushes the block out of the processor caches and memory into an SB line,
// sends it to the requesting node as MT_DATA and marks it invalid.
//
// Up to N_SLOTS (four) operations on different blocks are in progress at once;
// each slot runs its own sequence and they share the metadata cache, the RIM,
// the SB line allocator and the NI send port, each granted to the lowest-
// numbered slot that wants it. Metadata lookups for bus reads are done one at
// a time in arrival order, which keeps the coherency responses in bus order.
// Bus reads wait in a four-entry queue while all slots are busy, and the read
// at the head also waits while another slot is still working on the same
// block. Forwards from the network have a separate four-entry queue so that
// they never wait behind a stalled bus read (two nodes each waiting for the
// other's forward would otherwise lock up). An invalidate-and-forward can
// reach this node before the block it names has arrived; it then takes a free
// slot and holds there (SL_F_HOLD) until the other slot on that block is done,
// so it is never served from the stale page copy. ev_* pulse once per
// miss of each latency class. The document gives the responses, the miss
// classes, the four concurrent operations and the use of an SB metadata
// cache; the record layout, queue and slot sequencing are this design's.
// The S-COMA page of a block is taken to sit at the same physical address on
// every node, so no global-to-local translation is done here.
module smcc
  import avl_pkg::*;
#(
  parameter int unsigned N_SLOTS = 4,
  parameter int unsigned KEY_W   = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NODE_W-1:0]    node_id,
  input  logic [PA_W-1:0]      sh_base,
  input  logic [PA_W-1:0]      sh_limit,
  // Taxiway snoop and coherency response
  input  runway_t              taxi,
  output logic                 snp_valid,
  output coh_resp_t            snp_resp,
  // metadata cache
  output logic                 md_req,
  output logic                 md_we,
  output logic [KEY_W-1:0]     md_key,
  output logic [DW-1:0]        md_wdata,
  input  logic                 md_probe,
  input  logic                 md_hit,
  input  logic                 md_done,
  input  logic [DW-1:0]        md_rdata,
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
  // NI
  output logic                 tx_req,
  output msg_t                 tx_msg,
  output logic [SB_LINE_W-1:0] tx_line,
  input  logic                 tx_done,
  input  logic                 rx_valid,
  input  msg_t                 rx_msg,
  // miss classification
  output logic                 ev_lsmsh,
  output logic                 ev_lsmsm,
  output logic                 ev_ldcm,
  output logic                 ev_rdcm,
  output logic                 ev_fwd,
  output logic [2:0]           busy_slots
);
  localparam int unsigned SW = $clog2(N_SLOTS);

  typedef struct packed {
    logic              fwd;       // 1: INV_FWD from a DC, 0: processor snoop
    logic              priv;
    logic [PA_W-1:0]   addr;
    logic [3:0]        src;
    logic [7:0]        tag;
    logic [NODE_W-1:0] req_node;
    logic [SB_LINE_W-1:0] req_line;
    logic [1:0]        req_slot;
  } qent_t;

  typedef enum logic [3:0] {
    SL_FREE, SL_LOOK, SL_L_ALLOC, SL_L_RD, SL_L_C2C, SL_R_ALLOC, SL_R_TX, SL_R_WAIT, SL_R_MWR,
    SL_R_C2C, SL_F_ALLOC, SL_F_FLUSH, SL_F_TX, SL_MDW, SL_FREEL, SL_F_HOLD
  } sstate_t;

  typedef struct packed {
    qent_t             e;
    logic [DW-1:0]     rec;
    logic [SB_LINE_W-1:0] line;
  } slot_t;

  sstate_t st [N_SLOTS];
  slot_t   sl [N_SLOTS];

  // ---------------- request queue ----------------
  qent_t      q [4];
  logic [2:0] q_n;
  qent_t      in_snp, in_fwd;
  logic       push_snp, push_fwd, pop;
  qent_t      fq [4];      // forwards from the network
  logic [2:0] fq_n;
  logic       fpop;

  assign push_snp = (taxi.op == RW_RD_SHAR || taxi.op == RW_RD_PRIV);
  assign push_fwd = rx_valid && rx_msg.mtype == MT_INV_FWD;
  always_comb begin
    in_snp = '0;
    in_snp.priv = (taxi.op == RW_RD_PRIV);
    in_snp.addr = taxi.payload[PA_W-1:0];
    in_snp.src  = taxi.src;
    in_snp.tag  = taxi.tag;
    in_fwd = '0;
    in_fwd.fwd  = 1'b1;
    in_fwd.addr = {rx_msg.blk, 7'd0};
    in_fwd.req_node = rx_msg.req_node;
    in_fwd.req_line = rx_msg.sb_line;
    in_fwd.req_slot = rx_msg.slot;
    in_fwd.src  = 4'(rx_msg.sub);
  end

  a_queue_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (q_n + 3'(push_snp) - 3'(pop)) <= 3'd4);
  a_fwd_queue_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (fq_n + 3'(push_fwd) - 3'(fpop)) <= 3'd4);

  // ---------------- dispatcher ----------------
  typedef enum logic [1:0] {D_IDLE, D_MD, D_MDW} dstate_t;
  dstate_t          dst;
  qent_t            hd;
  logic [SW-1:0]    dslot;
  logic             free_v;
  logic [SW-1:0]    free_k;
  logic             mdw_v;
  logic [SW-1:0]    mdw_k;
  logic             probe_hit;
  logic             shared_hd;

  assign hd = q[0];

  // a request waits while another slot is still working on the same block
  logic blk_busy;
  always_comb begin
    blk_busy = 1'b0;
    for (int k = 0; k < N_SLOTS; k++)
      if (st[k] != SL_FREE && sl[k].e.addr[PA_W-1:7] == hd.addr[PA_W-1:7]) blk_busy = 1'b1;
  end
  // forward at the head of its queue meets a busy block; a held forward is
  // released once no other slot works on its block (lowest index first)
  logic            fwd_busy, hold_v;
  logic [SW-1:0]   hold_k;
  logic            other;
  always_comb begin
    fwd_busy = 1'b0;
    for (int k = 0; k < N_SLOTS; k++)
      if (st[k] != SL_FREE && sl[k].e.addr[PA_W-1:7] == fq[0].addr[PA_W-1:7]) fwd_busy = 1'b1;
    hold_v = 1'b0; hold_k = '0; other = 1'b0;
    for (int k = N_SLOTS-1; k >= 0; k--)
      if (st[k] == SL_F_HOLD) begin
        other = 1'b0;
        for (int j = 0; j < N_SLOTS; j++)
          if (j != k && st[j] != SL_FREE && st[j] != SL_F_HOLD &&
              sl[j].e.addr[PA_W-1:7] == sl[k].e.addr[PA_W-1:7]) other = 1'b1;
        if (!other) begin hold_v = 1'b1; hold_k = SW'(k); end
      end
  end
  assign shared_hd = hd.fwd || (hd.addr >= sh_base && hd.addr < sh_limit);

  always_comb begin
    free_v = 1'b0; free_k = '0;
    mdw_v = 1'b0;  mdw_k = '0;
    for (int k = N_SLOTS - 1; k >= 0; k--) begin
      if (st[k] == SL_FREE) begin free_v = 1'b1; free_k = SW'(k); end
      if (st[k] == SL_MDW)  begin mdw_v = 1'b1;  mdw_k = SW'(k); end
    end
  end

  logic [PA_W-1:0] key_addr;
  assign key_addr = (dst == D_MDW) ? sl[dslot].e.addr - sh_base
                  : (dst == D_MD)  ? sl[dslot].e.addr - sh_base : hd.addr - sh_base;
  assign md_key   = key_addr[KEY_W+6:7];
  assign md_req   = (dst == D_MD) || (dst == D_MDW);
  assign md_we    = (dst == D_MDW);
  assign md_wdata = sl[dslot].rec;

  // ---------------- shared port arbitration among slots ----------------
  logic          rim_busy, rim_acked, tx_busy;
  logic [SW-1:0] rim_own, tx_own;
  logic          rim_want_v, tx_want_v, al_want_v, fr_want_v;
  logic [SW-1:0] rim_want_k, tx_want_k, al_want_k, fr_want_k;

  function automatic logic wants_rim(sstate_t s);
    return s == SL_L_RD || s == SL_L_C2C || s == SL_R_MWR || s == SL_R_C2C || s == SL_F_FLUSH;
  endfunction

  always_comb begin
    rim_want_v = 1'b0; rim_want_k = '0;
    tx_want_v = 1'b0;  tx_want_k = '0;
    al_want_v = 1'b0;  al_want_k = '0;
    fr_want_v = 1'b0;  fr_want_k = '0;
    for (int k = N_SLOTS - 1; k >= 0; k--) begin
      if (wants_rim(st[k])) begin rim_want_v = 1'b1; rim_want_k = SW'(k); end
      if (st[k] == SL_R_TX || st[k] == SL_F_TX) begin tx_want_v = 1'b1; tx_want_k = SW'(k); end
      if (st[k] == SL_L_ALLOC || st[k] == SL_R_ALLOC || st[k] == SL_F_ALLOC) begin
        al_want_v = 1'b1; al_want_k = SW'(k);
      end
      if (st[k] == SL_FREEL) begin fr_want_v = 1'b1; fr_want_k = SW'(k); end
    end
  end

  assign al_req  = al_want_v;
  assign fr_req  = fr_want_v;
  assign fr_line = sl[fr_want_k].line;

  always_comb begin
    slot_t s;
    s = sl[rim_own];
    rim_req = rim_busy && !rim_acked;
    rim_cmd = '0;
    rim_cmd.dest = s.e.src;
    rim_cmd.dtag = s.e.tag;
    case (st[rim_own])
      SL_L_RD: begin
        rim_cmd.op = RC_MEM_RD;
        rim_cmd.addr = {s.e.addr[PA_W-1:5], 5'd0};
        rim_cmd.sb_addr = {s.line, 4'd0};
        rim_cmd.beats = 5'd4;
      end
      SL_L_C2C: begin
        rim_cmd.op = RC_C2C;
        rim_cmd.addr = {s.e.addr[PA_W-1:5], 5'd0};
        rim_cmd.sb_addr = {s.line, 4'd0};
        rim_cmd.beats = 5'd4;
      end
      SL_R_MWR: begin
        rim_cmd.op = RC_MEM_WR;
        rim_cmd.addr = {s.e.addr[PA_W-1:7], 7'd0};
        rim_cmd.sb_addr = {s.line, 4'd0};
        rim_cmd.beats = 5'd16;
      end
      SL_R_C2C: begin
        rim_cmd.op = RC_C2C;
        rim_cmd.addr = {s.e.addr[PA_W-1:5], 5'd0};
        rim_cmd.sb_addr = {s.line, s.e.addr[6:5], 2'd0};
        rim_cmd.beats = 5'd4;
      end
      default: begin  // SL_F_FLUSH
        rim_cmd.op = RC_FLUSH_RD;
        rim_cmd.addr = {s.e.addr[PA_W-1:7], 7'd0};
        rim_cmd.sb_addr = {s.line, 4'd0};
        rim_cmd.beats = 5'd16;
      end
    endcase
  end

  always_comb begin
    slot_t s;
    s = sl[tx_own];
    tx_req = tx_busy;
    tx_line = s.line;
    tx_msg = '0;
    tx_msg.src = node_id;
    tx_msg.blk = s.e.addr[PA_W-1:7];
    if (st[tx_own] == SL_R_TX) begin
      tx_msg.mtype    = MT_REQ;
      tx_msg.dst      = s.rec[9:4];
      tx_msg.req_node = node_id;
      tx_msg.sb_line  = s.line;
      tx_msg.slot     = 2'(tx_own);
      tx_msg.sub      = {1'b0, s.e.addr[6:5]};
    end else begin
      tx_msg.mtype    = MT_DATA;
      tx_msg.dst      = s.e.req_node;
      tx_msg.req_node = s.e.req_node;
      tx_msg.sb_line  = s.e.req_line;
      tx_msg.slot     = s.e.req_slot;
      tx_msg.has_data = 1'b1;
    end
  end

  always_comb begin
    busy_slots = '0;
    for (int k = 0; k < N_SLOTS; k++) if (st[k] != SL_FREE) busy_slots = busy_slots + 1'b1;
  end

  // ---------------- sequential part ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_n <= '0;
      fq_n <= '0;
      for (int i = 0; i < 4; i++) begin q[i] <= '0; fq[i] <= '0; end
      dst <= D_IDLE;
      dslot <= '0;
      probe_hit <= 1'b0;
      for (int k = 0; k < N_SLOTS; k++) begin
        st[k] <= SL_FREE;
        sl[k] <= '0;
      end
      rim_busy <= 1'b0; rim_acked <= 1'b0; rim_own <= '0;
      tx_busy <= 1'b0;  tx_own <= '0;
      snp_valid <= 1'b0;
      snp_resp <= COH_OK;
      {ev_lsmsh, ev_lsmsm, ev_ldcm, ev_rdcm, ev_fwd} <= '0;
    end else begin
      logic [2:0] n;
      snp_valid <= 1'b0;
      {ev_lsmsh, ev_lsmsm, ev_ldcm, ev_rdcm, ev_fwd} <= '0;

      // queue pop (decided by the dispatcher below) and pushes
      n = q_n;
      if (pop) begin
        for (int i = 0; i < 3; i++) q[i] <= q[i+1];
        n = n - 1'b1;
      end
      if (push_snp && n < 3'd4) begin q[n[1:0]] <= in_snp; n = n + 1'b1; end
      q_n <= n;
      n = fq_n;
      if (fpop) begin
        for (int i = 0; i < 3; i++) fq[i] <= fq[i+1];
        n = n - 1'b1;
      end
      if (push_fwd && n < 3'd4) begin fq[n[1:0]] <= in_fwd; n = n + 1'b1; end
      fq_n <= n;

      // dispatcher
      case (dst)
        D_IDLE: begin
          if (mdw_v) begin
            dslot <= mdw_k;
            dst <= D_MDW;
          end else if (hold_v) begin
            dslot <= hold_k;
            st[hold_k] <= SL_LOOK;
            dst <= D_MD;
          end else if (fq_n != 0 && free_v) begin
            sl[free_k].e <= fq[0];
            if (fwd_busy) begin
              st[free_k] <= SL_F_HOLD;
            end else begin
              dslot <= free_k;
              st[free_k] <= SL_LOOK;
              dst <= D_MD;
            end
          end else if (q_n != 0) begin
            if (!shared_hd) begin
              snp_valid <= 1'b1;
              snp_resp <= COH_OK;
            end else if (free_v && !blk_busy) begin
              dslot <= free_k;
              sl[free_k].e <= hd;
              st[free_k] <= SL_LOOK;
              dst <= D_MD;
            end
          end
        end
        D_MD: begin
          if (md_probe) begin
            probe_hit <= md_hit;
            if (!md_hit && !sl[dslot].e.fwd) begin
              snp_valid <= 1'b1;
              snp_resp <= COH_CPY;
            end
          end
          if (md_done) begin
            logic      valid_blk;
            bstate_t   bs;
            bs = bstate_t'(md_rdata[1:0]);
            valid_blk = (bs == BS_EXCLUSIVE) || (bs == BS_SHARED && !sl[dslot].e.priv);
            sl[dslot].rec <= md_rdata;
            dst <= D_IDLE;
            if (sl[dslot].e.fwd) begin
              st[dslot] <= SL_F_ALLOC;
              ev_fwd <= 1'b1;
            end else if (probe_hit && valid_blk) begin
              snp_valid <= 1'b1;
              snp_resp <= (bs == BS_EXCLUSIVE) ? COH_OK : COH_SHR;
              ev_lsmsh <= 1'b1;
              st[dslot] <= SL_FREE;
            end else if (valid_blk) begin
              ev_lsmsm <= 1'b1;
              st[dslot] <= SL_L_ALLOC;
            end else begin
              if (probe_hit) begin
                snp_valid <= 1'b1;
                snp_resp <= COH_CPY;
              end
              if (md_rdata[9:4] == node_id) ev_ldcm <= 1'b1;
              else                          ev_rdcm <= 1'b1;
              st[dslot] <= SL_R_ALLOC;
            end
          end
        end
        D_MDW: if (md_done) begin
          st[dslot] <= SL_FREEL;
          dst <= D_IDLE;
        end
        default: dst <= D_IDLE;
      endcase

      // allocation and free
      if (al_gnt) begin
        sl[al_want_k].line <= al_line;
        case (st[al_want_k])
          SL_L_ALLOC: st[al_want_k] <= SL_L_RD;
          SL_R_ALLOC: st[al_want_k] <= SL_R_TX;
          default:    st[al_want_k] <= SL_F_FLUSH;
        endcase
      end
      if (fr_ack) st[fr_want_k] <= SL_FREE;

      // RIM port
      if (!rim_busy && rim_want_v) begin
        rim_busy <= 1'b1;
        rim_own <= rim_want_k;
      end
      if (rim_ack) rim_acked <= 1'b1;
      if (rim_done) begin
        rim_busy <= 1'b0;
        rim_acked <= 1'b0;
        case (st[rim_own])
          SL_L_RD:    st[rim_own] <= SL_L_C2C;
          SL_L_C2C:   st[rim_own] <= SL_FREEL;
          SL_R_MWR:   st[rim_own] <= SL_R_C2C;
          SL_R_C2C: begin
            st[rim_own] <= SL_MDW;
            sl[rim_own].rec[1:0] <= BS_EXCLUSIVE;
          end
          default: begin  // SL_F_FLUSH
            st[rim_own] <= SL_F_TX;
            sl[rim_own].rec[1:0] <= BS_INVALID;
          end
        endcase
      end

      // NI send port
      if (!tx_busy && tx_want_v) begin
        tx_busy <= 1'b1;
        tx_own <= tx_want_k;
      end
      if (tx_done) begin
        tx_busy <= 1'b0;
        st[tx_own] <= (st[tx_own] == SL_R_TX) ? SL_R_WAIT : SL_MDW;
      end

      // block data from the network
      if (rx_valid && rx_msg.mtype == MT_DATA && st[rx_msg.slot[SW-1:0]] == SL_R_WAIT)
        st[rx_msg.slot[SW-1:0]] <= SL_R_MWR;
    end
  end

  assign fpop = (dst == D_IDLE) && !mdw_v && !hold_v && (fq_n != 0) && free_v;
  assign pop  = (dst == D_IDLE) && !mdw_v && !hold_v && !(fq_n != 0 && free_v) &&
                (q_n != 0) && (!shared_hd || (free_v && !blk_busy));
endmodule
