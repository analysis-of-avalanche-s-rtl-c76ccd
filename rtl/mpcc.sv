// mpcc: Message Passing Cache Controller (MP-CC).
//
// Incoming message-passing data is deposited in Shared Buffer lines, and the
// MP-CC manages those lines as an L2 communication cache in front of the local
// processors. It keeps one pre-allocated SB receive line, offered to the NI
// on rcv_line/rcv_valid; when the NI delivers an MT_MPDATA header (the block
// already written to that line) the line is entered in a table of ENTRIES
// blocks and a new receive line is allocated. A full table evicts round robin
// and frees the evicted line. Every coherent read on the Taxiway is answered
// one cycle later: COH_CPY when it hits a table block, COH_OK otherwise. On a
// hit the MP-CC has the RIM supply the missed 32-byte line from the SB by a
// cache-to-cache write; as the Runway requires of a client that answered
// COH_CPY, its own copy is then dropped and the SB line freed. Lines to be
// freed wait in a four-entry queue, since an eviction and the end of a supply
// can fall in the same cycle. The message
// header's block address is the local physical address the data belongs to.
// The document gives the role (SB lines as an L2 communication cache, data
// supplied to snooped reads); the table, replacement and receive-line
// scheme are this design's.
module mpcc
  import avl_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  runway_t              taxi,
  output logic                 snp_valid,
  output coh_resp_t            snp_resp,
  input  logic                 rx_valid,
  input  msg_t                 rx_msg,
  output logic [SB_LINE_W-1:0] rcv_line,
  output logic                 rcv_valid,
  output logic                 al_req,
  input  logic                 al_gnt,
  input  logic [SB_LINE_W-1:0] al_line,
  output logic                 fr_req,
  output logic [SB_LINE_W-1:0] fr_line,
  input  logic                 fr_ack,
  output logic                 rim_req,
  output rim_cmd_t             rim_cmd,
  input  logic                 rim_ack,
  input  logic                 rim_done,
  output logic                 ev_supply,
  output logic                 ev_evict
);
  localparam int unsigned EW = $clog2(ENTRIES);

  typedef struct packed {
    logic                 valid;
    logic                 pend;
    logic [BLK_AW-1:0]    blk;
    logic [SB_LINE_W-1:0] line;
    logic [3:0]           src;
    logic [7:0]           tag;
    logic [1:0]           sub;
  } ent_t;

  ent_t          tbl [ENTRIES];
  logic [EW-1:0] rr;
  logic          rim_busy, rim_acked;
  logic [EW-1:0] rim_own;

  // lines waiting to be freed
  logic [SB_LINE_W-1:0] fq [4];
  logic [2:0]           fq_n;

  // snoop lookup
  logic          snoop, hit;
  logic [EW-1:0] hit_k;
  logic [BLK_AW-1:0] s_blk;
  assign snoop = (taxi.op == RW_RD_SHAR || taxi.op == RW_RD_PRIV);
  assign s_blk = taxi.payload[PA_W-1:7];
  always_comb begin
    hit = 1'b0;
    hit_k = '0;
    for (int k = 0; k < ENTRIES; k++)
      if (tbl[k].valid && !tbl[k].pend && tbl[k].blk == s_blk) begin
        hit = 1'b1;
        hit_k = EW'(k);
      end
  end

  // placement of an incoming block
  logic          inv_v, pend_v;
  logic [EW-1:0] inv_k, pend_k, place_k;
  always_comb begin
    inv_v = 1'b0; inv_k = '0;
    pend_v = 1'b0; pend_k = '0;
    for (int k = ENTRIES - 1; k >= 0; k--) begin
      if (!tbl[k].valid) begin inv_v = 1'b1; inv_k = EW'(k); end
      if (tbl[k].pend)   begin pend_v = 1'b1; pend_k = EW'(k); end
    end
    place_k = inv_v ? inv_k : rr;
  end

  assign al_req  = !rcv_valid;
  assign rim_req = rim_busy && !rim_acked;
  always_comb begin
    rim_cmd = '0;
    rim_cmd.op = RC_C2C;
    rim_cmd.addr = {tbl[rim_own].blk, tbl[rim_own].sub, 5'd0};
    rim_cmd.sb_addr = {tbl[rim_own].line, tbl[rim_own].sub, 2'd0};
    rim_cmd.beats = 5'd4;
    rim_cmd.dest = tbl[rim_own].src;
    rim_cmd.dtag = tbl[rim_own].tag;
  end

  logic mp_in;
  assign mp_in = rx_valid && rx_msg.mtype == MT_MPDATA;

  assign fr_req  = (fq_n != 0);
  assign fr_line = fq[0];

  a_free_queue: assert property (@(posedge clk) disable iff (!rst_n)
    (mp_in && tbl[place_k].valid) || rim_done |-> fq_n <= 3'd2);
  a_rx_needs_line: assert property (@(posedge clk) disable iff (!rst_n) mp_in |-> rcv_valid);
  a_evict_not_pending: assert property (@(posedge clk) disable iff (!rst_n)
    mp_in |-> !tbl[place_k].pend);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ENTRIES; k++) tbl[k] <= '0;
      rr <= '0;
      rcv_valid <= 1'b0;
      rcv_line <= '0;
      fq_n <= '0;
      for (int i = 0; i < 4; i++) fq[i] <= '0;
      rim_busy <= 1'b0; rim_acked <= 1'b0; rim_own <= '0;
      snp_valid <= 1'b0;
      snp_resp <= COH_OK;
      ev_supply <= 1'b0;
      ev_evict <= 1'b0;
    end else begin
      logic [2:0] n;
      ev_supply <= 1'b0;
      ev_evict <= 1'b0;
      snp_valid <= snoop;
      snp_resp <= (snoop && hit) ? COH_CPY : COH_OK;
      if (snoop && hit) begin
        tbl[hit_k].pend <= 1'b1;
        tbl[hit_k].src <= taxi.src;
        tbl[hit_k].tag <= taxi.tag;
        tbl[hit_k].sub <= taxi.payload[6:5];
      end

      if (al_gnt) begin
        rcv_line <= al_line;
        rcv_valid <= 1'b1;
      end
      n = fq_n;
      if (fr_ack) begin
        for (int i = 0; i < 3; i++) fq[i] <= fq[i+1];
        n = n - 1'b1;
      end

      if (mp_in) begin
        if (tbl[place_k].valid) begin
          fq[n[1:0]] <= tbl[place_k].line;
          n = n + 1'b1;
          ev_evict <= 1'b1;
        end
        tbl[place_k] <= '{valid: 1'b1, pend: 1'b0, blk: rx_msg.blk, line: rcv_line,
                          src: 4'd0, tag: 8'd0, sub: 2'd0};
        rcv_valid <= 1'b0;
        if (!inv_v) rr <= (int'(rr) == ENTRIES - 1) ? '0 : rr + 1'b1;
      end

      if (!rim_busy && pend_v) begin
        rim_busy <= 1'b1;
        rim_own <= pend_k;
      end
      if (rim_ack) rim_acked <= 1'b1;
      if (rim_done) begin
        rim_busy <= 1'b0;
        rim_acked <= 1'b0;
        tbl[rim_own].valid <= 1'b0;
        tbl[rim_own].pend <= 1'b0;
        fq[n[1:0]] <= tbl[rim_own].line;
        n = n + 1'b1;
        ev_supply <= 1'b1;
      end
      fq_n <= n;
    end
  end
endmodule
