// sbm: Shared Buffer Manager.
//
// Two jobs. (1) It owns the bus to the Shared Buffer SRAM and arbitrates it
// among the Widget subsystems, round robin, one doubleword access at a time.
// An access spends two cycles in arbitration and two in the off-chip read, so
// a read requested in cycle t returns its data with rvalid in cycle t+4, the
// four-cycle hit time of the SM-CC and DC metadata caches. A client holds req
// and its request until it sees gnt, which lasts one cycle. Read data for all
// clients shares one rdata bus; rvalid says whose it is. (2) It allocates and
// frees SB lines for the SM-CC, DC, MP-CC and PPE. Lines below RESERVED (the
// metadata cache areas) are never handed out. Free lines come from a FIFO of
// released lines and, until every line has been handed out once, from a
// counter, so no initialisation pass is needed. alloc_gnt is given in the
// cycle alloc_req is seen, lowest-numbered client first; free_ack likewise.
// The document says who may allocate and that the SBM serves them, and gives
// the two-plus-two cycle hit time; the policies are this design's choice.
module sbm
  import avl_pkg::*;
#(
  parameter int unsigned N_CLIENTS = 5,
  parameter int unsigned N_ALLOC   = 4,
  parameter int unsigned LINES     = 2048,
  parameter int unsigned RESERVED  = 256
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // SB bus clients
  input  logic    [N_CLIENTS-1:0]      req,
  input  sb_req_t [N_CLIENTS-1:0]      sbreq,
  output logic    [N_CLIENTS-1:0]      gnt,
  output logic    [N_CLIENTS-1:0]      rvalid,
  output logic    [DW-1:0]             rdata,
  // line allocation
  input  logic    [N_ALLOC-1:0]        alloc_req,
  output logic    [N_ALLOC-1:0]        alloc_gnt,
  output logic    [SB_LINE_W-1:0]      alloc_line,
  input  logic    [N_ALLOC-1:0]        free_req,
  input  logic    [N_ALLOC-1:0][SB_LINE_W-1:0] free_line,
  output logic    [N_ALLOC-1:0]        free_ack,
  output logic    [SB_LINE_W:0]        free_count,
  // SRAM side
  output logic                         sb_en,
  output logic                         sb_we,
  output logic    [SB_AW-1:0]          sb_addr,
  output logic    [DW-1:0]             sb_wdata,
  input  logic    [DW-1:0]             sb_rdata
);
  localparam int unsigned CW = (N_CLIENTS > 1) ? $clog2(N_CLIENTS) : 1;

  // ---------------- SB bus arbitration ----------------
  logic          pick_v;
  logic [CW-1:0] pick_id, rr;
  logic          nxt_v;
  logic [CW-1:0] nxt_id;
  logic          p1_v, p2_v;
  logic [CW-1:0] p1_id, p2_id;

  always_comb begin
    nxt_v  = 1'b0;
    nxt_id = '0;
    for (int i = 1; i <= N_CLIENTS; i++) begin
      int unsigned idx;
      idx = (int'(rr) + i) % N_CLIENTS;
      if (!nxt_v && req[idx]) begin
        nxt_v  = 1'b1;
        nxt_id = CW'(idx);
      end
    end
  end

  always_comb begin
    gnt = '0;
    if (pick_v) gnt[pick_id] = 1'b1;
    sb_en    = pick_v;
    sb_we    = sbreq[pick_id].we;
    sb_addr  = sbreq[pick_id].addr;
    sb_wdata = sbreq[pick_id].wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pick_v <= 1'b0;
      pick_id <= '0;
      rr <= CW'(N_CLIENTS - 1);
      p1_v <= 1'b0; p2_v <= 1'b0;
      p1_id <= '0;  p2_id <= '0;
      rvalid <= '0;
      rdata <= '0;
    end else begin
      if (pick_v) begin
        pick_v <= 1'b0;
        rr     <= pick_id;
      end else if (nxt_v) begin
        pick_v  <= 1'b1;
        pick_id <= nxt_id;
      end
      p1_v  <= pick_v && !sbreq[pick_id].we;
      p1_id <= pick_id;
      p2_v  <= p1_v;
      p2_id <= p1_id;
      rvalid <= '0;
      if (p2_v) begin
        rvalid[p2_id] <= 1'b1;
        rdata <= sb_rdata;
      end
    end
  end

  // ---------------- line allocation ----------------
  logic [SB_LINE_W-1:0] fifo [LINES];
  logic [SB_LINE_W:0]   rd_ptr, wr_ptr, fresh;
  logic                 fifo_empty, have_line;
  logic                 do_alloc, do_free;
  logic [SB_LINE_W-1:0] push_line;

  assign fifo_empty = (rd_ptr == wr_ptr);
  assign have_line  = !fifo_empty || (fresh < (SB_LINE_W+1)'(LINES));
  assign alloc_line = fifo_empty ? fresh[SB_LINE_W-1:0] : fifo[rd_ptr[SB_LINE_W-1:0]];
  assign free_count = (SB_LINE_W+1)'(LINES) - fresh + (wr_ptr - rd_ptr);

  always_comb begin
    alloc_gnt = '0;
    free_ack  = '0;
    push_line = '0;
    for (int i = N_ALLOC - 1; i >= 0; i--) begin
      if (alloc_req[i] && have_line) begin
        alloc_gnt = '0;
        alloc_gnt[i] = 1'b1;
      end
      if (free_req[i]) begin
        free_ack = '0;
        free_ack[i] = 1'b1;
        push_line = free_line[i];
      end
    end
  end
  assign do_alloc = |alloc_gnt;
  assign do_free  = |free_ack;

  always_ff @(posedge clk) begin
    if (do_free) fifo[wr_ptr[SB_LINE_W-1:0]] <= push_line;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      fresh  <= (SB_LINE_W+1)'(RESERVED);
    end else begin
      if (do_alloc) begin
        if (fifo_empty) fresh <= fresh + 1'b1;
        else            rd_ptr <= rd_ptr + 1'b1;
      end
      if (do_free) wr_ptr <= wr_ptr + 1'b1;
    end
  end

  // A freed line must be one that can be handed out.
  a_free_range: assert property (@(posedge clk) disable iff (!rst_n)
    do_free |-> push_line >= SB_LINE_W'(RESERVED));
endmodule
