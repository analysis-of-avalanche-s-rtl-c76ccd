// meta_cache: the metadata cache used by the SM-CC (2-way) and the DC (4-way).
//
// Coherence metadata lives in main memory; recently used records are kept in
// the Shared Buffer. This block holds the tags on chip and the records in an
// SB area starting at doubleword SB_BASE, one record per 32-byte cache line
// (REC_BEATS doublewords of it used). A 16 KB cache of 32-byte lines has 512
// lines: 256 sets of 2 ways or 128 sets of 4 ways.
//
// Interface: the owner raises lk_req with lk_key (the block number) and, for a
// write, lk_we and lk_wdata, and holds them until lk_done. One cycle after the
// request is taken, lk_probe pulses with lk_hit telling whether the tag
// matched: the SM-CC uses this to decide its coherency response before the
// record arrives. A read hit then reads the record from the SB (four cycles
// per doubleword through the SBM). A read miss has the RIM copy the record
// from main memory (MEM_BASE + 32*key) into the victim line, then reads it.
// Writes go to the SB line (allocating on a miss) and then through the RIM to
// main memory. Replacement is round robin per set. The cache is blocking: one
// lookup at a time. Sizes and associativity follow the document; the record
// placement, write-through policy and replacement are this design's choice.
module meta_cache
  import avl_pkg::*;
#(
  parameter int unsigned WAYS       = 2,
  parameter int unsigned SIZE_BYTES = 16384,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned REC_BEATS  = 1,
  parameter int unsigned KEY_W      = 20,
  parameter logic [SB_AW-1:0] SB_BASE  = '0,
  parameter logic [PA_W-1:0]  MEM_BASE = 32'h0100_0000
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // lookup port
  input  logic                      lk_req,
  input  logic                      lk_we,
  input  logic [KEY_W-1:0]          lk_key,
  input  logic [REC_BEATS*DW-1:0]   lk_wdata,
  output logic                      lk_probe,
  output logic                      lk_hit,
  output logic                      lk_done,
  output logic [REC_BEATS*DW-1:0]   lk_rdata,
  // SB port (through the SBM)
  output logic                      sb_req,
  output sb_req_t                   sb_out,
  input  logic                      sb_gnt,
  input  logic                      sb_rvalid,
  input  logic [DW-1:0]             sb_rdata,
  // RIM command port
  output logic                      rim_req,
  output rim_cmd_t                  rim_cmd,
  input  logic                      rim_ack,
  input  logic                      rim_done
);
  localparam int unsigned LINES  = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned SETS   = LINES / WAYS;
  localparam int unsigned IDX_W  = $clog2(SETS);
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W  = KEY_W - IDX_W;
  localparam int unsigned LDW    = LINE_BYTES / 8;   // doublewords per cache line
  localparam int unsigned BW     = $clog2(REC_BEATS + 1);

  typedef enum logic [2:0] {M_IDLE, M_PROBE, M_FILL, M_FILL_WAIT, M_SB_RD, M_SB_WR, M_WT, M_WT_WAIT} mstate_t;
  mstate_t st;

  logic [TAG_W-1:0] tags  [SETS][WAYS];
  logic [WAYS-1:0]  valid [SETS];
  logic [WAY_W-1:0] rrp   [SETS];

  logic [IDX_W-1:0] set_i;
  logic [TAG_W-1:0] tag_i;
  logic [WAY_W-1:0] way_q, hit_way;
  logic             hit_c;
  logic [BW-1:0]    issued, got;
  logic [SB_AW-1:0] line_base;

  assign set_i = lk_key[IDX_W-1:0];
  assign tag_i = lk_key[KEY_W-1:IDX_W];

  always_comb begin
    hit_c = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[set_i][w] && tags[set_i][w] == tag_i) begin
        hit_c = 1'b1;
        hit_way = WAY_W'(w);
      end
  end

  assign line_base = SB_BASE + SB_AW'((int'(set_i) * WAYS + int'(way_q)) * LDW);

  always_comb begin
    sb_req = 1'b0;
    sb_out = '0;
    if ((st == M_SB_RD || st == M_SB_WR) && issued < BW'(REC_BEATS)) begin
      sb_req = 1'b1;
      sb_out.we    = (st == M_SB_WR);
      sb_out.addr  = line_base + SB_AW'(issued);
      sb_out.wdata = lk_wdata[issued*DW +: DW];
    end
    rim_req = (st == M_FILL) || (st == M_WT);
    rim_cmd = '0;
    rim_cmd.op      = (st == M_WT) ? RC_MEM_WR : RC_MEM_RD;
    rim_cmd.addr    = MEM_BASE + PA_W'(lk_key) * PA_W'(LINE_BYTES);
    rim_cmd.sb_addr = line_base;
    rim_cmd.beats   = 5'(REC_BEATS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE;
      lk_probe <= 1'b0;
      lk_hit <= 1'b0;
      lk_done <= 1'b0;
      lk_rdata <= '0;
      way_q <= '0;
      issued <= '0;
      got <= '0;
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        rrp[s] <= '0;
      end
    end else begin
      lk_probe <= 1'b0;
      lk_done  <= 1'b0;
      case (st)
        M_IDLE: if (lk_req && !lk_done) st <= M_PROBE;
        M_PROBE: begin
          lk_probe <= 1'b1;
          lk_hit   <= hit_c;
          issued <= '0;
          got    <= '0;
          if (hit_c) begin
            way_q <= hit_way;
            st <= lk_we ? M_SB_WR : M_SB_RD;
          end else begin
            way_q <= rrp[set_i];
            rrp[set_i] <= (int'(rrp[set_i]) == WAYS - 1) ? '0 : rrp[set_i] + 1'b1;
            valid[set_i][rrp[set_i]] <= 1'b0;
            st <= lk_we ? M_SB_WR : M_FILL;
          end
        end
        M_FILL: if (rim_ack) st <= M_FILL_WAIT;
        M_FILL_WAIT: if (rim_done) begin
          valid[set_i][way_q] <= 1'b1;
          tags[set_i][way_q]  <= tag_i;
          st <= M_SB_RD;
        end
        M_SB_RD: begin
          if (sb_gnt) issued <= issued + 1'b1;
          if (sb_rvalid) begin
            lk_rdata[got*DW +: DW] <= sb_rdata;
            got <= got + 1'b1;
            if (got == BW'(REC_BEATS - 1)) begin
              lk_done <= 1'b1;
              st <= M_IDLE;
            end
          end
        end
        M_SB_WR: if (sb_gnt) begin
          issued <= issued + 1'b1;
          if (issued == BW'(REC_BEATS - 1)) begin
            valid[set_i][way_q] <= 1'b1;
            tags[set_i][way_q]  <= tag_i;
            st <= M_WT;
          end
        end
        M_WT: if (rim_ack) st <= M_WT_WAIT;
        M_WT_WAIT: if (rim_done) begin
          lk_done <= 1'b1;
          st <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
