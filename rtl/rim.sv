// rim: Runway Interface Module.
//
// The RIM is the Widget's bus master on the Runway. Subsystems hand it
// commands (rim_cmd_t) on N_CMD request ports; it serves them one at a time,
// round robin, and moves the data between the Runway and the Shared Buffer
// through its own SBM port:
//   RC_MEM_RD / RC_FLUSH_RD  issue a non-coherent read (or a flushing read that
//                            purges processor caches), collect the returned
//                            RW_DATA beats, write them into the SB
//   RC_MEM_WR                read the beats from the SB, write them to memory
//   RC_C2C                   read the beats from the SB and send them to the
//                            requesting client as a cache-to-cache write
// cmd_ack pulses when a command is taken and cmd_done when it has finished.
// An address cycle carries the byte address in payload[31:0] and the beat
// count in payload[36:32]; data beats follow as RW_DATA words. Returned data
// is recognised by src == CLIENT_ID and the command's tag.
//
// It also forwards every Runway word to the other subsystems, one cycle
// later, as the Taxiway; collects the coherency response of each snooping
// subsystem (one per coherent read, in bus order) and drives the strongest
// (COH_CPY over COH_SHR over COH_OK) once all have answered; and holds the
// diff and splice logic. The document names these functions; the command set,
// the Runway word layout and the one-command-at-a-time policy are this
// design's own.
module rim
  import avl_pkg::*;
#(
  parameter int unsigned N_CMD     = 5,
  parameter int unsigned N_SNOOP   = 2,
  parameter logic [3:0]  CLIENT_ID = 4'hE
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // Runway
  input  runway_t                rw_in,
  output runway_t                rw_out,
  input  logic                   rw_ready,
  // Taxiway
  output runway_t                taxi,
  // coherency responses
  input  logic      [N_SNOOP-1:0] snp_valid,
  input  coh_resp_t [N_SNOOP-1:0] snp_resp,
  output logic                   coh_valid,
  output coh_resp_t              coh_resp,
  // commands
  input  logic      [N_CMD-1:0]  cmd_req,
  input  rim_cmd_t  [N_CMD-1:0]  cmd,
  output logic      [N_CMD-1:0]  cmd_ack,
  output logic      [N_CMD-1:0]  cmd_done,
  // SB port
  output logic                   sb_req,
  output sb_req_t                sb_out,
  input  logic                   sb_gnt,
  input  logic                   sb_rvalid,
  input  logic      [DW-1:0]     sb_rdata,
  // diff / splice
  input  logic [255:0]           diff_clean,
  input  logic [255:0]           diff_dirty,
  output logic [7:0]             diff_mask,
  input  logic [255:0]           splice_base,
  input  logic [255:0]           splice_upd,
  input  logic [7:0]             splice_mask,
  output logic [255:0]           splice_out
);
  localparam int unsigned CW = (N_CMD > 1) ? $clog2(N_CMD) : 1;

  rim_diff #(.WORDS(8), .WORD_W(32)) u_diff (
    .diff_clean, .diff_dirty, .diff_mask, .splice_base, .splice_upd, .splice_mask, .splice_out);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) taxi <= '0;
    else        taxi <= rw_in;
  end

  // ---------------- coherency response merge ----------------
  coh_resp_t      cq   [N_SNOOP][4];
  logic [2:0]     cq_n [N_SNOOP];
  logic           all_have;
  coh_resp_t      merged;

  always_comb begin
    all_have = 1'b1;
    merged = COH_OK;
    for (int s = 0; s < N_SNOOP; s++) begin
      if (cq_n[s] == 3'd0) all_have = 1'b0;
      if (cq[s][0] > merged) merged = cq[s][0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coh_valid <= 1'b0;
      coh_resp <= COH_OK;
      for (int s = 0; s < N_SNOOP; s++) begin
        cq_n[s] <= '0;
        for (int e = 0; e < 4; e++) cq[s][e] <= COH_OK;
      end
    end else begin
      coh_valid <= all_have;
      coh_resp <= merged;
      for (int s = 0; s < N_SNOOP; s++) begin
        logic [2:0] n;
        n = cq_n[s];
        if (all_have) begin
          for (int e = 0; e < 3; e++) cq[s][e] <= cq[s][e+1];
          n = n - 1'b1;
        end
        if (snp_valid[s] && n < 3'd4) begin
          cq[s][n[1:0]] <= snp_resp[s];
          n = n + 1'b1;
        end
        cq_n[s] <= n;
      end
    end
  end

  a_coh_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    snp_valid[0] |-> (cq_n[0] < 3'd4 || all_have));

  // ---------------- command engine ----------------
  typedef enum logic [2:0] {R_IDLE, R_ADDR, R_RDDATA, R_SBWR, R_SBRD, R_HDR, R_WDATA} rstate_t;
  rstate_t       st;
  rim_cmd_t      c;
  logic [CW-1:0] cur, rr;
  logic [7:0]    tag;
  logic [DW-1:0] buf_q [BLK_BEATS];
  logic [4:0]    cnt, issued;
  logic          pick_v;
  logic [CW-1:0] pick;

  always_comb begin
    pick_v = 1'b0;
    pick = '0;
    for (int i = 1; i <= N_CMD; i++) begin
      int unsigned idx;
      idx = (int'(rr) + i) % N_CMD;
      if (!pick_v && cmd_req[idx]) begin
        pick_v = 1'b1;
        pick = CW'(idx);
      end
    end
  end

  always_comb begin
    rw_out = '0;
    case (st)
      R_ADDR: begin
        rw_out.op  = (c.op == RC_FLUSH_RD) ? RW_FLUSH : RW_NC_RD;
        rw_out.src = CLIENT_ID;
        rw_out.tag = tag;
        rw_out.payload = {27'd0, c.beats, c.addr};
      end
      R_HDR: begin
        rw_out.op  = (c.op == RC_C2C) ? RW_C2C_WR : RW_NC_WR;
        rw_out.src = (c.op == RC_C2C) ? c.dest : CLIENT_ID;
        rw_out.tag = (c.op == RC_C2C) ? c.dtag : tag;
        rw_out.payload = {27'd0, c.beats, c.addr};
      end
      R_WDATA: begin
        rw_out.op  = RW_DATA;
        rw_out.src = (c.op == RC_C2C) ? c.dest : CLIENT_ID;
        rw_out.tag = (c.op == RC_C2C) ? c.dtag : tag;
        rw_out.payload = buf_q[cnt[3:0]];
      end
      default: ;
    endcase
    sb_req = 1'b0;
    sb_out = '0;
    if (st == R_SBWR) begin
      sb_req = 1'b1;
      sb_out.we = 1'b1;
      sb_out.addr = c.sb_addr + SB_AW'(cnt);
      sb_out.wdata = buf_q[cnt[3:0]];
    end else if (st == R_SBRD && issued < c.beats) begin
      sb_req = 1'b1;
      sb_out.addr = c.sb_addr + SB_AW'(issued);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE;
      c <= '0;
      cur <= '0;
      rr <= CW'(N_CMD - 1);
      tag <= '0;
      cnt <= '0;
      issued <= '0;
      cmd_ack <= '0;
      cmd_done <= '0;
    end else begin
      cmd_ack <= '0;
      cmd_done <= '0;
      case (st)
        R_IDLE: if (pick_v && !cmd_ack[pick] && !cmd_done[pick]) begin
          c <= cmd[pick];
          cur <= pick;
          rr <= pick;
          cmd_ack[pick] <= 1'b1;
          tag <= tag + 1'b1;
          cnt <= '0;
          issued <= '0;
          st <= (cmd[pick].op == RC_MEM_RD || cmd[pick].op == RC_FLUSH_RD) ? R_ADDR : R_SBRD;
        end
        R_ADDR: if (rw_ready) st <= R_RDDATA;
        R_RDDATA: if (rw_in.op == RW_DATA && rw_in.src == CLIENT_ID && rw_in.tag == tag) begin
          buf_q[cnt[3:0]] <= rw_in.payload;
          if (cnt + 1'b1 == c.beats) begin
            cnt <= '0;
            st <= R_SBWR;
          end else cnt <= cnt + 1'b1;
        end
        R_SBWR: if (sb_gnt) begin
          if (cnt + 1'b1 == c.beats) begin
            cmd_done[cur] <= 1'b1;
            st <= R_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        R_SBRD: begin
          if (sb_gnt) issued <= issued + 1'b1;
          if (sb_rvalid) begin
            buf_q[cnt[3:0]] <= sb_rdata;
            if (cnt + 1'b1 == c.beats) begin
              cnt <= '0;
              st <= R_HDR;
            end else cnt <= cnt + 1'b1;
          end
        end
        R_HDR: if (rw_ready) st <= R_WDATA;
        R_WDATA: if (rw_ready) begin
          if (cnt + 1'b1 == c.beats) begin
            cmd_done[cur] <= 1'b1;
            st <= R_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
