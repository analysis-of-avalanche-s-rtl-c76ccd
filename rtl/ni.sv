// ni: Network Interface.
//
// Connects the Widget to the network link, a 64-bit flit stream in each
// direction with valid/ready flow control. A message is one header flit
// (msg_t in the low bits) followed, when has_data is set, by the 128-byte
// block as 16 data flits.
// Send side: the SM-CC and DC offer messages (tx_req/tx_msg, and tx_line, the
// SB line holding the payload); the NI serves them round robin, reads the
// payload from the SB through the SBM, sends header and data, and pulses
// tx_done when the last flit has left. A message addressed to this node is
// looped back into the receive side instead of going out on the link.
// Receive side: the NI splits each incoming message. The payload is written
// into the SB, into the receive line named in the header (replies to SM-CC
// requests) or into the MP-CC's receive line (MT_MPDATA); the header is then
// handed to its subsystem: MT_REQ to the DC, MT_INV_FWD, MT_DATA and MT_UPDATE
// to the SM-CC, MT_MPDATA (with the line it landed in) to the MP-CC.
// The document gives the split and demultiplex; the physical link protocol is
// not given, so the flit format and handshake here are this design's.
module ni
  import avl_pkg::*;
#(
  parameter int unsigned N_TX = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NODE_W-1:0]    node_id,
  // link
  output logic                 ltx_valid,
  output logic [DW-1:0]        ltx_data,
  input  logic                 ltx_ready,
  input  logic                 lrx_valid,
  input  logic [DW-1:0]        lrx_data,
  output logic                 lrx_ready,
  // send ports
  input  logic [N_TX-1:0]      tx_req,
  input  msg_t [N_TX-1:0]      tx_msg,
  input  logic [N_TX-1:0][SB_LINE_W-1:0] tx_line,
  output logic [N_TX-1:0]      tx_done,
  // delivered headers
  output msg_t                 rx_msg,
  output logic                 smcc_rx_valid,
  output logic                 dc_rx_valid,
  output logic                 mpcc_rx_valid,
  input  logic [SB_LINE_W-1:0] rcv_line,
  input  logic                 rcv_valid,
  // SB ports: payload read (send) and payload write (receive)
  output logic                 sbt_req,
  output sb_req_t              sbt_out,
  input  logic                 sbt_gnt,
  input  logic                 sbt_rvalid,
  input  logic [DW-1:0]        sbt_rdata,
  output logic                 sbr_req,
  output sb_req_t              sbr_out,
  input  logic                 sbr_gnt,
  // activity
  output logic                 ev_loopback
);
  localparam int unsigned TW = (N_TX > 1) ? $clog2(N_TX) : 1;

  // ---------------- send ----------------
  typedef enum logic [1:0] {T_IDLE, T_SBRD, T_HDR, T_PAY} tstate_t;
  tstate_t              ts;
  msg_t                 tm;
  logic [SB_LINE_W-1:0] tl;
  logic [TW-1:0]        town, trr;
  logic [DW-1:0]        tbuf [BLK_BEATS];
  logic [4:0]           tcnt, tiss;
  logic                 t_loop, t_fv, t_acc;
  logic [DW-1:0]        t_flit;
  logic                 pick_v;
  logic [TW-1:0]        pick;

  always_comb begin
    pick_v = 1'b0;
    pick = '0;
    for (int i = 1; i <= N_TX; i++) begin
      int unsigned idx;
      idx = (int'(trr) + i) % N_TX;
      if (!pick_v && tx_req[idx] && !tx_done[idx]) begin
        pick_v = 1'b1;
        pick = TW'(idx);
      end
    end
  end

  assign t_loop = (tm.dst == node_id);
  assign t_fv   = (ts == T_HDR) || (ts == T_PAY);
  assign t_flit = (ts == T_HDR) ? DW'(tm) : tbuf[tcnt[3:0]];

  always_comb begin
    sbt_req = (ts == T_SBRD) && (tiss < 5'(BLK_BEATS));
    sbt_out = '0;
    sbt_out.addr = {tl, tiss[3:0]};
  end

  // ---------------- receive ----------------
  typedef enum logic [1:0] {X_HDR, X_PAY, X_SBWR, X_DELIV} xstate_t;
  xstate_t              xs;
  msg_t                 xm;
  logic [SB_LINE_W-1:0] xl;
  logic [DW-1:0]        xbuf [BLK_BEATS];
  logic [4:0]           xcnt;
  logic                 x_from_loop;
  logic                 x_in_v, x_ready, x_take;
  logic [DW-1:0]        x_in;
  msg_t                 x_hdr_in;
  logic                 use_loop;

  // Loopback traffic may enter only at a message boundary and then keeps the
  // receive side until its message is complete.
  assign use_loop = (xs == X_HDR) ? (t_fv && t_loop && ts == T_HDR) : x_from_loop;
  assign x_in_v   = use_loop ? (t_fv && t_loop) : lrx_valid;
  assign x_in     = use_loop ? t_flit : lrx_data;
  assign x_hdr_in = msg_t'(x_in[MSG_W-1:0]);
  always_comb begin
    case (xs)
      X_HDR:   x_ready = !(x_hdr_in.mtype == MT_MPDATA && x_hdr_in.has_data && !rcv_valid);
      X_PAY:   x_ready = 1'b1;
      default: x_ready = 1'b0;
    endcase
  end
  assign x_take    = x_in_v && x_ready;
  assign lrx_ready = x_ready && !use_loop;
  assign ltx_valid = t_fv && !t_loop;
  assign ltx_data  = t_flit;
  assign t_acc     = t_fv && (t_loop ? (use_loop && x_ready) : ltx_ready);

  assign sbr_req = (xs == X_SBWR);
  always_comb begin
    sbr_out = '0;
    sbr_out.we = 1'b1;
    sbr_out.addr = {xl, xcnt[3:0]};
    sbr_out.wdata = xbuf[xcnt[3:0]];
  end

  assign rx_msg        = xm;
  assign smcc_rx_valid = (xs == X_DELIV) && (xm.mtype == MT_INV_FWD || xm.mtype == MT_DATA ||
                                             xm.mtype == MT_UPDATE);
  assign dc_rx_valid   = (xs == X_DELIV) && (xm.mtype == MT_REQ);
  assign mpcc_rx_valid = (xs == X_DELIV) && (xm.mtype == MT_MPDATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts <= T_IDLE;
      tm <= '0;
      tl <= '0;
      town <= '0;
      trr <= TW'(N_TX - 1);
      tcnt <= '0;
      tiss <= '0;
      tx_done <= '0;
      xs <= X_HDR;
      xm <= '0;
      xl <= '0;
      xcnt <= '0;
      x_from_loop <= 1'b0;
      ev_loopback <= 1'b0;
    end else begin
      tx_done <= '0;
      ev_loopback <= 1'b0;
      // send
      case (ts)
        T_IDLE: if (pick_v) begin
          tm <= tx_msg[pick];
          tl <= tx_line[pick];
          town <= pick;
          trr <= pick;
          tcnt <= '0;
          tiss <= '0;
          ts <= tx_msg[pick].has_data ? T_SBRD : T_HDR;
        end
        T_SBRD: begin
          if (sbt_gnt) tiss <= tiss + 1'b1;
          if (sbt_rvalid) begin
            tbuf[tcnt[3:0]] <= sbt_rdata;
            if (tcnt == 5'(BLK_BEATS - 1)) begin
              tcnt <= '0;
              ts <= T_HDR;
            end else tcnt <= tcnt + 1'b1;
          end
        end
        T_HDR: if (t_acc) begin
          if (t_loop) ev_loopback <= 1'b1;
          if (tm.has_data) ts <= T_PAY;
          else begin
            tx_done[town] <= 1'b1;
            ts <= T_IDLE;
          end
        end
        T_PAY: if (t_acc) begin
          if (tcnt == 5'(BLK_BEATS - 1)) begin
            tx_done[town] <= 1'b1;
            ts <= T_IDLE;
          end else tcnt <= tcnt + 1'b1;
        end
        default: ts <= T_IDLE;
      endcase

      // receive
      case (xs)
        X_HDR: if (x_take) begin
          xm <= x_hdr_in;
          x_from_loop <= use_loop;
          xcnt <= '0;
          if (x_hdr_in.mtype == MT_MPDATA) begin
            xl <= rcv_line;
            xm.sb_line <= rcv_line;
          end else xl <= x_hdr_in.sb_line;
          xs <= x_hdr_in.has_data ? X_PAY : X_DELIV;
        end
        X_PAY: if (x_take) begin
          xbuf[xcnt[3:0]] <= x_in;
          if (xcnt == 5'(BLK_BEATS - 1)) begin
            xcnt <= '0;
            xs <= X_SBWR;
          end else xcnt <= xcnt + 1'b1;
        end
        X_SBWR: if (sbr_gnt) begin
          if (xcnt == 5'(BLK_BEATS - 1)) xs <= X_DELIV;
          else xcnt <= xcnt + 1'b1;
        end
        X_DELIV: begin
          xs <= X_HDR;
          x_from_loop <= 1'b0;
        end
        default: xs <= X_HDR;
      endcase
    end
  end
endmodule
