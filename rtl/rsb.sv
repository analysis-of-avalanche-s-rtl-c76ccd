// rsb: Release State Buffer, the SM-CC's support for the release-consistent
// delayed write-update protocol.
//
// When a local processor acquires a shared line, the clean copy of the line
// is stored here (acq_valid/acq_addr/acq_line). When the buffer is full and
// another acquire arrives, or when the processor performs a release
// (rel_req), entries are flushed: for each one the RSB fetches the dirty
// version of the line (dirty_req/dirty_addr, answered by dirty_valid/
// dirty_line), has the RIM diff it against the clean copy (diff_* ports) and
// emits a compressed update: the line address, the mask of modified words and
// the modified words packed from word 0 upwards (upd_*, valid/ready). Lines
// with no modified word produce no update. A release empties the buffer and
// ends with a rel_done pulse; acquires wait (acq_ready low) while a flush is
// in progress. Flushes on a full buffer take the oldest entry. Lines are
// 32-byte PA-RISC lines of eight 32-bit words. The document gives the
// store-on-acquire, diff-on-full-or-release behaviour and the compressed
// message; the entry count, the oldest-first choice and the handshakes are
// this design's.
module rsb
  import avl_pkg::*;
#(
  parameter int unsigned ENTRIES = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            acq_valid,
  output logic            acq_ready,
  input  logic [PA_W-1:0] acq_addr,
  input  logic [255:0]    acq_line,
  input  logic            rel_req,
  output logic            rel_done,
  output logic            dirty_req,
  output logic [PA_W-1:0] dirty_addr,
  input  logic            dirty_valid,
  input  logic [255:0]    dirty_line,
  output logic [255:0]    diff_clean,
  output logic [255:0]    diff_dirty,
  input  logic [7:0]      diff_mask,
  output logic            upd_valid,
  input  logic            upd_ready,
  output logic [PA_W-1:0] upd_addr,
  output logic [7:0]      upd_mask,
  output logic [3:0]      upd_count,
  output logic [255:0]    upd_words
);
  localparam int unsigned EW = $clog2(ENTRIES + 1);
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  // entries kept oldest first
  logic [PA_W-1:0] e_addr [ENTRIES];
  logic [255:0]    e_line [ENTRIES];
  logic [EW-1:0]   n;

  typedef enum logic [2:0] {B_IDLE, B_FETCH, B_DIFF, B_SEND, B_POP} bstate_t;
  bstate_t st;
  logic    releasing;
  logic [255:0] dirty_q;

  assign acq_ready  = (st == B_IDLE) && !rel_req && (n < EW'(ENTRIES));
  assign dirty_req  = (st == B_FETCH);
  assign dirty_addr = e_addr[0];
  assign diff_clean = e_line[0];
  assign diff_dirty = dirty_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE;
      n <= '0;
      releasing <= 1'b0;
      rel_done <= 1'b0;
      dirty_q <= '0;
      upd_valid <= 1'b0;
      upd_addr <= '0;
      upd_mask <= '0;
      upd_count <= '0;
      upd_words <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        e_addr[i] <= '0;
        e_line[i] <= '0;
      end
    end else begin
      rel_done <= 1'b0;
      case (st)
        B_IDLE: begin
          if (rel_req) begin
            releasing <= 1'b1;
            if (n == 0) rel_done <= 1'b1;
            else        st <= B_FETCH;
          end else if (acq_valid && n < EW'(ENTRIES)) begin
            e_addr[n[IW-1:0]] <= acq_addr;
            e_line[n[IW-1:0]] <= acq_line;
            n <= n + 1'b1;
          end else if (acq_valid) begin
            releasing <= 1'b0;
            st <= B_FETCH;            // full: flush the oldest to make room
          end
        end
        B_FETCH: if (dirty_valid) begin
          dirty_q <= dirty_line;
          st <= B_DIFF;
        end
        B_DIFF: begin
          logic [3:0]   c;
          logic [255:0] w;
          c = '0;
          w = '0;
          for (int i = 0; i < 8; i++)
            if (diff_mask[i]) begin
              w[c[2:0]*32 +: 32] = dirty_q[i*32 +: 32];
              c = c + 1'b1;
            end
          upd_addr <= e_addr[0];
          upd_mask <= diff_mask;
          upd_count <= c;
          upd_words <= w;
          upd_valid <= (diff_mask != 0);
          st <= (diff_mask != 0) ? B_SEND : B_POP;
        end
        B_SEND: if (upd_ready) begin
          upd_valid <= 1'b0;
          st <= B_POP;
        end
        B_POP: begin
          for (int i = 0; i < ENTRIES - 1; i++) begin
            e_addr[i] <= e_addr[i+1];
            e_line[i] <= e_line[i+1];
          end
          n <= n - 1'b1;
          if (releasing && n > EW'(1)) st <= B_FETCH;
          else begin
            st <= B_IDLE;
            if (releasing) begin
              rel_done <= 1'b1;
              releasing <= 1'b0;
            end
          end
        end
        default: st <= B_IDLE;
      endcase
    end
  end

  a_upd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    upd_valid && !upd_ready |=> upd_valid && $stable(upd_addr));
endmodule
