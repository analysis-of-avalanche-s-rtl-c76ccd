// tb_runway_model: behavioural model of one node's Runway bus, its main
// memory controller (MMC) with DRAM, and a processor, for Widget testbenches.
//
// The processor issues coherent reads (cpu_req) and reports each completed
// one on cpu_done with its data, latency and whether the data came by
// cache-to-cache write. The MMC waits for the Widget's coherency response to
// every coherent read, in order: COH_OK/COH_SHR let memory return the 32-byte
// line, COH_CPY makes the processor wait for the Widget's RW_C2C_WR. Widget
// reads (RW_NC_RD, RW_FLUSH) return their beats MEM_LAT cycles after the
// address, then one beat per cycle; Widget writes (RW_NC_WR) update memory.
// Memory reads are served one at a time in arrival order. Memory that was
// never written returns the contents the kernel would have set up: data
// pattern pat() for lines of blocks homed here, its complement (stale) for
// other shared lines, and the initial SM-CC and DC metadata records.
// Home node of a page is the low HOME_BITS bits of its page number within
// the shared region; the next bit set marks the page as "free" at its DC (no
// node has a copy).
module tb_runway_model
  import avl_pkg::*;
#(
  parameter logic [NODE_W-1:0] NODE         = '0,
  parameter logic [PA_W-1:0]   SH_BASE      = 32'h0010_0000,
  parameter logic [PA_W-1:0]   SH_LIMIT     = 32'h0020_0000,
  parameter logic [PA_W-1:0]   SMCC_MD_BASE = 32'h4000_0000,
  parameter logic [PA_W-1:0]   DC_MD_BASE   = 32'h6000_0000,
  parameter logic [3:0]        CLIENT_ID    = 4'hE,
  parameter int unsigned       MEM_LAT      = 26,
  parameter int unsigned       HOME_BITS    = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  output runway_t         rw_in,
  input  runway_t         rw_out,
  input  logic            coh_valid,
  input  coh_resp_t       coh_resp,
  input  logic            cpu_req,
  input  logic [PA_W-1:0] cpu_addr,
  input  logic            cpu_priv,
  output int              cpu_outstanding,
  output logic            cpu_done,
  output logic [PA_W-1:0] cpu_daddr,
  output logic [255:0]    cpu_data,
  output int              cpu_lat,
  output logic            cpu_c2c,
  output int              mem_reads,
  output int              c2c_count,
  output int              coh_cpy_count
);
  function automatic logic [63:0] pat(logic [31:0] a);
    return {a, ~a} ^ 64'h5a5a_0000_1234_a5a5;
  endfunction

  logic [63:0] mem [logic [31:0]];

  function automatic logic [63:0] memrd(logic [31:0] a);
    logic [31:0] key, blk, page;
    logic [5:0]  home;
    logic        free;
    if (mem.exists(a)) return mem[a];
    if (a >= SMCC_MD_BASE && a < SMCC_MD_BASE + 32'h0100_0000) begin
      key  = (a - SMCC_MD_BASE) >> 5;
      page = key >> 5;
      home = 6'(page & ((32'd1 << HOME_BITS) - 1));
      free = page[HOME_BITS];
      if (a[4:3] != 0) return '0;
      return {54'd0, home, 2'(PR_MIGRATORY),
              (!free && home == NODE) ? 2'(BS_EXCLUSIVE) : 2'(BS_INVALID)};
    end
    if (a >= DC_MD_BASE && a < DC_MD_BASE + 32'h0100_0000) begin
      key  = (a - DC_MD_BASE) >> 5;
      page = key >> 5;
      home = 6'(page & ((32'd1 << HOME_BITS) - 1));
      free = page[HOME_BITS];
      if (a[4:3] != 0) return '0;
      if (free) return '0;
      return (64'd1 << (8 + int'(home))) | {56'd0, home, 2'(GS_EXCLUSIVE)};
    end
    if (a >= SH_BASE && a < SH_LIMIT) begin
      blk  = a - SH_BASE;
      page = blk >> 12;
      return (6'(page & ((32'd1 << HOME_BITS) - 1)) == NODE) ? pat(a) : ~pat(a);
    end
    return pat(a);
  endfunction

  typedef struct {
    int          due;          // -1 until started
    logic [3:0]  dest;
    logic [7:0]  tag;
    logic [31:0] addr;
    int          beats;
    logic        to_cpu;
  } mreq_t;

  runway_t     dq [$];
  mreq_t       mq [$];
  logic [7:0]  coh_q [$];
  logic [31:0] o_addr  [256];
  int          o_start [256];
  logic        o_wait_c2c [256];
  int          now;
  logic [7:0]  ctag;

  // write / cache-to-cache collection from the Widget
  int          w_left;
  logic        w_c2c;
  logic [31:0] w_addr;
  logic [7:0]  w_tag;
  int          w_i;
  logic [255:0] w_line;

  always @(posedge clk) begin
    if (!rst_n) begin
      now <= 0;
      rw_in <= '0;
      cpu_done <= 1'b0;
      cpu_outstanding <= 0;
      ctag <= 8'd1;
      w_left <= 0;
      mem_reads <= 0;
      c2c_count <= 0;
      coh_cpy_count <= 0;
      dq.delete();
      mq.delete();
      coh_q.delete();
    end else begin
      now <= now + 1;
      cpu_done <= 1'b0;

      // processor request
      if (cpu_req) begin
        runway_t r;
        r.op = cpu_priv ? RW_RD_PRIV : RW_RD_SHAR;
        r.src = 4'd0;
        r.tag = ctag;
        r.payload = {32'd0, cpu_addr[31:5], 5'd0};
        dq.push_back(r);
        o_addr[ctag] = {cpu_addr[31:5], 5'd0};
        o_start[ctag] = now;
        o_wait_c2c[ctag] = 1'b0;
        coh_q.push_back(ctag);
        ctag <= (ctag == 8'd255) ? 8'd1 : ctag + 1'b1;
        cpu_outstanding <= cpu_outstanding + 1;
      end

      // coherency responses, in order
      if (coh_valid && coh_q.size() > 0) begin
        logic [7:0] t;
        t = coh_q.pop_front();
        if (coh_resp == COH_CPY) begin
          o_wait_c2c[t] = 1'b1;
          coh_cpy_count <= coh_cpy_count + 1;
        end else begin
          mq.push_back('{due: -1, dest: 4'd0, tag: t, addr: o_addr[t], beats: 4, to_cpu: 1'b1});
        end
      end

      // Widget bus traffic
      case (rw_out.op)
        RW_NC_RD, RW_FLUSH: begin
          mq.push_back('{due: -1, dest: CLIENT_ID, tag: rw_out.tag, addr: rw_out.payload[31:0],
                         beats: int'(rw_out.payload[36:32]), to_cpu: 1'b0});
          mem_reads <= mem_reads + 1;
        end
        RW_NC_WR, RW_C2C_WR: begin
          w_left <= int'(rw_out.payload[36:32]);
          w_c2c  <= (rw_out.op == RW_C2C_WR);
          w_addr <= rw_out.payload[31:0];
          w_tag  <= rw_out.tag;
          w_i    <= 0;
        end
        RW_DATA: if (w_left > 0) begin
          if (w_c2c) begin
            logic [255:0] l;
            l = w_line;
            l[w_i*64 +: 64] = rw_out.payload;
            w_line <= l;
            if (w_left == 1) begin
              cpu_done <= 1'b1;
              cpu_daddr <= o_addr[w_tag];
              cpu_data <= l;
              cpu_lat <= now - o_start[w_tag];
              cpu_c2c <= 1'b1;
              cpu_outstanding <= cpu_outstanding - 1;
              c2c_count <= c2c_count + 1;
            end
          end else begin
            mem[w_addr + 32'(w_i*8)] = rw_out.payload;
          end
          w_i <= w_i + 1;
          w_left <= w_left - 1;
        end
        default: ;
      endcase

      // memory controller: one read at a time
      if (mq.size() > 0) begin
        if (mq[0].due < 0) mq[0].due = now + MEM_LAT;
        else if (now >= mq[0].due) begin
          mreq_t m;
          logic [255:0] l;
          m = mq.pop_front();
          l = '0;
          for (int i = 0; i < m.beats; i++) begin
            runway_t r;
            r.op = RW_DATA;
            r.src = m.dest;
            r.tag = m.tag;
            r.payload = memrd(m.addr + 32'(i*8));
            if (i < 4) l[i*64 +: 64] = r.payload;
            if (!m.to_cpu) dq.push_back(r);
          end
          if (m.to_cpu) begin
            cpu_done <= 1'b1;
            cpu_daddr <= m.addr;
            cpu_data <= l;
            cpu_lat <= now + 4 - o_start[m.tag];
            cpu_c2c <= 1'b0;
            cpu_outstanding <= cpu_outstanding - 1;
          end
        end
      end

      rw_in <= (dq.size() > 0) ? dq.pop_front() : '0;
    end
  end
endmodule
