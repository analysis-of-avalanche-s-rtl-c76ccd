// tb_mem_env: testbench environment of a RIM, SBM and Shared Buffer with a
// simple Runway memory responder, for testing blocks that use the metadata
// cache, the RIM and the SB. Command port 0 of the RIM and SB port 1 are
// the unit under test's; SB port 0 is the RIM's. SB port 2 is offered to the
// testbench for inspecting the SB. Memory returns read beats LAT cycles
// after the address, one per cycle, from the function mem_word() unless the
// word was written; writes are stored. c2c_* record the last cache-to-cache
// write seen.
module tb_mem_env
  import avl_pkg::*;
#(
  parameter int unsigned LAT = 26
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_req,
  input  rim_cmd_t      cmd,
  output logic          cmd_ack,
  output logic          cmd_done,
  input  logic          u_sb_req,
  input  sb_req_t       u_sb_out,
  output logic          u_sb_gnt,
  output logic          u_sb_rvalid,
  input  logic          t_sb_req,
  input  sb_req_t       t_sb_out,
  output logic          t_sb_gnt,
  output logic          t_sb_rvalid,
  output logic [63:0]   sb_rdata,
  output int            n_reads,
  output int            n_writes,
  output logic [31:0]   c2c_addr,
  output logic [3:0]    c2c_dest,
  output logic [7:0]    c2c_tag,
  output logic [255:0]  c2c_data
);
  runway_t rw_in, rw_out;
  logic [2:0] sreq, sgnt, srv;
  sb_req_t [2:0] sq;
  logic sb_en, sb_we;
  logic [14:0] sb_addr;
  logic [63:0] sb_wdata, sram_q;
  logic [4:0] cr, ca, cd;
  rim_cmd_t [4:0] cc;

  assign cr = {4'b0, cmd_req};
  always_comb begin
    cc = '0;
    cc[0] = cmd;
  end
  assign cmd_ack = ca[0];
  assign cmd_done = cd[0];

  rim #(.N_CMD(5), .N_SNOOP(2)) u_rim (
    .clk, .rst_n, .rw_in, .rw_out, .rw_ready(1'b1), .taxi(),
    .snp_valid(2'b0), .snp_resp({COH_OK, COH_OK}), .coh_valid(), .coh_resp(),
    .cmd_req(cr), .cmd(cc), .cmd_ack(ca), .cmd_done(cd),
    .sb_req(sreq[0]), .sb_out(sq[0]), .sb_gnt(sgnt[0]), .sb_rvalid(srv[0]), .sb_rdata,
    .diff_clean('0), .diff_dirty('0), .diff_mask(), .splice_base('0), .splice_upd('0),
    .splice_mask('0), .splice_out());

  assign sreq[1] = u_sb_req;
  assign sq[1] = u_sb_out;
  assign u_sb_gnt = sgnt[1];
  assign u_sb_rvalid = srv[1];
  assign sreq[2] = t_sb_req;
  assign sq[2] = t_sb_out;
  assign t_sb_gnt = sgnt[2];
  assign t_sb_rvalid = srv[2];

  sbm #(.N_CLIENTS(3), .N_ALLOC(1)) u_sbm (
    .clk, .rst_n, .req(sreq), .sbreq(sq), .gnt(sgnt), .rvalid(srv), .rdata(sb_rdata),
    .alloc_req(1'b0), .alloc_gnt(), .alloc_line(), .free_req(1'b0), .free_line('0),
    .free_ack(), .free_count(),
    .sb_en, .sb_we, .sb_addr, .sb_wdata, .sb_rdata(sram_q));
  shared_buffer u_sb (.clk, .en(sb_en), .we(sb_we), .addr(sb_addr), .wdata(sb_wdata), .rdata(sram_q));

  function automatic logic [63:0] mem_word(logic [31:0] a);
    return {a, 32'hfeed_0000 ^ a};
  endfunction

  logic [63:0] mem [logic [31:0]];
  runway_t dq [$];
  int now, due;
  logic [31:0] ra;
  int rbeats, wleft, wi;
  logic [7:0] rtag;
  logic wc2c;
  logic [31:0] waddr;
  logic rpend;

  always @(posedge clk) begin
    if (!rst_n) begin
      now <= 0; rpend <= 0; wleft <= 0; rw_in <= '0; n_reads <= 0; n_writes <= 0;
    end else begin
      now <= now + 1;
      case (rw_out.op)
        RW_NC_RD, RW_FLUSH: begin
          rpend <= 1; due <= now + LAT; ra <= rw_out.payload[31:0];
          rbeats <= int'(rw_out.payload[36:32]); rtag <= rw_out.tag; n_reads <= n_reads + 1;
        end
        RW_NC_WR, RW_C2C_WR: begin
          wleft <= int'(rw_out.payload[36:32]); wi <= 0; wc2c <= rw_out.op == RW_C2C_WR;
          waddr <= rw_out.payload[31:0];
          if (rw_out.op == RW_C2C_WR) begin
            c2c_addr <= rw_out.payload[31:0]; c2c_dest <= rw_out.src; c2c_tag <= rw_out.tag;
          end else n_writes <= n_writes + 1;
        end
        RW_DATA: if (wleft > 0) begin
          if (wc2c) c2c_data[wi*64 +: 64] <= rw_out.payload;
          else mem[waddr + 32'(wi*8)] = rw_out.payload;
          wi <= wi + 1; wleft <= wleft - 1;
        end
        default: ;
      endcase
      if (rpend && now >= due) begin
        rpend <= 0;
        for (int i = 0; i < rbeats; i++) begin
          runway_t r;
          logic [31:0] a;
          a = ra + 32'(i*8);
          r.op = RW_DATA; r.src = 4'hE; r.tag = rtag;
          r.payload = mem.exists(a) ? mem[a] : mem_word(a);
          dq.push_back(r);
        end
      end
      rw_in <= (dq.size() > 0) ? dq.pop_front() : '0;
    end
  end
endmodule
