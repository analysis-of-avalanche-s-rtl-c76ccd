// tb_mpcc: message-passing cache on its own. The allocator, free port and
// RIM command port are behavioural models that answer at once. Checks the
// one-cycle snoop answer (COH_CPY on a hit, COH_OK otherwise), the
// cache-to-cache command built for a hit, release of the line afterwards,
// refill of the receive line, and eviction when all entries are in use.
module tb_mpcc;
  import avl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  runway_t taxi = '0;
  logic snp_valid, rx_valid = 0, rcv_valid, al_req, al_gnt = 0, fr_req, fr_ack;
  coh_resp_t snp_resp;
  msg_t rx_msg = '0;
  logic [10:0] rcv_line, al_line = 0, fr_line;
  logic rim_req, rim_ack = 0, rim_done = 0, ev_supply, ev_evict;
  rim_cmd_t rim_cmd;

  mpcc dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // allocator model: hands out 100, 101, ...
  int next_line = 100;
  always @(posedge clk) begin
    al_gnt <= 0;
    if (rst_n && al_req && !al_gnt) begin al_gnt <= 1; al_line <= 11'(next_line); next_line++; end
  end
  assign fr_ack = fr_req;
  int freed [$];
  always @(posedge clk) if (rst_n && fr_req) freed.push_back(int'(fr_line));
  // RIM model
  rim_cmd_t cmds [$];
  int rim_cnt = -1;
  always @(posedge clk) begin
    rim_ack <= 0; rim_done <= 0;
    if (rst_n && rim_req && !rim_ack && rim_cnt < 0) begin rim_ack <= 1; cmds.push_back(rim_cmd); rim_cnt = 5; end
    else if (rim_cnt > 0) rim_cnt--;
    else if (rim_cnt == 0) begin rim_done <= 1; rim_cnt = -1; end
  end
  int n_sup = 0, n_ev = 0;
  always @(posedge clk) if (rst_n) begin n_sup += ev_supply; n_ev += ev_evict; end

  task automatic mp(input logic [24:0] b);
    while (!rcv_valid) @(negedge clk);
    rx_msg = '0; rx_msg.mtype = MT_MPDATA; rx_msg.blk = b; rx_msg.sb_line = rcv_line; rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
    @(negedge clk);
  endtask
  task automatic snoop(input rw_op_t op, input logic [24:0] b, input logic [1:0] sub,
                       input logic [3:0] src, input logic [7:0] tag, output logic v, output coh_resp_t r);
    taxi = '0; taxi.op = op; taxi.src = src; taxi.tag = tag; taxi.payload = 64'({b, sub, 5'd0});
    @(negedge clk);
    taxi = '0;
    v = snp_valid; r = snp_resp;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic v;
    coh_resp_t r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    chk(rcv_valid && rcv_line == 100, "receive line taken from allocator");
    mp(25'h10);
    repeat (3) @(negedge clk);
    chk(rcv_valid && rcv_line == 101, "receive line refilled");

    snoop(RW_RD_SHAR, 25'h11, 2'd0, 4'd3, 8'h40, v, r);
    chk(v && r == COH_OK, "miss answered COH_OK");
    snoop(RW_WB, 25'h10, 2'd0, 4'd3, 8'h41, v, r);
    chk(!v, "non-read transaction not answered");
    snoop(RW_RD_SHAR, 25'h10, 2'd2, 4'd3, 8'h44, v, r);
    chk(v && r == COH_CPY, "hit answered COH_CPY");
    repeat (12) @(negedge clk);
    chk(cmds.size() == 1, "one C2C command");
    if (cmds.size() == 1) begin
      chk(cmds[0].op == RC_C2C && cmds[0].beats == 5'd4, "C2C of one 32-byte line");
      chk(cmds[0].addr == {25'h10, 2'd2, 5'd0}, "C2C address");
      chk(cmds[0].sb_addr == {11'd100, 2'd2, 2'd0}, "C2C SB address");
      chk(cmds[0].dest == 4'd3 && cmds[0].dtag == 8'h44, "C2C destination and tag");
    end
    chk(n_sup == 1 && freed.size() == 1 && freed[0] == 100, "line freed after supply");
    snoop(RW_RD_PRIV, 25'h10, 2'd2, 4'd3, 8'h45, v, r);
    chk(v && r == COH_OK, "supplied block no longer held");

    // fill all entries then one more to force an eviction
    for (int i = 0; i < 9; i++) mp(25'h200 + 25'(i));
    repeat (3) @(negedge clk);
    chk(n_ev == 1, "one eviction after 9 messages");
    chk(freed.size() == 2, "evicted line freed");
    snoop(RW_RD_SHAR, 25'h208, 2'd0, 4'd1, 8'h50, v, r);
    chk(v && r == COH_CPY, "newest block held");
    repeat (12) @(negedge clk);
    chk(cmds.size() == 2 && n_sup == 2, "second supply");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
