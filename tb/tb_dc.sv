// tb_dc: directory controller on its own. The metadata cache, line
// allocator, RIM command port and NI send port are behavioural models.
// Checks: a request for a free block is served from home memory (flush read
// into an allocated line, MT_DATA to the requester, line freed); a request
// for a block held exclusive elsewhere sends MT_INV_FWD to the owner; the
// record is rewritten with the requester as exclusive owner; four requests
// are handled at once; two requests for one block are served in turn.
module tb_dc;
  import avl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [31:0] SHB = 32'h8000_0000;
  logic [5:0] node_id = 6'd1;
  logic [31:0] sh_base = SHB;
  logic rx_valid = 0;
  msg_t rx_msg = '0;
  logic md_req, md_we, md_probe = 0, md_hit = 0, md_done = 0;
  logic [19:0] md_key;
  logic [127:0] md_wdata, md_rdata = '0;
  logic rim_req, rim_ack = 0, rim_done = 0;
  rim_cmd_t rim_cmd;
  logic al_req, al_gnt = 0, fr_req, fr_ack;
  logic [10:0] al_line = 0, fr_line, tx_line;
  logic tx_req, tx_done = 0;
  msg_t tx_msg;
  logic ev_supply, ev_invfwd, ev_md_miss;
  logic [2:0] busy_slots;

  dc dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // metadata model
  logic [127:0] rec [int];
  bit seen [int];
  int md_t = 0;
  always @(posedge clk) begin
    md_probe <= 0; md_hit <= 0; md_done <= 0;
    if (!rst_n) md_t = 0;
    else if (md_t < 0) md_t++;
    else if (md_t == 0 && md_req) md_t = 1;
    else if (md_t > 0) begin
      md_t++;
      if (md_t == 2) begin md_probe <= 1; md_hit <= seen.exists(int'(md_key)); end
      if (md_t == 4) begin
        md_done <= 1;
        if (md_we) rec[int'(md_key)] = md_wdata;
        md_rdata <= rec.exists(int'(md_key)) ? rec[int'(md_key)] : '0;
        seen[int'(md_key)] = 1;
        md_t = -2;
      end
    end
  end
  // allocator and free models
  int next_line = 300;
  always @(posedge clk) begin
    al_gnt <= 0;
    if (rst_n && al_req && !al_gnt) begin al_gnt <= 1; al_line <= 11'(next_line); next_line++; end
  end
  assign fr_ack = fr_req;
  int freed [$];
  always @(posedge clk) if (rst_n && fr_req) freed.push_back(int'(fr_line));
  // RIM model, slow enough for slots to pile up
  rim_cmd_t cmds [$];
  int rim_cnt = -1;
  always @(posedge clk) begin
    rim_ack <= 0; rim_done <= 0;
    if (rst_n && rim_req && !rim_ack && rim_cnt < 0) begin rim_ack <= 1; cmds.push_back(rim_cmd); rim_cnt = 30; end
    else if (rim_cnt > 0) rim_cnt--;
    else if (rim_cnt == 0) begin rim_done <= 1; rim_cnt = -1; end
  end
  // NI send model
  msg_t sent [$];
  int sent_line [$];
  int tx_cnt = -1;
  always @(posedge clk) begin
    tx_done <= 0;
    if (rst_n && tx_req && tx_cnt < 0 && !tx_done) begin sent.push_back(tx_msg); sent_line.push_back(int'(tx_line)); tx_cnt = 3; end
    else if (tx_cnt > 0) tx_cnt--;
    else if (tx_cnt == 0) begin tx_done <= 1; tx_cnt = -1; end
  end
  int n_sup = 0, n_fwd = 0, n_miss = 0, max_busy = 0;
  always @(posedge clk) if (rst_n) begin
    n_sup += ev_supply; n_fwd += ev_invfwd; n_miss += ev_md_miss;
    if (int'(busy_slots) > max_busy) max_busy = int'(busy_slots);
  end

  function automatic logic [127:0] mkrec(gstate_t g, int owner);
    logic [127:0] r = '0;
    r[1:0] = g;
    r[7:2] = 6'(owner);
    if (g != GS_FREE) r[8 + owner] = 1'b1;
    return r;
  endfunction
  task automatic req(input int key, input int from);
    rx_msg = '0; rx_msg.mtype = MT_REQ; rx_msg.src = 6'(from); rx_msg.dst = node_id;
    rx_msg.req_node = 6'(from); rx_msg.blk = 25'((SHB >> 7) + key); rx_msg.sb_line = 11'(900 + key);
    rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
  endtask
  task automatic idle_wait();
    int n = 0;
    while (n < 10) begin @(negedge clk); n = (busy_slots == 0) ? n + 1 : 0; end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rec[1] = mkrec(GS_EXCLUSIVE, 5);
    for (int k = 10; k < 14; k++) rec[k] = mkrec(GS_FREE, 0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // free block
    req(0, 3);
    idle_wait();
    chk(cmds.size() == 1 && cmds[0].op == RC_FLUSH_RD && cmds[0].beats == 5'd16, "flush read of a whole block");
    chk(cmds.size() == 1 && cmds[0].addr == SHB && cmds[0].sb_addr == {11'd300, 4'd0}, "flush address and SB line");
    chk(sent.size() == 1 && sent[0].mtype == MT_DATA && sent[0].dst == 6'd3 && sent[0].has_data
        && sent[0].src == node_id && sent[0].sb_line == 11'd900, "MT_DATA to requester");
    chk(sent_line.size() == 1 && sent_line[0] == 300, "data sent from the flushed line");
    chk(rec[0] == mkrec(GS_EXCLUSIVE, 3), "record: exclusive at requester");
    chk(freed.size() == 1 && freed[0] == 300, "line freed");
    chk(n_sup == 1 && n_fwd == 0 && n_miss == 1, "supply and miss events");

    // exclusive elsewhere
    req(1, 3);
    idle_wait();
    chk(cmds.size() == 1, "forward needs no memory read");
    chk(sent.size() == 2 && sent[1].mtype == MT_INV_FWD && sent[1].dst == 6'd5 && !sent[1].has_data
        && sent[1].req_node == 6'd3, "MT_INV_FWD to owner");
    chk(rec[1] == mkrec(GS_EXCLUSIVE, 3), "record moves to requester");
    chk(n_fwd == 1 && freed.size() == 1, "forward event, no line used");

    // migrated block requested again
    req(0, 6);
    idle_wait();
    chk(sent.size() == 3 && sent[2].mtype == MT_INV_FWD && sent[2].dst == 6'd3, "forward to new owner");
    chk(rec[0] == mkrec(GS_EXCLUSIVE, 6), "record follows migration");
    chk(n_miss == 2, "second lookup of block 0 hits");

    // owner asks again for its own block: served from memory
    req(0, 6);
    idle_wait();
    chk(sent.size() == 4 && sent[3].mtype == MT_DATA && sent[3].dst == 6'd6, "owner's own request served with data");

    // two requests for one free block back to back: the second must see
    // the record the first wrote and be forwarded to the new owner
    rec[20] = mkrec(GS_FREE, 0);
    req(20, 2);
    req(20, 4);
    idle_wait();
    chk(sent.size() == 6 && sent[4].mtype == MT_DATA && sent[4].dst == 6'd2, "first request served from home");
    chk(sent.size() == 6 && sent[5].mtype == MT_INV_FWD && sent[5].dst == 6'd2 && sent[5].req_node == 6'd4,
        "second request for the same block forwarded to the new owner");
    chk(rec[20] == mkrec(GS_EXCLUSIVE, 4), "record ends with the second requester");

    // four requests at once
    for (int k = 10; k < 14; k++) req(k, 2 + k - 10);
    idle_wait();
    chk(max_busy == 4, $sformatf("four slots busy at once (max %0d)", max_busy));
    chk(sent.size() == 10, "four more messages");
    for (int k = 10; k < 14; k++) chk(rec[k] == mkrec(GS_EXCLUSIVE, 2 + k - 10), $sformatf("record %0d", k));
    chk(freed.size() == 7, "all lines freed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
