// tb_smcc: shared memory cache controller on its own. The metadata cache,
// line allocator, RIM command port and NI send port are behavioural models.
// Checks the coherency response for each case (non-shared address, record
// hit, record miss, block not valid), the commands issued for each miss
// class (LSMSM, LDCM, RDCM), the handling of an invalidate-and-forward
// message (also one that arrives before the block it names), response order
// for back-to-back snoops and four misses in progress at once.
module tb_smcc;
  import avl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [31:0] SHB = 32'h8000_0000;
  logic [5:0] node_id = 6'd1;
  logic [31:0] sh_base = SHB, sh_limit = SHB + 32'h0100_0000;
  runway_t taxi = '0;
  logic snp_valid;
  coh_resp_t snp_resp;
  logic md_req, md_we, md_probe = 0, md_hit = 0, md_done = 0;
  logic [19:0] md_key;
  logic [63:0] md_wdata, md_rdata = '0;
  logic rim_req, rim_ack = 0, rim_done = 0;
  rim_cmd_t rim_cmd;
  logic al_req, al_gnt = 0, fr_req, fr_ack;
  logic [10:0] al_line = 0, fr_line, tx_line;
  logic tx_req, tx_done = 0, rx_valid = 0;
  msg_t tx_msg, rx_msg = '0;
  logic ev_lsmsh, ev_lsmsm, ev_ldcm, ev_rdcm, ev_fwd;
  logic [2:0] busy_slots;

  smcc dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // metadata model: first touch of a key misses, later ones hit
  logic [63:0] rec [int];
  bit seen [int];
  int md_t = 0, md_reads = 0;
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
        else md_reads++;
        md_rdata <= rec.exists(int'(md_key)) ? rec[int'(md_key)] : '0;
        seen[int'(md_key)] = 1;
        md_t = -2;
      end
    end
  end
  int next_line = 600;
  always @(posedge clk) begin
    al_gnt <= 0;
    if (rst_n && al_req && !al_gnt) begin al_gnt <= 1; al_line <= 11'(next_line); next_line++; end
  end
  assign fr_ack = fr_req;
  int freed [$];
  always @(posedge clk) if (rst_n && fr_req) freed.push_back(int'(fr_line));
  rim_cmd_t cmds [$];
  int rim_cnt = -1;
  always @(posedge clk) begin
    rim_ack <= 0; rim_done <= 0;
    if (rst_n && rim_req && !rim_ack && rim_cnt < 0) begin rim_ack <= 1; cmds.push_back(rim_cmd); rim_cnt = 6; end
    else if (rim_cnt > 0) rim_cnt--;
    else if (rim_cnt == 0) begin rim_done <= 1; rim_cnt = -1; end
  end
  msg_t sent [$];
  int sent_line [$];
  int tx_cnt = -1;
  always @(posedge clk) begin
    tx_done <= 0;
    if (rst_n && tx_req && tx_cnt < 0 && !tx_done) begin sent.push_back(tx_msg); sent_line.push_back(int'(tx_line)); tx_cnt = 3; end
    else if (tx_cnt > 0) tx_cnt--;
    else if (tx_cnt == 0) begin tx_done <= 1; tx_cnt = -1; end
  end
  coh_resp_t resp [$];
  int n_sh = 0, n_sm = 0, n_ld = 0, n_rd = 0, n_fw = 0, max_busy = 0;
  always @(posedge clk) if (rst_n) begin
    if (snp_valid) resp.push_back(snp_resp);
    n_sh += ev_lsmsh; n_sm += ev_lsmsm; n_ld += ev_ldcm; n_rd += ev_rdcm; n_fw += ev_fwd;
    if (int'(busy_slots) > max_busy) max_busy = int'(busy_slots);
  end

  function automatic logic [63:0] mkrec(bstate_t b, int home);
    logic [63:0] r = '0;
    r[1:0] = b;
    r[3:2] = PR_MIGRATORY;
    r[9:4] = 6'(home);
    return r;
  endfunction
  function automatic logic [31:0] ka(int key, int sub);
    return SHB + 32'(key * 128 + sub * 32);
  endfunction
  task automatic snoop(input rw_op_t op, input logic [31:0] a, input logic [7:0] tag);
    taxi = '0; taxi.op = op; taxi.src = 4'd2; taxi.tag = tag; taxi.payload = 64'(a);
    @(negedge clk);
    taxi = '0;
  endtask
  task automatic idle_wait();
    int n = 0;
    while (n < 10) begin @(negedge clk); n = (busy_slots == 0) ? n + 1 : 0; end
  endtask
  task automatic data_in(input int slot, input int line);
    rx_msg = '0; rx_msg.mtype = MT_DATA; rx_msg.slot = 2'(slot); rx_msg.sb_line = 11'(line);
    rx_msg.has_data = 1; rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, s0, f0;
    rec[0] = mkrec(BS_EXCLUSIVE, 1);
    rec[2] = mkrec(BS_SHARED, 1); seen[2] = 1;
    rec[3] = mkrec(BS_INVALID, 7);
    for (int k = 20; k < 24; k++) rec[k] = mkrec(BS_INVALID, 7);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // address outside the shared region
    snoop(RW_RD_SHAR, 32'h0000_1000, 8'h01);
    repeat (3) @(negedge clk);
    chk(resp.size() == 1 && resp[0] == COH_OK && md_reads == 0, "private address: COH_OK, no lookup");

    // record miss, block valid: LSMSM
    snoop(RW_RD_SHAR, ka(0, 3), 8'h02);
    idle_wait();
    chk(resp.size() == 2 && resp[1] == COH_CPY, "record miss answered COH_CPY");
    chk(n_sm == 1, "LSMSM event");
    chk(cmds.size() == 2 && cmds[0].op == RC_MEM_RD && cmds[0].beats == 5'd4 && cmds[0].addr == ka(0, 3)
        && cmds[0].sb_addr == {11'd600, 4'd0}, "line read from memory into SB");
    chk(cmds.size() == 2 && cmds[1].op == RC_C2C && cmds[1].dest == 4'd2 && cmds[1].dtag == 8'h02
        && cmds[1].addr == ka(0, 3), "line supplied cache to cache");
    chk(freed.size() == 1 && freed[0] == 600, "line freed");

    // record hit, exclusive: LSMSH
    snoop(RW_RD_PRIV, ka(0, 1), 8'h03);
    idle_wait();
    chk(resp.size() == 3 && resp[2] == COH_OK && n_sh == 1 && cmds.size() == 2, "hit exclusive: COH_OK, LSMSH");
    snoop(RW_RD_SHAR, ka(2, 0), 8'h04);
    idle_wait();
    chk(resp.size() == 4 && resp[3] == COH_SHR && n_sh == 2, "hit shared: COH_SHR");

    // write to a shared block: not valid for a private read, home is here: LDCM
    snoop(RW_RD_PRIV, ka(2, 2), 8'h05);
    repeat (30) @(negedge clk);
    chk(resp.size() == 5 && resp[4] == COH_CPY && n_ld == 1, "LDCM: COH_CPY");
    chk(sent.size() == 1 && sent[0].mtype == MT_REQ && sent[0].dst == 6'd1 && sent[0].req_node == 6'd1
        && sent[0].blk == 25'(ka(2, 0) >> 7), "request to local DC");
    c0 = cmds.size(); f0 = freed.size();
    data_in(int'(sent[0].slot), int'(sent[0].sb_line));
    idle_wait();
    chk(cmds.size() == c0 + 2, "write block and supply line");
    if (cmds.size() == c0 + 2) begin
      chk(cmds[c0].op == RC_MEM_WR && cmds[c0].beats == 5'd16 && cmds[c0].addr == ka(2, 0)
          && cmds[c0].sb_addr == {sent[0].sb_line, 4'd0}, "block written to S-COMA page");
      chk(cmds[c0+1].op == RC_C2C && cmds[c0+1].beats == 5'd4 && cmds[c0+1].dtag == 8'h05
          && cmds[c0+1].sb_addr == {sent[0].sb_line, 2'd2, 2'd0}, "missed line supplied");
    end
    chk(rec[2][1:0] == BS_EXCLUSIVE, "record set exclusive");
    chk(freed.size() == f0 + 1 && freed[f0] == int'(sent[0].sb_line), "receive line freed");

    // remote home: RDCM
    snoop(RW_RD_SHAR, ka(3, 0), 8'h06);
    repeat (30) @(negedge clk);
    chk(n_rd == 1 && sent.size() == 2 && sent[1].mtype == MT_REQ && sent[1].dst == 6'd7, "RDCM request to home 7");
    data_in(int'(sent[1].slot), int'(sent[1].sb_line));
    idle_wait();
    chk(rec[3][1:0] == BS_EXCLUSIVE, "remote block now exclusive here");

    // forward that overtakes the block: held until the block is written here
    snoop(RW_RD_SHAR, ka(5, 0), 8'h07);
    rec[5] = mkrec(BS_INVALID, 7);
    repeat (30) @(negedge clk);
    c0 = cmds.size();
    rx_msg = '0; rx_msg.mtype = MT_INV_FWD; rx_msg.blk = 25'(ka(5, 0) >> 7); rx_msg.req_node = 6'd8;
    rx_msg.sb_line = 11'd66; rx_msg.slot = 2'd1; rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
    repeat (40) @(negedge clk);
    chk(cmds.size() == c0, "forward waits while the block is in flight");
    // a forward for another block is not held up behind the parked one
    s0 = sent.size();
    rx_msg = '0; rx_msg.mtype = MT_INV_FWD; rx_msg.blk = 25'(ka(3, 0) >> 7); rx_msg.req_node = 6'd10;
    rx_msg.sb_line = 11'd77; rx_msg.slot = 2'd3; rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
    repeat (60) @(negedge clk);
    chk(cmds.size() == c0 + 1 && cmds[c0].op == RC_FLUSH_RD && cmds[c0].addr == ka(3, 0)
        && sent.size() == s0 + 1 && sent[s0].dst == 6'd10 && rec[3][1:0] == BS_INVALID,
        "forward for another block served meanwhile");
    c0 = cmds.size();
    data_in(int'(sent[s0-1].slot), int'(sent[s0-1].sb_line));
    idle_wait();
    chk(cmds.size() == c0 + 3 && cmds[c0].op == RC_MEM_WR && cmds[c0+1].op == RC_C2C
        && cmds[c0+2].op == RC_FLUSH_RD, "block written and supplied before it is flushed for the forward");
    chk(sent[sent.size()-1].mtype == MT_DATA && sent[sent.size()-1].dst == 6'd8, "then forwarded");
    chk(rec[5][1:0] == BS_INVALID, "and invalid here");

    // invalidate and forward
    c0 = cmds.size(); s0 = resp.size();
    rx_msg = '0; rx_msg.mtype = MT_INV_FWD; rx_msg.blk = 25'(ka(0, 0) >> 7); rx_msg.req_node = 6'd9;
    rx_msg.sb_line = 11'd55; rx_msg.slot = 2'd2; rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
    idle_wait();
    chk(n_fw == 3 && resp.size() == s0, "forward event, no bus response");
    chk(cmds.size() == c0 + 1 && cmds[c0].op == RC_FLUSH_RD && cmds[c0].beats == 5'd16 && cmds[c0].addr == ka(0, 0),
        "block flushed from local caches");
    chk(sent.size() == 6 && sent[5].mtype == MT_DATA && sent[5].dst == 6'd9 && sent[5].sb_line == 11'd55
        && sent[5].slot == 2'd2 && sent[5].has_data, $sformatf("block forwarded to requester (%0d sent)", sent.size()));
    chk(rec[0][1:0] == BS_INVALID, "record invalidated");

    // back-to-back snoops keep bus order
    s0 = resp.size();
    snoop(RW_RD_SHAR, 32'h0000_2000, 8'h10);
    snoop(RW_RD_SHAR, ka(2, 1), 8'h11);
    snoop(RW_RD_SHAR, 32'h0000_3000, 8'h12);
    idle_wait();
    chk(resp.size() == s0 + 3 && resp[s0] == COH_OK && resp[s0+1] == COH_OK && resp[s0+2] == COH_OK,
        "responses in bus order");

    // four misses in progress at once
    s0 = sent.size();
    for (int k = 20; k < 24; k++) snoop(RW_RD_SHAR, ka(k, 0), 8'(k));
    repeat (80) @(negedge clk);
    chk(max_busy == 4 && sent.size() == s0 + 4, $sformatf("four misses outstanding (max %0d)", max_busy));
    for (int i = s0; i < sent.size(); i++) data_in(int'(sent[i].slot), int'(sent[i].sb_line));
    idle_wait();
    chk(n_rd == 6, "all remote misses counted");
    for (int k = 20; k < 24; k++) chk(rec[k][1:0] == BS_EXCLUSIVE, $sformatf("record %0d exclusive", k));
    chk(freed.size() == 11, $sformatf("every line freed (%0d)", freed.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
