// tb_ni: network interface with an SBM and Shared Buffer. Sends a message
// with a payload out on the link and checks the flits; sends one to its own
// node and checks the loopback delivery (payload landed in the named SB line,
// header to the SM-CC); receives an MT_MPDATA message (payload into the
// MP-CC's receive line, stalling while none is offered) and an MT_REQ header
// (to the DC) from the link.
module tb_ni;
  import avl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [5:0] ME = 6'd2;
  logic ltx_valid, ltx_ready = 1, lrx_valid = 0, lrx_ready;
  logic [63:0] ltx_data, lrx_data = 0, sb_rdata;
  logic [1:0] tx_req = 0, tx_done;
  msg_t [1:0] tx_msg;
  logic [1:0][10:0] tx_line;
  msg_t rx_msg;
  logic smcc_v, dc_v, mpcc_v, rcv_valid = 0;
  logic [10:0] rcv_line = 11'd500;
  logic [2:0] sreq, sgnt, srv;
  sb_req_t [2:0] sq;
  logic sb_en, sb_we;
  logic [14:0] sb_addr;
  logic [63:0] sb_wdata, sram_q;

  ni dut (.clk, .rst_n, .node_id(ME), .ltx_valid, .ltx_data, .ltx_ready, .lrx_valid, .lrx_data,
    .lrx_ready, .tx_req, .tx_msg, .tx_line, .tx_done, .rx_msg, .smcc_rx_valid(smcc_v),
    .dc_rx_valid(dc_v), .mpcc_rx_valid(mpcc_v), .rcv_line, .rcv_valid,
    .sbt_req(sreq[1]), .sbt_out(sq[1]), .sbt_gnt(sgnt[1]), .sbt_rvalid(srv[1]), .sbt_rdata(sb_rdata),
    .sbr_req(sreq[2]), .sbr_out(sq[2]), .sbr_gnt(sgnt[2]), .ev_loopback());
  sbm #(.N_CLIENTS(3), .N_ALLOC(1)) u_sbm (.clk, .rst_n, .req(sreq), .sbreq(sq), .gnt(sgnt),
    .rvalid(srv), .rdata(sb_rdata), .alloc_req(1'b0), .alloc_gnt(), .alloc_line(),
    .free_req(1'b0), .free_line('0), .free_ack(), .free_count(),
    .sb_en, .sb_we, .sb_addr, .sb_wdata, .sb_rdata(sram_q));
  shared_buffer u_sb (.clk, .en(sb_en), .we(sb_we), .addr(sb_addr), .wdata(sb_wdata), .rdata(sram_q));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic sbwr(input logic [14:0] a, input logic [63:0] v);
    sq[0] = '0; sq[0].we = 1; sq[0].addr = a; sq[0].wdata = v; sreq[0] = 1;
    @(negedge clk);
    while (!sgnt[0]) @(negedge clk);
    sreq[0] = 0;
    @(negedge clk);
  endtask
  task automatic sbrd(input logic [14:0] a, output logic [63:0] d);
    sq[0] = '0; sq[0].addr = a; sreq[0] = 1;
    @(negedge clk);
    while (!sgnt[0]) @(negedge clk);
    sreq[0] = 0;
    while (!srv[0]) @(negedge clk);
    d = sb_rdata;
  endtask
  function automatic logic [63:0] w(int i);
    return 64'hbeef_0000_0000_0000 + 64'(i * 3);
  endfunction

  // link capture
  logic [63:0] cap [$];
  always @(posedge clk) if (rst_n && ltx_valid && ltx_ready) cap.push_back(ltx_data);
  // delivered headers
  int n_smcc = 0, n_dc = 0, n_mpcc = 0;
  msg_t last;
  always @(posedge clk) if (rst_n) begin
    if (smcc_v) begin n_smcc++; last = rx_msg; end
    if (dc_v)   begin n_dc++;   last = rx_msg; end
    if (mpcc_v) begin n_mpcc++; last = rx_msg; end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t m;
    logic [63:0] d;
    sreq[0] = 0; sq[0] = '0;
    tx_msg = '0; tx_line = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 16; i++) sbwr(15'(300 * 16 + i), w(i));

    // remote send
    m = '0; m.mtype = MT_DATA; m.src = ME; m.dst = 6'd5; m.req_node = 6'd5; m.blk = 25'h12345;
    m.sb_line = 11'd77; m.slot = 2'd3; m.has_data = 1;
    tx_msg[0] = m; tx_line[0] = 11'd300; tx_req[0] = 1;
    @(negedge clk);
    while (!tx_done[0]) @(negedge clk);
    tx_req[0] = 0;
    @(negedge clk);
    chk(cap.size() == 17, $sformatf("%0d flits sent", cap.size()));
    chk(cap.size() > 0 && cap[0] == 64'(m), "header flit");
    for (int i = 1; i < 17 && i < cap.size(); i++) chk(cap[i] == w(i - 1), "payload flit");

    // loopback
    m.dst = ME; m.sb_line = 11'd400;
    tx_msg[1] = m; tx_line[1] = 11'd300; tx_req[1] = 1;
    @(negedge clk);
    while (!tx_done[1]) @(negedge clk);
    tx_req[1] = 0;
    repeat (60) @(negedge clk);
    chk(cap.size() == 17, "loopback does not use the link");
    chk(n_smcc == 1 && last == m, "loopback header delivered to SM-CC");
    for (int i = 0; i < 16; i++) begin
      sbrd(15'(400 * 16 + i), d);
      chk(d == w(i), "loopback payload in SB");
    end

    // MPDATA from the link, no receive line offered at first
    m = '0; m.mtype = MT_MPDATA; m.src = 6'd9; m.dst = ME; m.blk = 25'h00abc; m.has_data = 1;
    lrx_valid = 1; lrx_data = 64'(m);
    repeat (5) @(negedge clk);
    chk(!lrx_ready, "stalls without a receive line");
    rcv_valid = 1;
    for (int i = 0; i < 17; i++) begin
      lrx_valid = 1;
      lrx_data = (i == 0) ? 64'(m) : w(100 + i);
      @(negedge clk);
      while (!lrx_ready) @(negedge clk);
      // the flit was taken at the edge just passed only if ready was high before it
    end
    lrx_valid = 0;
    repeat (60) @(negedge clk);
    chk(n_mpcc == 1 && last.sb_line == 11'd500 && last.blk == 25'h00abc, "MPDATA header to MP-CC");
    for (int i = 0; i < 16; i++) begin
      sbrd(15'(500 * 16 + i), d);
      chk(d == w(101 + i), $sformatf("MPDATA payload word %0d", i));
    end

    // request header
    m = '0; m.mtype = MT_REQ; m.src = 6'd4; m.dst = ME; m.req_node = 6'd4; m.blk = 25'h777;
    lrx_valid = 1; lrx_data = 64'(m);
    @(negedge clk);
    lrx_valid = 0;
    repeat (3) @(negedge clk);
    chk(n_dc == 1 && last == m && n_smcc == 1, "REQ header to DC only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
