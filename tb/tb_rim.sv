// tb_rim: the RIM's command engine (through the memory environment) and,
// on a second instance, its Taxiway forwarding, coherency response merge and
// diff port. Checks memory-to-SB reads, SB-to-memory writes, cache-to-cache
// writes with their destination and tag, the one-cycle Taxiway delay and the
// in-order strongest-response merge of two snoopers answering at different
// times.
module tb_rim;
  import avl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_req = 0, cmd_ack, cmd_done;
  rim_cmd_t cmd = '0;
  logic t_req = 0, t_gnt, t_rv;
  sb_req_t t_out = '0;
  logic [63:0] sb_rdata;
  int n_reads, n_writes;
  logic [31:0] c2c_addr;
  logic [3:0] c2c_dest;
  logic [7:0] c2c_tag;
  logic [255:0] c2c_data;

  tb_mem_env u_env (.clk, .rst_n, .cmd_req, .cmd, .cmd_ack, .cmd_done,
    .u_sb_req(1'b0), .u_sb_out('0), .u_sb_gnt(), .u_sb_rvalid(),
    .t_sb_req(t_req), .t_sb_out(t_out), .t_sb_gnt(t_gnt), .t_sb_rvalid(t_rv),
    .sb_rdata, .n_reads, .n_writes, .c2c_addr, .c2c_dest, .c2c_tag, .c2c_data);

  // second instance: Taxiway, coherency merge, diff
  runway_t rw_in = '0, taxi;
  logic [1:0] snp_valid = '0;
  coh_resp_t [1:0] snp_resp;
  logic coh_valid;
  coh_resp_t coh_resp;
  logic [255:0] dclean = '0, ddirty = '0;
  logic [7:0] dmask;
  rim u_m (.clk, .rst_n, .rw_in, .rw_out(), .rw_ready(1'b1), .taxi, .snp_valid, .snp_resp,
    .coh_valid, .coh_resp, .cmd_req('0), .cmd('0), .cmd_ack(), .cmd_done(),
    .sb_req(), .sb_out(), .sb_gnt(1'b0), .sb_rvalid(1'b0), .sb_rdata('0),
    .diff_clean(dclean), .diff_dirty(ddirty), .diff_mask(dmask), .splice_base('0),
    .splice_upd('0), .splice_mask('0), .splice_out());

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic run(input rim_op_t op, input logic [31:0] a, input logic [14:0] sa,
                     input int beats, input logic [3:0] dest, input logic [7:0] dtag);
    cmd = '0;
    cmd.op = op; cmd.addr = a; cmd.sb_addr = sa; cmd.beats = 5'(beats);
    cmd.dest = dest; cmd.dtag = dtag;
    cmd_req = 1;
    @(negedge clk);
    while (!cmd_ack) @(negedge clk);
    cmd_req = 0;
    while (!cmd_done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic sbrd(input logic [14:0] a, output logic [63:0] d);
    t_out = '0; t_out.addr = a; t_req = 1;
    @(negedge clk);
    while (!t_gnt) @(negedge clk);
    t_req = 0;
    while (!t_rv) @(negedge clk);
    d = sb_rdata;
  endtask

  task automatic sbwr(input logic [14:0] a, input logic [63:0] v);
    t_out = '0; t_out.we = 1; t_out.addr = a; t_out.wdata = v; t_req = 1;
    @(negedge clk);
    while (!t_gnt) @(negedge clk);
    t_req = 0;
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // coherency responses: snooper 0 answers at once, snooper 1 three cycles later
  coh_resp_t exp_q [$];
  coh_resp_t got_q [$];
  always @(posedge clk) if (rst_n && coh_valid) got_q.push_back(coh_resp);

  initial begin
    logic [63:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // memory to SB
    run(RC_MEM_RD, 32'h0004_0000, 15'd1600, 16, 4'h0, 8'h0);
    for (int i = 0; i < 16; i++) begin
      sbrd(15'(1600 + i), d);
      chk(d == u_env.mem_word(32'h0004_0000 + 32'(i * 8)), $sformatf("read beat %0d", i));
    end
    // SB to memory
    for (int i = 0; i < 4; i++) sbwr(15'(2000 + i), 64'h1234_0000 + 64'(i));
    run(RC_MEM_WR, 32'h0008_0040, 15'd2000, 4, 4'h0, 8'h0);
    for (int i = 0; i < 4; i++)
      chk(u_env.mem[32'h0008_0040 + 32'(i * 8)] == 64'h1234_0000 + 64'(i), "write beat");
    // cache to cache
    run(RC_C2C, 32'h0008_0060, 15'd2000, 4, 4'h3, 8'h5c);
    chk(c2c_dest == 4'h3 && c2c_tag == 8'h5c && c2c_addr == 32'h0008_0060, "c2c header");
    chk(c2c_data == {64'h1234_0003, 64'h1234_0002, 64'h1234_0001, 64'h1234_0000}, "c2c data");
    chk(n_reads == 1 && n_writes == 1, "bus operation counts");

    // Taxiway
    @(negedge clk);
    rw_in.op = RW_RD_SHAR; rw_in.src = 4'h1; rw_in.tag = 8'h77; rw_in.payload = 64'h1000;
    @(negedge clk);
    chk(taxi == rw_in, "Taxiway forwards the bus word one cycle later");
    rw_in = '0;

    // merge: 6 transactions
    fork
      for (int t = 0; t < 6; t++) begin
        @(negedge clk);
        snp_valid[0] = 1; snp_resp[0] = coh_resp_t'(t % 2);
        @(negedge clk);
        snp_valid[0] = 0;
      end
      begin
        repeat (3) @(negedge clk);
        for (int t = 0; t < 6; t++) begin
          snp_valid[1] = 1; snp_resp[1] = (t == 4) ? COH_CPY : COH_OK;
          @(negedge clk);
          snp_valid[1] = 0;
          @(negedge clk);
        end
      end
    join
    repeat (5) @(negedge clk);
    for (int t = 0; t < 6; t++) exp_q.push_back((t == 4) ? COH_CPY : coh_resp_t'(t % 2));
    chk(got_q.size() == 6, $sformatf("%0d merged responses", got_q.size()));
    for (int t = 0; t < 6 && t < got_q.size(); t++) chk(got_q[t] == exp_q[t], $sformatf("merged response %0d", t));

    // diff port
    dclean = {8{32'haaaa_5555}};
    ddirty = dclean;
    ddirty[3*32 +: 32] = 32'h0;
    ddirty[6*32 +: 32] = 32'h1;
    #1;
    chk(dmask == 8'b0100_1000, "diff port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
