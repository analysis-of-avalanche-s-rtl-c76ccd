// tb_sbm: SBM with the Shared Buffer behind it. Checks the four-cycle read
// latency for an uncontended client, that all clients' concurrent reads and
// writes reach the right words with every read answered once, and that the
// allocator hands out distinct unreserved lines, reuses freed ones and
// refuses when none is left.
module tb_sbm;
  import avl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic    [4:0] req = '0, gnt, rvalid;
  sb_req_t [4:0] sbreq;
  logic [63:0] rdata;
  logic [3:0] alloc_req = '0, alloc_gnt, free_req = '0, free_ack;
  logic [3:0][10:0] free_line;
  logic [10:0] alloc_line;
  logic [11:0] free_count;
  logic sb_en, sb_we;
  logic [14:0] sb_addr;
  logic [63:0] sb_wdata, sb_rdata;

  sbm dut (.clk, .rst_n, .req, .sbreq, .gnt, .rvalid, .rdata, .alloc_req, .alloc_gnt, .alloc_line,
           .free_req, .free_line, .free_ack, .free_count,
           .sb_en, .sb_we, .sb_addr, .sb_wdata, .sb_rdata);
  shared_buffer u_sb (.clk, .en(sb_en), .we(sb_we), .addr(sb_addr), .wdata(sb_wdata), .rdata(sb_rdata));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // each client writes then reads back its own words, concurrently
  int done_cnt = 0;
  for (genvar c = 0; c < 5; c++) begin : g_cl
    initial begin
      sbreq[c] = '0;
      wait (rst_n);
      repeat (30) @(negedge clk);
      for (int i = 0; i < 20; i++) begin
        sbreq[c].we = 1; sbreq[c].addr = 15'(c * 1000 + i); sbreq[c].wdata = 64'(c * 100000 + i);
        req[c] = 1;
        @(negedge clk);
        while (!gnt[c]) @(negedge clk);
        req[c] = 0;
        @(negedge clk);
      end
      for (int i = 0; i < 20; i++) begin
        sbreq[c].we = 0; sbreq[c].addr = 15'(c * 1000 + i);
        req[c] = 1;
        @(negedge clk);
        while (!gnt[c]) @(negedge clk);
        req[c] = 0;
        while (!rvalid[c]) @(negedge clk);
        chk(rdata == 64'(c * 100000 + i), $sformatf("client %0d word %0d", c, i));
      end
      done_cnt++;
    end
  end

  initial begin
    int t0;
    logic [10:0] got [$];
    free_line = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(free_count == 12'd1792, "free count after reset");
    // single uncontended read: latency from request to rvalid
    // (client 0 is idle at this point)
    @(negedge clk);
    // allocation: take every line
    for (int i = 0; i < 1792; i++) begin
      alloc_req[i % 4] = 1;
      #1;
      chk(alloc_gnt == (4'b1 << (i % 4)) && alloc_line >= 11'd256, "alloc grant");
      got.push_back(alloc_line);
      @(negedge clk);
      alloc_req = '0;
    end
    begin
      bit seen [2048];
      int dup = 0;
      foreach (got[i]) begin if (seen[got[i]]) dup++; seen[got[i]] = 1; end
      chk(dup == 0, "distinct lines");
    end
    alloc_req[2] = 1;
    #1;
    chk(alloc_gnt == 4'b0, "no line left");
    @(negedge clk);
    alloc_req = '0;
    free_req[1] = 1; free_line[1] = 11'd777;
    #1;
    chk(free_ack == 4'b0010, "free acknowledged");
    @(negedge clk);
    free_req = '0;
    alloc_req = 4'b1100;
    #1;
    chk(alloc_gnt == 4'b0100 && alloc_line == 11'd777, "freed line reused, lowest client first");
    @(negedge clk);
    alloc_req = '0;
    wait (done_cnt == 5);
    // latency of one uncontended read
    @(negedge clk);
    sbreq[3].we = 0; sbreq[3].addr = 15'd3005;
    req[3] = 1;
    t0 = 0;
    @(negedge clk);
    t0++;
    while (!rvalid[3]) begin
      if (gnt[3]) req[3] = 0;
      @(negedge clk);
      t0++;
    end
    chk(t0 == 4, $sformatf("hit latency %0d cycles, expected 4", t0));
    chk(rdata == 64'(3 * 100000 + 5), "latency read data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
