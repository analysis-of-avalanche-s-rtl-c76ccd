// tb_rsb: release state buffer with the diff logic attached. Acquires more
// lines than it holds (the oldest is flushed to make room), then releases.
// Dirty lines differ from the clean copies in known words; each update's
// address, mask, count and packed words are checked, a clean line must send
// nothing, and the release must end with rel_done and an empty buffer.
module tb_rsb;
  import avl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic acq_valid = 0, acq_ready, rel_req = 0, rel_done, dirty_req, dirty_valid = 0;
  logic [31:0] acq_addr = 0, dirty_addr, upd_addr;
  logic [255:0] acq_line = 0, dirty_line = 0, dc, dd, upd_words;
  logic [7:0] dm, upd_mask;
  logic [3:0] upd_count;
  logic upd_valid, upd_ready = 0;

  rsb #(.ENTRIES(4)) dut (.clk, .rst_n, .acq_valid, .acq_ready, .acq_addr, .acq_line, .rel_req,
    .rel_done, .dirty_req, .dirty_addr, .dirty_valid, .dirty_line, .diff_clean(dc),
    .diff_dirty(dd), .diff_mask(dm), .upd_valid, .upd_ready, .upd_addr, .upd_mask, .upd_count,
    .upd_words);
  rim_diff u_diff (.diff_clean(dc), .diff_dirty(dd), .diff_mask(dm), .splice_base('0),
    .splice_upd('0), .splice_mask('0), .splice_out());

  function automatic logic [7:0] dmask(logic [31:0] a);
    return (a[7:5] == 3'd3) ? 8'h00 : 8'(8'h81 >> a[7:5]) | 8'(a[7:5]);
  endfunction
  function automatic logic [255:0] clean_of(logic [31:0] a);
    logic [255:0] l;
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = a * 32'(i + 3);
    return l;
  endfunction
  function automatic logic [255:0] dirty_of(logic [31:0] a);
    logic [255:0] l;
    l = clean_of(a);
    for (int i = 0; i < 8; i++) if (dmask(a)[i]) l[i*32 +: 32] = ~l[i*32 +: 32];
    return l;
  endfunction

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // processor side: dirty line two cycles after the request; updates accepted after a delay
  always @(posedge clk) begin
    dirty_valid <= dirty_req && !dirty_valid;
    dirty_line <= dirty_of(dirty_addr);
  end
  logic [31:0] seen [$];
  int wait_cnt = 0;
  always @(posedge clk) begin
    upd_ready <= 0;
    if (upd_valid && !upd_ready) begin
      wait_cnt <= wait_cnt + 1;
      if (wait_cnt == 2) begin
        logic [255:0] w;
        logic [255:0] d;
        int c;
        upd_ready <= 1;
        wait_cnt <= 0;
        d = dirty_of(upd_addr);
        w = '0;
        c = 0;
        for (int i = 0; i < 8; i++) if (dmask(upd_addr)[i]) begin w[c*32 +: 32] = d[i*32 +: 32]; c++; end
        chk(upd_mask == dmask(upd_addr) && int'(upd_count) == c && upd_words == w,
            $sformatf("update %h", upd_addr));
        seen.push_back(upd_addr);
      end
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int stalled = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 6; k++) begin
      acq_valid = 1; acq_addr = 32'h0020_0000 + 32'(k * 32); acq_line = clean_of(acq_addr);
      while (!acq_ready) begin stalled++; @(negedge clk); end
      @(negedge clk);
      acq_valid = 0;
      @(negedge clk);
      if (k == 4) chk(seen.size() == 1 && seen[0] == 32'h0020_0000, "full buffer flushed the oldest");
    end
    chk(stalled > 0, "acquire waited while the buffer was full");
    rel_req = 1;
    while (!rel_done) @(negedge clk);
    rel_req = 0;
    @(negedge clk);
    // six lines, one of them (k=3) clean
    chk(seen.size() == 5, $sformatf("%0d updates, expected 5", seen.size()));
    foreach (seen[i]) chk(seen[i] != 32'h0020_0060, "clean line sends no update");
    chk(dut.n == 0, "empty after release");
    rel_req = 1;
    @(negedge clk);
    @(negedge clk);
    rel_req = 0;
    chk(seen.size() == 5, "release of an empty buffer sends nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
