// tb_meta_cache: 2-way metadata cache with a real RIM, SBM and SB behind it.
// Checks miss (fill from memory) and hit results and latencies, the probe
// flag, write-through to memory, and eviction when a third key maps to a set.
module tb_meta_cache;
  import avl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [31:0] MB = 32'h4000_0000;
  logic lk_req = 0, lk_we = 0, lk_probe, lk_hit, lk_done;
  logic [19:0] lk_key = 0;
  logic [63:0] lk_wdata = 0, lk_rdata, sb_rdata;
  logic sb_req, sb_gnt, sb_rvalid, rim_req, rim_ack, rim_done;
  sb_req_t sb_out;
  rim_cmd_t rim_cmd;
  int n_reads, n_writes;

  meta_cache #(.WAYS(2), .REC_BEATS(1), .KEY_W(20), .SB_BASE(15'd0), .MEM_BASE(MB)) dut (
    .clk, .rst_n, .lk_req, .lk_we, .lk_key, .lk_wdata, .lk_probe, .lk_hit, .lk_done, .lk_rdata,
    .sb_req, .sb_out, .sb_gnt, .sb_rvalid, .sb_rdata, .rim_req, .rim_cmd, .rim_ack, .rim_done);

  tb_mem_env u_env (.clk, .rst_n, .cmd_req(rim_req), .cmd(rim_cmd), .cmd_ack(rim_ack),
    .cmd_done(rim_done), .u_sb_req(sb_req), .u_sb_out(sb_out), .u_sb_gnt(sb_gnt),
    .u_sb_rvalid(sb_rvalid), .t_sb_req(1'b0), .t_sb_out('0), .t_sb_gnt(), .t_sb_rvalid(),
    .sb_rdata, .n_reads, .n_writes, .c2c_addr(), .c2c_dest(), .c2c_tag(), .c2c_data());

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic lookup(input logic [19:0] k, input bit w, input logic [63:0] wd,
                        output logic [63:0] d, output bit hit, output int lat);
    lk_req = 1; lk_key = k; lk_we = w; lk_wdata = wd; lat = 0;
    @(negedge clk);
    while (!lk_done) begin
      if (lk_probe) hit = lk_hit;
      lat++;
      @(negedge clk);
    end
    lat++;
    d = lk_rdata;
    lk_req = 0;
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    bit h;
    int lat, r0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    lookup(20'h00123, 0, 0, d, h, lat);
    chk(!h && d == u_env.mem_word(MB + 32'h123 * 32), "cold miss returns memory record");
    chk(lat >= 30, $sformatf("miss latency %0d", lat));
    r0 = n_reads;
    lookup(20'h00123, 0, 0, d, h, lat);
    chk(h && d == u_env.mem_word(MB + 32'h123 * 32), "hit returns record");
    chk(lat <= 7, $sformatf("hit latency %0d", lat));
    chk(n_reads == r0, "hit does not read memory");
    lookup(20'h00123, 1, 64'hdead_beef_0000_0001, d, h, lat);
    chk(h && n_writes == 1, "write hit writes through");
    lookup(20'h00123, 0, 0, d, h, lat);
    chk(h && d == 64'hdead_beef_0000_0001, "read after write");
    chk(u_env.mem[MB + 32'h123 * 32] == 64'hdead_beef_0000_0001, "memory holds written record");
    // three keys in set 0x23 of a 2-way cache: the oldest fill is evicted
    lookup(20'h00223, 0, 0, d, h, lat);
    chk(!h, "second key misses");
    lookup(20'h00323, 0, 0, d, h, lat);
    chk(!h && d == u_env.mem_word(MB + 32'h323 * 32), "third key misses");
    lookup(20'h00223, 0, 0, d, h, lat);
    chk(h, "second key still cached");
    lookup(20'h00123, 0, 0, d, h, lat);
    chk(!h && d == 64'hdead_beef_0000_0001, "evicted key refetched with written value");
    // many keys in different sets stay resident
    for (int k = 0; k < 64; k++) lookup(20'(k * 3 + 20'h1000), 0, 0, d, h, lat);
    for (int k = 0; k < 64; k++) begin
      lookup(20'(k * 3 + 20'h1000), 0, 0, d, h, lat);
      chk(h && d == u_env.mem_word(MB + 32'(k * 3 + 32'h1000) * 32), "resident key");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
