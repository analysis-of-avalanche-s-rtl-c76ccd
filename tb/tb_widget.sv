// tb_widget: end-to-end test of two Widget nodes.
//
// Nodes 0 and 1, each with a Runway/memory/processor model, are joined by a
// flit-queue network model. Processor reads walk the coherence protocol
// through every miss class (LSMSH, LSMSM, LDCM, RDCM), the DC's supply-from-
// home and invalidate-and-forward paths, NI loopback, the MP-CC
// communication cache (hit supply and eviction), overlapped SM-CC operations,
// and the release state buffer (flush on full, flush on release, clean line
// with no update). Every read's data is checked against the value the line
// must hold; latencies are checked to rank LSMSH < LSMSM < LDCM, RDCM. Each
// mechanism is counted and a failure is recorded for any that never happened.
// Runs the Widget at its default parameters.
module tb_widget;
  import avl_pkg::*;

  localparam logic [PA_W-1:0] SH_BASE  = 32'h0010_0000;
  localparam logic [PA_W-1:0] SH_LIMIT = 32'h0020_0000;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  runway_t   rw_in [2], rw_out [2];
  logic      coh_valid [2];
  coh_resp_t coh_resp [2];
  logic      ltx_valid [2], ltx_ready [2], lrx_valid [2], lrx_ready [2];
  logic [63:0] ltx_data [2], lrx_data [2];
  logic      cpu_req [2], cpu_priv [2], cpu_done [2], cpu_c2c [2];
  logic [31:0] cpu_addr [2], cpu_daddr [2];
  logic [255:0] cpu_data [2];
  int        cpu_lat [2], cpu_out [2], mem_reads [2], c2c_count [2], cpy_count [2];

  logic ev_lsmsh [2], ev_lsmsm [2], ev_ldcm [2], ev_rdcm [2], ev_fwd [2], ev_dc_supply [2];
  logic ev_dc_invfwd [2], ev_dc_md_miss [2], ev_mp_supply [2], ev_mp_evict [2], ev_loopback [2];
  logic [2:0] smcc_busy [2], dc_busy [2];
  logic [11:0] sb_free [2];

  // release state buffer of node 0
  logic acq_valid = 0, acq_ready, rel_req = 0, rel_done, dirty_req, dirty_valid = 0;
  logic [31:0] acq_addr = 0, dirty_addr, upd_addr;
  logic [255:0] acq_line = 0, dirty_line = 0, upd_words;
  logic upd_valid, upd_ready = 1'b1;
  logic [7:0] upd_mask;
  logic [3:0] upd_count;
  logic [255:0] sp_base = 0, sp_upd = 0, sp_out;
  logic [7:0] sp_mask = 0;

  for (genvar n = 0; n < 2; n++) begin : g_node
    if (n == 0) begin : g_w
      widget u_w (
        .clk, .rst_n, .node_id(6'(n)), .sh_base(SH_BASE), .sh_limit(SH_LIMIT),
        .rw_in(rw_in[n]), .rw_out(rw_out[n]), .rw_ready(1'b1), .coh_valid(coh_valid[n]),
        .coh_resp(coh_resp[n]),
        .ltx_valid(ltx_valid[n]), .ltx_data(ltx_data[n]), .ltx_ready(ltx_ready[n]),
        .lrx_valid(lrx_valid[n]), .lrx_data(lrx_data[n]), .lrx_ready(lrx_ready[n]),
        .ppe_al_req(1'b0), .ppe_al_gnt(), .ppe_al_line(), .ppe_fr_req(1'b0), .ppe_fr_line('0),
        .ppe_fr_ack(),
        .acq_valid, .acq_ready, .acq_addr, .acq_line, .rel_req, .rel_done, .dirty_req,
        .dirty_addr, .dirty_valid, .dirty_line, .upd_valid, .upd_ready, .upd_addr, .upd_mask,
        .upd_count, .upd_words,
        .splice_base(sp_base), .splice_upd(sp_upd), .splice_mask(sp_mask), .splice_out(sp_out),
        .ev_lsmsh(ev_lsmsh[n]), .ev_lsmsm(ev_lsmsm[n]), .ev_ldcm(ev_ldcm[n]), .ev_rdcm(ev_rdcm[n]),
        .ev_fwd(ev_fwd[n]), .ev_dc_supply(ev_dc_supply[n]), .ev_dc_invfwd(ev_dc_invfwd[n]),
        .ev_dc_md_miss(ev_dc_md_miss[n]), .ev_mp_supply(ev_mp_supply[n]),
        .ev_mp_evict(ev_mp_evict[n]), .ev_loopback(ev_loopback[n]),
        .smcc_busy(smcc_busy[n]), .dc_busy(dc_busy[n]), .sb_free_count(sb_free[n]));
    end else begin : g_w
      widget u_w (
        .clk, .rst_n, .node_id(6'(n)), .sh_base(SH_BASE), .sh_limit(SH_LIMIT),
        .rw_in(rw_in[n]), .rw_out(rw_out[n]), .rw_ready(1'b1), .coh_valid(coh_valid[n]),
        .coh_resp(coh_resp[n]),
        .ltx_valid(ltx_valid[n]), .ltx_data(ltx_data[n]), .ltx_ready(ltx_ready[n]),
        .lrx_valid(lrx_valid[n]), .lrx_data(lrx_data[n]), .lrx_ready(lrx_ready[n]),
        .ppe_al_req(1'b0), .ppe_al_gnt(), .ppe_al_line(), .ppe_fr_req(1'b0), .ppe_fr_line('0),
        .ppe_fr_ack(),
        .acq_valid(1'b0), .acq_ready(), .acq_addr('0), .acq_line('0), .rel_req(1'b0),
        .rel_done(), .dirty_req(), .dirty_addr(), .dirty_valid(1'b0), .dirty_line('0),
        .upd_valid(), .upd_ready(1'b1), .upd_addr(), .upd_mask(), .upd_count(), .upd_words(),
        .splice_base('0), .splice_upd('0), .splice_mask('0), .splice_out(),
        .ev_lsmsh(ev_lsmsh[n]), .ev_lsmsm(ev_lsmsm[n]), .ev_ldcm(ev_ldcm[n]), .ev_rdcm(ev_rdcm[n]),
        .ev_fwd(ev_fwd[n]), .ev_dc_supply(ev_dc_supply[n]), .ev_dc_invfwd(ev_dc_invfwd[n]),
        .ev_dc_md_miss(ev_dc_md_miss[n]), .ev_mp_supply(ev_mp_supply[n]),
        .ev_mp_evict(ev_mp_evict[n]), .ev_loopback(ev_loopback[n]),
        .smcc_busy(smcc_busy[n]), .dc_busy(dc_busy[n]), .sb_free_count(sb_free[n]));
    end
    tb_runway_model #(.NODE(6'(n)), .SH_BASE(SH_BASE), .SH_LIMIT(SH_LIMIT)) u_bus (
      .clk, .rst_n, .rw_in(rw_in[n]), .rw_out(rw_out[n]), .coh_valid(coh_valid[n]),
      .coh_resp(coh_resp[n]), .cpu_req(cpu_req[n]), .cpu_addr(cpu_addr[n]),
      .cpu_priv(cpu_priv[n]), .cpu_outstanding(cpu_out[n]), .cpu_done(cpu_done[n]),
      .cpu_daddr(cpu_daddr[n]), .cpu_data(cpu_data[n]), .cpu_lat(cpu_lat[n]),
      .cpu_c2c(cpu_c2c[n]), .mem_reads(mem_reads[n]), .c2c_count(c2c_count[n]),
      .coh_cpy_count(cpy_count[n]));
  end

  // network: one flit queue per direction, plus injection into node 0
  logic [63:0] netq [2][$];
  always @(posedge clk) begin
    for (int n = 0; n < 2; n++) begin
      if (ltx_valid[n]) netq[1-n].push_back(ltx_data[n]);
      if (lrx_valid[n] && lrx_ready[n]) void'(netq[n].pop_front());
    end
  end
  always_comb begin
    for (int n = 0; n < 2; n++) begin
      ltx_ready[n] = 1'b1;
      lrx_valid[n] = netq[n].size() > 0;
      lrx_data[n]  = (netq[n].size() > 0) ? netq[n][0] : '0;
    end
  end

  // mechanism counters
  int n_lsmsh, n_lsmsm, n_ldcm, n_rdcm, n_fwd, n_supply, n_invfwd, n_mdmiss, n_mpsup, n_mpevict;
  int n_loop, max_busy, n_upd, n_rsb_full;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < 2; n++) begin
      n_lsmsh  += int'(ev_lsmsh[n]);
      n_lsmsm  += int'(ev_lsmsm[n]);
      n_ldcm   += int'(ev_ldcm[n]);
      n_rdcm   += int'(ev_rdcm[n]);
      n_fwd    += int'(ev_fwd[n]);
      n_supply += int'(ev_dc_supply[n]);
      n_invfwd += int'(ev_dc_invfwd[n]);
      n_mdmiss += int'(ev_dc_md_miss[n]);
      n_mpsup  += int'(ev_mp_supply[n]);
      n_mpevict += int'(ev_mp_evict[n]);
      n_loop   += int'(ev_loopback[n]);
      if (int'(smcc_busy[n]) > max_busy) max_busy = int'(smcc_busy[n]);
    end
  end

  function automatic logic [63:0] pat(logic [31:0] a);
    return {a, ~a} ^ 64'h5a5a_0000_1234_a5a5;
  endfunction
  function automatic logic [63:0] mpword(int k, int i);
    return 64'hc0de_0000_0000_0000 | (64'(k) << 16) | 64'(i);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one processor read, waited for and checked
  task automatic rd(input int n, input logic [31:0] a, input logic [255:0] exp,
                    output int lat, output logic c2c);
    @(negedge clk);
    cpu_req[n] = 1'b1;
    cpu_addr[n] = a;
    cpu_priv[n] = 1'b0;
    @(negedge clk);
    cpu_req[n] = 1'b0;
    while (!cpu_done[n]) @(negedge clk);
    lat = cpu_lat[n];
    c2c = cpu_c2c[n];
    check(cpu_data[n] == exp, $sformatf("node %0d read %h data %h exp %h", n, a, cpu_data[n], exp));
    repeat (40) @(negedge clk);
  endtask

  function automatic logic [255:0] line_pat(logic [31:0] a);
    logic [255:0] l;
    for (int i = 0; i < 4; i++) l[i*64 +: 64] = pat({a[31:5], 5'd0} + 32'(i*8));
    return l;
  endfunction

  task automatic inject_mp(input int k, input logic [31:0] a);
    msg_t m;
    m = '0;
    m.mtype = MT_MPDATA;
    m.src = 6'd1;
    m.dst = 6'd0;
    m.blk = a[31:7];
    m.has_data = 1'b1;
    @(negedge clk);
    netq[0].push_back(64'(m));
    for (int i = 0; i < 16; i++) netq[0].push_back(mpword(k, i));
    repeat (60) @(negedge clk);
  endtask

  // RSB processor side: dirty lines differ from the clean copy in the words of dmask()
  function automatic logic [7:0] dmask(logic [31:0] a);
    return (a[7:5] == 3'd2) ? 8'h00 : 8'(37 * (int'(a[7:5]) + 1));
  endfunction
  function automatic logic [255:0] clean_of(logic [31:0] a);
    logic [255:0] l;
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = a ^ 32'(i * 32'h0101_0101);
    return l;
  endfunction
  function automatic logic [255:0] dirty_of(logic [31:0] a);
    logic [255:0] l;
    l = clean_of(a);
    for (int i = 0; i < 8; i++) if (dmask(a)[i]) l[i*32 +: 32] = l[i*32 +: 32] + 32'd7;
    return l;
  endfunction
  always @(posedge clk) begin
    dirty_valid <= dirty_req && !dirty_valid;
    dirty_line  <= dirty_of(dirty_addr);
  end
  always @(posedge clk) if (rst_n && upd_valid && upd_ready) begin
    logic [255:0] w;
    int c;
    logic [255:0] d;
    d = dirty_of(upd_addr);
    w = '0;
    c = 0;
    for (int i = 0; i < 8; i++) if (dmask(upd_addr)[i]) begin
      w[c*32 +: 32] = d[i*32 +: 32];
      c++;
    end
    n_upd++;
    check(upd_mask == dmask(upd_addr) && int'(upd_count) == c && upd_words == w,
          $sformatf("RSB update for %h mask %h", upd_addr, upd_mask));
  end

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat_lsmsh, lat_lsmsm, lat_ldcm, lat_rdcm, l;
    logic c;
    logic [31:0] a;
    for (int n = 0; n < 2; n++) begin
      cpu_req[n] = 1'b0; cpu_addr[n] = '0; cpu_priv[n] = 1'b0;
    end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // 1: node 0, own block, metadata cold -> LSMSM (COH_CPY then cache-to-cache)
    rd(0, 32'h0010_0000, line_pat(32'h0010_0000), lat_lsmsm, c);
    check(c == 1'b1, "LSMSM supplied by cache-to-cache write");
    // 2: same block, other line -> LSMSH, memory supplies
    rd(0, 32'h0010_0020, line_pat(32'h0010_0020), lat_lsmsh, c);
    check(c == 1'b0, "LSMSH supplied by memory");
    // 3: node 1 reads node 0's block -> RDCM, invalidate and forward from node 0
    rd(1, 32'h0010_0040, line_pat(32'h0010_0040), lat_rdcm, c);
    check(c == 1'b1, "RDCM supplied by cache-to-cache write");
    // 4: node 1 now owns it: its memory holds the block
    rd(1, 32'h0010_0000, line_pat(32'h0010_0000), l, c);
    check(c == 1'b0, "migrated block read from node 1 memory");
    // 5: node 0 (home) takes it back -> LDCM with forward from node 1
    rd(0, 32'h0010_0060, line_pat(32'h0010_0060), l, c);
    // 6: free block homed at node 0 -> LDCM, DC supplies from home memory
    rd(0, 32'h0010_2000, line_pat(32'h0010_2000), lat_ldcm, c);
    // 7, 8: free blocks homed at node 1
    rd(1, 32'h0010_3000, line_pat(32'h0010_3000), l, c);
    rd(0, 32'h0010_3080, line_pat(32'h0010_3080), l, c);
    // 9: private memory
    rd(0, 32'h0080_0000, line_pat(32'h0080_0000), l, c);
    check(c == 1'b0, "private read from memory");

    check(lat_lsmsh < lat_lsmsm && lat_lsmsm < lat_ldcm && lat_lsmsm < lat_rdcm,
          $sformatf("latency order LSMSH %0d LSMSM %0d LDCM %0d RDCM %0d",
                    lat_lsmsh, lat_lsmsm, lat_ldcm, lat_rdcm));
    $display("latency: LSMSH %0d LSMSM %0d LDCM %0d RDCM %0d cycles",
             lat_lsmsh, lat_lsmsm, lat_ldcm, lat_rdcm);

    // 10: message data into the MP-CC; nine blocks into eight entries evicts the first
    for (int k = 0; k < 9; k++) inject_mp(k, 32'h0080_1000 + 32'(k * 128));
    begin
      logic [255:0] e;
      for (int i = 0; i < 4; i++) e[i*64 +: 64] = mpword(8, 4 + i);
      rd(0, 32'h0080_1000 + 32'(8 * 128) + 32'h20, e, l, c);
      check(c == 1'b1, "MP-CC hit supplied by cache-to-cache write");
    end
    rd(0, 32'h0080_1000, line_pat(32'h0080_1000), l, c);
    check(c == 1'b0, "evicted message block read from memory");

    // 11: four overlapped reads by node 1 to its own cold blocks
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      cpu_req[1] = 1'b1;
      cpu_addr[1] = 32'h0010_1000 + 32'(k * 128);
      @(negedge clk);
      cpu_req[1] = 1'b0;
    end
    for (int k = 0; k < 4; k++) begin
      while (!cpu_done[1]) @(negedge clk);
      check(cpu_data[1] == line_pat(cpu_daddr[1]), $sformatf("overlapped read %h", cpu_daddr[1]));
      @(negedge clk);
    end

    // 12: release state buffer: five acquires into four entries, then a release
    for (int k = 0; k < 5; k++) begin
      a = 32'h0010_0000 + 32'(k * 32);
      @(negedge clk);
      while (!acq_ready) begin
        if (k == 4) n_rsb_full++;
        @(negedge clk);
      end
      acq_valid = 1'b1;
      acq_addr = a;
      acq_line = clean_of(a);
      @(negedge clk);
      acq_valid = 1'b0;
      if (k == 3) begin
        // buffer now full: the next acquire waits for the oldest to be flushed
        @(negedge clk);
        acq_valid = 1'b1;
        acq_addr = 32'h0010_0000 + 32'(4 * 32);
        acq_line = clean_of(acq_addr);
        @(negedge clk);
        while (!acq_ready) begin n_rsb_full++; @(negedge clk); end
        @(negedge clk);
        acq_valid = 1'b0;
        break;
      end
    end
    repeat (20) @(negedge clk);
    rel_req = 1'b1;
    while (!rel_done) @(negedge clk);
    rel_req = 1'b0;
    check(n_upd == 4, $sformatf("RSB sent %0d updates, expected 4 (one clean line)", n_upd));

    // splice through the RIM port
    sp_base = {8{32'h1111_1111}};
    sp_upd  = {8{32'h2222_2222}};
    sp_mask = 8'b1010_0101;
    #1;
    check(sp_out == {32'h2222_2222, 32'h1111_1111, 32'h2222_2222, 32'h1111_1111,
                     32'h1111_1111, 32'h2222_2222, 32'h1111_1111, 32'h2222_2222}, "splice");

    repeat (200) @(negedge clk);
    check(sb_free[0] >= 12'd1780 && sb_free[1] >= 12'd1780, "SB lines returned");

    $display("mechanisms: LSMSH %0d LSMSM %0d LDCM %0d RDCM %0d fwd %0d dc-supply %0d inv-fwd %0d",
             n_lsmsh, n_lsmsm, n_ldcm, n_rdcm, n_fwd, n_supply, n_invfwd);
    $display("            dc-md-miss %0d mp-supply %0d mp-evict %0d loopback %0d max-busy %0d rsb-full %0d upd %0d",
             n_mdmiss, n_mpsup, n_mpevict, n_loop, max_busy, n_rsb_full, n_upd);
    check(n_lsmsh > 0, "LSMSH happened");
    check(n_lsmsm > 0, "LSMSM happened");
    check(n_ldcm > 0, "LDCM happened");
    check(n_rdcm > 0, "RDCM happened");
    check(n_fwd > 0, "SM-CC forward happened");
    check(n_supply > 0, "DC supply happened");
    check(n_invfwd > 0, "DC invalidate-forward happened");
    check(n_mdmiss > 0, "DC metadata miss happened");
    check(n_mpsup > 0, "MP-CC supply happened");
    check(n_mpevict > 0, "MP-CC eviction happened");
    check(n_loop > 0, "NI loopback happened");
    check(max_busy >= 2, "SM-CC overlapped operations");
    check(n_rsb_full > 0, "RSB full flush happened");
    check(cpy_count[0] > 0 && cpy_count[1] > 0, "COH_CPY responses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
