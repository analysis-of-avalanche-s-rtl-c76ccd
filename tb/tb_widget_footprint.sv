// tb_widget_footprint: sweeps a benchmark-sized shared data set through four
// Widget nodes.
//
// The shared region is PAGES 4 KB pages (784, the largest of the SPLASH-2
// inputs the Avalanche study ran: FFT with 64K points), 32 blocks each, far
// more blocks than the 512-entry SM-CC and DC metadata caches hold. Page p is
// homed on node p mod 4; bit 2 of p marks its blocks as free at home, the
// other pages start exclusive at home. Phase 1: every node reads the first
// two lines of every block it is home for (metadata misses, then hits, in
// its own SM-CC; local DC misses on free pages). Phase 2: every node reads every
// block homed on the next node, which migrates each of them across the
// network. Each read's data is checked, the miss classes and metadata cache
// misses are counted and must all occur, and every SB line must come back.
// Runs the Widget at its default parameters.
module tb_widget_footprint;
  import avl_pkg::*;

  localparam logic [PA_W-1:0] SH_BASE  = 32'h0010_0000;
  localparam logic [PA_W-1:0] SH_LIMIT = 32'h0050_0000;
  localparam int PAGES = 784;
  localparam int NODES = 4;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  runway_t   rw_in [NODES], rw_out [NODES];
  logic      coh_valid [NODES];
  coh_resp_t coh_resp [NODES];
  logic      ltx_valid [NODES], ltx_ready [NODES], lrx_valid [NODES], lrx_ready [NODES];
  logic [63:0] ltx_data [NODES], lrx_data [NODES];
  logic      cpu_req [NODES], cpu_priv [NODES], cpu_done [NODES], cpu_c2c [NODES];
  logic [31:0] cpu_addr [NODES], cpu_daddr [NODES];
  logic [255:0] cpu_data [NODES];
  int        cpu_lat [NODES], cpu_out [NODES], mem_reads [NODES], c2c_count [NODES], cpy_count [NODES];
  logic ev_dc_md_miss [NODES];
  logic ev_lsmsh [NODES], ev_lsmsm [NODES], ev_ldcm [NODES], ev_rdcm [NODES], ev_fwd [NODES];
  logic [2:0] smcc_busy [NODES], dc_busy [NODES];
  logic [11:0] sb_free [NODES];

  for (genvar n = 0; n < NODES; n++) begin : g_node
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
      .ev_fwd(ev_fwd[n]), .ev_dc_supply(), .ev_dc_invfwd(), .ev_dc_md_miss(ev_dc_md_miss[n]), .ev_mp_supply(),
      .ev_mp_evict(), .ev_loopback(), .smcc_busy(smcc_busy[n]), .dc_busy(dc_busy[n]),
      .sb_free_count(sb_free[n]));
    tb_runway_model #(.NODE(6'(n)), .SH_BASE(SH_BASE), .SH_LIMIT(SH_LIMIT), .HOME_BITS(2)) u_bus (
      .clk, .rst_n, .rw_in(rw_in[n]), .rw_out(rw_out[n]), .coh_valid(coh_valid[n]),
      .coh_resp(coh_resp[n]), .cpu_req(cpu_req[n]), .cpu_addr(cpu_addr[n]),
      .cpu_priv(cpu_priv[n]), .cpu_outstanding(cpu_out[n]), .cpu_done(cpu_done[n]),
      .cpu_daddr(cpu_daddr[n]), .cpu_data(cpu_data[n]), .cpu_lat(cpu_lat[n]),
      .cpu_c2c(cpu_c2c[n]), .mem_reads(mem_reads[n]), .c2c_count(c2c_count[n]),
      .coh_cpy_count(cpy_count[n]));
  end

  // network: each outgoing message is collected whole, then queued at its
  // destination; delivery stalls at random
  logic [63:0] netq [NODES][$];
  logic [63:0] asmq [NODES][$];
  int          asm_left [NODES];
  logic [5:0]  asm_dst [NODES];
  logic        stall [NODES];
  always @(posedge clk) begin
    for (int n = 0; n < NODES; n++) begin
      if (lrx_valid[n] && lrx_ready[n]) void'(netq[n].pop_front());
      if (ltx_valid[n]) begin
        if (asmq[n].size() == 0) begin
          msg_t m;
          m = msg_t'(ltx_data[n]);
          asm_dst[n] = m.dst;
          asm_left[n] = m.has_data ? 16 : 0;
        end else asm_left[n]--;
        asmq[n].push_back(ltx_data[n]);
        if (asm_left[n] == 0) begin
          foreach (asmq[n][i]) netq[int'(asm_dst[n])].push_back(asmq[n][i]);
          asmq[n].delete();
        end
      end
      stall[n] <= ($urandom_range(0, 3) == 0);
    end
  end
  always_comb begin
    for (int n = 0; n < NODES; n++) begin
      ltx_ready[n] = 1'b1;
      lrx_valid[n] = !stall[n] && netq[n].size() > 0;
      lrx_data[n]  = (netq[n].size() > 0) ? netq[n][0] : '0;
    end
  end

  int n_cls [5];
  int n_mdm = 0;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      n_cls[0] += int'(ev_lsmsh[n]);
      n_cls[1] += int'(ev_lsmsm[n]);
      n_cls[2] += int'(ev_ldcm[n]);
      n_cls[3] += int'(ev_rdcm[n]);
      n_cls[4] += int'(ev_fwd[n]);
      n_mdm += int'(ev_dc_md_miss[n]);
    end
  end

  function automatic logic [63:0] pat(logic [31:0] a);
    return {a, ~a} ^ 64'h5a5a_0000_1234_a5a5;
  endfunction
  function automatic logic [255:0] line_pat(logic [31:0] a);
    logic [255:0] l;
    for (int i = 0; i < 4; i++) l[i*64 +: 64] = pat({a[31:5], 5'd0} + 32'(i*8));
    return l;
  endfunction
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic rd(input int n, input int p, input int b, input int line);
    logic [31:0] a;
    a = SH_BASE + 32'(p * 4096 + b * 128 + line * 32);
    @(negedge clk);
    cpu_req[n] = 1'b1;
    cpu_addr[n] = a;
    cpu_priv[n] = 1'b0;
    @(negedge clk);
    cpu_req[n] = 1'b0;
    while (!cpu_done[n]) @(negedge clk);
    check(cpu_daddr[n] == a && cpu_data[n] == line_pat(a), $sformatf("node %0d read %h got %h", n, a, cpu_data[n]));
  endtask
  task automatic sweep(input int n, input int home, input int lines);
    for (int p = home; p < PAGES; p += NODES)
      for (int b = 0; b < 32; b++)
        for (int l = 0; l < lines; l++) rd(n, p, b, l);
  endtask

  initial begin : watchdog
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] free0 [NODES];
    for (int n = 0; n < NODES; n++) begin cpu_req[n] = 0; cpu_addr[n] = 0; cpu_priv[n] = 0; end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    for (int n = 0; n < NODES; n++) free0[n] = sb_free[n];
    fork
      sweep(0, 0, 2);
      sweep(1, 1, 2);
      sweep(2, 2, 2);
      sweep(3, 3, 2);
    join
    $display("phase 1 done at %0t", $time);
    fork
      sweep(0, 1, 1);
      sweep(1, 2, 1);
      sweep(2, 3, 1);
      sweep(3, 0, 1);
    join
    repeat (300) @(negedge clk);
    for (int n = 0; n < NODES; n++) begin
      check(sb_free[n] == free0[n], $sformatf("node %0d SB lines %0d of %0d back", n, sb_free[n], free0[n]));
      check(smcc_busy[n] == 0 && dc_busy[n] == 0, "controllers idle");
    end
    check(n_cls[0] > 0 && n_cls[1] > 0 && n_cls[2] > 0 && n_cls[3] > 0,
          $sformatf("miss classes LSMSH %0d LSMSM %0d LDCM %0d RDCM %0d FWD %0d",
                    n_cls[0], n_cls[1], n_cls[2], n_cls[3], n_cls[4]));
    check(n_mdm > 0, $sformatf("DC metadata cache misses: %0d", n_mdm));
    $display("DC metadata misses %0d", n_mdm);
    $display("classes LSMSH %0d LSMSM %0d LDCM %0d RDCM %0d FWD %0d", n_cls[0], n_cls[1], n_cls[2], n_cls[3], n_cls[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
