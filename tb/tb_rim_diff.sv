// tb_rim_diff: random lines with random changed words; checks the diff mask
// and the splice result against word-by-word reference computations.
module tb_rim_diff;
  int checks = 0, failures = 0;
  logic [255:0] clean, dirty, base, upd, sout;
  logic [7:0]   mask, smask;

  rim_diff #(.WORDS(8), .WORD_W(32)) dut (
    .diff_clean(clean), .diff_dirty(dirty), .diff_mask(mask),
    .splice_base(base), .splice_upd(upd), .splice_mask(smask), .splice_out(sout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [7:0] m;
      logic [255:0] e;
      m = 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        clean[i*32 +: 32] = $urandom;
        // a changed word differs in at least one bit
        dirty[i*32 +: 32] = m[i] ? clean[i*32 +: 32] ^ (32'd1 << ($urandom % 32)) : clean[i*32 +: 32];
        base[i*32 +: 32] = $urandom;
        upd[i*32 +: 32]  = $urandom;
      end
      smask = 8'($urandom);
      #1;
      for (int i = 0; i < 8; i++) e[i*32 +: 32] = smask[i] ? upd[i*32 +: 32] : base[i*32 +: 32];
      checks += 2;
      if (mask !== m) begin failures++; $display("FAIL diff %h exp %h", mask, m); end
      if (sout !== e) begin failures++; $display("FAIL splice"); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
