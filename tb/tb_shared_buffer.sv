// tb_shared_buffer: writes a pattern over the whole 256 KB array, reads it
// back and checks data and the two-cycle read latency.
module tb_shared_buffer;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, we = 0;
  logic [14:0] addr = 0;
  logic [63:0] wdata = 0, rdata;

  shared_buffer dut (.clk, .en, .we, .addr, .wdata, .rdata);

  function automatic logic [63:0] p(int a);
    return {32'(a) * 32'h9e37_79b9, ~32'(a)};
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < 32768; a++) begin
      en = 1; we = 1; addr = 15'(a); wdata = p(a);
      @(negedge clk);
    end
    for (int a = 0; a < 32768; a += 7) begin
      en = 1; we = 0; addr = 15'(a);
      @(negedge clk);
      en = 0; addr = 15'($urandom);
      @(negedge clk);
      // data is valid two cycles after the access was presented
      checks++;
      if (rdata !== p(a)) begin failures++; $display("FAIL %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
