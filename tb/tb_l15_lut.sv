// tb_l15_lut -- self-checking test of the programmable LUT at its default
// size (ADDR_W = 16):
// fills the whole table with a pattern, reads it back at one word per clock
// and checks the one-clock read latency, the hold when re is low and the
// old-word result of a read colliding with a write.
module tb_l15_lut;
  logic        clk = 1'b0;
  always #5 clk = ~clk;

  logic        we = 1'b0, wdata = 1'b0, re = 1'b0, rdata;
  logic [15:0] waddr = '0, raddr = '0;
  int checks = 0, failures = 0;

  l15_lut dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  function automatic bit pat(int a);
    return ((a * 37) ^ (a >> 5)) % 3 == 0;
  endfunction

  initial begin
    for (int a = 0; a < 65536; a++) begin
      @(negedge clk); we = 1'b1; waddr = 16'(a); wdata = pat(a);
    end
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < 65536; a += 7) begin
      @(negedge clk); re = 1'b1; raddr = 16'(a);
      @(negedge clk); re = 1'b0;
      checks++;
      if (rdata !== pat(a)) begin failures++; $display("FAIL a=%0d", a); end
      raddr = 16'(a + 1);
      @(negedge clk);                        // re low: output holds
      checks++;
      if (rdata !== pat(a)) failures++;
    end
    // read and write the same word in one clock: old word is returned
    @(negedge clk); we = 1'b1; waddr = 16'd100; wdata = ~pat(100); re = 1'b1; raddr = 16'd100;
    @(negedge clk); we = 1'b0;
    checks++;
    if (rdata !== pat(100)) failures++;
    @(negedge clk); re = 1'b0;
    checks++;
    if (rdata !== ~pat(100)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
