// tb_addr_latch: self-checking test of the low address register.
// Drives random bytes on P0 with ALE high and low at random and checks that
// the output follows P0 one clock after an ALE-high edge and holds otherwise,
// and that reset clears it.
module tb_addr_latch;
  logic clk = 1'b0, rst_n = 1'b0, ale = 1'b0;
  logic [7:0] p0 = '0, a_lo, expect_q;
  int checks = 0, failures = 0;

  addr_latch #(.W(8)) dut (.clk, .rst_n, .ale, .p0, .a_lo);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (a_lo !== 8'h00) failures++;
    rst_n = 1'b1;
    expect_q = 8'h00;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ale = ($urandom_range(0, 2) == 0);
      p0  = 8'($urandom);
      @(posedge clk);
      if (ale) expect_q = p0;
      @(negedge clk);
      checks++;
      if (a_lo !== expect_q) begin
        failures++;
        $display("mismatch: ale=%0b p0=%02h a_lo=%02h exp=%02h", ale, p0, a_lo, expect_q);
      end
    end
    rst_n = 1'b0; #1;
    checks++; if (a_lo !== 8'h00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
