// tb_sram_32k: self-checking test of the 32 Kbyte RAM.
// Fills every address with a value computed from the address, reads all of
// it back, checks that a write with CE high or WE high changes nothing and
// that the output enable follows CE, OE and WE.
module tb_sram_32k;
  logic clk = 1'b0, ce_n = 1'b1, oe_n = 1'b1, we_n = 1'b1;
  logic [14:0] addr = '0;
  logic [7:0]  din = '0, dout;
  logic        dout_en;
  int checks = 0, failures = 0;

  sram_32k dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] pat(input int a, input int k);
    return 8'((a * 7) ^ (a >> 8) ^ k);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32768; a++) begin
      @(negedge clk);
      addr = 15'(a); din = pat(a, 8'h5A); ce_n = 1'b0; we_n = 1'b0; oe_n = 1'b1;
    end
    @(negedge clk); we_n = 1'b1; ce_n = 1'b1;
    checks++; if (dout_en !== 1'b0) failures++;
    // writes that must be ignored
    @(negedge clk); addr = 15'h1234; din = 8'h00; ce_n = 1'b1; we_n = 1'b0;
    @(negedge clk); addr = 15'h4321; ce_n = 1'b0; we_n = 1'b1; oe_n = 1'b1;
    @(negedge clk);
    for (int a = 0; a < 32768; a++) begin
      addr = 15'(a); ce_n = 1'b0; oe_n = 1'b0; we_n = 1'b1;
      #1;
      checks++;
      if (dout !== pat(a, 8'h5A) || dout_en !== 1'b1) begin
        failures++;
        if (failures < 10) $display("mismatch at %04h: %02h", a, dout);
      end
    end
    oe_n = 1'b1; #1;
    checks++; if (dout_en !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
