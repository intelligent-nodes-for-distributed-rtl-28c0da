// tb_biop_regs: self-checking test of the basic input-output ports.
// Writes random bytes to random output registers (and with no select, which
// must change nothing), reads both input ports, and checks the outputs, the
// read data and its enable against a copy of the expected register contents.
module tb_biop_regs;
  import in_node_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, rd_n = 1'b1, wr_n = 1'b1;
  logic [3:0] sel_out = '0;
  logic [1:0] sel_in = '0;
  logic [7:0] din = '0, dout;
  logic [7:0] in_port [2];
  logic [7:0] out_port [4];
  logic [7:0] m_out [4];
  logic dout_en;
  int checks = 0, failures = 0;

  biop_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_port[0] = 8'h00; in_port[1] = 8'h00;
    foreach (m_out[i]) m_out[i] = 8'h00;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      int r;
      r = $urandom_range(0, 5);
      @(negedge clk);
      if (r < 4) begin                  // write output register r
        sel_out = 4'b1 << r; din = 8'($urandom); wr_n = 1'b0;
        m_out[r] = din;
        @(negedge clk); @(negedge clk);
        wr_n = 1'b1; sel_out = '0;
      end else if (r == 4) begin        // write with no register selected
        din = 8'($urandom); wr_n = 1'b0;
        @(negedge clk); wr_n = 1'b1;
      end else begin                    // read an input port
        int k;
        k = $urandom_range(0, 1);
        in_port[0] = 8'($urandom); in_port[1] = 8'($urandom);
        sel_in = 2'b1 << k; rd_n = 1'b0;
        #1;
        checks++;
        if (dout !== in_port[k] || dout_en !== 1'b1) failures++;
        @(negedge clk); rd_n = 1'b1; #1;
        checks++; if (dout_en !== 1'b0) failures++;
        sel_in = '0;
      end
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (out_port[i] !== m_out[i]) begin
          failures++;
          if (failures < 10) $display("out %0d = %02h exp %02h", i, out_port[i], m_out[i]);
        end
      end
    end
    rst_n = 1'b0; #1;
    checks++; if (out_port[0] !== 8'h00 || out_port[3] !== 8'h00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
