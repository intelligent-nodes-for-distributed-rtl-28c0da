// tb_reset_ctrl: self-checking test of the reset circuit.
// Measures in clocks how long board_rst_n and mcu_rst stay active after
// power-up and after a restart request, and checks them against the
// two-clock release synchroniser and RST_CYCLES.
module tb_reset_ctrl;
  localparam int unsigned RST_CYCLES = 24;
  logic clk = 1'b0, por_n = 1'b0, restart = 1'b0;
  logic board_rst_n, mcu_rst;
  int checks = 0, failures = 0;
  int t_board, t_mcu, t_restart;

  reset_ctrl #(.RST_CYCLES(RST_CYCLES)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    check(board_rst_n == 1'b0 && mcu_rst == 1'b1, "reset held while por_n low");
    por_n = 1'b1;
    t_board = 0; t_mcu = 0;
    for (int c = 1; c <= 60; c++) begin
      @(negedge clk);
      if (!board_rst_n) t_board = c;
      if (mcu_rst)      t_mcu   = c;
    end
    check(t_board == 1, "board reset released on second edge");
    check(t_mcu == 1 + RST_CYCLES, "MCU reset lasts RST_CYCLES after board reset");
    check(board_rst_n == 1'b1 && mcu_rst == 1'b0, "running");
    // restart request
    restart = 1'b1;
    @(negedge clk); restart = 1'b0;
    t_restart = 0;
    for (int c = 1; c <= 60; c++) begin
      if (mcu_rst) t_restart = c;
      @(negedge clk);
    end
    check(t_restart == RST_CYCLES, "restart pulse is RST_CYCLES clocks");
    check(board_rst_n == 1'b1, "restart leaves board logic alone");
    // asynchronous assertion
    @(posedge clk); #2 por_n = 1'b0; #1;
    check(board_rst_n == 1'b0 && mcu_rst == 1'b1, "por_n asserts at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
