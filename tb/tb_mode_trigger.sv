// tb_mode_trigger: self-checking test of the program trigger.
// Checks the power-up mode (internal loader, EA high), the switch to external
// mode on a write to C040 with a single-clock restart request, that a held
// strobe or an unselected access changes nothing, the switch back on a read
// of C080, and that a board reset returns to internal mode.
module tb_mode_trigger;
  import in_node_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sel_ext = 1'b0, sel_int = 1'b0, rd_n = 1'b1, wr_n = 1'b1;
  prog_mode_e mode;
  logic ea_n, restart;
  int checks = 0, failures = 0, n_restart = 0;

  mode_trigger dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && restart) n_restart++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One strobe of `len` clocks on the chosen line with the given selects.
  task automatic access(input logic ext, input logic intl, input logic is_wr, input int len);
    @(negedge clk);
    sel_ext = ext; sel_int = intl;
    if (is_wr) wr_n = 1'b0; else rd_n = 1'b0;
    repeat (len) @(negedge clk);
    wr_n = 1'b1; rd_n = 1'b1; sel_ext = 1'b0; sel_int = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(mode == MODE_INTERNAL && ea_n == 1'b1 && restart == 1'b0, "reset state");
    rst_n = 1'b1;
    access(1'b0, 1'b0, 1'b1, 3);
    check(mode == MODE_INTERNAL && n_restart == 0, "unselected write ignored");
    access(1'b1, 1'b0, 1'b1, 4);
    check(mode == MODE_EXTERNAL && ea_n == 1'b0, "C040 selects external");
    check(n_restart == 1, "one restart per access");
    access(1'b1, 1'b0, 1'b1, 2);
    check(mode == MODE_EXTERNAL && n_restart == 2, "repeat C040 restarts again");
    access(1'b0, 1'b1, 1'b0, 3);
    check(mode == MODE_INTERNAL && ea_n == 1'b1, "C080 read selects internal");
    check(n_restart == 3, "restart on return");
    // restart must be exactly one clock wide and follow the strobe edge
    @(negedge clk); sel_ext = 1'b1; wr_n = 1'b0;
    @(negedge clk); check(restart == 1'b1, "restart after first edge");
    @(negedge clk); check(restart == 1'b0, "restart one clock only");
    wr_n = 1'b1; sel_ext = 1'b0;
    @(negedge clk);
    rst_n = 1'b0; #1;
    check(mode == MODE_INTERNAL && ea_n == 1'b1, "board reset returns to internal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
