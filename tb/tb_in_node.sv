// tb_in_node: end-to-end test of the intelligent-node board at its default
// parameters, with this testbench playing the 89C51 (bus cycles with ALE,
// PSEN, RD, WR on P0/P2, and the RST, EA, INT0, INT1 and P1 pins) and an
// expansion board (256 byte registers on the system bus).
//
// One complete remote-reprogramming operation is run:
//   1. power-up: the board and MCU resets, loader mode (EA high);
//   2. the loader writes a routine into the whole 16 Kbyte code range and a
//      table into the data range, and reads both back with MOVX;
//   3. code fetches are not passed to the RAM while the loader runs;
//   4. an access to C040 switches to the loaded routine: EA low and an MCU
//      reset of RST_CYCLES clocks;
//   5. the routine is fetched with PSEN from address zero and compared;
//   6. writes into the code range are blocked, data writes are not;
//   7. expansion-board writes and reads, BIOP outputs and inputs, an
//      unmapped read, maskable interrupts through INT1 with the source on P1,
//      and the NMI on INT0;
//   8. an access to C080 returns to the loader.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_in_node;
  import in_node_pkg::*;

  localparam int unsigned RST_CYCLES = 24;   // the top's default
  localparam int unsigned CODE_BYTES = 16384;

  logic clk = 1'b0, por_n = 1'b0;
  logic mcu_rst, mcu_ea_n, mcu_int0_n, mcu_int1_n;
  logic mcu_ale = 1'b0, mcu_psen_n = 1'b1, mcu_rd_n = 1'b1, mcu_wr_n = 1'b1;
  logic [7:0] mcu_p2 = '0, mcu_p0_out = '0, mcu_p0_in;
  logic mcu_p0_oe = 1'b0, mcu_p1_ack = 1'b0;
  logic [1:0] mcu_p1_src;
  logic [7:0] sbi_a, sbi_dat_out, sbi_dat_in;
  logic sbi_dat_oe, sbi_ewr_n, sbi_erd_n, sbi_nmi = 1'b0;
  logic [3:0] sbi_irq = '0, irq_pending;
  logic [7:0] biop_out [4];
  logic [7:0] biop_in  [2];
  prog_mode_e mode;
  logic ram_wr_blocked;

  int checks = 0, failures = 0;
  int n_por = 0, n_load = 0, n_psen_gated = 0, n_sw_ext = 0, n_sw_int = 0;
  int n_fetch = 0, n_blocked = 0, n_data = 0, n_ewr = 0, n_erd = 0;
  int n_biop_wr = 0, n_biop_rd = 0, n_unmapped = 0, n_int1 = 0, n_int0 = 0;
  int n_irq_queue = 0;

  in_node dut (.*);

  always #5 clk = ~clk;

  // ---- expansion board model: 256 registers, written on EWR, read on ERD
  logic [7:0] exp_reg [256];
  assign sbi_dat_in = sbi_erd_n ? 8'h00 : exp_reg[sbi_a];
  always @(posedge clk) if (!sbi_ewr_n && sbi_dat_oe) exp_reg[sbi_a] <= sbi_dat_out;
  // count strobe leading edges seen on the boards and blocked RAM writes
  logic ewr_d = 1'b1, erd_d = 1'b1, wr_d = 1'b1;
  always @(posedge clk) begin
    if (!sbi_ewr_n && ewr_d) n_ewr++;
    if (!sbi_erd_n && erd_d) n_erd++;
    if (ram_wr_blocked && !mcu_wr_n && wr_d) n_blocked++;
    ewr_d <= sbi_ewr_n; erd_d <= sbi_erd_n; wr_d <= mcu_wr_n;
  end

  function automatic logic [7:0] code_byte(input int a);
    return 8'((a * 13 + 7) ^ (a >> 7));
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  typedef enum {CYC_WR, CYC_RD, CYC_PSEN} cyc_e;

  // One external bus cycle of the MCU: ALE phase, then a two-clock strobe.
  task automatic bus(input cyc_e kind, input logic [15:0] addr,
                     input logic [7:0] wdata, output logic [7:0] rdata);
    @(negedge clk);
    mcu_ale = 1'b1; mcu_p2 = addr[15:8]; mcu_p0_out = addr[7:0]; mcu_p0_oe = 1'b1;
    @(negedge clk);
    mcu_ale = 1'b0;
    if (kind == CYC_WR) begin
      mcu_p0_out = wdata; mcu_wr_n = 1'b0;
    end else begin
      mcu_p0_oe = 1'b0;
      if (kind == CYC_RD) mcu_rd_n = 1'b0; else mcu_psen_n = 1'b0;
    end
    @(negedge clk);
    @(negedge clk);
    rdata = mcu_p0_in;
    mcu_wr_n = 1'b1; mcu_rd_n = 1'b1; mcu_psen_n = 1'b1; mcu_p0_oe = 1'b0;
  endtask

  task automatic wr(input logic [15:0] a, input logic [7:0] d);
    logic [7:0] dummy;
    bus(CYC_WR, a, d, dummy);
  endtask

  // Wait until the MCU reset has ended; return how many clocks it lasted.
  task automatic wait_mcu_reset(output int len);
    len = 0;
    @(negedge clk);
    while (!mcu_rst) begin len--; @(negedge clk); if (len < -10) break; end
    len = 0;
    while (mcu_rst) begin len++; @(negedge clk); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] q;
    int len, errs;
    biop_in[0] = 8'h00; biop_in[1] = 8'h00;
    foreach (exp_reg[i]) exp_reg[i] = 8'h00;

    // 1. power-up
    repeat (4) @(negedge clk);
    check(mcu_rst == 1'b1, "MCU held in reset at power-up");
    por_n = 1'b1;
    len = 0;
    while (mcu_rst) begin len++; @(negedge clk); end
    check(len == RST_CYCLES + 2, $sformatf("power-up reset length %0d", len));
    check(mode == MODE_INTERNAL && mcu_ea_n == 1'b1, "loader mode after power-up");
    n_por++;

    // 2. loader copies the routine and a data table into RAM
    for (int a = 0; a < CODE_BYTES; a++) begin
      wr(16'(a), code_byte(a));
      n_load++;
    end
    for (int a = 0; a < 256; a++) wr(16'h4000 + 16'(a), ~code_byte(a));
    errs = 0;
    for (int a = 0; a < CODE_BYTES; a += 61) begin
      bus(CYC_RD, 16'(a), 8'h00, q);
      if (q !== code_byte(a)) errs++;
    end
    check(errs == 0, "loader reads back the routine");
    bus(CYC_RD, 16'h4005, 8'h00, q);
    check(q === ~code_byte(5), "loader reads back data");

    // 3. fetch while the loader runs does not reach the RAM
    bus(CYC_PSEN, 16'h0010, 8'h00, q);
    check(q === 8'hFF, "PSEN not passed to RAM in loader mode");
    n_psen_gated++;

    // 4. switch to the loaded routine
    fork
      wr(16'hC040, 8'h00);
      wait_mcu_reset(len);
    join
    check(len == RST_CYCLES, $sformatf("restart reset length %0d", len));
    check(mode == MODE_EXTERNAL && mcu_ea_n == 1'b0, "external mode after C040");
    n_sw_ext++;

    // 5. the MCU runs the routine from address zero
    errs = 0;
    for (int a = 0; a < CODE_BYTES; a++) begin
      bus(CYC_PSEN, 16'(a), 8'h00, q);
      if (q !== code_byte(a)) errs++;
      n_fetch++;
    end
    check(errs == 0, $sformatf("routine fetched from RAM (%0d errors)", errs));

    // 6. write protection of the code range, data range still writable
    for (int k = 0; k < 8; k++) begin
      int a;
      a = $urandom_range(0, CODE_BYTES - 1);
      wr(16'(a), ~code_byte(a));
      bus(CYC_PSEN, 16'(a), 8'h00, q);
      check(q === code_byte(a), "code byte unchanged after blocked write");
      bus(CYC_RD, 16'(a), 8'h00, q);
      check(q === code_byte(a), "code byte unchanged (MOVX read)");
    end
    for (int k = 0; k < 16; k++) begin
      logic [15:0] a;
      logic [7:0] d;
      a = 16'h4000 + 16'($urandom_range(0, 16383));
      d = 8'($urandom);
      wr(a, d);
      bus(CYC_RD, a, 8'h00, q);
      check(q === d, "data range written and read in routine mode");
      n_data++;
    end

    // 7a. expansion board
    for (int k = 0; k < 8; k++) begin
      logic [7:0] r, d;
      r = 8'($urandom); d = 8'($urandom);
      wr({8'h80, r}, d);
      check(exp_reg[r] === d, "expansion register written through EWR");
      bus(CYC_RD, {8'h80, r}, 8'h00, q);
      check(q === d, "expansion register read through ERD");
    end

    // 7b. BIOP output registers and input ports
    begin
      logic [15:0] oa [4];
      logic [7:0]  od [4];
      oa = '{16'hC0D0, 16'hC0D1, 16'hC0E0, 16'hC0E1};
      for (int i = 0; i < 4; i++) begin
        od[i] = 8'($urandom);
        wr(oa[i], od[i]);
        n_biop_wr++;
      end
      for (int i = 0; i < 4; i++) check(biop_out[i] === od[i], "BIOP output register");
      biop_in[0] = 8'hA5; biop_in[1] = 8'h3C;
      bus(CYC_RD, 16'hC0F0, 8'h00, q); check(q === 8'hA5, "BIOP input 0"); n_biop_rd++;
      bus(CYC_RD, 16'hC0F1, 8'h00, q); check(q === 8'h3C, "BIOP input 1"); n_biop_rd++;
    end

    // 7c. unmapped address reads the pull-ups
    bus(CYC_RD, 16'hA000, 8'h00, q);
    check(q === 8'hFF, "unmapped read"); n_unmapped++;

    // 7d. interrupts: two requests queue on INT1, lowest number first
    @(negedge clk); sbi_irq[2] = 1'b1; sbi_irq[1] = 1'b1;
    @(negedge clk); @(negedge clk);
    check(mcu_int1_n == 1'b0, "INT1 asserted");
    if (irq_pending == 4'b0110) n_irq_queue++;
    check(mcu_p1_src == 2'd1, "P1 names source 1 first");
    n_int1++;
    mcu_p1_ack = 1'b1; @(negedge clk); mcu_p1_ack = 1'b0; @(negedge clk);
    check(mcu_int1_n == 1'b0 && mcu_p1_src == 2'd2, "source 2 still pending");
    mcu_p1_ack = 1'b1; @(negedge clk); mcu_p1_ack = 1'b0; @(negedge clk);
    check(mcu_int1_n == 1'b1, "INT1 released after both acknowledged");
    sbi_irq = '0;
    sbi_nmi = 1'b1; #1;
    check(mcu_int0_n == 1'b0, "NMI reaches INT0"); n_int0++;
    @(negedge clk); sbi_nmi = 1'b0; #1;
    check(mcu_int0_n == 1'b1, "INT0 released");

    // 8. back to the loader
    fork
      wr(16'hC080, 8'h00);
      wait_mcu_reset(len);
    join
    check(len == RST_CYCLES, "restart on return to loader");
    check(mode == MODE_INTERNAL && mcu_ea_n == 1'b1, "loader mode after C080");
    n_sw_int++;
    // the loader may rewrite the code range again
    wr(16'h0123, 8'h77);
    bus(CYC_RD, 16'h0123, 8'h00, q);
    check(q === 8'h77, "code range writable again in loader mode");

    // every mechanism must have happened
    check(n_por > 0,        "mechanism: power-up reset");
    check(n_load > 0,       "mechanism: routine loading");
    check(n_psen_gated > 0, "mechanism: fetch gated in loader mode");
    check(n_sw_ext > 0,     "mechanism: switch to external program");
    check(n_sw_int > 0,     "mechanism: switch to internal program");
    check(n_fetch > 0,      "mechanism: fetch from RAM");
    check(n_blocked > 0,    "mechanism: blocked code write");
    check(n_data > 0,       "mechanism: data access");
    check(n_ewr > 0,        "mechanism: expansion write");
    check(n_erd > 0,        "mechanism: expansion read");
    check(n_biop_wr > 0 && n_biop_rd > 0, "mechanism: BIOP");
    check(n_unmapped > 0,   "mechanism: unmapped read");
    check(n_int1 > 0 && n_irq_queue > 0, "mechanism: queued INT1 requests");
    check(n_int0 > 0,       "mechanism: NMI");
    $display("mechanisms: por=%0d load=%0d gated=%0d sw_ext=%0d sw_int=%0d fetch=%0d blocked=%0d data=%0d ewr=%0d erd=%0d biop=%0d/%0d unmapped=%0d int1=%0d queue=%0d int0=%0d",
             n_por, n_load, n_psen_gated, n_sw_ext, n_sw_int, n_fetch, n_blocked, n_data,
             n_ewr, n_erd, n_biop_wr, n_biop_rd, n_unmapped, n_int1, n_irq_queue, n_int0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
