// in_node: base controller board of an intelligent node (IN) of a distributed
// sensor network.
//
// The node is built around an 89C51 single-chip microcomputer (outside this
// module; its pins are the mcu_* ports). Its main idea is remote
// reprogramming without relocation: the system loader in the MCU's internal
// ROM writes a routine received from the central computer into external RAM
// starting at address zero, then accesses C040. The program trigger flips to
// external mode (EA low) and the reset circuit restarts the MCU, which now
// fetches the routine from RAM with PSEN. While it runs, the RAM controller
// blocks writes to the code half of the RAM; data goes to the upper half.
// An access to C080 returns to the loader.
//
// Blocks: AR (addr_latch), DC (sys_decoder), CS (ram_ctrl), RAM (sram_32k),
// Tr (mode_trigger), Res (reset_ctrl), IC (irq_ctrl), BIOP (biop_regs), SBI
// with bus former CD (sbi_bus). The network interface (a transistor and
// opto-isolated line driver between the MCU's serial port and the line) and
// the clock oscillator are analog and lie outside: clk is the board clock.
//
// Bus model: P0 is split into the MCU's drive (mcu_p0_out, mcu_p0_oe) and what
// the node returns (mcu_p0_in, 8'hFF when nothing drives it, as with the
// pull-ups). All glue logic samples the MCU pins on the rising edge of clk.
// A bus cycle is: ALE high with the address on P0/P2 for at least one clock,
// then RD, WR or PSEN low for at least two clocks with P2 held. Reads are
// combinational from the strobe to mcu_p0_in. The non-maskable request
// sbi_nmi drives INT0 directly; the maskable ones share INT1 through IC, with
// the source number on P1.
module in_node
  import in_node_pkg::*;
#(
  parameter logic [15:0] CODE_TOP   = CODE_TOP_DEFAULT,
  parameter int unsigned RST_CYCLES = 24,
  parameter int unsigned N_IRQ      = 4,
  localparam int unsigned IDW       = (N_IRQ > 1) ? $clog2(N_IRQ) : 1
) (
  input  logic              clk,
  input  logic              por_n,
  // 89C51 pins
  output logic              mcu_rst,
  output logic              mcu_ea_n,
  input  logic              mcu_ale,
  input  logic              mcu_psen_n,
  input  logic              mcu_rd_n,
  input  logic              mcu_wr_n,
  input  logic [7:0]        mcu_p2,
  input  logic [7:0]        mcu_p0_out,
  input  logic              mcu_p0_oe,
  output logic [7:0]        mcu_p0_in,
  output logic              mcu_int0_n,
  output logic              mcu_int1_n,
  output logic [IDW-1:0]    mcu_p1_src,   // P1 inputs: interrupt source number
  input  logic              mcu_p1_ack,   // P1 output: interrupt acknowledge
  // system bus interface to expansion boards
  output logic [7:0]        sbi_a,
  output logic [7:0]        sbi_dat_out,
  output logic              sbi_dat_oe,
  input  logic [7:0]        sbi_dat_in,
  output logic              sbi_ewr_n,
  output logic              sbi_erd_n,
  input  logic              sbi_nmi,
  input  logic [N_IRQ-1:0]  sbi_irq,
  // basic input-output ports
  output logic [7:0]        biop_out [N_BIOP_OUT],
  input  logic [7:0]        biop_in  [N_BIOP_IN],
  // status
  output prog_mode_e        mode,
  output logic              ram_wr_blocked,
  output logic [N_IRQ-1:0]  irq_pending
);

  logic       board_rst_n;
  logic [7:0] a_lo;
  logic [ADDR_W-1:0] addr;
  dec_sel_t   sel;
  logic       restart;
  logic       ram_ce_n, ram_oe_n, ram_we_n;
  logic [7:0] ram_q, biop_q, sbi_q;
  logic       ram_q_en, biop_q_en, sbi_q_en;

  reset_ctrl #(.RST_CYCLES(RST_CYCLES)) u_res (
    .clk, .por_n, .restart, .board_rst_n, .mcu_rst
  );

  addr_latch #(.W(8)) u_ar (
    .clk, .rst_n(board_rst_n), .ale(mcu_ale), .p0(mcu_p0_out), .a_lo
  );

  assign addr = {mcu_p2, a_lo};

  sys_decoder #(.CODE_TOP(CODE_TOP)) u_dc (.addr, .sel);

  mode_trigger u_tr (
    .clk, .rst_n(board_rst_n), .sel_ext(sel.sw_ext), .sel_int(sel.sw_int),
    .rd_n(mcu_rd_n), .wr_n(mcu_wr_n), .mode, .ea_n(mcu_ea_n), .restart
  );

  ram_ctrl u_cs (
    .mode, .sel_ram(sel.ram), .sel_code(sel.code),
    .rd_n(mcu_rd_n), .wr_n(mcu_wr_n), .psen_n(mcu_psen_n),
    .ram_ce_n, .ram_oe_n, .ram_we_n, .wr_blocked(ram_wr_blocked)
  );

  sram_32k #(.AW(15), .DW(8)) u_ram (
    .clk, .ce_n(ram_ce_n), .oe_n(ram_oe_n), .we_n(ram_we_n),
    .addr(addr[14:0]), .din(mcu_p0_out), .dout(ram_q), .dout_en(ram_q_en)
  );

  biop_regs u_biop (
    .clk, .rst_n(board_rst_n), .sel_out(sel.biop_out), .sel_in(sel.biop_in),
    .rd_n(mcu_rd_n), .wr_n(mcu_wr_n), .din(mcu_p0_out),
    .in_port(biop_in), .out_port(biop_out), .dout(biop_q), .dout_en(biop_q_en)
  );

  sbi_bus u_sbi (
    .sel_exp(sel.exp), .rd_n(mcu_rd_n), .wr_n(mcu_wr_n),
    .din(mcu_p0_out), .dat_in(sbi_dat_in),
    .ewr_n(sbi_ewr_n), .erd_n(sbi_erd_n), .dat_out(sbi_dat_out),
    .dat_oe(sbi_dat_oe), .dout(sbi_q), .dout_en(sbi_q_en)
  );

  irq_ctrl #(.N_SRC(N_IRQ)) u_ic (
    .clk, .rst_n(board_rst_n), .req(sbi_irq), .ack(mcu_p1_ack),
    .int1_n(mcu_int1_n), .src_id(mcu_p1_src), .pending(irq_pending)
  );

  assign sbi_a      = a_lo;
  assign mcu_int0_n = !sbi_nmi;

  // P0 read-back: one driver at a time, pull-ups otherwise.
  always_comb begin
    if      (ram_q_en)  mcu_p0_in = ram_q;
    else if (biop_q_en) mcu_p0_in = biop_q;
    else if (sbi_q_en)  mcu_p0_in = sbi_q;
    else                mcu_p0_in = 8'hFF;
  end

  // Only one target may drive the MCU data bus, the MCU must not drive it at
  // the same time, and the MCU issues at most one strobe at a time.
  always_ff @(posedge clk) begin
    if (board_rst_n) begin
      assert ($countones({!mcu_rd_n, !mcu_wr_n, !mcu_psen_n}) <= 1)
        else $error("in_node: several MCU strobes active");
      assert ($countones({ram_q_en, biop_q_en, sbi_q_en}) <= 1)
        else $error("in_node: data bus contention");
      assert (!(mcu_p0_oe && (ram_q_en || biop_q_en || sbi_q_en)))
        else $error("in_node: MCU and node drive P0 together");
    end
  end

endmodule
