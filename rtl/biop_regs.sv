// biop_regs: basic input-output ports (BIOP) of the intelligent node.
//
// Up to six byte-wide registers on the MCU's external data bus serve a
// seven-segment or LED display, a 16-button or PC keyboard, a printer, or a
// direct link to measurement modules: four output registers and two input
// ports. An output register loads the data byte while the MCU's WR strobe is
// low and the decoder selects it, and holds it until the next write; its
// outputs drive the peripherals. An input port puts its pins on the data bus
// while RD is low and it is selected (dout_en high). Board reset clears the
// output registers.
// The count and direction of the registers follow the board description;
// their addresses and reset value are this design's choices.
module biop_regs
  import in_node_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_BIOP_OUT-1:0]   sel_out,
  input  logic [N_BIOP_IN-1:0]    sel_in,
  input  logic                    rd_n,
  input  logic                    wr_n,
  input  logic [DATA_W-1:0]       din,
  input  logic [DATA_W-1:0]       in_port  [N_BIOP_IN],
  output logic [DATA_W-1:0]       out_port [N_BIOP_OUT],
  output logic [DATA_W-1:0]       dout,
  output logic                    dout_en
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_BIOP_OUT; i++) out_port[i] <= '0;
    end else if (!wr_n) begin
      for (int i = 0; i < N_BIOP_OUT; i++)
        if (sel_out[i]) out_port[i] <= din;
    end
  end

  always_comb begin
    dout    = '0;
    dout_en = 1'b0;
    if (!rd_n) begin
      for (int i = 0; i < N_BIOP_IN; i++) begin
        if (sel_in[i]) begin
          dout    = in_port[i];
          dout_en = 1'b1;
        end
      end
    end
  end

endmodule
