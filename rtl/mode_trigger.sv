// mode_trigger: the program-memory trigger (Tr) of the intelligent node.
//
// After power-up the MCU runs the system loader in its internal ROM (EA high).
// The loader copies a routine received over the network into external RAM
// from address zero and then accesses address C040: the trigger flips to
// external mode, EA goes low and a restart request is raised so that the MCU
// starts the loaded routine at address zero without any address relocation.
// An access to C080 flips it back to the internal loader the same way.
//
// An access is the leading edge of an RD or WR strobe while the decoder selects
// one of the two addresses; the mode changes on the next clock edge and
// restart pulses for exactly one clock. Only board reset (power-up) returns
// the trigger to internal mode; the MCU restart it requests does not. Using
// either strobe, and restarting the MCU on a switch, are this design's
// choices: the description names the two addresses and states that execution
// begins from address zero after the switch.
module mode_trigger
  import in_node_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sel_ext,    // address is C040
  input  logic       sel_int,    // address is C080
  input  logic       rd_n,
  input  logic       wr_n,
  output prog_mode_e mode,
  output logic       ea_n,       // to the MCU EA pin
  output logic       restart     // one-clock request to the reset circuit
);

  logic strobe, strobe_d, access;

  assign strobe = !rd_n || !wr_n;
  assign access = strobe && !strobe_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strobe_d <= 1'b0;
      mode     <= MODE_INTERNAL;
      restart  <= 1'b0;
    end else begin
      strobe_d <= strobe;
      restart  <= 1'b0;
      if (access && sel_ext) begin
        mode    <= MODE_EXTERNAL;
        restart <= 1'b1;
      end else if (access && sel_int) begin
        mode    <= MODE_INTERNAL;
        restart <= 1'b1;
      end
    end
  end

  assign ea_n = (mode == MODE_EXTERNAL) ? 1'b0 : 1'b1;

endmodule
