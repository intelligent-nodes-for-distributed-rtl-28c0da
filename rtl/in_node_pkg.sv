// in_node_pkg: constants and types shared by the intelligent-node glue logic.
//
// The node's 64 Kbyte MCU address space is split as follows (from the node's
// published memory map for a 32 Kbyte 61256 RAM):
//   0000-3FFF  code of the loaded routine in external RAM (write protected
//              while that routine runs)
//   4000-7FFF  data in external RAM
//   8000-80FF  expansion boards on the system bus (SBI)
//   C0D0, C0D1, C0E0, C0E1  BIOP output registers 0..3
//   C0F0, C0F1              BIOP input ports 0..1
//   C040       switch to the program stored in external RAM
//   C080       switch to the program stored in internal ROM
// The placement of the six BIOP registers inside C0D0..C0F1 is this design's
// choice: the six addresses are the ones that differ only in A5..A4 (D/E/F)
// and A0.
package in_node_pkg;

  localparam int unsigned ADDR_W = 16;
  localparam int unsigned DATA_W = 8;

  // Boundary between loaded code and data inside the RAM.
  localparam logic [15:0] CODE_TOP_DEFAULT = 16'h4000;
  localparam logic [15:0] RAM_TOP          = 16'h8000;  // first address above the RAM

  localparam logic [7:0]  EXP_PAGE   = 8'h80;           // 8000-80FF
  localparam logic [15:0] SW_EXT_ADR = 16'hC040;
  localparam logic [15:0] SW_INT_ADR = 16'hC080;

  localparam int unsigned N_BIOP_OUT = 4;
  localparam int unsigned N_BIOP_IN  = 2;

  localparam logic [15:0] BIOP_OUT_ADR [N_BIOP_OUT] = '{16'hC0D0, 16'hC0D1, 16'hC0E0, 16'hC0E1};
  localparam logic [15:0] BIOP_IN_ADR  [N_BIOP_IN]  = '{16'hC0F0, 16'hC0F1};

  // Program memory the MCU executes from (state of the trigger Tr).
  typedef enum logic {
    MODE_INTERNAL = 1'b0,   // loader in the MCU's internal ROM, EA high
    MODE_EXTERNAL = 1'b1    // loaded routine in external RAM, EA low
  } prog_mode_e;

  // Select lines produced by the system decoder for one address.
  typedef struct packed {
    logic                  ram;      // 0000-7FFF
    logic                  code;     // 0000..CODE_TOP-1 (inside ram)
    logic                  exp;      // 8000-80FF
    logic [N_BIOP_OUT-1:0] biop_out;
    logic [N_BIOP_IN-1:0]  biop_in;
    logic                  sw_ext;   // C040
    logic                  sw_int;   // C080
  } dec_sel_t;

endpackage
