// imager_pkg: constants and types shared by the imager's digital blocks.
//
// The numbers are the chip's own: 2112 column ADCs split over a top and a
// bottom side (1056 each), 16-bit ADC words, 1124 shared-pixel rows, and a
// 132:1 hybrid output multiplexer built from two groups of six 11:1
// tristate multiplexers. Eight 132:1 multiplexers serve one side, and every
// multiplexer output feeds two LVDS lanes (32 lanes in all).
// mux_ctrl_t bundles the multiplexer control lines drawn in the
// multiplexer diagram (mux_en, mux_reg_en, load_sel) plus the select of the
// 2:1 shift/load multiplexers, which the diagram does not name.
package imager_pkg;

  localparam int unsigned PIX_W         = 16;   // ADC word width
  localparam int unsigned ROWS          = 1124; // shared-pixel rows
  localparam int unsigned AMUX_N        = 11;   // 11:1 tristate multiplexer
  localparam int unsigned SMUX_N        = 6;    // 6:1 multiplexer
  localparam int unsigned GROUPS        = 2;    // register depth of one 132:1 mux
  localparam int unsigned COLS_PER_MUX  = AMUX_N * SMUX_N * GROUPS; // 132
  localparam int unsigned MUX_PER_SIDE  = 8;
  localparam int unsigned ADC_PER_SIDE  = COLS_PER_MUX * MUX_PER_SIDE; // 1056
  localparam int unsigned LANES_PER_MUX = 2;
  localparam int unsigned SER_MAX       = 16;   // largest serialization factor

  // Control lines shared by all 132:1 multiplexers of one side.
  typedef struct packed {
    logic [AMUX_N-1:0] mux_en;     // one-hot select of the 11:1 tristate muxes
    logic              mux_reg_en; // register stage latches the tristate values
    logic [2:0]        load_sel;   // 6:1 multiplexer select
    logic              load;       // 2:1 muxes take the 6:1 output (else shift)
    logic              adv;        // word clock enable of the output registers
  } mux_ctrl_t;

  // The six vertical shift registers of the row driver.
  typedef enum logic [2:0] {
    VR_SEL1 = 3'd0, VR_SEL2 = 3'd1, VR_RST1 = 3'd2,
    VR_RST2 = 3'd3, VR_TG12 = 3'd4, VR_TG03 = 3'd5
  } vreg_e;
  localparam int unsigned NUM_VREG = 6;

  // Per-register controls from the external timing generator.
  typedef struct packed {
    logic tok;    // token input (TOK_x), enters the first row on a forward shift
    logic shift;  // one shift per clock with this set (stands for the x_CLK edge)
    logic fw_bwn; // 1: shift forward (towards the last row), 0: backward
    logic en;     // output enable: the register's token row is driven
  } vreg_ctrl_t;

endpackage
