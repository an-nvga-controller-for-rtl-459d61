// nvga_pkg: shared types and constants of the nVGA graphics controller.
//
// The controller keeps a small frame buffer (8 bit x 32768 words) and lets the
// application trade resolution for colour depth through four colour modes.
// This package holds the colour-mode encoding, the serial command opcodes and
// the VGA scan geometry that several modules share.
//
// Opcodes, colour-mode numbers and the scan geometry (96-clock HSync, 2-line
// VSync, visible window starting at clock 138 / line 28) follow the original
// design. The 800 x 525 totals are the standard 640x480 VGA frame.
package nvga_pkg;

  // Colour modes, as sent in the "change colour mode" command.
  typedef enum logic [1:0] {
    MODE_1BPP = 2'b00,  // black/white, 320 x 480
    MODE_2BPP = 2'b01,  // 4 grey levels, 320 x 240
    MODE_4BPP = 2'b10,  // 16 colours R1 G2 B1, 160 x 240
    MODE_8BPP = 2'b11   // 256 colours R3 G3 B2, 160 x 120
  } color_mode_e;

  // Serial command opcodes (first byte of each command).
  localparam logic [7:0] OP_NOP        = 8'h00;
  localparam logic [7:0] OP_CLEAR      = 8'h45;
  localparam logic [7:0] OP_DOT        = 8'h50;
  localparam logic [7:0] OP_COLOR_MODE = 8'h59;

  // Scan geometry in pixel clocks / lines.
  localparam int H_TOTAL   = 800;  // clocks per line
  localparam int V_TOTAL   = 525;  // lines per frame
  localparam int H_SYNC    = 96;   // HSync low for scan x < H_SYNC
  localparam int V_SYNC    = 2;    // VSync low for scan y < V_SYNC
  localparam int H_VIS_LO  = 138;  // first visible scan x
  localparam int H_VIS_HI  = 777;  // last visible scan x
  localparam int V_VIS_LO  = 28;   // first visible scan y
  localparam int V_VIS_HI  = 507;  // last visible scan y
  // Frame-buffer origin in scan coordinates. X is two clocks ahead of the
  // visible window because the memory pipeline is two stages deep.
  localparam int X_ORIGIN  = 136;
  localparam int Y_ORIGIN  = 28;

  localparam int SCAN_W    = 10;   // scan counter width
  localparam int COORD_W   = 16;   // coordinate width on the command bus
  localparam int ADDR_W    = 15;   // frame buffer address: {y[8:2], x[9:2]}
  localparam int N_UNITS   = 8;    // colour-bus request lines

  // Request / enable line of each graphics unit on the colour bus.
  // A higher index has priority.
  localparam int UNIT_DOT   = 0;
  localparam int UNIT_SOLID = 1;
  localparam int UNIT_RECT  = 2;

endpackage
