// nvga_top: nVGA graphics controller, a small frame-buffered VGA display
// controller commanded by a microcontroller over SPI.
//
// Data flow: spi_receiver (SPI clock domain) assembles bytes;
// command_interpreter (pixel clock) decodes the dot-draw, clear-screen and
// colour-mode commands; the graphics units dot_draw, solid_draw and rect_draw
// watch the pixel position the memory controller advertises and request the
// shared colour bus when they want to paint it; memory_controller arbitrates,
// merges the winning colour into the frame buffer (read-modify-write) and
// hands the pixel colour to vga_output, which adds syncs and blanking.
// Colour-bus priority: rectangle > clear > dot.
//
// Interface: clk is the 25 MHz pixel clock (from an on-chip clock manager,
// outside this design); rst resets the pixel-clock logic, io_rst the SPI
// receiver and command interpreter (both asynchronous, active high).
// buff_full is the overflow warning to the host. The rectangle unit has no
// serial command; it is started by rect_go and paints from the last
// commanded coordinate (upper-left) to (RECT_LOWER_X, RECT_LOWER_Y) in the
// last commanded colour, as wired in the original design.
module nvga_top
  import nvga_pkg::*;
#(
  parameter int N_DOTS       = 10,
  parameter int RECT_LOWER_X = 160,
  parameter int RECT_LOWER_Y = 120
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       io_rst,
  input  logic       spi_clk,
  input  logic       spi_d,
  input  logic       rect_go,
  output logic       ready,
  output logic       waiting,
  output logic       buff_full,
  output logic       rect_ready,
  output logic       hsync,
  output logic       vsync,
  output logic [2:0] r,
  output logic [2:0] g,
  output logic [2:0] b
);

  logic               valid;
  logic [7:0]         par_data;
  logic [COORD_W-1:0] x_coord, y_coord, x_next, y_next;
  logic [7:0]         cmd_color;
  color_mode_e        mode;
  logic               dot_go, clear_go, next_active, writ;
  logic [N_UNITS-1:0] req, enable;
  logic [7:0]         dot_color, solid_color, rect_color, bus_color, out_color;
  logic [SCAN_W-1:0]  x_scan, y_scan;
  logic               solid_busy, mem_we;
  logic [ADDR_W-1:0]  mem_wr_addr;
  logic [7:0]         mem_wr_data;

  spi_receiver u_spi (
    .spi_clk, .rst(io_rst), .spi_d, .ready, .valid, .par_data
  );

  command_interpreter u_cmd (
    .clk, .rst(io_rst), .valid, .par_data, .waiting,
    .x_coord, .y_coord, .color_out(cmd_color), .color_mode(mode),
    .dot_go, .clear_go
  );

  dot_draw #(.N_DOTS(N_DOTS)) u_dot (
    .clk, .rst, .x_coord, .y_coord, .color(cmd_color), .go(dot_go),
    .x_next, .y_next, .next_active,
    .req(req[UNIT_DOT]), .enable(enable[UNIT_DOT]),
    .bus_color(dot_color), .buff_full
  );

  solid_draw u_solid (
    .clk, .rst, .color(cmd_color), .go(clear_go), .vsync,
    .req(req[UNIT_SOLID]), .enable(enable[UNIT_SOLID]),
    .bus_color(solid_color), .busy(solid_busy)
  );

  rect_draw u_rect (
    .clk, .rst,
    .upper_x(x_coord), .upper_y(y_coord),
    .lower_x(COORD_W'(RECT_LOWER_X)), .lower_y(COORD_W'(RECT_LOWER_Y)),
    .color(cmd_color), .go(rect_go),
    .x_next, .y_next, .next_active,
    .req(req[UNIT_RECT]), .ready(rect_ready), .enable(enable[UNIT_RECT]),
    .bus_color(rect_color)
  );

  assign req[N_UNITS-1:UNIT_RECT+1] = '0;  // free lines for future units
  assign bus_color = dot_color | solid_color | rect_color;

  memory_controller u_mem (
    .clk, .rst, .mode, .req, .bus_color, .writ, .enable,
    .x_next, .y_next, .next_active, .x_scan, .y_scan, .out_color,
    .mem_we, .mem_wr_addr, .mem_wr_data
  );

  vga_output u_vga (
    .clk, .rst, .color(out_color), .x_scan, .y_scan,
    .hsync, .vsync, .r, .g, .b, .writ
  );

endmodule
