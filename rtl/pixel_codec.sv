// pixel_codec: packs and unpacks pixels in a frame-buffer byte.
//
// Every memory byte covers a 4 x 4 block of screen positions. The colour
// mode decides how the byte is split:
//   1bpp: 8 one-bit pixels, bit index {x[1], y[1], y[0]}  (2 x 1 positions each)
//   2bpp: 4 two-bit pixels, field  {x[1], y[1]}          (2 x 2 positions each)
//   4bpp: 2 nibbles, nibble y[1]                         (4 x 2 positions each)
//   8bpp: the whole byte is one pixel                    (4 x 4 positions)
// Combinational. Given the current memory byte and position it
//   * selects the pixel colour: the bus colour when paint is high, else the
//     field read from mem_byte (pix_color, right-aligned, zero-filled),
//   * returns mem_byte with that field replaced by pix_color (wb_byte),
//   * expands pix_color to the 8-bit R3 G3 B2 output format (rgb):
//       1bpp: the bit on all eight lines (black or white)
//       2bpp: grey g1 g0 g1 on red and green, g1 g0 on blue
//       4bpp: R -> RRR, G1 G0 -> G1 G0 G0, B -> BB
// Bit placement and colour expansion follow the original design.
module pixel_codec
  import nvga_pkg::*;
(
  input  color_mode_e mode,
  input  logic [7:0]  mem_byte,
  input  logic        x1,         // screen x bit 1
  input  logic [1:0]  y10,        // screen y bits 1:0
  input  logic        paint,      // a graphics unit owns this pixel
  input  logic [7:0]  bus_color,  // its colour, right-aligned
  output logic [7:0]  pix_color,
  output logic [7:0]  wb_byte,
  output logic [7:0]  rgb
);

  logic [2:0] bit_idx;
  logic [1:0] fld_idx;

  assign bit_idx = {x1, y10};
  assign fld_idx = {x1, y10[1]};

  always_comb begin
    wb_byte = mem_byte;
    unique case (mode)
      MODE_1BPP: begin
        pix_color = paint ? {7'b0, bus_color[0]} : {7'b0, mem_byte[bit_idx]};
        wb_byte[bit_idx] = pix_color[0];
        rgb = {8{pix_color[0]}};
      end
      MODE_2BPP: begin
        pix_color = paint ? {6'b0, bus_color[1:0]}
                          : {6'b0, mem_byte[2*fld_idx +: 2]};
        wb_byte[2*fld_idx +: 2] = pix_color[1:0];
        rgb = {pix_color[1:0], pix_color[1], pix_color[1:0], pix_color[1],
               pix_color[1:0]};
      end
      MODE_4BPP: begin
        pix_color = paint ? {4'b0, bus_color[3:0]}
                          : {4'b0, mem_byte[4*y10[1] +: 4]};
        wb_byte[4*y10[1] +: 4] = pix_color[3:0];
        rgb = {{3{pix_color[3]}}, pix_color[2:1], pix_color[1], {2{pix_color[0]}}};
      end
      default: begin
        pix_color = paint ? bus_color : mem_byte;
        wb_byte   = pix_color;
        rgb       = pix_color;
      end
    endcase
  end

endmodule
