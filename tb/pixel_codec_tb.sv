// pixel_codec_tb: self-checking test of the pixel packing logic.
//
// For every colour mode, position bit combination and many random bytes and
// colours, compares pix_color, wb_byte and rgb with a reference that works
// from the field width and field index of each mode (1bpp: 1 bit at index
// {x1,y1,y0}; 2bpp: 2 bits at {x1,y1}; 4bpp: 4 bits at y1; 8bpp: whole byte)
// and from a table of the output colours.
module pixel_codec_tb;
  import nvga_pkg::*;
  color_mode_e mode;
  logic [7:0]  mem_byte, bus_color, pix_color, wb_byte, rgb;
  logic        x1, paint;
  logic [1:0]  y10;
  int          checks = 0, failures = 0;

  pixel_codec dut (.mode, .mem_byte, .x1, .y10, .paint, .bus_color, .pix_color, .wb_byte, .rgb);

  function automatic logic [7:0] expand(input int m, input logic [7:0] c);
    logic [7:0] grey [4] = '{8'h00, 8'h49, 8'hB6, 8'hFF};
    case (m)
      0: return c[0] ? 8'hFF : 8'h00;
      1: return grey[c[1:0]];
      2: return {c[3] ? 3'b111 : 3'b000, c[2], c[1], c[1], c[0] ? 2'b11 : 2'b00};
      default: return c;
    endcase
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, idx, lo;
    logic [7:0] field, ref_pix, ref_wb, mask;
    for (int m = 0; m < 4; m++) begin
      for (int pos = 0; pos < 8; pos++) begin
        for (int t = 0; t < 60; t++) begin
          mode = color_mode_e'(m);
          {x1, y10} = 3'(pos);
          mem_byte = 8'($urandom);
          bus_color = 8'($urandom);
          paint = t[0];
          #1;
          w   = 1 << m;
          idx = (m == 0) ? pos : (m == 1) ? (pos >> 1) : (m == 2) ? ((pos >> 1) & 1) : 0;
          lo  = idx * w;
          mask = 8'((1 << w) - 1);
          field = (mem_byte >> lo) & mask;
          ref_pix = paint ? (bus_color & mask) : field;
          ref_wb  = (mem_byte & ~(mask << lo)) | (ref_pix << lo);
          checks += 3;
          if (pix_color !== ref_pix) begin failures++; $display("FAIL pix m%0d pos%0d", m, pos); end
          if (wb_byte !== ref_wb)    begin failures++; $display("FAIL wb m%0d pos%0d %h %h", m, pos, wb_byte, ref_wb); end
          if (rgb !== expand(m, ref_pix)) begin failures++; $display("FAIL rgb m%0d", m); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
