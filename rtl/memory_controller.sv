// memory_controller: scan generator and read-modify-write frame-buffer pipeline.
//
// Scan: x_scan counts pixel clocks 0..H_TOTAL-1, y_scan counts lines
// 0..V_TOTAL-1. The frame-buffer position of the scan is (x_scan - X_ORIGIN,
// y_scan - Y_ORIGIN); a memory word is addressed by {y[8:2], x[9:2]}, i.e.
// one byte per 4 x 4 block of the 640 x 480 visible area.
//
// Three pipeline stages carry each pixel position:
//   stage 1 (In):  the position is advertised to the graphics units as
//                  (x_next, y_next) in the units of the current colour mode,
//                  with next_active high inside the visible area; units
//                  raise req combinationally; the word address goes into the
//                  memory read port.
//   stage 2 (Out): the memory word arrives (mem_out); the arbiter's one-hot
//                  enable selects one unit, which drives bus_color.
//   stage 3 (Now): mem_now holds the current word. pixel_codec merges the
//                  bus colour (if a unit was enabled) or keeps the stored
//                  field, giving the output colour and the modified word.
//                  If the next pixel (stage 2) lies in another word, the
//                  modified word is written back at addr_now (only while
//                  writ, the visible-area flag of the VGA stage, is high) and
//                  mem_now loads mem_out; otherwise mem_now keeps the
//                  modified word.
// out_color is therefore the colour of the pixel two clocks behind x_scan,
// which is why X_ORIGIN is two clocks before the first visible clock.
//
// Coordinate units of x_next / y_next per mode:
//   1bpp x[9:1], y[8:0]   2bpp x[9:1], y[8:1]
//   4bpp x[9:2], y[8:1]   8bpp x[9:2], y[8:2]
// The pipeline, address mapping and coordinate units follow the original
// design. The next_active flag (the original forced coordinates to 0
// outside the visible area) and the OR-ed bus are this design's choices.
module memory_controller
  import nvga_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  color_mode_e         mode,
  input  logic [N_UNITS-1:0]  req,
  input  logic [7:0]          bus_color,
  input  logic                writ,
  output logic [N_UNITS-1:0]  enable,
  output logic [COORD_W-1:0]  x_next,
  output logic [COORD_W-1:0]  y_next,
  output logic                next_active,
  output logic [SCAN_W-1:0]   x_scan,
  output logic [SCAN_W-1:0]   y_scan,
  output logic [7:0]          out_color,
  // observation of the write port (used by tests and debug)
  output logic                mem_we,
  output logic [ADDR_W-1:0]   mem_wr_addr,
  output logic [7:0]          mem_wr_data
);

  // stage 1
  logic [SCAN_W-1:0] xm_in, ym_in;
  logic [ADDR_W-1:0] addr_in;
  // stage 2
  logic [SCAN_W-1:0] xm_out, ym_out;
  logic [ADDR_W-1:0] addr_out;
  logic [7:0]        mem_out;
  // stage 3
  logic [SCAN_W-1:0] x_now, y_now;
  logic [ADDR_W-1:0] addr_now;
  logic [7:0]        mem_now, bus_color_now;
  logic              paint_now;
  logic [7:0]        wb_byte, pix_color;
  logic              new_word;

  // ---- scan counters ----
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      x_scan <= '0;
      y_scan <= '0;
    end else if (x_scan == SCAN_W'(H_TOTAL - 1)) begin
      x_scan <= '0;
      y_scan <= (y_scan == SCAN_W'(V_TOTAL - 1)) ? '0 : y_scan + 1'b1;
    end else begin
      x_scan <= x_scan + 1'b1;
    end
  end

  // ---- stage 1: advertise the next pixel, start the read ----
  assign xm_in   = x_scan - SCAN_W'(X_ORIGIN);
  assign ym_in   = y_scan - SCAN_W'(Y_ORIGIN);
  assign addr_in = {ym_in[8:2], xm_in[9:2]};

  assign next_active = (x_scan >= SCAN_W'(X_ORIGIN)) && (x_scan < SCAN_W'(X_ORIGIN + 640))
                    && (y_scan >= SCAN_W'(Y_ORIGIN)) && (y_scan < SCAN_W'(Y_ORIGIN + 480));

  always_comb begin
    x_next = '0;
    y_next = '0;
    if (next_active) begin
      unique case (mode)
        MODE_1BPP: begin x_next = COORD_W'(xm_in[9:1]); y_next = COORD_W'(ym_in[8:0]); end
        MODE_2BPP: begin x_next = COORD_W'(xm_in[9:1]); y_next = COORD_W'(ym_in[8:1]); end
        MODE_4BPP: begin x_next = COORD_W'(xm_in[9:2]); y_next = COORD_W'(ym_in[8:1]); end
        default:   begin x_next = COORD_W'(xm_in[9:2]); y_next = COORD_W'(ym_in[8:2]); end
      endcase
    end
  end

  color_bus_arbiter #(.N(N_UNITS)) u_arbiter (
    .clk, .rst, .req, .enable
  );

  video_mem #(.DATA_W(8), .ADDR_W(ADDR_W)) u_mem (
    .clk,
    .we      (mem_we),
    .wr_addr (addr_now),
    .wr_data (wb_byte),
    .rd_addr (addr_in),
    .rd_data (mem_out)
  );

  // ---- stage 3: merge and write back ----
  pixel_codec u_codec (
    .mode,
    .mem_byte  (mem_now),
    .x1        (x_now[1]),
    .y10       (y_now[1:0]),
    .paint     (paint_now),
    .bus_color (bus_color_now),
    .pix_color (pix_color),
    .wb_byte   (wb_byte),
    .rgb       (out_color)
  );

  assign new_word    = (addr_out != addr_now);
  assign mem_we      = new_word && writ;
  assign mem_wr_addr = addr_now;
  assign mem_wr_data = wb_byte;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      xm_out        <= '0;
      ym_out        <= '0;
      addr_out      <= '0;
      x_now         <= '0;
      y_now         <= '0;
      addr_now      <= '0;
      mem_now       <= '0;
      bus_color_now <= '0;
      paint_now     <= 1'b0;
    end else begin
      xm_out        <= xm_in;
      ym_out        <= ym_in;
      addr_out      <= addr_in;
      x_now         <= xm_out;
      y_now         <= ym_out;
      addr_now      <= addr_out;
      mem_now       <= new_word ? mem_out : wb_byte;
      bus_color_now <= bus_color;
      paint_now     <= |enable;
    end
  end

endmodule
