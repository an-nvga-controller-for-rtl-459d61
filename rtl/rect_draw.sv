// rect_draw: graphics unit that fills an axis-aligned rectangle.
//
// While ready, the corner and colour registers follow their inputs. go
// freezes them and starts a draw: for every advertised pixel inside the
// rectangle (upper-left corner to lower-right corner, both inclusive) the
// unit requests the colour bus. The draw ends once the scan has passed the
// upper-left corner and, after it, either the lower-right corner or the end
// of the frame (seen as the advertised y going back), so every on-screen
// pixel of the rectangle has been offered at least once, even when the
// lower-right corner lies off screen in the current colour mode; ready then
// rises again.
//
// Timing: req is combinational on x_next/y_next; bus_color follows enable in
// the next cycle (zero when not enabled, for the OR-ed colour bus).
// The unit, its ports and the corner-tracking idea follow the original
// design. Inclusive bounds and requiring the lower corner to be seen after
// the upper one (so a draw started mid-frame still covers the rectangle)
// and the end-of-frame exit are this design's choices.
module rect_draw
  import nvga_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [COORD_W-1:0] upper_x,
  input  logic [COORD_W-1:0] upper_y,
  input  logic [COORD_W-1:0] lower_x,
  input  logic [COORD_W-1:0] lower_y,
  input  logic [7:0]         color,
  input  logic               go,
  input  logic [COORD_W-1:0] x_next,
  input  logic [COORD_W-1:0] y_next,
  input  logic               next_active,
  output logic               req,
  output logic               ready,
  input  logic               enable,
  output logic [7:0]         bus_color
);

  logic [COORD_W-1:0] ux_q, uy_q, lx_q, ly_q;
  logic [7:0]         color_q;
  logic               busy_q, seen_first_q;
  logic               at_first, at_last, in_rect, wrapped;
  logic [COORD_W-1:0] y_prev_q;  // last advertised active y

  assign at_first = next_active && x_next == ux_q && y_next == uy_q;
  assign at_last  = next_active && x_next == lx_q && y_next == ly_q;
  assign wrapped  = next_active && y_next < y_prev_q;
  assign in_rect   = next_active
                 && x_next >= ux_q && x_next <= lx_q
                 && y_next >= uy_q && y_next <= ly_q;

  assign req       = busy_q && in_rect;
  assign ready     = ~busy_q;
  assign bus_color = enable ? color_q : 8'h00;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ux_q <= '0; uy_q <= '0; lx_q <= '0; ly_q <= '0;
      color_q      <= '0;
      busy_q       <= 1'b0;
      seen_first_q <= 1'b0;
      y_prev_q     <= '0;
    end else begin
      if (next_active) y_prev_q <= y_next;
      if (!busy_q) begin
        ux_q <= upper_x; uy_q <= upper_y;
        lx_q <= lower_x; ly_q <= lower_y;
        color_q      <= color;
        seen_first_q <= 1'b0;
        busy_q       <= go;
      end else begin
        if (at_first) seen_first_q <= 1'b1;
        if ((seen_first_q && wrapped) || ((seen_first_q || at_first) && at_last))
          busy_q <= 1'b0;
      end
    end
  end

endmodule
