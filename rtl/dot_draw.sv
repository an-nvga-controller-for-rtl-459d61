// dot_draw: graphics unit that draws single dots as the scan passes them.
//
// Commanded dots enter a shift register of N_DOTS slots: on go every slot
// moves down by one (the oldest, slot 0, is dropped) and the new dot enters
// slot N_DOTS-1 marked unwritten. Each unwritten slot compares its
// coordinates with the advertised next pixel (x_next, y_next); any match
// raises req. The matching colour (newest slot first) and the matching slots
// are registered, so in the following cycle, when the colour-bus arbiter's
// enable arrives, bus_color carries the colour and the granted slots are
// marked written. A slot that loses arbitration stays unwritten and is drawn
// on a later frame.
//
// buff_full is the overflow warning: it is high while slot 1 (the ninth
// newest dot) is unwritten, so one more dot could push an undrawn dot out.
//
// Timing: req is combinational on x_next/y_next (pipeline stage 1 of the
// memory controller); bus_color is valid one clock later with enable.
// bus_color is zero when not enabled so units can be OR-ed onto one bus.
// Ten slots, the shift-register organisation and the ninth-dot full flag
// follow the document. Requesting only for unwritten dots, and marking a dot
// written only when its request is granted, are this design's choices.
module dot_draw
  import nvga_pkg::*;
#(
  parameter int N_DOTS      = 10,  // dots held at once
  parameter int DOT_COORD_W = 9    // stored coordinate bits (x < 320, y < 480)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [COORD_W-1:0] x_coord,
  input  logic [COORD_W-1:0] y_coord,
  input  logic [7:0]         color,
  input  logic               go,
  input  logic [COORD_W-1:0] x_next,
  input  logic [COORD_W-1:0] y_next,
  input  logic               next_active,
  output logic               req,
  input  logic               enable,
  output logic [7:0]         bus_color,
  output logic               buff_full
);

  logic [DOT_COORD_W-1:0] xs_q [N_DOTS];
  logic [DOT_COORD_W-1:0] ys_q [N_DOTS];
  logic [7:0]             cs_q [N_DOTS];
  logic [N_DOTS-1:0]      pending_q;
  logic [N_DOTS-1:0]      match;
  logic [N_DOTS-1:0]      granted_q;   // slots that matched last cycle
  logic [7:0]             sel_color, color_q;
  logic [N_DOTS-1:0]      drawn, still_pending;

  always_comb begin
    sel_color = '0;
    for (int i = 0; i < N_DOTS; i++) begin
      match[i] = pending_q[i] && next_active
              && (x_next == COORD_W'(xs_q[i]))
              && (y_next == COORD_W'(ys_q[i]));
      if (match[i]) sel_color = cs_q[i];  // later (newer) slot wins
    end
  end

  assign req           = |match;
  assign drawn         = enable ? granted_q : '0;
  assign still_pending = pending_q & ~drawn;
  assign bus_color     = enable ? color_q : 8'h00;
  assign buff_full     = pending_q[1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < N_DOTS; i++) begin
        xs_q[i] <= '0;
        ys_q[i] <= '0;
        cs_q[i] <= '0;
      end
      pending_q <= '0;
      granted_q <= '0;
      color_q   <= '0;
    end else begin
      color_q <= sel_color;
      if (go) begin
        for (int i = 0; i < N_DOTS - 1; i++) begin
          xs_q[i] <= xs_q[i+1];
          ys_q[i] <= ys_q[i+1];
          cs_q[i] <= cs_q[i+1];
        end
        xs_q[N_DOTS-1] <= x_coord[DOT_COORD_W-1:0];
        ys_q[N_DOTS-1] <= y_coord[DOT_COORD_W-1:0];
        cs_q[N_DOTS-1] <= color;
        pending_q      <= {1'b1, still_pending[N_DOTS-1:1]};
        granted_q      <= match >> 1;  // follow the slots as they move
      end else begin
        pending_q <= still_pending;
        granted_q <= match;
      end
    end
  end

endmodule
