// solid_draw: graphics unit that fills the whole screen with one colour.
//
// While idle the colour register is enabled and follows color; go freezes
// it and the unit starts requesting the colour bus for every pixel. It keeps
// requesting until it has seen a falling, a rising and another falling edge
// of the (active-low) VSync, which guarantees at least one complete frame
// has been painted, then returns to idle. A go that arrives while busy is
// ignored, so the screen can be cleared at most about once every two frames.
// After reset the unit starts one clear to colour 0, so the frame buffer
// comes up black.
//
// Timing: req is a registered state bit; bus_color is the held colour while
// enable is high and zero otherwise (OR-ed colour bus).
// The edge sequence and the clear-on-reset follow the original design; edge
// detection with a registered copy of VSync is this design's choice.
module solid_draw (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] color,
  input  logic       go,
  input  logic       vsync,
  output logic       req,
  input  logic       enable,
  output logic [7:0] bus_color,
  output logic       busy
);

  typedef enum logic [1:0] {
    S_IDLE, S_WAIT_FALL1, S_WAIT_RISE, S_WAIT_FALL2
  } state_e;

  state_e     state_q;
  logic [7:0] color_q;
  logic       vsync_q;
  logic       fall, rise;

  assign fall      = vsync_q & ~vsync;
  assign rise      = ~vsync_q & vsync;
  assign busy      = (state_q != S_IDLE);
  assign req       = busy;
  assign bus_color = enable ? color_q : 8'h00;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state_q <= S_WAIT_FALL1;
      color_q <= '0;
      vsync_q <= 1'b0;
    end else begin
      vsync_q <= vsync;
      unique case (state_q)
        S_IDLE: begin
          color_q <= color;
          if (go) state_q <= S_WAIT_FALL1;
        end
        S_WAIT_FALL1: if (fall) state_q <= S_WAIT_RISE;
        S_WAIT_RISE:  if (rise) state_q <= S_WAIT_FALL2;
        S_WAIT_FALL2: if (fall) state_q <= S_IDLE;
        default:      state_q <= S_IDLE;
      endcase
    end
  end

endmodule
