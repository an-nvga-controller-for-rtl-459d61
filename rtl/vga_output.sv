// vga_output: VGA sync generation and blanking.
//
// From the scan position it derives writ, the visible-area flag (scan x in
// H_VIS_LO..H_VIS_HI and scan y in V_VIS_LO..V_VIS_HI), used by the memory
// controller to gate frame-buffer writes. On each clock it registers
//   hsync = low while scan x < H_SYNC, vsync = low while scan y < V_SYNC
//   (negative polarity), and the colour: R = color[7:5], G = color[4:2],
//   B = {color[1:0], color[1]}, all forced to zero outside the visible area.
// Outputs therefore lag the scan position by one clock and the pixel by
// three; both syncs and colours pass the same register, so they stay aligned.
// Sync widths, window and the blue-bit replication follow the original design.
module vga_output
  import nvga_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        color,
  input  logic [SCAN_W-1:0] x_scan,
  input  logic [SCAN_W-1:0] y_scan,
  output logic              hsync,
  output logic              vsync,
  output logic [2:0]        r,
  output logic [2:0]        g,
  output logic [2:0]        b,
  output logic              writ
);

  assign writ = (x_scan >= SCAN_W'(H_VIS_LO)) && (x_scan <= SCAN_W'(H_VIS_HI))
             && (y_scan >= SCAN_W'(V_VIS_LO)) && (y_scan <= SCAN_W'(V_VIS_HI));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      hsync <= 1'b0;
      vsync <= 1'b0;
      r <= '0;
      g <= '0;
      b <= '0;
    end else begin
      hsync <= !(x_scan < SCAN_W'(H_SYNC));
      vsync <= !(y_scan < SCAN_W'(V_SYNC));
      r <= writ ? color[7:5] : 3'b0;
      g <= writ ? color[4:2] : 3'b0;
      b <= writ ? {color[1:0], color[1]} : 3'b0;
    end
  end

endmodule
