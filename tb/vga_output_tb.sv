// vga_output_tb: self-checking test of sync generation and blanking.
//
// Sweeps a full 800 x 525 scan with a colour that changes every clock and
// checks writ combinationally, and hsync, vsync and R/G/B one clock after
// each scan position against the 640 x 480 window (scan x 138..777,
// y 28..507), the sync widths (96 clocks, 2 lines, active low) and the
// R3 G3 B2 -> 3:3:3 mapping (blue MSB repeated as LSB).
module vga_output_tb;
  import nvga_pkg::*;
  logic              clk = 1'b0, rst;
  logic [7:0]        color;
  logic [SCAN_W-1:0] x_scan, y_scan;
  logic              hsync, vsync, writ;
  logic [2:0]        r, g, b;
  int                checks = 0, failures = 0;

  vga_output dut (.clk, .rst, .color, .x_scan, .y_scan, .hsync, .vsync, .r, .g, .b, .writ);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit vis;
    logic [7:0] c;
    rst = 1'b0;  // start low: the asynchronous reset needs a rising edge
    #1 rst = 1'b1; x_scan = '0; y_scan = '0; color = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int y = 0; y < 525; y++) begin
      for (int x = 0; x < 800; x++) begin
        @(negedge clk);
        x_scan = SCAN_W'(x); y_scan = SCAN_W'(y);
        c = 8'($urandom);
        color = c;
        vis = (x >= 138 && x <= 777 && y >= 28 && y <= 507);
        #1;
        checks++;
        if (writ !== vis) begin failures++; $display("FAIL writ %0d,%0d", x, y); end
        @(posedge clk); #1;
        checks++;
        if (hsync !== (x >= 96) || vsync !== (y >= 2)) begin
          failures++; $display("FAIL sync %0d,%0d", x, y);
        end
        checks++;
        if ({r, g, b} !== (vis ? {c[7:5], c[4:2], c[1:0], c[1]} : 9'd0)) begin
          failures++; $display("FAIL rgb %0d,%0d", x, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
