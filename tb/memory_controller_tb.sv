// memory_controller_tb: self-checking test of the scan and frame-buffer pipeline.
//
// The testbench plays one graphics unit (request line 0) and the VGA stage's
// visible-area flag. For each colour mode it
//   1. paints a whole frame with a pattern f(x, y) given in that mode's
//      coordinate units (request on every active position, colour driven in
//      the granted clock), checking out_color as it is painted;
//   2. lets a frame pass without requests and checks that every visible
//      clock shows the stored pattern, expanded to R3 G3 B2;
//   3. repaints a single position with another colour and checks on the
//      next frame that only that position changed (the read-modify-write
//      must not disturb the other pixels sharing its byte).
// It also checks the scan counter periods (800 clocks, 525 lines), the
// advertised coordinates in each mode, and that the grant arrives one
// clock after the request.
module memory_controller_tb;
  import nvga_pkg::*;
  logic               clk = 1'b0, rst, writ, next_active, mem_we;
  color_mode_e        mode;
  logic [N_UNITS-1:0] req, enable;
  logic [7:0]         bus_color, out_color, pat_q, mem_wr_data;
  logic [COORD_W-1:0] x_next, y_next;
  logic [SCAN_W-1:0]  x_scan, y_scan;
  logic [ADDR_W-1:0]  mem_wr_addr;
  int                 checks = 0, failures = 0;
  bit                 paint_all = 0, paint_one = 0;
  int                 one_x, one_y;
  logic [7:0]         one_c;
  bit                 req_q;
  bit                 changed = 0;  // the single position holds one_c

  memory_controller dut (.clk, .rst, .mode, .req, .bus_color, .writ, .enable, .x_next, .y_next,
                         .next_active, .x_scan, .y_scan, .out_color, .mem_we, .mem_wr_addr,
                         .mem_wr_data);

  always #20 clk = ~clk;

  function automatic int width(input int m);  return 1 << m; endfunction
  function automatic int sx(input int m);     return (m >= 2) ? 2 : 1; endfunction   // x shift
  function automatic int sy(input int m);     return (m == 0) ? 0 : (m == 3) ? 2 : 1; endfunction

  function automatic logic [7:0] pattern(input int m, input int x, input int y);
    return 8'((x * 7 + y * 13 + x * y) & ((1 << width(m)) - 1));
  endfunction

  function automatic logic [7:0] expand(input int m, input logic [7:0] c);
    logic [7:0] grey [4] = '{8'h00, 8'h49, 8'hB6, 8'hFF};
    case (m)
      0: return c[0] ? 8'hFF : 8'h00;
      1: return grey[c[1:0]];
      2: return {c[3] ? 3'b111 : 3'b000, c[2], c[1], c[1], c[0] ? 2'b11 : 2'b00};
      default: return c;
    endcase
  endfunction

  // visible-area flag as the VGA stage produces it
  assign writ = (x_scan >= 138 && x_scan <= 777 && y_scan >= 28 && y_scan <= 507);

  // the test's graphics unit
  wire want = next_active && (paint_all ||
              (paint_one && x_next == COORD_W'(one_x) && y_next == COORD_W'(one_y)));
  assign req = {7'b0, want};
  always_ff @(posedge clk) begin
    pat_q <= paint_one ? one_c : pattern(int'(mode), int'(x_next), int'(y_next));
    req_q <= want;
  end
  assign bus_color = enable[0] ? pat_q : 8'h00;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at scan %0d,%0d mode %0d one %0b", what, x_scan, y_scan, mode, paint_one);
    end
  endtask

  // run one frame from scan (0,0); check output and coordinates each clock
  task automatic frame(input int m, input bit check_out);
    int px, py;
    logic [7:0] want_c;
    for (int t = 0; t < H_TOTAL * V_TOTAL; t++) begin
      @(posedge clk); #1;
      check(enable[0] == req_q, "grant one clock after request");
      if (next_active) begin
        check(x_next == COORD_W'((int'(x_scan) - 136) >> sx(m)) &&
              y_next == COORD_W'((int'(y_scan) - 28) >> sy(m)), "advertised coordinates");
      end
      if (check_out && writ) begin
        px = (int'(x_scan) - 138) >> sx(m);
        py = (int'(y_scan) - 28) >> sy(m);
        want_c = (changed && px == one_x && py == one_y) ? one_c : pattern(m, px, py);
        check(out_color == expand(m, want_c), $sformatf("pixel colour %h", out_color));
      end
    end
  endtask

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int periods_x = 0;
    rst = 1'b0;  // start low: the asynchronous reset needs a rising edge
    #1 rst = 1'b1; mode = MODE_1BPP; one_x = 0; one_y = 0; one_c = 8'h00;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // scan periods: x wraps every 800 clocks, y every 525 lines
    for (int t = 1; t <= H_TOTAL * V_TOTAL; t++) begin
      @(posedge clk); #1;
      if (x_scan == 0) periods_x++;
      if (t % H_TOTAL == 0) check(x_scan == 0 && y_scan == SCAN_W'((t / H_TOTAL) % V_TOTAL), "scan period");
    end
    check(periods_x == V_TOTAL, "lines per frame");
    check(x_scan == 0 && y_scan == 0, "frame period");
    for (int m = 0; m < 4; m++) begin
      @(negedge clk);
      mode = color_mode_e'(m);
      // 1. paint everything
      paint_all = 1;
      frame(m, 1);
      paint_all = 0;
      // 2. read back
      frame(m, 1);
      // 3. change one position
      one_x = (m < 2) ? 101 : 53;
      one_y = (m == 3) ? 77 : 151;
      one_c = ~pattern(m, one_x, one_y) & 8'((1 << width(m)) - 1);
      paint_one = 1; changed = 1;
      frame(m, 1);
      paint_one = 0;
      frame(m, 1);
      changed = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
