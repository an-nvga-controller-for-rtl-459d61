// rect_draw_tb: self-checking test of the rectangle unit.
//
// Sweeps (x_next, y_next) over a 24 x 20 "screen" repeatedly, one position
// per clock, granting every request one clock later. For several rectangles
// started at different points of the sweep it checks that req is high
// exactly on positions inside the rectangle (corners inclusive), that the
// granted colour is on bus_color, that ready drops during the draw and rises
// once every position of the rectangle has been requested at least once
// (also when the lower-right corner lies off screen), and that corner inputs
// changed during a draw have no effect.
module rect_draw_tb;
  import nvga_pkg::*;
  localparam int W = 24, H = 20;
  logic               clk = 1'b0, rst, go, next_active, req, ready, enable;
  logic [COORD_W-1:0] upper_x, upper_y, lower_x, lower_y, x_next, y_next;
  logic [7:0]         color, bus_color;
  int                 checks = 0, failures = 0;
  int                 sx = 0, sy = 0;

  rect_draw dut (.clk, .rst, .upper_x, .upper_y, .lower_x, .lower_y, .color, .go,
                 .x_next, .y_next, .next_active, .req, .ready, .enable, .bus_color);

  always #5 clk = ~clk;
  always_ff @(posedge clk) enable <= req;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0d,%0d", what, sx, sy); end
  endtask

  // advance the scan by one position
  task automatic step();
    @(negedge clk);
    sx++;
    if (sx == W) begin sx = 0; sy = (sy == H - 1) ? 0 : sy + 1; end
    x_next = COORD_W'(sx); y_next = COORD_W'(sy);
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ux, uy, lx, ly, start_y, covered, area, steps;
    bit seen [W][H];
    bit inside_r, was_req;
    logic [7:0] c;
    rst = 1'b0;  // start low: the asynchronous reset needs a rising edge
    #1 rst = 1'b1; go = 1'b0; next_active = 1'b1; color = '0;
    upper_x = '0; upper_y = '0; lower_x = '0; lower_y = '0; x_next = '0; y_next = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(ready && !req, "reset");

    for (int k = 0; k < 6; k++) begin
      ux = $urandom_range(0, 15); uy = $urandom_range(0, 12);
      lx = $urandom_range(ux, W - 1); ly = $urandom_range(uy, H - 1);
      if (k == 0) begin ux = 3; uy = 4; lx = 3; ly = 4; end  // single position
      if (k == 1) begin ux = 5; uy = 6; lx = W + 4; ly = H + 9; end  // off screen
      c = 8'(k * 37 + 5);
      start_y = $urandom_range(0, H - 1);
      while (!(sy == start_y && sx == 0)) step();
      upper_x = COORD_W'(ux); upper_y = COORD_W'(uy);
      lower_x = COORD_W'(lx); lower_y = COORD_W'(ly); color = c;
      go = 1'b1;
      step();
      go = 1'b0;
      upper_x = '0; upper_y = '0; lower_x = COORD_W'(W - 1); lower_y = COORD_W'(H - 1);
      foreach (seen[i, j]) seen[i][j] = 0;
      was_req = 0; steps = 0;
      while (1) begin
        #1;
        if (was_req) check(enable && bus_color == c, "colour on bus");
        if (ready && steps > 0) break;
        check(!ready, "ready low while drawing");
        inside_r = (sx >= ux && sx <= lx && sy >= uy && sy <= ly);
        check(req == inside_r, "req inside rectangle only");
        if (req) seen[sx][sy] = 1;
        was_req = req;
        steps++;
        step();
        if (steps > 3 * W * H) break;
      end
      area = ((lx < W ? lx : W - 1) - ux + 1) * ((ly < H ? ly : H - 1) - uy + 1);
      covered = 0;
      foreach (seen[i, j]) covered += seen[i][j];
      check(covered == area, $sformatf("rectangle %0d covered %0d of %0d", k, covered, area));
      check(steps <= 2 * W * H + 1, "finishes within two frames");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
