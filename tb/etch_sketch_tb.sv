// etch_sketch_tb: the Etch-A-Sketch demonstration run on the full controller.
//
// The testbench plays the demo's host microcontroller and the monitor.
// The host loop works like the demo program. Each pass it reads the "knobs"
// (a target cursor position and a colour), moves the cursor one step toward
// the target on each axis, and sends one dot command at the cursor. The host
// honours the overflow flag: while buff_full is high it neither moves nor
// sends, and polls again one loop period later. The demo program instead
// kept sending, which can push undrawn dots out of the queue. The "shake"
// button is a clear screen in the current colour. A change of the mode
// switches sends the mode command, a clear and a new cursor start.
// Sequence:
//   8bpp: clear, a closed four-sided path (horizontal runs stay on one
//   memory row, so the queue fills and the flag throttles the host);
//   shake, then a diagonal sent while the clear is still running;
//   4bpp with the flash button held (colour + 1 every pass);
//   1bpp: a diagonal, then a vertical run.
// After each phase the whole captured frame is compared with a reference
// frame buffer in which every sent dot is painted in order. It also checks
// that no undrawn dot was ever pushed out, that the flag throttled the host
// at least once, and the sync timing and blanking of every frame.
// SPI at 5 Mbit/s, MSB first, 25 MHz pixel clock; 1 ns time unit.
module etch_sketch_tb;
  logic       clk = 1'b0, rst, io_rst, spi_clk = 1'b0, spi_d = 1'b0, rect_go = 1'b0;
  logic       ready, waiting, buff_full, rect_ready, hsync, vsync;
  logic [2:0] r, g, b;
  int         checks = 0, failures = 0;

  nvga_top dut (.clk, .rst, .io_rst, .spi_clk, .spi_d, .rect_go, .ready, .waiting,
                .buff_full, .rect_ready, .hsync, .vsync, .r, .g, .b);

  always #20 clk = ~clk;  // 25 MHz pixel clock (time unit = 1 ns)

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------------
  // monitor: position from the syncs, frame capture, sync/blank checks
  // ------------------------------------------------------------------
  logic [8:0] cap [480][640];
  int  hx = 0, vy = 0, frames = 0, hs_low = 0, blank_errs = 0;
  bit  hs_prev = 0, vs_prev = 0, synced = 0;

  always @(negedge clk) begin
    if (hs_prev && !hsync) begin
      if (synced) begin
        checks++; if (hx != 799) begin failures++; $display("FAIL line length %0d", hx + 1); end
        checks++; if (hs_low != 96 && vy > 0) begin failures++; $display("FAIL hsync width %0d", hs_low); end
      end
      hx = 0; hs_low = 0;
      if (vs_prev && !vsync) begin
        if (synced) begin
          checks++; if (vy != 524) begin failures++; $display("FAIL lines per frame %0d", vy + 1); end
          checks++; if (blank_errs != 0) begin failures++; $display("FAIL %0d blanking errors", blank_errs); end
        end
        vy = 0; frames++; synced = 1; blank_errs = 0;
      end else begin
        vy++;
        if (vy == 2) begin checks++; if (!vsync) begin failures++; $display("FAIL vsync width"); end end
      end
    end else hx++;
    if (!hsync) hs_low++;
    if (synced) begin
      if (hx >= 138 && hx <= 777 && vy >= 28 && vy <= 507) cap[vy-28][hx-138] = {r, g, b};
      else if ({r, g, b} != 9'd0) blank_errs++;
    end
    hs_prev = hsync; vs_prev = vsync;
  end

  task automatic wait_frames(input int n);
    int f = frames;
    while (frames < f + n) @(negedge clk);
  endtask

  // ------------------------------------------------------------------
  // mechanism counters
  // ------------------------------------------------------------------
  int n_dot = 0, n_solid = 0, n_rect = 0, n_conflict = 0, n_overflow = 0;
  int n_lost = 0, n_mode = 0, n_wb = 0;
  bit bf_prev = 0;
  logic [1:0] mode_prev = 2'b00;
  always @(posedge clk) if (!rst) begin
    if (dut.enable[0]) n_dot++;
    if (dut.enable[1]) n_solid++;
    if (dut.enable[2]) n_rect++;
    if ($countones(dut.req) > 1) n_conflict++;
    if (buff_full && !bf_prev) n_overflow++;
    if (dut.mode != mode_prev) n_mode++;
    if (dut.mem_we) n_wb++;
    if (dut.u_dot.go && dut.u_dot.still_pending[0]) n_lost++;
    bf_prev = buff_full; mode_prev = dut.mode;
  end

  // ------------------------------------------------------------------
  // host side: SPI master and commands
  // ------------------------------------------------------------------
  task automatic spi_byte(input logic [7:0] v);
    for (int i = 7; i >= 0; i--) begin
      spi_d = v[i];
      #100 spi_clk = 1'b1;
      #100 spi_clk = 1'b0;
    end
    #300;
  endtask

  // ------------------------------------------------------------------
  // reference model of the frame buffer
  // ------------------------------------------------------------------
  logic [7:0] fb [120][160];
  int mode_m = 0;

  function automatic int xs(input int m); return (m >= 2) ? 2 : 1; endfunction
  function automatic int ys(input int m); return (m == 0) ? 0 : (m == 3) ? 2 : 1; endfunction

  function automatic logic [7:0] remap(input int m, input logic [7:0] c);
    case (m)
      0: return {7'b0, c[7]};
      1: return {6'b0, c[7:6]};
      2: return {4'b0, c[7], c[4], c[3], c[1]};
      default: return c;
    endcase
  endfunction

  // field of physical pixel (px, py): low bit and width
  function automatic int field_lo(input int m, input int px, input int py);
    case (m)
      0: return ((px >> 1) & 1) * 4 + (py & 3);
      1: return (((px >> 1) & 1) * 2 + ((py >> 1) & 1)) * 2;
      2: return ((py >> 1) & 1) * 4;
      default: return 0;
    endcase
  endfunction

  function automatic logic [8:0] show(input int m, input int px, input int py);
    int lo = field_lo(m, px, py), w = 1 << m;
    logic [7:0] f = (fb[py>>2][px>>2] >> lo) & 8'((1 << w) - 1);
    logic [7:0] c;
    logic [7:0] grey [4] = '{8'h00, 8'h49, 8'hB6, 8'hFF};
    case (m)
      0: c = f[0] ? 8'hFF : 8'h00;
      1: c = grey[f[1:0]];
      2: c = {f[3] ? 3'b111 : 3'b000, f[2], f[1], f[1], f[0] ? 2'b11 : 2'b00};
      default: c = f;
    endcase
    return {c[7:5], c[4:2], c[1:0], c[1]};
  endfunction

  task automatic model_set(input int m, input int px, input int py, input logic [7:0] c);
    int lo = field_lo(m, px, py);
    logic [7:0] mask = 8'((1 << (1 << m)) - 1) << lo;
    fb[py>>2][px>>2] = (fb[py>>2][px>>2] & ~mask) | ((c << lo) & mask);
  endtask

  task automatic model_pos(input int m, input int x, input int y, input logic [7:0] c);
    for (int dy = 0; dy < (1 << ys(m)); dy++)
      for (int dx = 0; dx < (1 << xs(m)); dx++)
        model_set(m, (x << xs(m)) + dx, (y << ys(m)) + dy, c);
  endtask

  task automatic model_clear(input int m, input logic [7:0] c);
    for (int py = 0; py < 480; py++)
      for (int px = 0; px < 640; px++) model_set(m, px, py, c);
  endtask

  logic [7:0] last_color = 8'h00;
  int last_x = 0, last_y = 0;

  task automatic cmd_mode(input int m);
    spi_byte(8'h59); spi_byte(8'(m)); mode_m = m;
  endtask
  task automatic cmd_clear(input logic [7:0] c, input bit model = 1);
    spi_byte(8'h45); spi_byte(c); last_color = c;
    if (model) model_clear(mode_m, remap(mode_m, c));
  endtask
  task automatic cmd_dot(input int x, input int y, input logic [7:0] c, input bit model = 1);
    spi_byte(8'h50);
    spi_byte(8'(x >> 8)); spi_byte(8'(x)); spi_byte(8'(y >> 8)); spi_byte(8'(y));
    spi_byte(c);
    last_color = c; last_x = x; last_y = y;
    if (model) model_pos(mode_m, x, y, remap(mode_m, c));
  endtask
  task automatic nop(); spi_byte(8'h00); endtask

  task automatic compare_frame(input string what);
    int bad = 0;
    wait_frames(1);  // the frame that just ended is captured completely
    for (int py = 0; py < 480; py++)
      for (int px = 0; px < 640; px++)
        if (cap[py][px] !== show(mode_m, px, py)) begin
          if (bad < 3) $display("  %s: pixel %0d,%0d is %h, expected %h", what, px, py,
                                cap[py][px], show(mode_m, px, py));
          bad++;
        end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d pixels differ", what, bad); end
  endtask

  // ------------------------------------------------------------------
  // the demo host
  // ------------------------------------------------------------------
  localparam int LOOP_NS = 20_000;  // one pass of the host loop (knob reads)
  int  cur_x = 0, cur_y = 0, n_sent = 0, n_polls = 0;
  logic [7:0] knob_color = 8'h00;
  bit  flash = 0;

  // maximum cursor values per mode, as the demo scales its knobs
  function automatic int max_x(input int m); return (m >= 2) ? 159 : 319; endfunction
  function automatic int max_y(input int m);
    return (m == 0) ? 479 : (m == 3) ? 119 : 239;
  endfunction

  task automatic pass(input int tx, input int ty);
    if (buff_full) begin
      n_polls++;
      #(LOOP_NS);
      return;
    end
    if (flash) knob_color++;
    if (cur_y < ty) cur_y++; else if (cur_y > ty) cur_y--;
    if (cur_x < tx) cur_x++; else if (cur_x > tx) cur_x--;
    cmd_dot(cur_x, cur_y, knob_color);
    n_sent++;
    #(LOOP_NS);
  endtask

  // run the loop until the cursor has reached (tx, ty) and sent a dot there
  task automatic move_to(input int tx, input int ty);
    while (cur_x != tx || cur_y != ty) pass(tx, ty);
  endtask

  task automatic set_mode_switches(input int m, input int x0, input int y0,
                                   input logic [7:0] c);
    cmd_mode(m);
    knob_color = c;
    cur_x = x0; cur_y = y0;
    cmd_clear(knob_color);
  endtask

  task automatic settle_and_compare(input string what);
    nop();          // deliver the last command byte
    wait_frames(3); // clear (if any) and every queued dot are done
    compare_frame(what);
  endtask

  initial begin
    repeat (5) #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (fb[i, j]) fb[i][j] = 8'h00;
    rst = 1'b0; io_rst = 1'b0;  // start low: the asynchronous resets need a rising edge
    #1 rst = 1'b1; io_rst = 1'b1;
    #400 rst = 1'b0; io_rst = 1'b0;
    wait_frames(3);

    // 8bpp: a closed path drawn with the knobs
    set_mode_switches(3, 20, 15, 8'h49);
    knob_color = 8'hFC;
    move_to(140, 15);
    knob_color = 8'h1F;
    move_to(140, 100);
    knob_color = 8'hE3;
    move_to(20, 100);
    knob_color = 8'h03;
    move_to(20, 15);
    settle_and_compare("8bpp path");
    check(max_x(3) == 159 && max_y(3) == 119, "8bpp cursor range");

    // shake: clear, then keep drawing while the clear is still running
    cmd_clear(8'h92);
    move_to(60, 55);
    move_to(110, 119);
    settle_and_compare("8bpp shake and diagonal");

    // 4bpp with the flash button held: the colour steps every pass
    set_mode_switches(2, 0, 0, 8'h00);
    flash = 1;
    move_to(80, 80);
    move_to(159, 100);
    flash = 0;
    settle_and_compare("4bpp flashing diagonal");

    // 1bpp: white line across the black screen, then back along y
    set_mode_switches(0, 0, 0, 8'h00);
    knob_color = 8'h80;
    move_to(150, 150);
    move_to(150, 200);
    settle_and_compare("1bpp line");

    check(n_lost == 0, $sformatf("no undrawn dot pushed out (%0d)", n_lost));
    check(n_polls > 0, $sformatf("overflow flag throttled the host (%0d polls)", n_polls));
    check(n_overflow > 0, $sformatf("overflow flag raised (%0d)", n_overflow));
    check(n_dot > 0 && n_solid > 0, "dots and clears reached the memory");
    check(n_conflict > 0, "dots and a clear competed for the bus");
    check(n_wb > 0, "read-modify-write write-backs happened");
    $display("workload: dots sent=%0d polls=%0d frames=%0d flag rises=%0d dots lost=%0d",
             n_sent, n_polls, frames, n_overflow, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
