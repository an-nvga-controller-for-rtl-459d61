// nvga_top_tb: end-to-end test of the graphics controller at its default size.
//
// The testbench plays the host microcontroller (an SPI master at 5 Mbit/s,
// MSB first, 25 MHz pixel clock) and the monitor: it follows HSync/VSync,
// captures every visible pixel of each frame and compares whole frames with
// a reference model of the frame buffer (one byte per 4 x 4 block, packed
// per colour mode the way the document describes). Sequence:
//   reset clear to black; 8bpp clear and dots; eleven dots sent in one
//   burst (overflow flag, oldest pending dot lost); clear and dot together
//   (arbitration, the dot is drawn after the clear); switch to 4bpp without
//   clearing (stored bytes reinterpreted); 4bpp clear and dots; 2bpp dots;
//   a rectangle; 1bpp clear and dots.
// Sync timing (96-clock HSync, 800-clock line, 525-line frame, 2-line VSync)
// and blanking outside the 640 x 480 window are checked on every frame.
// Each mechanism (dot, clear, rectangle, arbitration conflict, overflow,
// dot lost to overflow, mode switch, read-modify-write write-back) is
// counted; one that never happened counts as a failure.
module nvga_top_tb;
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
  initial begin
    #2_000_000_000;
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
    check(ready && waiting, "idle after reset");

    // reset clears the screen to black
    wait_frames(3);
    compare_frame("reset clear");

    // 8bpp: clear and dots
    cmd_mode(3);
    cmd_clear(8'h25);
    nop();
    wait_frames(3);
    compare_frame("8bpp clear");
    cmd_dot(10, 10, 8'hE0);
    cmd_dot(159, 119, 8'h1C);
    cmd_dot(0, 0, 8'h03);
    cmd_dot(80, 60, 8'hFF);
    nop();
    wait_frames(2);
    compare_frame("8bpp dots");

    // overflow: eleven dots in one burst near the top of a frame, all lower
    // on the screen, so none is drawn before the burst ends
    @(negedge vsync);
    for (int k = 0; k < 11; k++) begin
      // a dot's last byte is delivered when the next byte starts
      if (k <= 9) check(!buff_full, $sformatf("no overflow with %0d dots pending", k - 1));
      cmd_dot(20 + 7 * k, 100 + (k % 5), 8'h40 + 8'(k), k != 0);
      if (k == 9) check(buff_full, "overflow flag with nine pending dots");
      if (k == 10 && buff_full) n_lost++;
    end
    nop();
    check(buff_full, "overflow flag raised");
    wait_frames(2);
    check(!buff_full, "overflow flag cleared once drawn");
    compare_frame("overflow burst (oldest dot lost)");

    // clear and dot together: the clear wins the bus, the dot follows
    cmd_clear(8'h92);
    cmd_dot(30, 30, 8'h11);
    nop();
    wait_frames(4);
    compare_frame("clear then dot");

    // 4bpp without clearing: stored bytes are reinterpreted
    cmd_mode(2);
    nop();
    wait_frames(1);
    compare_frame("4bpp reinterpretation");
    cmd_clear(8'hB5);
    cmd_dot(159, 239, 8'hFF);
    cmd_dot(0, 1, 8'h9A);
    cmd_dot(77, 133, 8'h42);
    nop();
    wait_frames(4);
    compare_frame("4bpp clear and dots");

    // 2bpp dots on top of the 4bpp content
    cmd_mode(1);
    cmd_dot(319, 239, 8'h40);
    cmd_dot(1, 0, 8'hC0);
    cmd_dot(200, 100, 8'h80);
    nop();
    wait_frames(2);
    compare_frame("2bpp dots");

    // rectangle from the last dot (200,100) to (160,120)? use a dot above-left
    cmd_dot(100, 50, 8'hC0);
    nop();
    wait_frames(1);
    @(negedge clk) rect_go = 1'b1;
    @(negedge clk) rect_go = 1'b0;
    check(!rect_ready, "rectangle busy");
    for (int y = 50; y <= 120; y++)
      for (int x = 100; x <= 160; x++) model_pos(1, x, y, remap(1, 8'hC0));
    wait_frames(3);
    check(rect_ready, "rectangle done");
    compare_frame("2bpp rectangle");

    // 1bpp: white clear, black dots
    cmd_mode(0);
    cmd_clear(8'h80);
    cmd_dot(319, 479, 8'h00);
    cmd_dot(0, 0, 8'h00);
    cmd_dot(101, 151, 8'h7F);
    nop();
    wait_frames(4);
    compare_frame("1bpp clear and dots");

    check(n_dot > 0,      $sformatf("dot draws happened (%0d)", n_dot));
    check(n_solid > 0,    $sformatf("clears happened (%0d)", n_solid));
    check(n_rect > 0,     $sformatf("rectangle draws happened (%0d)", n_rect));
    check(n_conflict > 0, $sformatf("bus conflicts happened (%0d)", n_conflict));
    check(n_overflow > 0, $sformatf("overflow flag raised (%0d)", n_overflow));
    check(n_lost > 0,     $sformatf("dot lost to overflow (%0d)", n_lost));
    check(n_mode >= 4,    $sformatf("mode switches (%0d)", n_mode));
    check(n_wb > 0,       $sformatf("write-backs (%0d)", n_wb));
    $display("mechanisms: dot=%0d clear=%0d rect=%0d conflict=%0d overflow=%0d lost=%0d mode=%0d writeback=%0d",
             n_dot, n_solid, n_rect, n_conflict, n_overflow, n_lost, n_mode, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
