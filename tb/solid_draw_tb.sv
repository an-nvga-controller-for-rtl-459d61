// solid_draw_tb: self-checking test of the clear-screen unit.
//
// Uses a short artificial frame (P clocks, VSync low for the first 4) and
// checks that the unit requests after reset and after go, that the request
// is continuous, lasts at least one full frame and ends at the second VSync
// falling edge after go (fall, rise, fall), that go while busy is ignored,
// and that bus_color carries the colour latched at go only while enabled.
module solid_draw_tb;
  localparam int P = 100;
  logic       clk = 1'b0, rst, go, vsync, req, enable, busy;
  logic [7:0] color, bus_color;
  int         checks = 0, failures = 0, t = 0;

  solid_draw dut (.clk, .rst, .color, .go, .vsync, .req, .enable, .bus_color, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) t <= t + 1;
  assign vsync = !((t % P) < 4);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0d)", what, t); end
  endtask

  // measure one draw: returns the number of request clocks
  task automatic run_draw(output int len, output int falls);
    len = 0; falls = 0;
    while (req) begin
      @(negedge clk);
      len++;
      // count VSync falling edges seen while requesting
      if ((t % P) == 0) falls++;
      if (len > 5 * P) break;
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len, falls, start;
    rst = 1'b0;  // start low: the asynchronous reset needs a rising edge
    #1 rst = 1'b1; go = 1'b0; enable = 1'b0; color = 8'h00;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(req && busy, "clear after reset");
    run_draw(len, falls);
    check(falls == 2, $sformatf("reset clear ends at second fall (%0d)", falls));
    check(!req && !busy, "idle");

    for (int k = 0; k < 4; k++) begin
      // start at various phases of the frame
      while ((t % P) != 13 * k + 2) @(negedge clk);
      color = 8'hC0 + 8'(k);
      go = 1'b1;
      @(negedge clk);
      go = 1'b0; color = 8'h0F;
      start = t;
      check(req, "request after go");
      enable = 1'b1; #1;
      check(bus_color == 8'hC0 + 8'(k), "latched colour on bus");
      enable = 1'b0; #1;
      check(bus_color == 8'h00, "bus released when not enabled");
      // go while busy is ignored
      @(negedge clk); color = 8'h77; go = 1'b1;
      @(negedge clk); go = 1'b0;
      enable = 1'b1; #1;
      check(bus_color == 8'hC0 + 8'(k), "go while busy ignored");
      enable = 1'b0;
      run_draw(len, falls);
      len = t - start;
      check(len >= P, $sformatf("at least a full frame (%0d)", len));
      check(len <= 2 * P + 2, "at most two frames");
      check((t % P) == 1, "ends right after a VSync fall");
      repeat (3) @(negedge clk);
      check(!req, "stays idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
