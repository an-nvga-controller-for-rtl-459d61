// command_interpreter_tb: self-checking test of the command decoder.
//
// Presents bytes the way the SPI receiver does (par_data stable, valid high
// for several pixel clocks, then low) and checks:
//   * dot draw (0x50 XH XL YH YL C): coordinates, one-clock dot_go, and that
//     dot_go comes 3 clocks after valid rises (2-flop synchroniser + edge);
//   * clear (0x45 C): one-clock clear_go and colour;
//   * colour mode (0x59 M) for all four modes, and the repacking of the
//     colour byte R3 G3 B2 into each mode's pixel format;
//   * unknown bytes and no-ops are ignored; waiting is high between commands.
module command_interpreter_tb;
  import nvga_pkg::*;
  logic               clk = 1'b0, rst, valid;
  logic [7:0]         par_data;
  logic               waiting, dot_go, clear_go;
  logic [COORD_W-1:0] x_coord, y_coord;
  logic [7:0]         color_out;
  color_mode_e        color_mode;
  int                 checks = 0, failures = 0;
  int                 dot_pulses = 0, clear_pulses = 0, last_go_latency = -1;
  int                 cyc = 0, valid_rise_cyc = 0;

  command_interpreter dut (.clk, .rst, .valid, .par_data, .waiting, .x_coord, .y_coord,
                           .color_out, .color_mode, .dot_go, .clear_go);

  always #20 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (!rst && dot_go)   begin dot_pulses++;   last_go_latency = cyc - valid_rise_cyc; end
    if (!rst && clear_go) begin clear_pulses++; last_go_latency = cyc - valid_rise_cyc; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [7:0] b);
    @(negedge clk);
    par_data = b;
    valid = 1'b1;
    valid_rise_cyc = cyc + 1;
    repeat (8) @(negedge clk);
    valid = 1'b0;
    repeat (8) @(negedge clk);
  endtask

  function automatic logic [7:0] repack(input int m, input logic [7:0] c);
    case (m)
      0: return {7'b0, c[7]};
      1: return {6'b0, c[7], c[6]};
      2: return {4'b0, c[7], c[4], c[3], c[1]};
      default: return c;
    endcase
  endfunction

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] c;
    rst = 1'b0;  // start low: the asynchronous reset needs a rising edge
    #1 rst = 1'b1; valid = 1'b0; par_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(waiting && color_mode == MODE_1BPP, "reset state");

    for (int m = 0; m < 4; m++) begin
      send(8'h59); check(!waiting, "busy after opcode");
      send(8'(m));
      check(color_mode == color_mode_e'(m), "colour mode");
      check(waiting, "waiting after mode");
      // dot draw
      c = 8'($urandom);
      send(8'h50); send(8'h01); send(8'h3F); send(8'h00); send(8'h9A + 8'(m));
      check(dot_pulses == m, "no early dot_go");
      send(c);
      check(dot_pulses == m + 1, "dot_go pulse");
      check(last_go_latency == 3, $sformatf("dot_go latency %0d", last_go_latency));
      check(x_coord == 16'h013F && y_coord == 16'(8'h9A + m), "dot coordinates");
      check(color_out == repack(m, c), $sformatf("colour repack mode %0d", m));
      // clear
      c = 8'($urandom);
      send(8'h45); send(c);
      check(clear_pulses == m + 1, "clear_go pulse");
      check(color_out == repack(m, c), "clear colour");
      // junk and no-op bytes are ignored
      send(8'h00); send(8'h13); send(8'hFF);
      check(waiting && dot_pulses == m + 1 && clear_pulses == m + 1, "ignored bytes");
    end
    // the colour byte is kept; changing mode repacks it again
    send(8'h45); send(8'hB5);
    for (int m = 0; m < 4; m++) begin
      send(8'h59); send(8'(m));
      check(color_out == repack(m, 8'hB5), "repack on mode change");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
