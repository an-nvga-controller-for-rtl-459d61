// spi_receiver_tb: self-checking test of the SPI byte receiver.
//
// Sends a stream of random bytes MSB first (data set up while the SPI clock
// is low, sampled on its rising edge) and after every rising edge compares
// ready, valid and par_data with a reference computed from the edge count:
// the byte sent in slot k must appear on par_data at the first edge of slot
// k+1 and stay until the first edge of slot k+2; valid must be high exactly
// after edges 2 and 3 of each byte, ready after edge 0 (mod 8).
module spi_receiver_tb;
  logic       spi_clk = 1'b0, rst, spi_d = 1'b0;
  logic       ready, valid;
  logic [7:0] par_data;
  int         checks = 0, failures = 0;
  int         edges = 0;
  logic [7:0] sent [64];
  logic [7:0] expect_par;

  spi_receiver dut (.spi_clk, .rst, .spi_d, .ready, .valid, .par_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at edge %0d", what, edges);
    end
  endtask

  task automatic clock_bit(input logic b);
    spi_d = b;
    #50 spi_clk = 1'b1;
    edges++;
    #10;
    // reference: after edge n, counter = n mod 8
    check(ready == ((edges % 8) == 0), "ready");
    check(valid == ((edges % 8) == 2 || (edges % 8) == 3), "valid");
    if (edges > 8) begin
      // byte slot whose completion was latched at the last edge with count 0
      int slot = (edges - 1) / 8 - 1;
      expect_par = sent[slot];
      check(par_data == expect_par, "par_data");
    end
    #40 spi_clk = 1'b0;
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0;  // start low: the asynchronous reset needs a rising edge
    #1 rst = 1'b1;
    #100 rst = 1'b0;
    #100;
    check(par_data == 8'h00 && ready && !valid, "reset state");
    for (int k = 0; k < 64; k++) sent[k] = 8'($urandom);
    sent[0] = 8'h50; sent[1] = 8'hA5; sent[2] = 8'h00; sent[3] = 8'hFF;
    for (int k = 0; k < 64; k++)
      for (int i = 7; i >= 0; i--) clock_bit(sent[k][i]);
    // the clock stops between bytes: nothing may change while idle
    #1000;
    check(!valid && ready, "idle flags");
    check(par_data == sent[62], "idle par_data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
