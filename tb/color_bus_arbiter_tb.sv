// color_bus_arbiter_tb: self-checking test of the colour-bus arbiter.
//
// Applies random request vectors (and the empty vector) and checks that one
// clock later enable is the one-hot code of the highest requesting line, or
// zero with no request.
module color_bus_arbiter_tb;
  localparam int N = 8;
  logic         clk = 1'b0, rst;
  logic [N-1:0] req, enable, expected;
  int           checks = 0, failures = 0;

  color_bus_arbiter #(.N(N)) dut (.clk, .rst, .req, .enable);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] highest(input logic [N-1:0] r);
    for (int i = N - 1; i >= 0; i--)
      if (r[i]) return N'(1) << i;
    return '0;
  endfunction

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0;  // start low: the asynchronous reset needs a rising edge
    #1 rst = 1'b1; req = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    checks++; if (enable !== '0) failures++;
    for (int t = 0; t < 500; t++) begin
      req = (t % 7 == 0) ? '0 : N'($urandom);
      if (t % 11 == 0) req = N'(1) << (t % N);
      expected = highest(req);
      @(posedge clk); #1;
      checks++;
      if (enable !== expected) begin
        failures++;
        $display("FAIL req=%b enable=%b expected=%b", req, enable, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
