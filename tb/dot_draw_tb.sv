// dot_draw_tb: self-checking test of the dot draw unit.
//
// The testbench plays the memory controller: it sweeps (x_next, y_next) over
// a 16 x 16 area one position per clock and grants every request one clock
// later (or withholds grants, to model losing arbitration). A reference list
// of pending dots predicts, per position, whether req must rise and which
// colour must be on bus_color in the granted clock. Also checked: dots are
// drawn once, buff_full rises when the ninth dot is pending, the eleventh
// dot pushes the oldest undrawn dot out, and the newest of two dots on the
// same position wins.
module dot_draw_tb;
  import nvga_pkg::*;
  localparam int N = 10;
  logic               clk = 1'b0, rst, go, next_active, req, enable, buff_full;
  logic               grant_ok;
  logic [COORD_W-1:0] x_coord, y_coord, x_next, y_next;
  logic [7:0]         color, bus_color;
  int                 checks = 0, failures = 0;

  // reference model: slot list, newest last
  int   mx[$], my[$], mc[$];
  bit   mpend[$];

  dot_draw #(.N_DOTS(N)) dut (.clk, .rst, .x_coord, .y_coord, .color, .go, .x_next, .y_next,
                              .next_active, .req, .enable, .bus_color, .buff_full);

  always #5 clk = ~clk;

  always_ff @(posedge clk) enable <= req & grant_ok;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic add_dot(input int x, input int y, input int c);
    @(negedge clk);
    x_coord = COORD_W'(x); y_coord = COORD_W'(y); color = 8'(c); go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    mx.push_back(x); my.push_back(y); mc.push_back(c); mpend.push_back(1'b1);
    if (mx.size() > N) begin
      void'(mx.pop_front()); void'(my.pop_front()); void'(mc.pop_front()); void'(mpend.pop_front());
    end
  endtask

  function automatic int model_hit(input int x, input int y);  // newest pending slot or -1
    int hit = -1;
    foreach (mx[i]) if (mpend[i] && mx[i] == x && my[i] == y) hit = i;
    return hit;
  endfunction

  task automatic sweep(input bit grants, output int drawn);
    int hit, pend_color;
    bit pend;
    drawn = 0; pend = 0; pend_color = 0;
    grant_ok = grants;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        @(negedge clk);
        // the grant for the previous position is visible now
        if (pend && grants) begin
          check(enable && bus_color == 8'(pend_color), $sformatf("bus colour %h", bus_color));
        end else begin
          check(!enable && bus_color == 8'h00, "bus idle");
        end
        x_next = COORD_W'(x); y_next = COORD_W'(y); next_active = 1'b1;
        #1;
        hit = model_hit(x, y);
        check(req == (hit >= 0), $sformatf("req at %0d,%0d", x, y));
        pend = (hit >= 0);
        if (pend) begin
          pend_color = mc[hit];
          drawn++;
          if (grants) foreach (mx[i]) if (mx[i] == x && my[i] == y) mpend[i] = 1'b0;
        end
      end
    @(negedge clk);
    next_active = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int drawn;
    rst = 1'b0;  // start low: the asynchronous reset needs a rising edge
    #1 rst = 1'b1; go = 1'b0; next_active = 1'b0; grant_ok = 1'b1;
    x_coord = '0; y_coord = '0; x_next = '0; y_next = '0; color = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(!req && !buff_full, "reset");

    // one dot, drawn once
    add_dot(5, 7, 32'h11);
    sweep(1, drawn); check(drawn == 1, "single dot drawn");
    sweep(1, drawn); check(drawn == 0, "dot drawn only once");

    // no request outside the active area
    add_dot(3, 3, 32'h22);
    @(negedge clk); x_next = 3; y_next = 3; next_active = 1'b0; #1;
    check(!req, "inactive position ignored");

    // losing arbitration keeps the dot pending
    sweep(0, drawn); check(drawn == 1, "ungranted dot requested");
    sweep(1, drawn); check(drawn == 1, "ungranted dot drawn later");
    sweep(1, drawn); check(drawn == 0, "then done");

    // buffer full: ninth pending dot raises the flag
    for (int k = 0; k < 8; k++) add_dot(k, 10, 32'h30 + k);
    check(!buff_full, "8 pending: not full");
    add_dot(8, 10, 32'h38);
    check(buff_full, "9 pending: full");
    add_dot(9, 10, 32'h39);
    check(buff_full, "10 pending: full");
    add_dot(10, 10, 32'h3A);   // pushes out (0,10)
    check(model_hit(0, 10) < 0, "model dropped oldest");
    sweep(1, drawn); check(drawn == 10, "ten dots drawn, oldest lost");
    check(!buff_full, "empty after drawing");

    // two dots on one position: the newest colour wins
    add_dot(12, 12, 32'hA0);
    add_dot(12, 12, 32'hA1);
    sweep(1, drawn); check(drawn == 1, "shared position drawn once");

    // a dot added while a grant is in flight
    add_dot(2, 2, 32'h55);
    grant_ok = 1'b1;
    @(negedge clk); x_next = 2; y_next = 2; next_active = 1'b1;
    x_coord = 14; y_coord = 1; color = 8'h66; go = 1'b1;   // go in the request clock
    @(negedge clk); go = 1'b0; next_active = 1'b0;
    check(enable && bus_color == 8'h55, "grant survives a shift");
    mx.push_back(14); my.push_back(1); mc.push_back(32'h66); mpend.push_back(1'b1);
    foreach (mx[i]) if (mx[i] == 2 && my[i] == 2) mpend[i] = 1'b0;
    @(negedge clk);
    sweep(1, drawn); check(drawn == 1, "only the new dot left");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
