// color_bus_arbiter: grants the shared colour bus to one graphics unit.
//
// Every graphics unit raises its line of req when it wants to paint the
// advertised next pixel. The arbiter registers a one-hot grant for the
// highest-numbered requesting line (fixed priority), so the grant (enable)
// is valid one clock after the request, in the memory controller's second
// pipeline stage. With no request, enable is all zero.
// Fixed priority, the registered grant and eight request lines follow the
// original design.
module color_bus_arbiter #(
  parameter int N = 8  // request lines
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  output logic [N-1:0] enable
);

  logic [N-1:0] grant;

  always_comb begin
    grant = '0;
    for (int i = 0; i < N; i++)
      if (req[i]) grant = N'(1) << i;  // the last (highest) one wins
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) enable <= '0;
    else     enable <= grant;
  end

  assert property (@(posedge clk) disable iff (rst) $onehot0(enable));

endmodule
