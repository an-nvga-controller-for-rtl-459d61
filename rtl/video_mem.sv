// video_mem: frame-buffer memory, simple dual port, 8 bit x 32768 words.
//
// One synchronous write port and one synchronous read port on the same
// clock. rd_data holds the word at the address presented in the previous
// cycle (one clock read latency), which is what the memory controller's
// pipeline is built around. When both ports use the same address in the
// same cycle the old word is read. The contents are not reset; the solid
// draw unit clears the screen after reset.
// Size and organisation follow the document; the port protocol is the
// usual one of an FPGA block RAM, which the document names but does not show.
module video_mem #(
  parameter int DATA_W = 8,
  parameter int ADDR_W = 15
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
