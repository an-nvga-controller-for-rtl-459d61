// spi_receiver: SPI byte receiver running entirely in the SPI clock domain.
//
// Every rising edge of spi_clk shifts spi_d into an 8-bit shift register,
// MSB first, and advances a free-running 3-bit bit counter. On the edge where
// the counter is 0 (the first edge of the next byte) the shift register,
// which then holds the complete previous byte, is copied to par_data. The
// parallel byte is therefore only delivered once the following byte starts,
// which is why the host sends a no-op after its last command.
//
// valid is high while the counter is 2 or 3, i.e. while bits 2..4 of the
// following byte are clocked in. par_data cannot change then, so the pixel
// clock domain may synchronise valid and sample par_data on its rising edge.
// ready is high while the counter is 0, i.e. between bytes (byte framing).
//
// Interface: spi_clk/spi_d from the host (SPI mode 0, MSB first);
// rst is asynchronous and active high.
// The structure (counter, shift register, output register, valid window)
// follows the original design; the SV coding is this design's own.
module spi_receiver (
  input  logic       spi_clk,
  input  logic       rst,
  input  logic       spi_d,
  output logic       ready,
  output logic       valid,
  output logic [7:0] par_data
);

  logic [7:0] shift_q;
  logic [2:0] bit_cnt_q;

  assign ready = (bit_cnt_q == 3'd0);
  assign valid = (bit_cnt_q == 3'd2) || (bit_cnt_q == 3'd3);

  always_ff @(posedge spi_clk or posedge rst) begin
    if (rst) begin
      shift_q   <= '0;
      bit_cnt_q <= '0;
      par_data  <= '0;
    end else begin
      shift_q   <= {shift_q[6:0], spi_d};
      bit_cnt_q <= bit_cnt_q + 3'd1;
      if (ready) par_data <= shift_q;
    end
  end

endmodule
