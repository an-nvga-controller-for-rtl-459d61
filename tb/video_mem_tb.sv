// video_mem_tb: self-checking test of the frame-buffer memory.
//
// Writes a pattern computed from the address over the whole 32768-word
// memory, then reads it back with random addresses, checking that each word
// appears exactly one clock after its address and not before the edge. Also checks that a read of
// the address being written returns the old word.
module video_mem_tb;
  localparam int AW = 15;
  logic          clk = 1'b0, we;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [7:0]    wr_data, rd_data;
  int            checks = 0, failures = 0;

  video_mem #(.DATA_W(8), .ADDR_W(AW)) dut (.clk, .we, .wr_addr, .wr_data, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  function automatic logic [7:0] pattern(input logic [AW-1:0] a);
    return a[7:0] ^ {a[14:8], 1'b1};
  endfunction

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] a;
    logic [7:0]    prev;
    we = 1'b0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    @(negedge clk);
    for (int i = 0; i < 2**AW; i++) begin
      we = 1'b1; wr_addr = AW'(i); wr_data = pattern(AW'(i));
      @(negedge clk);
    end
    we = 1'b0;
    prev = rd_data;
    for (int t = 0; t < 4000; t++) begin
      a = AW'($urandom);
      rd_addr = a;
      #1;
      checks++;
      if (rd_data !== prev) begin
        failures++;
        $display("FAIL read data changed before the clock edge");
      end
      @(posedge clk); #1;
      prev = rd_data;
      checks++;
      if (rd_data !== pattern(a)) begin
        failures++;
        $display("FAIL addr %h read %h", a, rd_data);
      end
      @(negedge clk);
    end
    // read during write of the same address returns the old word
    rd_addr = 15'h1234; wr_addr = 15'h1234; wr_data = 8'h00; we = 1'b1;
    @(posedge clk); #1;
    checks++; if (rd_data !== pattern(15'h1234)) failures++;
    @(negedge clk); we = 1'b0;
    @(posedge clk); #1;
    checks++; if (rd_data !== 8'h00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
