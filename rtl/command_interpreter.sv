// command_interpreter: decodes the serial command stream into draw controls.
//
// valid from the SPI receiver is brought into the pixel clock domain through
// a two-flop synchroniser; a third flop detects its rising edge (new_byte).
// On each new byte a state machine walks through the command formats:
//   0x50 XH XL YH YL C  dot draw   -> x, y, colour latched, dot_go pulse
//   0x45 C              clear      -> colour latched, clear_go pulse
//   0x59 M              colour mode-> mode latched (bits [1:0])
//   0x00 / other        ignored (no-op)
// dot_go and clear_go are one pixel clock wide. waiting is high in the idle
// state, between commands.
//
// The colour byte is sent in RGB 3:3:2 form. color_out repacks the latched
// byte for the current colour mode (zero-filled above the used bits):
//   1bpp: R2           2bpp: R2 R1
//   4bpp: R2 G2 G1 B1  8bpp: the byte unchanged
// The repacking happens combinationally on the current mode, as in the
// original design; the opcodes and byte order follow the document. The
// two-flop synchroniser (the original used one) is this design's choice.
module command_interpreter
  import nvga_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               valid,
  input  logic [7:0]         par_data,
  output logic               waiting,
  output logic [COORD_W-1:0] x_coord,
  output logic [COORD_W-1:0] y_coord,
  output logic [7:0]         color_out,
  output color_mode_e        color_mode,
  output logic               dot_go,
  output logic               clear_go
);

  typedef enum logic [2:0] {
    S_IDLE, S_MODE, S_XH, S_XL, S_YH, S_YL, S_DOT_COLOR, S_CLEAR_COLOR
  } state_e;

  state_e     state_q;
  logic [2:0] valid_sync_q;  // [0],[1] synchroniser, [2] edge history
  logic       new_byte;
  logic [7:0] color_q;

  assign new_byte = valid_sync_q[1] & ~valid_sync_q[2];
  assign waiting  = (state_q == S_IDLE);

  always_comb begin
    unique case (color_mode)
      MODE_1BPP: color_out = {7'b0, color_q[7]};
      MODE_2BPP: color_out = {6'b0, color_q[7:6]};
      MODE_4BPP: color_out = {4'b0, color_q[7], color_q[4:3], color_q[1]};
      default:   color_out = color_q;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      valid_sync_q <= '0;
      state_q      <= S_IDLE;
      color_mode   <= MODE_1BPP;
      color_q      <= '0;
      x_coord      <= '0;
      y_coord      <= '0;
      dot_go       <= 1'b0;
      clear_go     <= 1'b0;
    end else begin
      valid_sync_q <= {valid_sync_q[1:0], valid};
      dot_go       <= 1'b0;
      clear_go     <= 1'b0;
      if (new_byte) begin
        unique case (state_q)
          S_IDLE: begin
            unique case (par_data)
              OP_COLOR_MODE: state_q <= S_MODE;
              OP_DOT:        state_q <= S_XH;
              OP_CLEAR:      state_q <= S_CLEAR_COLOR;
              OP_NOP:        state_q <= S_IDLE;
              default:       state_q <= S_IDLE;
            endcase
          end
          S_MODE: begin
            color_mode <= color_mode_e'(par_data[1:0]);
            state_q    <= S_IDLE;
          end
          S_XH: begin x_coord[15:8] <= par_data; state_q <= S_XL; end
          S_XL: begin x_coord[7:0]  <= par_data; state_q <= S_YH; end
          S_YH: begin y_coord[15:8] <= par_data; state_q <= S_YL; end
          S_YL: begin y_coord[7:0]  <= par_data; state_q <= S_DOT_COLOR; end
          S_DOT_COLOR: begin
            color_q <= par_data;
            dot_go  <= 1'b1;
            state_q <= S_IDLE;
          end
          S_CLEAR_COLOR: begin
            color_q  <= par_data;
            clear_go <= 1'b1;
            state_q  <= S_IDLE;
          end
          default: state_q <= S_IDLE;
        endcase
      end
    end
  end

endmodule
