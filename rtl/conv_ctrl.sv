// conv_ctrl: control FSM and window address generator of a 3x3 convolution.
//
// After start it walks the output pixels in raster order (row y, column x)
// and, for each, the nine kernel taps (ky, kx) row by row, one tap per cycle.
// For each tap it issues the feature-memory address of input pixel
// (y+ky-1, x+kx-1), or flags `pad` when that pixel lies outside the map
// (zero padding, so the output map has the input's size). `first` marks tap 0
// and `last` tap 8 of each output pixel; x and y name the output pixel.
// An H x W layer therefore takes exactly 9*H*W issue cycles; `done` pulses in
// the cycle after the last issue. height and width are sampled at start.
// The controller FSM that sequences the convolution follows the published
// design; the loop order, one tap per cycle and the zero padding are this
// design's choices.
module conv_ctrl #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   height,
  input  logic [15:0]   width,
  output logic          busy,
  output logic          done,
  output logic          valid,
  output logic [AW-1:0] rd_addr,
  output logic          pad,
  output logic [3:0]    tap,
  output logic          first,
  output logic          last,
  output logic [15:0]   x,
  output logic [15:0]   y
);

  typedef enum logic [0:0] {S_IDLE, S_RUN} state_e;
  state_e state;

  logic [15:0] h_q, w_q;
  logic [1:0]  ky, kx;

  // Input pixel of the current tap, in signed coordinates.
  logic signed [17:0] iy, ix;
  assign iy = $signed({2'b00, y}) + $signed({16'd0, ky}) - 18'sd1;
  assign ix = $signed({2'b00, x}) + $signed({16'd0, kx}) - 18'sd1;

  assign busy  = (state == S_RUN);
  assign valid = (state == S_RUN);
  assign tap   = 4'(ky * 2'd3) + 4'(kx);
  assign first = (ky == 2'd0) && (kx == 2'd0);
  assign last  = (ky == 2'd2) && (kx == 2'd2);
  assign pad   = (iy < 0) || (ix < 0) ||
                 (iy >= $signed({2'b00, h_q})) || (ix >= $signed({2'b00, w_q}));
  assign rd_addr = pad ? '0 : AW'(32'(iy[15:0]) * 32'(w_q) + 32'(ix[15:0]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      h_q <= '0; w_q <= '0;
      x <= '0; y <= '0; ky <= '0; kx <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          h_q <= height; w_q <= width;
          x <= '0; y <= '0; ky <= '0; kx <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (kx != 2'd2) kx <= kx + 2'd1;
          else begin
            kx <= '0;
            if (ky != 2'd2) ky <= ky + 2'd1;
            else begin
              ky <= '0;
              if (x != w_q - 16'd1) x <= x + 16'd1;
              else begin
                x <= '0;
                if (y != h_q - 16'd1) y <= y + 16'd1;
                else begin
                  state <= S_IDLE;
                  done  <= 1'b1;
                end
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
