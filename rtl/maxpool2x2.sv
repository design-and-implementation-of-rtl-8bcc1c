// maxpool2x2: streaming 2x2 max pooling with stride 2 over a raster-order
// pixel stream.
//
// Pixels arrive with their column x and row y. Within a row, a holding register
// keeps the left pixel of each horizontal pair and a comparator takes the
// channel-wise maximum with the right one. On even rows that pair maximum is
// parked in a row buffer (one entry per output column, MAXW/2 deep); on odd
// rows it is compared with the parked value and the 2x2 maximum is emitted.
// Output pixels come in raster order of the pooled map; out_addr counts them
// from 0 and is cleared by start. Odd trailing rows or columns are dropped.
// Timing: out_valid is registered, one cycle after the bottom-right input
// pixel of each window.
// Pooling with registers and comparators follows the published design; the
// row-buffer organisation is this design's choice.
module maxpool2x2 #(
  parameter int unsigned CH   = 8,
  parameter int unsigned MAXW = 256,
  parameter int unsigned AW   = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 in_valid,
  input  logic [15:0]          in_x,
  input  logic [15:0]          in_y,
  input  logic [CH-1:0][7:0]   in_vec,
  output logic                 out_valid,
  output logic [AW-1:0]        out_addr,
  output logic [CH-1:0][7:0]   out_vec
);

  localparam int unsigned HALF = MAXW / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  function automatic logic [CH-1:0][7:0] vmax(input logic [CH-1:0][7:0] a,
                                              input logic [CH-1:0][7:0] b);
    for (int c = 0; c < CH; c++)
      vmax[c] = ($signed(a[c]) > $signed(b[c])) ? a[c] : b[c];
  endfunction

  logic [CH-1:0][7:0] hold;
  logic [CH-1:0][7:0] rowbuf [HALF];
  logic [CH-1:0][7:0] pair;
  logic [15:0]        col;
  logic               col_ok;
  logic [CW-1:0]      ci;

  assign pair = vmax(hold, in_vec);
  assign col    = in_x >> 1;
  assign col_ok = 32'(col) < HALF;
  assign ci     = CW'(col);

  always_ff @(posedge clk) begin
    if (in_valid && !in_x[0]) hold <= in_vec;
    if (in_valid && in_x[0] && !in_y[0] && col_ok) rowbuf[ci] <= pair;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_addr  <= '0;
      out_vec   <= '0;
    end else begin
      if (out_valid) out_addr <= out_addr + 1'b1;
      if (start) out_addr <= '0;
      out_valid <= in_valid && in_x[0] && in_y[0] && col_ok;
      if (in_valid && in_x[0] && in_y[0] && col_ok)
        out_vec <= vmax(pair, rowbuf[ci]);
    end
  end

endmodule
