// mac_array: pipelined array of 8-bit signed multiply-accumulate cells.
//
// ROWS x COLS multipliers. Each cycle with in_valid, row r forms the dot
// product of the shared activation vector act[COLS] with its own weight row
// wgt[r][COLS] and adds it to accumulator r. in_first starts a new sum,
// in_last marks the final term. The array is used with ROWS = output channels
// and COLS = input channels for a convolution, and ROWS = classes for the FC
// layer (a matrix-vector multiplier).
//
// Timing: two register stages (products, then adder tree + accumulate). The
// finished sums appear on acc with out_valid high for one cycle, two cycles
// after the in_last input, together with the tag given with that input.
// The 8-bit fixed-point MAC array follows the published design; the two-stage
// pipeline, the tag sideband and the 32-bit accumulator are this design's
// choices.
module mac_array #(
  parameter int unsigned ROWS  = 8,
  parameter int unsigned COLS  = 8,
  parameter int unsigned ACC_W = 32,
  parameter int unsigned TAG_W = 32
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic                               in_first,
  input  logic                               in_last,
  input  logic [TAG_W-1:0]                   in_tag,
  input  logic [COLS-1:0][7:0]               act,
  input  logic [ROWS-1:0][COLS-1:0][7:0]     wgt,
  output logic                               out_valid,
  output logic [TAG_W-1:0]                   out_tag,
  output logic [ROWS-1:0][ACC_W-1:0]         acc
);

  // Stage 1: products.
  logic signed [15:0] prod [ROWS][COLS];
  logic               v1, first1, last1;
  logic [TAG_W-1:0]   tag1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0; tag1 <= '0;
    end else begin
      v1 <= in_valid; first1 <= in_first; last1 <= in_last; tag1 <= in_tag;
    end
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        prod[r][c] <= $signed(act[c]) * $signed(wgt[r][c]);
  end

  // Stage 2: adder tree per row and accumulation.
  logic signed [ACC_W-1:0] rowsum [ROWS];
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      rowsum[r] = '0;
      for (int c = 0; c < COLS; c++)
        rowsum[r] = rowsum[r] + ACC_W'(prod[r][c]);
    end
  end

  logic signed [ACC_W-1:0] accr [ROWS];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) accr[r] <= '0;
      out_valid <= 1'b0;
      out_tag   <= '0;
    end else begin
      out_valid <= v1 && last1;
      if (v1) begin
        out_tag <= tag1;
        for (int r = 0; r < ROWS; r++)
          accr[r] <= (first1 ? '0 : accr[r]) + rowsum[r];
      end
    end
  end

  always_comb
    for (int r = 0; r < ROWS; r++) acc[r] = accr[r];

endmodule
