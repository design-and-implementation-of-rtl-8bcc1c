// weight_memory: weight store that is written 32 bits at a time from the
// AXI-lite side and read one full weight word per cycle by the MAC array.
//
// Each word is LANES 32-bit lanes wide. A write puts wr_data into lane wr_lane
// of word wr_addr. A read is synchronous: rd_data holds word rd_addr one cycle
// after rd_en. For the convolution array a word holds the 8x8 weights of one
// kernel tap; for the FC layer it holds all classes' weights for one pixel.
// A separate weight memory loaded over AXI-lite follows the published design;
// the word and lane layout is this design's choice.
module weight_memory #(
  parameter int unsigned DEPTH  = 27,
  parameter int unsigned LANES  = 16,
  parameter int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned LW     = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                   clk,
  input  logic                   wr_en,
  input  logic [AW-1:0]          wr_addr,
  input  logic [LW-1:0]          wr_lane,
  input  logic [31:0]            wr_data,
  input  logic                   rd_en,
  input  logic [AW-1:0]          rd_addr,
  output logic [LANES-1:0][31:0] rd_data
);

  logic [LANES-1:0][31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr][wr_lane] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
