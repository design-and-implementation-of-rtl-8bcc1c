// feature_memory: simple dual-port block RAM holding one feature map.
//
// One word per pixel, all channels of that pixel packed in the word, so one
// read returns the channel vector that the MAC array consumes in a cycle.
// Write port and read port are independent; the read is synchronous: rd_data
// holds the word at rd_addr one cycle after rd_en. Reading and writing the
// same address in one cycle returns the old word.
// On-chip BRAM buffering follows the published design; the word layout is
// this design's choice.
module feature_memory #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned WIDTH = 64,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
