// memory_controller: the two on-chip feature buffers and the routing of data
// between layers (ping-pong buffering).
//
// Bank 0 receives the input frame and every layer reads one bank while writing
// the other, so a layer's output becomes the next layer's input without
// copying. The input interface always writes bank 0; the active layer writes
// bank wr_bank. Exactly one reader is active at a time; it reads bank rd_bank.
// Bank 0 holds a full frame (DEPTH0 words); bank 1 only ever holds pooled
// maps, so it is a quarter of that (DEPTH1).
// Timing: synchronous reads, rd_data one cycle after rd_en; the bank choice
// is registered with the read so the data mux matches.
// A memory controller that streams data between layers through BRAM follows
// the published design; the ping-pong scheme and bank sizes are this design's
// choices.
module memory_controller #(
  parameter int unsigned DEPTH0 = 65536,
  parameter int unsigned DEPTH1 = 16384,
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned AW     = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // input interface writes (bank 0)
  input  logic             in_wr_en,
  input  logic [AW-1:0]    in_wr_addr,
  input  logic [WIDTH-1:0] in_wr_data,
  // layer writes
  input  logic             l_wr_en,
  input  logic             wr_bank,
  input  logic [AW-1:0]    l_wr_addr,
  input  logic [WIDTH-1:0] l_wr_data,
  // layer reads
  input  logic             rd_en,
  input  logic             rd_bank,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  localparam int unsigned AW0 = $clog2(DEPTH0);
  localparam int unsigned AW1 = $clog2(DEPTH1);

  logic             we0, we1;
  logic [AW-1:0]    wa0;
  logic [WIDTH-1:0] wd0, rd0, rd1;
  logic             rd_bank_q;

  assign we0 = in_wr_en || (l_wr_en && !wr_bank);
  assign wa0 = in_wr_en ? in_wr_addr : l_wr_addr;
  assign wd0 = in_wr_en ? in_wr_data : l_wr_data;
  assign we1 = l_wr_en && wr_bank;

  feature_memory #(.DEPTH(DEPTH0), .WIDTH(WIDTH), .AW(AW0)) u_bank0 (
    .clk, .wr_en(we0), .wr_addr(AW0'(wa0)), .wr_data(wd0),
    .rd_en(rd_en && !rd_bank), .rd_addr(AW0'(rd_addr)), .rd_data(rd0)
  );

  feature_memory #(.DEPTH(DEPTH1), .WIDTH(WIDTH), .AW(AW1)) u_bank1 (
    .clk, .wr_en(we1), .wr_addr(AW1'(l_wr_addr)), .wr_data(l_wr_data),
    .rd_en(rd_en && rd_bank), .rd_addr(AW1'(rd_addr)), .rd_data(rd1)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_bank_q <= 1'b0;
    else if (rd_en) rd_bank_q <= rd_bank;
  end

  assign rd_data = rd_bank_q ? rd1 : rd0;

  // Only one writer may use bank 0 in a cycle.
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(in_wr_en && l_wr_en && !wr_bank));

endmodule
