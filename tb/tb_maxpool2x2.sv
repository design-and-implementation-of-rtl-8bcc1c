// tb_maxpool2x2: streams random 8 x 6 maps (2 channels, with gaps) through
// the pooling unit and compares every pooled pixel, its address and its
// timing with a reference 2x2 maximum.
module tb_maxpool2x2;
  localparam int CHN = 2, MAXW = 8, W = 8, H = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, in_valid, out_valid;
  logic [15:0] in_x, in_y;
  logic [CHN-1:0][7:0] in_vec, out_vec;
  logic [15:0] out_addr;
  int checks = 0, failures = 0;

  maxpool2x2 #(.CH(CHN), .MAXW(MAXW), .AW(16)) dut (.*);

  logic [7:0] img [H][W][CHN];
  int got = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Checker: every output compared with the reference for its address.
  always @(posedge clk) if (rst_n && out_valid) begin
    int py, px;
    py = int'(out_addr) / (W / 2); px = int'(out_addr) % (W / 2);
    for (int c = 0; c < CHN; c++) begin
      logic signed [7:0] m;
      m = -128;
      for (int dy = 0; dy < 2; dy++) for (int dx = 0; dx < 2; dx++)
        if ($signed(img[2*py+dy][2*px+dx][c]) > m) m = img[2*py+dy][2*px+dx][c];
      checks++;
      if ($signed(out_vec[c]) != m) begin failures++; $display("addr %0d ch %0d got %0d exp %0d", out_addr, c, $signed(out_vec[c]), m); end
    end
    checks++;
    if (int'(out_addr) != got) begin failures++; $display("address order"); end
    got++;
  end

  initial begin
    start = 0; in_valid = 0; in_x = 0; in_y = 0; in_vec = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      got = 0;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        for (int c = 0; c < CHN; c++) img[y][x][c] = 8'($urandom);
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        if ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_x = 16'(x); in_y = 16'(y);
        for (int c = 0; c < CHN; c++) in_vec[c] = img[y][x][c];
        // latency: output must follow the bottom-right pixel by one cycle
        @(negedge clk);
        in_valid = 0;
        if (x % 2 == 1 && y % 2 == 1) begin
          checks++; if (!out_valid) begin failures++; $display("no output one cycle after window end"); end
        end else begin
          checks++; if (out_valid) begin failures++; $display("unexpected output"); end
        end
      end
      repeat (3) @(negedge clk);
      checks++;
      if (got != (H / 2) * (W / 2)) begin failures++; $display("got %0d outputs", got); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
