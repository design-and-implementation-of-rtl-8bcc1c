// tb_conv_layer: runs the convolution layer on random maps held in
// testbench memories (one-cycle read latency, like the block RAMs) and
// compares every written output pixel with a reference 3x3 convolution with
// zero padding, bias, rounding shift, ReLU, saturation and optional 2x2 max
// pool. Checks the run length against 9 cycles per output pixel.
module tb_conv_layer;
  import dnn_pkg::*;
  localparam int CHN = 4, MAXW = 8, AW = 8, WAW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  conv_cfg_t cfg;
  logic [CHN-1:0][31:0] bias;
  logic fm_rd_en, wt_rd_en, fm_wr_en;
  logic [AW-1:0] fm_rd_addr, fm_wr_addr;
  logic [WAW-1:0] wt_rd_addr;
  logic [CHN-1:0][7:0] fm_rd_data, fm_wr_data;
  logic [CHN-1:0][CHN-1:0][7:0] wt_rd_data;
  int checks = 0, failures = 0;

  conv_layer #(.CHN(CHN), .MAXW(MAXW), .AW(AW), .WAW(WAW)) dut (.*);

  logic [CHN-1:0][7:0] src [256];
  logic [CHN-1:0][7:0] dst [256];
  logic [CHN-1:0][CHN-1:0][7:0] wmem [27];

  always_ff @(posedge clk) begin
    if (fm_rd_en) fm_rd_data <= src[fm_rd_addr];
    if (wt_rd_en) wt_rd_data <= wmem[wt_rd_addr];
    if (fm_wr_en) dst[fm_wr_addr] <= fm_wr_data;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int rq(longint s, int sh);
    longint r;
    if (sh > 0) s += (longint'(1) << (sh - 1));
    r = (s >= 0) ? (s >> sh) : -((-s + (longint'(1) << sh) - 1) >> sh);
    if (r < 0) return 0;
    if (r > 127) return 127;
    return int'(r);
  endfunction

  int n_zero, n_sat;

  task automatic run(int layer, int H, int W, bit pool, int sh);
    int outp [16][16][CHN];
    int cyc = 0;
    for (int a = 0; a < H*W; a++) for (int c = 0; c < CHN; c++) src[a][c] = 8'($urandom);
    for (int t = 0; t < 9; t++) for (int o = 0; o < CHN; o++) for (int c = 0; c < CHN; c++)
      wmem[layer*9+t][o][c] = 8'($signed($urandom % 64) - 32);
    for (int o = 0; o < CHN; o++) bias[o] = 32'($signed($urandom % 4000) - 2000);
    // reference
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) for (int o = 0; o < CHN; o++) begin
      longint s = longint'($signed(bias[o]));
      for (int ky = 0; ky < 3; ky++) for (int kx = 0; kx < 3; kx++) begin
        int iy = y + ky - 1, ix = x + kx - 1;
        if (iy >= 0 && ix >= 0 && iy < H && ix < W)
          for (int c = 0; c < CHN; c++)
            s += longint'($signed(src[iy*W+ix][c])) * longint'($signed(wmem[layer*9+ky*3+kx][o][c]));
      end
      outp[y][x][o] = rq(s, sh);
      if (outp[y][x][o] == 0) n_zero++;
      if (outp[y][x][o] == 127) n_sat++;
    end
    cfg = '{layer: 2'(layer), height: 16'(H), width: 16'(W), pool: pool, src_bank: 1'b0, shift: 5'(sh)};
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done && cyc < 5000) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc < 9*H*W || cyc > 9*H*W + 8) begin failures++; $display("run took %0d cycles for %0d pixels", cyc, H*W); end
    if (pool) begin
      for (int y = 0; y < H/2; y++) for (int x = 0; x < W/2; x++) for (int o = 0; o < CHN; o++) begin
        int m = 0;
        for (int dy = 0; dy < 2; dy++) for (int dx = 0; dx < 2; dx++)
          if (outp[2*y+dy][2*x+dx][o] > m) m = outp[2*y+dy][2*x+dx][o];
        checks++;
        if ($signed(dst[y*(W/2)+x][o]) != m) begin
          failures++; if (failures < 10) $display("pool (%0d,%0d,%0d) got %0d exp %0d", y, x, o, $signed(dst[y*(W/2)+x][o]), m);
        end
      end
    end else begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) for (int o = 0; o < CHN; o++) begin
        checks++;
        if ($signed(dst[y*W+x][o]) != outp[y][x][o]) begin
          failures++; if (failures < 10) $display("(%0d,%0d,%0d) got %0d exp %0d", y, x, o, $signed(dst[y*W+x][o]), outp[y][x][o]);
        end
      end
    end
  endtask

  initial begin
    start = 0; cfg = '0; bias = '0; n_zero = 0; n_sat = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    run(0, 8, 8, 1'b1, 6);
    run(1, 6, 4, 1'b1, 5);
    run(2, 5, 7, 1'b0, 4);
    run(0, 4, 4, 1'b0, 9);
    checks++;
    if (n_zero == 0 || n_sat == 0) begin failures++; $display("ReLU/saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
