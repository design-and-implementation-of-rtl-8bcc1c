// tb_conv_ctrl: checks the tap sequence of the convolution controller for a
// 4 x 5 map: every issued address, pad flag, tap index, first/last marker and
// output coordinate, the total of 9*H*W issue cycles and the done pulse.
module tb_conv_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, valid, pad, first, last;
  logic [15:0] height, width, x, y, rd_addr;
  logic [3:0] tap;
  int checks = 0, failures = 0;

  conv_ctrl #(.AW(16)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(int H, int W);
    int n = 0, npad = 0;
    @(negedge clk); start = 1; height = 16'(H); width = 16'(W);
    @(negedge clk); start = 0;
    for (int oy = 0; oy < H; oy++) for (int ox = 0; ox < W; ox++)
      for (int ky = 0; ky < 3; ky++) for (int kx = 0; kx < 3; kx++) begin
        int iy = oy + ky - 1, ix = ox + kx - 1;
        bit ep = (iy < 0 || ix < 0 || iy >= H || ix >= W);
        checks++;
        if (!valid || pad != ep || tap != 4'(ky*3+kx) || first != (ky==0 && kx==0) ||
            last != (ky==2 && kx==2) || x != 16'(ox) || y != 16'(oy) ||
            (!ep && rd_addr != 16'(iy*W+ix))) begin
          failures++;
          if (failures < 10) $display("(%0d,%0d) tap %0d: valid=%0d pad=%0d tap=%0d addr=%0d", oy, ox, ky*3+kx, valid, pad, tap, rd_addr);
        end
        if (ep) npad++;
        n++;
        @(negedge clk);
        if (n == 9*H*W) begin
          checks++; if (!done || valid) begin failures++; $display("done/valid wrong at end"); end
        end
      end
    checks++; if (npad == 0) begin failures++; $display("no padding exercised"); end
  endtask

  initial begin
    start = 0; height = 0; width = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    run(4, 5);
    run(3, 3);
    run(6, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
