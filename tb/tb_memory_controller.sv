// tb_memory_controller: writes a map into bank 0 through the input port and
// another into bank 1 through the layer port, then a layer write into bank 0,
// and reads both banks back, checking the ping-pong routing and read latency.
module tb_memory_controller;
  localparam int D0 = 32, D1 = 8, WIDTH = 16, AW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_wr_en, l_wr_en, wr_bank, rd_en, rd_bank;
  logic [AW-1:0] in_wr_addr, l_wr_addr, rd_addr;
  logic [WIDTH-1:0] in_wr_data, l_wr_data, rd_data;
  logic [WIDTH-1:0] s0 [D0], s1 [D1];
  int checks = 0, failures = 0;

  memory_controller #(.DEPTH0(D0), .DEPTH1(D1), .WIDTH(WIDTH), .AW(AW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic readback();
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < (b ? D1 : D0); a++) begin
        @(negedge clk); rd_en = 1; rd_bank = b[0]; rd_addr = AW'(a);
        @(posedge clk); #1; rd_en = 0;
        checks++;
        if (rd_data != (b ? s1[a] : s0[a])) begin failures++; $display("bank %0d addr %0d got %h", b, a, rd_data); end
      end
  endtask

  initial begin
    in_wr_en = 0; l_wr_en = 0; wr_bank = 0; rd_en = 0; rd_bank = 0;
    in_wr_addr = 0; l_wr_addr = 0; rd_addr = 0; in_wr_data = 0; l_wr_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int a = 0; a < D0; a++) begin
      @(negedge clk); in_wr_en = 1; in_wr_addr = AW'(a); in_wr_data = WIDTH'($urandom); s0[a] = in_wr_data;
    end
    @(negedge clk); in_wr_en = 0;
    for (int a = 0; a < D1; a++) begin
      @(negedge clk); l_wr_en = 1; wr_bank = 1; l_wr_addr = AW'(a); l_wr_data = WIDTH'($urandom); s1[a] = l_wr_data;
    end
    @(negedge clk); l_wr_en = 0;
    readback();
    // layer writes into bank 0 must not touch bank 1
    for (int a = 0; a < D1; a++) begin
      @(negedge clk); l_wr_en = 1; wr_bank = 0; l_wr_addr = AW'(a); l_wr_data = WIDTH'($urandom); s0[a] = l_wr_data;
    end
    @(negedge clk); l_wr_en = 0;
    readback();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
