// tb_feature_memory: random writes and reads against a shadow copy, with the
// one-cycle read latency and read-before-write on a same-address collision.
module tb_feature_memory;
  localparam int DEPTH = 64, WIDTH = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en;
  logic [5:0] wr_addr, rd_addr;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  feature_memory #(.DEPTH(DEPTH), .WIDTH(WIDTH), .AW(6)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = 6'(a); wr_data = WIDTH'($urandom); shadow[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 1000; i++) begin
      logic [WIDTH-1:0] exp;
      @(negedge clk);
      rd_en = 1; rd_addr = 6'($urandom);
      wr_en = $urandom % 2; wr_addr = (i % 5 == 0) ? rd_addr : 6'($urandom); wr_data = WIDTH'($urandom);
      exp = shadow[rd_addr];
      @(posedge clk); #1;
      if (wr_en) shadow[wr_addr] = wr_data;
      checks++;
      if (rd_data != exp) begin failures++; $display("addr %0d got %h exp %h", rd_addr, rd_data, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
