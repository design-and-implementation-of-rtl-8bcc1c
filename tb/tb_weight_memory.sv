// tb_weight_memory: fills words lane by lane in random order, then reads
// every word wide and compares it with the shadow copy; also checks that a
// lane write leaves the other lanes of the word unchanged.
module tb_weight_memory;
  localparam int DEPTH = 12, LANES = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en;
  logic [3:0] wr_addr, rd_addr;
  logic [2:0] wr_lane;
  logic [31:0] wr_data;
  logic [LANES-1:0][31:0] rd_data;
  logic [31:0] shadow [DEPTH][LANES];
  int checks = 0, failures = 0;

  weight_memory #(.DEPTH(DEPTH), .LANES(LANES), .AW(4), .LW(3)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_lane = 0; wr_data = 0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < DEPTH * LANES; i++) begin
        int a;
        a = (i * 7 + pass) % (DEPTH * LANES);
        @(negedge clk); wr_en = 1; wr_addr = 4'(a / LANES); wr_lane = 3'(a % LANES);
        wr_data = $urandom; shadow[a / LANES][a % LANES] = wr_data;
      end
      @(negedge clk); wr_en = 0;
      for (int w = 0; w < DEPTH; w++) begin
        @(negedge clk); rd_en = 1; rd_addr = 4'(w);
        @(posedge clk); #1; rd_en = 0;
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (rd_data[l] != shadow[w][l]) begin failures++; $display("w%0d l%0d got %h exp %h", w, l, rd_data[l], shadow[w][l]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
