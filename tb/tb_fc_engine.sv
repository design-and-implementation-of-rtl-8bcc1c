// tb_fc_engine: random feature vectors and weight matrices through the FC
// matrix-vector unit; every score is compared with W*x + b computed in the
// testbench, and the run length with n_pix + 3 cycles.
module tb_fc_engine;
  localparam int CHN = 4, NCL = 3, AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, fm_rd_en, wt_rd_en;
  logic [31:0] n_pix;
  logic [NCL-1:0][31:0] bias, scores;
  logic [AW-1:0] rd_addr;
  logic [CHN-1:0][7:0] fm_rd_data;
  logic [NCL-1:0][CHN-1:0][7:0] wt_rd_data;
  logic [CHN-1:0][7:0] fm [64];
  logic [NCL-1:0][CHN-1:0][7:0] wm [64];
  int checks = 0, failures = 0;

  fc_engine #(.CHN(CHN), .NCL(NCL), .AW(AW)) dut (.*);

  always_ff @(posedge clk) begin
    if (fm_rd_en) fm_rd_data <= fm[rd_addr];
    if (wt_rd_en) wt_rd_data <= wm[rd_addr];
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; n_pix = 0; bias = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      int n, cyc;
      longint ref_s [NCL];
      n = 1 + ($urandom % 40); cyc = 0;
      for (int p = 0; p < n; p++) begin
        for (int c = 0; c < CHN; c++) fm[p][c] = 8'($urandom);
        for (int k = 0; k < NCL; k++) for (int c = 0; c < CHN; c++) wm[p][k][c] = 8'($urandom);
      end
      for (int k = 0; k < NCL; k++) begin
        bias[k] = $urandom;
        ref_s[k] = longint'($signed(bias[k]));
        for (int p = 0; p < n; p++) for (int c = 0; c < CHN; c++)
          ref_s[k] += longint'($signed(fm[p][c])) * longint'($signed(wm[p][k][c]));
      end
      @(negedge clk); start = 1; n_pix = n; @(negedge clk); start = 0;
      while (!done && cyc < 200) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != n + 3) begin failures++; $display("n=%0d took %0d cycles", n, cyc); end
      for (int k = 0; k < NCL; k++) begin
        checks++;
        if (scores[k] != 32'(ref_s[k])) begin failures++; $display("class %0d got %0d exp %0d", k, $signed(scores[k]), 32'(ref_s[k])); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
