// tb_mac_array: self-checking test of the pipelined MAC array.
// Random dot-product sequences of 1..6 terms are fed with random gaps; each
// finished sum is compared with a reference computed in the testbench, and
// the result must appear exactly two cycles after the last term.
module tb_mac_array;
  localparam int ROWS = 3, COLS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_first, in_last, out_valid;
  logic [7:0] in_tag, out_tag;
  logic [COLS-1:0][7:0] act;
  logic [ROWS-1:0][COLS-1:0][7:0] wgt;
  logic [ROWS-1:0][31:0] acc;
  int checks = 0, failures = 0;

  mac_array #(.ROWS(ROWS), .COLS(COLS), .ACC_W(32), .TAG_W(8)) dut (.*);

  longint ref_acc [ROWS];
  int     last_cycle, cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_tag = 0; act = '0; wgt = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int s = 0; s < 200; s++) begin
      int len;
      len = 1 + ($urandom % 6);
      for (int r = 0; r < ROWS; r++) ref_acc[r] = 0;
      for (int t = 0; t < len; t++) begin
        // optional idle gap
        if ($urandom % 3 == 0) begin
          @(negedge clk); in_valid = 0; @(posedge clk);
        end
        @(negedge clk);
        in_valid = 1; in_first = (t == 0); in_last = (t == len - 1); in_tag = 8'(s);
        for (int c = 0; c < COLS; c++) act[c] = 8'($urandom);
        if (s < 5) for (int c = 0; c < COLS; c++) act[c] = (c % 2) ? 8'h80 : 8'h7f; // extremes
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            wgt[r][c] = (s < 5) ? 8'h80 : 8'($urandom);
            ref_acc[r] += longint'($signed(act[c])) * longint'($signed(wgt[r][c]));
          end
        @(posedge clk);
        if (t == len - 1) last_cycle = cycle;
      end
      @(negedge clk); in_valid = 0; in_last = 0;
      // wait for the result
      begin
        int waited;
        waited = 0;
        while (!out_valid && waited < 10) begin @(posedge clk); #1; waited++; end
        checks++;
        if (!out_valid) begin failures++; $display("no out_valid for seq %0d", s); end
        else begin
          checks++;
          if (cycle - last_cycle != 2) begin
            failures++; $display("latency %0d, expected 2", cycle - last_cycle);
          end
          checks++;
          if (out_tag != 8'(s)) begin failures++; $display("tag mismatch"); end
          for (int r = 0; r < ROWS; r++) begin
            checks++;
            if ($signed(acc[r]) != 32'(ref_acc[r])) begin
              failures++; $display("seq %0d row %0d: got %0d exp %0d", s, r, $signed(acc[r]), ref_acc[r]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
