// tb_output_formatter: random score sets (including ties) are sent out under
// random tready back-pressure; checks the beat sequence, tlast, the argmax
// class against a reference, and that the stream holds while stalled.
module tb_output_formatter;
  localparam int NCL = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, m_axis_tvalid, m_axis_tready, m_axis_tlast, busy, done;
  logic [NCL-1:0][31:0] scores;
  logic [31:0] m_axis_tdata;
  logic [7:0] pred_class;
  int checks = 0, failures = 0, stalls = 0;

  output_formatter #(.NCL(NCL)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; scores = '0; m_axis_tready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 50; run++) begin
      logic [NCL-1:0][31:0] sc;
      int best, beat;
      for (int k = 0; k < NCL; k++) sc[k] = (run % 4 == 0) ? 32'($urandom % 3) : $urandom;
      best = 0;
      for (int k = 1; k < NCL; k++) if ($signed(sc[k]) > $signed(sc[best])) best = k;
      @(negedge clk); start = 1; scores = sc; @(negedge clk); start = 0; scores = '0;
      beat = 0;
      while (beat <= NCL) begin
        m_axis_tready = ($urandom % 3 != 0);
        #1;
        if (m_axis_tready && m_axis_tvalid) begin
          checks++;
          if (beat < NCL && (m_axis_tdata != sc[beat] || m_axis_tlast)) begin
            failures++; $display("run %0d beat %0d data %h exp %h", run, beat, m_axis_tdata, sc[beat]);
          end
          if (beat == NCL && (m_axis_tdata != 32'(best) || !m_axis_tlast)) begin
            failures++; $display("run %0d class beat %0d exp %0d", run, m_axis_tdata, best);
          end
          beat++;
        end else if (!m_axis_tready) stalls++;
        @(negedge clk);
      end
      m_axis_tready = 0;
      checks++; if (pred_class != 8'(best)) begin failures++; $display("pred_class %0d exp %0d", pred_class, best); end
      checks++; if (m_axis_tvalid) begin failures++; $display("tvalid after last beat"); end
    end
    checks++; if (stalls == 0) begin failures++; $display("no back-pressure exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
