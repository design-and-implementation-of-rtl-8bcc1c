// tb_input_interface: streams frames with random source gaps and checks
// every feature-memory write (address, channel bytes, zeroed upper channels),
// tready outside a frame, the done pulse, and the tlast framing check.
module tb_input_interface;
  localparam int CHN = 8, INC = 3, AW = 8, NPIX = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, s_axis_tvalid, s_axis_tready, s_axis_tlast, wr_en, done, frame_err;
  logic [31:0] n_pix, s_axis_tdata;
  logic [AW-1:0] wr_addr;
  logic [CHN-1:0][7:0] wr_data;
  int checks = 0, failures = 0, nwr = 0, ndone = 0;
  logic [31:0] sent [NPIX];

  input_interface #(.CHN(CHN), .INC(INC), .AW(AW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (wr_en) begin
      checks++;
      if (int'(wr_addr) != nwr || wr_data[2:0] != sent[nwr][23:0] || wr_data[7:3] != '0) begin
        failures++; $display("write %0d: addr %0d data %h", nwr, wr_addr, wr_data);
      end
      nwr++;
    end
    if (done) ndone++;
  end

  task automatic frame(bit bad_last);
    nwr = 0; ndone = 0;
    @(negedge clk); start = 1; n_pix = NPIX; @(negedge clk); start = 0;
    for (int p = 0; p < NPIX; p++) begin
      while ($urandom % 3 == 0) begin s_axis_tvalid = 0; @(negedge clk); end
      s_axis_tvalid = 1; s_axis_tdata = $urandom; sent[p] = s_axis_tdata;
      s_axis_tlast = bad_last ? (p == NPIX - 2) : (p == NPIX - 1);
      #1;
      checks++; if (!s_axis_tready) begin failures++; $display("tready low in frame"); end
      @(negedge clk);
    end
    s_axis_tvalid = 0; s_axis_tlast = 0;
    @(negedge clk);
    checks++; if (s_axis_tready) begin failures++; $display("tready high after frame"); end
    checks++; if (nwr != NPIX || ndone != 1) begin failures++; $display("writes %0d done %0d", nwr, ndone); end
    checks++; if (frame_err != bad_last) begin failures++; $display("frame_err %0d", frame_err); end
  endtask

  initial begin
    start = 0; n_pix = 0; s_axis_tvalid = 0; s_axis_tdata = 0; s_axis_tlast = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    checks++; if (s_axis_tready) begin failures++; $display("tready before start"); end
    frame(0); frame(1); frame(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
