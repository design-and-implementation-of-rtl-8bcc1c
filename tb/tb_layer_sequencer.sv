// tb_layer_sequencer: plays the load, conv, FC and output units with random
// delays and checks the order of the start pulses, the per-layer settings
// (size, pooling, banks, shift), the pixel counts and the cycle counter.
module tb_layer_sequencer;
  import dnn_pkg::*;
  localparam int H = 16, W = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, load_done, conv_done, fc_done, out_done;
  logic [NUM_CONV-1:0][4:0] shift;
  phase_e phase;
  logic [1:0] layer;
  logic load_start, conv_start, fc_start, rd_bank, wr_bank, busy, done;
  logic [31:0] load_pix, fc_pix, cycles;
  conv_cfg_t conv_cfg;
  int checks = 0, failures = 0;

  layer_sequencer #(.H(H), .W(W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_pulse(ref logic sig, input string name, output int waited);
    waited = 0;
    while (!sig && waited < 50) begin @(negedge clk); waited++; end
    checks++;
    if (!sig) begin failures++; $display("no %s pulse", name); end
  endtask

  task automatic respond(ref logic d, input int delay);
    repeat (delay) @(negedge clk);
    d = 1; @(negedge clk); d = 0;
  endtask

  initial begin
    
    start = 0; load_done = 0; conv_done = 0; fc_done = 0; out_done = 0;
    shift = {5'd9, 5'd4, 5'd6};
    repeat (3) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      checks++; if (!load_start || load_pix != H*W || phase != PH_LOAD) begin failures++; $display("load start"); end
      respond(load_done, 3 + run);
      for (int l = 0; l < 3; l++) begin
        checks++;
        if (!conv_start || conv_cfg.layer != 2'(l) || conv_cfg.height != 16'(H >> l) ||
            conv_cfg.width != 16'(W >> l) || conv_cfg.pool != (l < 2) ||
            rd_bank != l[0] || wr_bank != !l[0] || conv_cfg.shift != shift[l]) begin
          failures++; $display("layer %0d: start=%0d cfg=%p rd=%0d wr=%0d", l, conv_start, conv_cfg, rd_bank, wr_bank);
        end
        respond(conv_done, 5);
      end
      checks++; if (!fc_start || fc_pix != (H/4)*(W/4) || !rd_bank) begin failures++; $display("fc start"); end
      respond(fc_done, 2);
      checks++; if (phase != PH_OUT) begin failures++; $display("not in output phase"); end
      respond(out_done, 4);
      #1;
      checks++; if (!done) begin failures++; $display("no done"); end
      @(negedge clk);
      checks++; if (busy) begin failures++; $display("still busy"); end
      $display("cycles=%0d", cycles);
      // start 1 + load (4+run) + 3 conv x 6 + FC 3 + output 5 cycles
      checks++; if (cycles != 31 + run) begin failures++; $display("cycle counter %0d", cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
