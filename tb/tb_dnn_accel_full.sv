// tb_dnn_accel_full: end-to-end test of the accelerator at its default size (256 x 256 frame).
//
// The testbench acts as the host: it loads random int8 conv and FC weights,
// 32-bit biases and per-layer shifts over AXI-lite, starts an inference,
// streams a random int8 RGB frame (with source gaps) over AXI-stream, and
// drains the result stream under random back-pressure. A reference model in
// the testbench (3x3 conv with zero padding + bias + rounding shift + ReLU +
// saturation, 2x2 max pool after conv1 and conv2, flatten, FC) gives the
// expected scores and class. It also checks the cycle count of the inference
// against the schedule (frame load + 9 cycles per conv output pixel + FC) and
// counts how often each mechanism happened: zero padding, pooling, ReLU
// clamping, saturation, both ping-pong bank directions, input and output
// back-pressure. A mechanism that never happened counts as a failure.
module tb_dnn_accel_full;
  import dnn_pkg::*;
  localparam int H = 256, W = 256;
  localparam int NPIX = H * W, FC_PIX = (H / 4) * (W / 4);
  localparam int FRAMES = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [19:0] s_axil_awaddr, s_axil_araddr;
  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready, s_axil_bvalid, s_axil_bready;
  logic s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0] s_axil_wstrb;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic [31:0] s_axis_tdata, m_axis_tdata;
  logic s_axis_tvalid, s_axis_tready, s_axis_tlast, m_axis_tvalid, m_axis_tready, m_axis_tlast;
  logic irq;
  logic [7:0] pred_class;
  int checks = 0, failures = 0;

  dnn_accel_top dut (.*);

  // ---------------- watchdog ----------------
  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_pad = 0, n_pool = 0, n_relu = 0, n_sat = 0, n_b0 = 0, n_b1 = 0, n_in_stall = 0, n_out_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_conv.u_ctrl.valid && dut.u_conv.u_ctrl.pad) n_pad++;
    if (dut.u_conv.u_pool.out_valid) n_pool++;
    if (dut.u_conv.fm_wr_en && dut.u_seq.wr_bank) n_b1++;
    if (dut.u_conv.fm_wr_en && !dut.u_seq.wr_bank) n_b0++;
    if (s_axis_tvalid && !s_axis_tready) n_in_stall++;
    if (m_axis_tvalid && !m_axis_tready) n_out_stall++;
  end

  // ---------------- AXI-lite host ----------------
  task automatic axil_write(input logic [19:0] a, input logic [31:0] d);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1; s_axil_wdata = d; s_axil_wvalid = 1; s_axil_wstrb = 4'hf;
    #1;
    while (!(s_axil_awready && s_axil_wready)) begin @(negedge clk); #1; end
    @(negedge clk); s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_bready = 1;
    #1;
    while (!s_axil_bvalid) begin @(negedge clk); #1; end
    if (s_axil_bresp != 2'b00) begin failures++; $display("write %h answered %0d", a, s_axil_bresp); end
    @(negedge clk); s_axil_bready = 0;
  endtask

  task automatic axil_read(input logic [19:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axil_araddr = a; s_axil_arvalid = 1;
    #1;
    while (!s_axil_arready) begin @(negedge clk); #1; end
    @(negedge clk); s_axil_arvalid = 0; s_axil_rready = 1;
    #1;
    while (!s_axil_rvalid) begin @(negedge clk); #1; end
    d = s_axil_rdata;
    @(negedge clk); s_axil_rready = 0;
  endtask

  // ---------------- model data ----------------
  byte wc [NUM_CONV][KTAPS][CH][CH];   // [layer][tap][out][in]
  int  bc [NUM_CONV][CH];
  byte wf [FC_PIX][NCLS][CH];          // [pixel][class][channel]
  int  bf [NCLS];
  int  sh [NUM_CONV];
  byte img [NPIX][IN_CH];

  // Loop bounds held in variables, so the reference model stays a loop
  // instead of being unrolled when compiled.
  int nch, n3, ncl;

  // feature maps of the reference model
  int fa [H][W][CH];
  int fb [H][W][CH];
  longint ref_scores [NCLS];
  int ref_class;

  function automatic int rq(longint s, int k);
    longint r;
    if (k > 0) s += (longint'(1) << (k - 1));
    r = (s >= 0) ? (s >> k) : -((-s + (longint'(1) << k) - 1) >> k);
    if (r <= 0) begin if (r < 0) n_relu++; return 0; end
    if (r > 127) begin n_sat++; return 127; end
    return int'(r);
  endfunction

  // conv of fa (h x w, cin channels valid) into fb, layer l
  task automatic ref_conv(int l, int h, int w);
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) for (int o = 0; o < nch; o++) begin
      longint s;
      s = bc[l][o];
      for (int ky = 0; ky < n3; ky++) for (int kx = 0; kx < n3; kx++) begin
        int iy, ix;
        iy = y + ky - 1; ix = x + kx - 1;
        if (iy >= 0 && ix >= 0 && iy < h && ix < w)
          for (int c = 0; c < nch; c++) s += longint'(fa[iy][ix][c]) * longint'(wc[l][ky*3+kx][o][c]);
      end
      fb[y][x][o] = rq(s, sh[l]);
    end
  endtask

  task automatic ref_pool_copy(int h, int w, bit pool);
    if (pool) begin
      for (int y = 0; y < h/2; y++) for (int x = 0; x < w/2; x++) for (int c = 0; c < nch; c++) begin
        int m;
        m = fb[2*y][2*x][c];
        if (fb[2*y][2*x+1][c] > m) m = fb[2*y][2*x+1][c];
        if (fb[2*y+1][2*x][c] > m) m = fb[2*y+1][2*x][c];
        if (fb[2*y+1][2*x+1][c] > m) m = fb[2*y+1][2*x+1][c];
        fa[y][x][c] = m;
      end
    end else begin
      for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) for (int c = 0; c < nch; c++) fa[y][x][c] = fb[y][x][c];
    end
  endtask

  task automatic reference();
    for (int p = 0; p < NPIX; p++) for (int c = 0; c < nch; c++)
      fa[p / W][p % W][c] = (c < IN_CH) ? int'(img[p][c]) : 0;
    ref_conv(0, H, W);         ref_pool_copy(H, W, 1);
    ref_conv(1, H/2, W/2);     ref_pool_copy(H/2, W/2, 1);
    ref_conv(2, H/4, W/4);     ref_pool_copy(H/4, W/4, 0);
    for (int k = 0; k < ncl; k++) begin
      ref_scores[k] = bf[k];
      for (int p = 0; p < FC_PIX; p++) for (int c = 0; c < nch; c++)
        ref_scores[k] += longint'(fa[p / (W/4)][p % (W/4)][c]) * longint'(wf[p][k][c]);
    end
    ref_class = 0;
    for (int k = 1; k < ncl; k++) if (int'(ref_scores[k]) > int'(ref_scores[ref_class])) ref_class = k;
  endtask

  task automatic load_weights();
    for (int l = 0; l < NUM_CONV; l++) begin
      sh[l] = 6;
      axil_write(A_SHIFT0 + 20'(4*l), 32'(sh[l]));
      for (int o = 0; o < nch; o++) begin
        bc[l][o] = int'($urandom % 1024) - 512;
        axil_write(A_CONV_B + 20'(4*(l*CH+o)), 32'(bc[l][o]));
      end
      for (int t = 0; t < n3 * n3; t++) begin
        for (int o = 0; o < nch; o++) for (int c = 0; c < nch; c++) wc[l][t][o][c] = byte'(int'($urandom % 41) - 20);
        for (int ln = 0; ln < CH*CH/4; ln++) begin
          logic [31:0] d;
          for (int b = 0; b < 4; b++) d[8*b +: 8] = wc[l][t][(4*ln+b) / CH][(4*ln+b) % CH];
          axil_write(A_CONV_W + 20'(((l*KTAPS+t)*16 + ln)*4), d);
        end
      end
    end
    for (int k = 0; k < ncl; k++) begin
      bf[k] = int'($urandom % 20000) - 10000;
      axil_write(A_FC_B + 20'(4*k), 32'(bf[k]));
    end
    for (int p = 0; p < FC_PIX; p++) begin
      for (int k = 0; k < ncl; k++) for (int c = 0; c < nch; c++) wf[p][k][c] = byte'($urandom);
      for (int ln = 0; ln < NCLS*CH/4; ln++) begin
        logic [31:0] d;
        for (int b = 0; b < 4; b++) d[8*b +: 8] = wf[p][(4*ln+b) / CH][(4*ln+b) % CH];
        axil_write(A_FC_W + 20'((p*32 + ln)*4), d);
      end
    end
  endtask

  task automatic send_frame();
    for (int p = 0; p < NPIX; p++) begin
      if ($urandom % 8 == 0) begin s_axis_tvalid = 0; @(negedge clk); end
      s_axis_tvalid = 1; s_axis_tlast = (p == NPIX - 1);
      s_axis_tdata = {8'h00, img[p][2], img[p][1], img[p][0]};
      #1;
      while (!s_axis_tready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    s_axis_tvalid = 0; s_axis_tlast = 0;
  endtask

  initial begin
    logic [31:0] d;
    nch = CH; n3 = 3; ncl = NCLS;
    s_axil_awaddr = 0; s_axil_awvalid = 0; s_axil_wdata = 0; s_axil_wvalid = 0; s_axil_wstrb = 0;
    s_axil_bready = 0; s_axil_araddr = 0; s_axil_arvalid = 0; s_axil_rready = 0;
    s_axis_tdata = 0; s_axis_tvalid = 0; s_axis_tlast = 0; m_axis_tready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    load_weights();
    for (int f = 0; f < FRAMES; f++) begin
      int beat, cyc;
      for (int p = 0; p < NPIX; p++) for (int c = 0; c < IN_CH; c++) img[p][c] = byte'($urandom);
      reference();
      // offer the first pixel before the start: it must be held off
      @(negedge clk); s_axis_tvalid = 1; s_axis_tdata = '0; repeat (3) @(negedge clk); s_axis_tvalid = 0;
      axil_write(A_CTRL, 32'h1);
      send_frame();
      // drain the result stream with back-pressure
      beat = 0;
      while (beat <= NCLS) begin
        @(negedge clk);
        m_axis_tready = ($urandom % 3 != 0);
        #1;
        if (m_axis_tvalid && m_axis_tready) begin
          checks++;
          if (beat < NCLS) begin
            if (m_axis_tdata != 32'(ref_scores[beat]) || m_axis_tlast) begin
              failures++; $display("frame %0d score %0d: got %0d exp %0d", f, beat, $signed(m_axis_tdata), 32'(ref_scores[beat]));
            end
          end else if (m_axis_tdata != 32'(ref_class) || !m_axis_tlast) begin
            failures++; $display("frame %0d class got %0d exp %0d", f, m_axis_tdata, ref_class);
          end
          beat++;
        end
      end
      @(negedge clk); m_axis_tready = 0;
      repeat (3) @(negedge clk);
      checks++; if (pred_class != 8'(ref_class)) begin failures++; $display("pred_class port"); end
      axil_read(A_STATUS, d);
      checks++; if (d != {16'd0, 8'(ref_class), 8'h02}) begin failures++; $display("status %h", d); end
      axil_read(A_CYCLES, d);
      cyc = int'(d);
      // schedule: frame load, 9 cycles per conv output pixel, FC pixels, small handoffs
      begin
        int sched;
        sched = NPIX + 9 * (NPIX + NPIX/4 + NPIX/16) + FC_PIX;
        $display("frame %0d: %0d cycles (schedule %0d) = %0.3f ms at 150 MHz", f, cyc, sched, real'(cyc) / 150.0e3);
        checks++;
        if (cyc < sched || cyc > sched + NPIX/8 + 200) begin failures++; $display("cycle count out of range"); end
        // an 11 ms frame time at 150 MHz is 1.65 million cycles
        checks++; if (cyc > 1650000) begin failures++; $display("slower than 11 ms per frame"); end
      end
    end
    $display("padding taps=%0d pooled pixels=%0d relu clamps=%0d saturations=%0d bank0 writes=%0d bank1 writes=%0d input stalls=%0d output stalls=%0d",
             n_pad, n_pool, n_relu, n_sat, n_b0, n_b1, n_in_stall, n_out_stall);
    checks++; if (n_pad == 0) begin failures++; $display("padding never happened"); end
    checks++; if (n_pool != FRAMES * (NPIX/4 + NPIX/16)) begin failures++; $display("pool count %0d", n_pool); end
    checks++; if (n_relu == 0) begin failures++; $display("ReLU clamp never happened"); end
    checks++; if (n_sat == 0) begin failures++; $display("saturation never happened"); end
    checks++; if (n_b0 == 0 || n_b1 == 0) begin failures++; $display("ping-pong not exercised"); end
    checks++; if (n_in_stall == 0) begin failures++; $display("input back-pressure never happened"); end
    checks++; if (n_out_stall == 0) begin failures++; $display("output back-pressure never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
