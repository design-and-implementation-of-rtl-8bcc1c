// tb_axil_weight_loader: drives the AXI-lite slave as a host would (address
// and data phases offset in time, delayed response ready) and checks the
// weight-memory write ports, bias and shift registers and their read-back,
// the start pulse (ignored while busy), the status word and error responses.
module tb_axil_weight_loader;
  import dnn_pkg::*;
  localparam int CHN = 8, NCL = 10, NCONV = 3, FC_PIX = 16, CWAW = 5, FWAW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [19:0] s_axil_awaddr, s_axil_araddr;
  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready, s_axil_bvalid, s_axil_bready;
  logic s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0] s_axil_wstrb;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic start, busy, done, frame_err;
  logic [NCONV-1:0][4:0] shift;
  logic [NCONV-1:0][CHN-1:0][31:0] conv_bias;
  logic [NCL-1:0][31:0] fc_bias;
  logic [7:0] pred_class;
  logic [31:0] cycles, wr_data;
  logic cw_wr_en, fw_wr_en;
  logic [CWAW-1:0] cw_wr_addr;
  logic [3:0] cw_wr_lane;
  logic [FWAW-1:0] fw_wr_addr;
  logic [4:0] fw_wr_lane;
  int checks = 0, failures = 0, nstart = 0;

  axil_weight_loader #(.CHN(CHN), .NCL(NCL), .NCONV(NCONV), .FC_PIX(FC_PIX),
                       .CWAW(CWAW), .FWAW(FWAW)) dut (.*);

  // Monitor of weight writes: remembers the last one.
  logic [31:0] last_cw [3], last_fw [3];
  int ncw = 0, nfw = 0;
  always @(posedge clk) if (rst_n) begin
    if (cw_wr_en) begin last_cw = '{32'(cw_wr_addr), 32'(cw_wr_lane), wr_data}; ncw++; end
    if (fw_wr_en) begin last_fw = '{32'(fw_wr_addr), 32'(fw_wr_lane), wr_data}; nfw++; end
    if (start) nstart++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic axil_write(input logic [19:0] a, input logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1;
    if ($urandom % 2 == 1) @(negedge clk);             // data phase a cycle later
    s_axil_wdata = d; s_axil_wvalid = 1; s_axil_wstrb = 4'hf;
    #1;
    while (!(s_axil_awready && s_axil_wready)) begin @(negedge clk); #1; end
    @(negedge clk); s_axil_awvalid = 0; s_axil_wvalid = 0;
    repeat ($urandom % 3) @(negedge clk);          // slow response ready
    s_axil_bready = 1;
    while (!s_axil_bvalid) @(negedge clk);
    resp = s_axil_bresp;
    @(negedge clk); s_axil_bready = 0;
  endtask

  task automatic axil_read(input logic [19:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    s_axil_araddr = a; s_axil_arvalid = 1;
    #1;
    while (!s_axil_arready) begin @(negedge clk); #1; end
    @(negedge clk); s_axil_arvalid = 0;
    repeat ($urandom % 3) @(negedge clk);
    s_axil_rready = 1;
    while (!s_axil_rvalid) @(negedge clk);
    d = s_axil_rdata; resp = s_axil_rresp;
    @(negedge clk); s_axil_rready = 0;
  endtask

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [1:0] r;
    logic [31:0] d, v;
    s_axil_awaddr = 0; s_axil_awvalid = 0; s_axil_wdata = 0; s_axil_wvalid = 0; s_axil_wstrb = 0;
    s_axil_bready = 0; s_axil_araddr = 0; s_axil_arvalid = 0; s_axil_rready = 0;
    busy = 0; done = 0; frame_err = 0; pred_class = 8'd7; cycles = 32'd12345;
    repeat (3) @(posedge clk); rst_n = 1;

    // reset values of the shifts
    for (int l = 0; l < NCONV; l++) begin
      axil_read(20'h8 + 20'(4*l), d, r); chk(r == 0 && d == 7, "shift reset value");
    end
    // conv weights
    for (int i = 0; i < 40; i++) begin
      int t, ln;
      t = $urandom % 27; ln = $urandom % 16; v = $urandom;
      axil_write(A_CONV_W + 20'((t*16 + ln)*4), v, r);
      chk(r == 0 && last_cw[0] == t && last_cw[1] == ln && last_cw[2] == v, "conv weight write");
    end
    // FC weights
    for (int i = 0; i < 40; i++) begin
      int p, ln;
      p = $urandom % FC_PIX; ln = $urandom % 20; v = $urandom;
      axil_write(A_FC_W + 20'((p*32 + ln)*4), v, r);
      chk(r == 0 && last_fw[0] == p && last_fw[1] == ln && last_fw[2] == v, "fc weight write");
    end
    chk(ncw == 40 && nfw == 40, "weight write counts");
    // out-of-range lanes and addresses are refused
    axil_write(A_FC_W + 20'((3*32 + 20)*4), 32'h1, r); chk(r == 2'b10 && nfw == 40, "fc lane 20 refused");
    axil_write(A_CONV_W + 20'((27*16)*4), 32'h1, r); chk(r == 2'b10 && ncw == 40, "conv tap 27 refused");
    axil_write(20'h0_5000, 32'h1, r); chk(r == 2'b10, "unmapped write SLVERR");
    axil_read(A_FC_W, d, r); chk(r == 2'b10, "weight read SLVERR");
    // biases and shifts
    for (int i = 0; i < NCONV*CHN; i++) begin
      v = $urandom; axil_write(A_CONV_B + 20'(4*i), v, r);
      chk(conv_bias[i / CHN][i % CHN] == v, "conv bias register");
      axil_read(A_CONV_B + 20'(4*i), d, r); chk(d == v && r == 0, "conv bias readback");
    end
    for (int k = 0; k < NCL; k++) begin
      v = $urandom; axil_write(A_FC_B + 20'(4*k), v, r);
      chk(fc_bias[k] == v, "fc bias register");
      axil_read(A_FC_B + 20'(4*k), d, r); chk(d == v, "fc bias readback");
    end
    for (int l = 0; l < NCONV; l++) begin
      axil_write(A_SHIFT0 + 20'(4*l), 32'(l + 3), r);
      chk(shift[l] == 5'(l + 3), "shift register");
    end
    // start and status
    axil_write(A_CTRL, 32'h1, r); chk(nstart == 1, "start pulse");
    busy = 1;
    axil_write(A_CTRL, 32'h1, r); chk(nstart == 1, "start ignored while busy");
    axil_read(A_STATUS, d, r); chk(d == 32'h0000_0701, "status busy");
    @(negedge clk); done = 1; busy = 0; @(negedge clk); done = 0; frame_err = 1;
    axil_read(A_STATUS, d, r); chk(d == 32'h0000_0706, "status done + frame error");
    axil_read(A_CYCLES, d, r); chk(d == 32'd12345, "cycle counter read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
