// dnn_accel_top: FPGA-style inference engine for a quantized CNN object
// classifier, from a preprocessed camera frame to class scores.
//
// Dataflow: the host loads int8 weights, 32-bit biases and per-layer shifts
// over AXI-lite into the weight memories, then writes CTRL.start and streams
// one H x W frame (3 int8 channels per beat) over the AXI-stream input. The
// frame lands in feature bank 0; one shared convolution engine (3x3, 8 output
// channels in parallel x 8 input channels, one tap per cycle) then runs the
// three conv layers in turn, each with ReLU and the first two with 2x2 max
// pooling, alternating between the two feature banks. The fully connected
// layer multiplies the flattened (H/4) x (W/4) x 8 map by its weight matrix,
// and the output stage streams the NCLS scores and the argmax class.
// Interfaces: AXI-lite slave (20-bit byte address, map in axil_weight_loader),
// AXI-stream slave (image), AXI-stream master (results), `irq` pulse at the end
// of an inference, pred_class.
// Timing at the default 256 x 256: about 65.5k cycles to load the frame,
// 9 cycles per conv output pixel (590k + 147k + 37k), 4.1k for the FC layer:
// about 843k cycles, 5.6 ms at 150 MHz.
// The block structure (input interface, weight loader and weight memory over
// AXI-lite, MAC array with control FSM, pooling, FC matrix-vector unit,
// memory controller, output interface), the 8-bit arithmetic and the frame
// size follow the published design; channel counts, class count, kernel
// size, the buffer plan and all interface details are this design's choices.
module dnn_accel_top
  import dnn_pkg::*;
#(
  parameter int unsigned H = IMG_H,
  parameter int unsigned W = IMG_W
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI-lite slave: weights, biases, control
  input  logic [19:0] s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [19:0] s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // AXI-stream image input
  input  logic [31:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  logic        s_axis_tlast,
  // AXI-stream result output
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tlast,
  // status
  output logic        irq,
  output logic [7:0]  pred_class
);

  localparam int unsigned NPIX   = H * W;
  localparam int unsigned AW     = (NPIX > 1) ? $clog2(NPIX) : 1;
  localparam int unsigned FC_PIX = (H / 4) * (W / 4);
  localparam int unsigned FWAW   = (FC_PIX > 1) ? $clog2(FC_PIX) : 1;
  localparam int unsigned CWAW   = 5;
  localparam int unsigned CW_LANES = CH * CH / 4;
  localparam int unsigned FW_LANES = NCLS * CH / 4;

  // Control and configuration.
  logic                           start, busy, seq_done;
  logic [NUM_CONV-1:0][4:0]       shift;
  logic [NUM_CONV-1:0][CH-1:0][31:0] conv_bias;
  logic [NCLS-1:0][31:0]          fc_bias;
  logic [31:0]                    cycles;
  logic                           frame_err;

  logic                           cw_wr_en, fw_wr_en;
  logic [CWAW-1:0]                cw_wr_addr;
  logic [3:0]                     cw_wr_lane;
  logic [FWAW-1:0]                fw_wr_addr;
  logic [4:0]                     fw_wr_lane;
  logic [31:0]                    wt_wr_data;

  axil_weight_loader #(.CHN(CH), .NCL(NCLS), .NCONV(NUM_CONV), .FC_PIX(FC_PIX),
                       .CWAW(CWAW), .FWAW(FWAW)) u_axil (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready, .s_axil_wdata, .s_axil_wstrb,
    .s_axil_wvalid, .s_axil_wready, .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready, .s_axil_rdata, .s_axil_rresp,
    .s_axil_rvalid, .s_axil_rready,
    .start, .shift, .conv_bias, .fc_bias,
    .busy, .done(seq_done), .frame_err, .pred_class, .cycles,
    .cw_wr_en, .cw_wr_addr, .cw_wr_lane, .fw_wr_en, .fw_wr_addr, .fw_wr_lane,
    .wr_data(wt_wr_data)
  );

  // Layer sequencer.
  phase_e     phase;
  logic [1:0] layer;
  logic       load_start, conv_start, fc_start;
  logic       load_done, conv_done, fc_done, out_done;
  logic [31:0] load_pix, fc_pix;
  conv_cfg_t  conv_cfg;
  logic       rd_bank, wr_bank;

  layer_sequencer #(.H(H), .W(W)) u_seq (
    .clk, .rst_n, .start, .shift,
    .load_done, .conv_done, .fc_done, .out_done,
    .phase, .layer, .load_start, .load_pix, .conv_start, .conv_cfg,
    .rd_bank, .wr_bank, .fc_start, .fc_pix,
    .busy, .done(seq_done), .cycles
  );
  assign irq = seq_done;

  // Input interface.
  logic                in_wr_en;
  logic [AW-1:0]       in_wr_addr;
  logic [CH-1:0][7:0]  in_wr_data;

  input_interface #(.CHN(CH), .INC(IN_CH), .AW(AW)) u_in (
    .clk, .rst_n, .start(load_start), .n_pix(load_pix),
    .s_axis_tdata, .s_axis_tvalid, .s_axis_tready, .s_axis_tlast,
    .wr_en(in_wr_en), .wr_addr(in_wr_addr), .wr_data(in_wr_data),
    .done(load_done), .frame_err
  );

  // Weight memories.
  logic                         cw_rd_en;
  logic [CWAW-1:0]              cw_rd_addr;
  logic [CW_LANES-1:0][31:0]    cw_rd_data;
  logic                         fw_rd_en;
  logic [FW_LANES-1:0][31:0]    fw_rd_data;
  logic [AW-1:0]                fc_rd_addr;

  weight_memory #(.DEPTH(NUM_CONV * KTAPS), .LANES(CW_LANES), .AW(CWAW), .LW(4)) u_conv_wmem (
    .clk, .wr_en(cw_wr_en), .wr_addr(cw_wr_addr), .wr_lane(cw_wr_lane), .wr_data(wt_wr_data),
    .rd_en(cw_rd_en), .rd_addr(cw_rd_addr), .rd_data(cw_rd_data)
  );

  weight_memory #(.DEPTH(FC_PIX), .LANES(FW_LANES), .AW(FWAW), .LW(5)) u_fc_wmem (
    .clk, .wr_en(fw_wr_en), .wr_addr(fw_wr_addr), .wr_lane(fw_wr_lane), .wr_data(wt_wr_data),
    .rd_en(fw_rd_en), .rd_addr(FWAW'(fc_rd_addr)), .rd_data(fw_rd_data)
  );

  // Feature buffers.
  logic               l_wr_en, fm_rd_en, conv_rd_en, fc_rd_en;
  logic [AW-1:0]      l_wr_addr, fm_rd_addr, conv_rd_addr;
  logic [CH-1:0][7:0] l_wr_data, fm_rd_data;

  assign fm_rd_en   = conv_rd_en || fc_rd_en;
  assign fm_rd_addr = (phase == PH_FC) ? fc_rd_addr : conv_rd_addr;

  memory_controller #(.DEPTH0(NPIX), .DEPTH1((NPIX / 4 > 1) ? NPIX / 4 : 2),
                      .WIDTH(CH * 8), .AW(AW)) u_memctl (
    .clk, .rst_n,
    .in_wr_en, .in_wr_addr, .in_wr_data,
    .l_wr_en, .wr_bank, .l_wr_addr, .l_wr_data,
    .rd_en(fm_rd_en), .rd_bank, .rd_addr(fm_rd_addr), .rd_data(fm_rd_data)
  );

  // Convolution engine (shared by the three conv layers).
  logic conv_busy;
  conv_layer #(.CHN(CH), .MAXW(W), .AW(AW), .WAW(CWAW)) u_conv (
    .clk, .rst_n, .start(conv_start), .cfg(conv_cfg), .bias(conv_bias[layer]),
    .busy(conv_busy), .done(conv_done),
    .fm_rd_en(conv_rd_en), .fm_rd_addr(conv_rd_addr), .fm_rd_data,
    .wt_rd_en(cw_rd_en), .wt_rd_addr(cw_rd_addr), .wt_rd_data(cw_rd_data),
    .fm_wr_en(l_wr_en), .fm_wr_addr(l_wr_addr), .fm_wr_data(l_wr_data)
  );

  // Fully connected layer.
  logic                       fc_busy;
  logic [NCLS-1:0][ACC_W-1:0] scores;
  fc_engine #(.CHN(CH), .NCL(NCLS), .AW(AW)) u_fc (
    .clk, .rst_n, .start(fc_start), .n_pix(fc_pix), .bias(fc_bias),
    .busy(fc_busy), .done(fc_done),
    .fm_rd_en(fc_rd_en), .rd_addr(fc_rd_addr), .fm_rd_data,
    .wt_rd_en(fw_rd_en), .wt_rd_data(fw_rd_data), .scores
  );

  // Output interface.
  logic out_busy;
  output_formatter #(.NCL(NCLS)) u_out (
    .clk, .rst_n, .start(fc_done), .scores,
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast,
    .pred_class, .busy(out_busy), .done(out_done)
  );

endmodule
