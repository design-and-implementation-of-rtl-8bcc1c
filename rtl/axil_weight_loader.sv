// axil_weight_loader: AXI-lite slave through which the host loads the
// quantized weights and biases and controls the accelerator.
//
// Register map (byte addresses, 32-bit accesses; see dnn_pkg):
//   0x00000 CTRL    write bit0 = 1 starts one inference
//   0x00004 STATUS  bit0 busy, bit1 done, bit2 frame error, bits[15:8] class
//   0x00008 SHIFT0..SHIFT2  requantization shift of each conv layer (reset 7)
//   0x00018 CYCLES  clock cycles taken by the last inference
//   0x01000 conv weights: byte address ((layer*9 + tap)*16 + lane)*4; lane l
//           of a tap word holds bytes 4l..4l+3, byte o*8+c = weight of output
//           channel o, input channel c
//   0x02000 conv biases, (layer*8 + o)*4, 32-bit signed
//   0x03000 FC biases, class*4, 32-bit signed
//   0x80000 FC weights: (pixel*32 + lane)*4, lanes 0..19, byte k*8+c = weight
//           of class k, channel c of that pixel
// Biases and shifts are read back at their addresses. Writes to weights go
// straight to the weight memories (one lane per write). An unmapped address
// answers SLVERR. wstrb is ignored: every write is a full 32-bit word.
// Timing: a write is accepted when AWVALID and WVALID are both high, in one
// cycle, and answered on B the next; a read is answered on R the cycle after
// AR. One transaction of each kind is outstanding at a time.
// Loading weights over AXI-lite into a separate weight memory follows the
// published design; the register map is this design's own.
module axil_weight_loader
  import dnn_pkg::*;
#(
  parameter int unsigned CHN    = CH,
  parameter int unsigned NCL    = NCLS,
  parameter int unsigned NCONV  = NUM_CONV,
  parameter int unsigned FC_PIX = (IMG_H / 4) * (IMG_W / 4),
  parameter int unsigned CWAW   = 5,
  parameter int unsigned FWAW   = (FC_PIX > 1) ? $clog2(FC_PIX) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // AXI-lite slave
  input  logic [19:0]                       s_axil_awaddr,
  input  logic                              s_axil_awvalid,
  output logic                              s_axil_awready,
  input  logic [31:0]                       s_axil_wdata,
  input  logic [3:0]                        s_axil_wstrb,
  input  logic                              s_axil_wvalid,
  output logic                              s_axil_wready,
  output logic [1:0]                        s_axil_bresp,
  output logic                              s_axil_bvalid,
  input  logic                              s_axil_bready,
  input  logic [19:0]                       s_axil_araddr,
  input  logic                              s_axil_arvalid,
  output logic                              s_axil_arready,
  output logic [31:0]                       s_axil_rdata,
  output logic [1:0]                        s_axil_rresp,
  output logic                              s_axil_rvalid,
  input  logic                              s_axil_rready,
  // control and status
  output logic                              start,
  output logic [NCONV-1:0][4:0]             shift,
  output logic [NCONV-1:0][CHN-1:0][31:0]   conv_bias,
  output logic [NCL-1:0][31:0]              fc_bias,
  input  logic                              busy,
  input  logic                              done,
  input  logic                              frame_err,
  input  logic [7:0]                        pred_class,
  input  logic [31:0]                       cycles,
  // weight memory write ports
  output logic                              cw_wr_en,
  output logic [CWAW-1:0]                   cw_wr_addr,
  output logic [3:0]                        cw_wr_lane,
  output logic                              fw_wr_en,
  output logic [FWAW-1:0]                   fw_wr_addr,
  output logic [4:0]                        fw_wr_lane,
  output logic [31:0]                       wr_data
);

  localparam int unsigned CW_LANES = CHN * CHN / 4;
  localparam int unsigned FW_LANES = NCL * CHN / 4;

  typedef enum logic [2:0] {R_CTRL, R_SHIFT, R_CONV_W, R_CONV_B, R_FC_B, R_FC_W, R_RO, R_NONE} region_e;

  // Address decode shared by the write and read paths.
  function automatic region_e decode(input logic [19:0] a);
    if (a[19]) begin
      if (32'(a[6:2]) < FW_LANES && 32'(a[18:7]) < FC_PIX) return R_FC_W;
      return R_NONE;
    end
    case (a[18:12])
      7'h00: begin
        if (a[11:0] == 12'h000) return R_CTRL;
        if (a[11:0] == 12'h004 || a[11:0] == 12'h018) return R_RO;
        if (a[11:0] >= 12'h008 && 32'(a[11:2]) < 2 + NCONV) return R_SHIFT;
        return R_NONE;
      end
      7'h01: return (32'(a[5:2]) < CW_LANES && 32'(a[11:6]) < NCONV * KTAPS) ? R_CONV_W : R_NONE;
      7'h02: return (32'(a[11:2]) < NCONV * CHN) ? R_CONV_B : R_NONE;
      7'h03: return (32'(a[11:2]) < NCL) ? R_FC_B : R_NONE;
      default: return R_NONE;
    endcase
  endfunction

  logic    wr_go;
  region_e wreg;
  assign wr_go          = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_awready = wr_go;
  assign s_axil_wready  = wr_go;
  assign wreg           = decode(s_axil_awaddr);

  // Weight writes go straight to the memories.
  assign wr_data    = s_axil_wdata;
  assign cw_wr_en   = wr_go && (wreg == R_CONV_W);
  assign cw_wr_addr = CWAW'(s_axil_awaddr[11:6]);
  assign cw_wr_lane = s_axil_awaddr[5:2];
  assign fw_wr_en   = wr_go && (wreg == R_FC_W);
  assign fw_wr_addr = FWAW'(s_axil_awaddr[18:7]);
  assign fw_wr_lane = s_axil_awaddr[6:2];

  logic done_q;
  logic [9:0] bidx;
  assign bidx = s_axil_awaddr[11:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_bvalid <= 1'b0; s_axil_bresp <= 2'b00; start <= 1'b0; done_q <= 1'b0;
      for (int l = 0; l < NCONV; l++) shift[l] <= 5'd7;
      conv_bias <= '0;
      fc_bias   <= '0;
    end else begin
      start <= 1'b0;
      if (done) done_q <= 1'b1;
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (wr_go) begin
        s_axil_bvalid <= 1'b1;
        s_axil_bresp  <= (wreg == R_NONE || wreg == R_RO) ? 2'b10 : 2'b00;
        case (wreg)
          R_CTRL:   if (s_axil_wdata[0] && !busy) begin start <= 1'b1; done_q <= 1'b0; end
          R_SHIFT:  shift[32'(bidx) - 2] <= s_axil_wdata[4:0];
          R_CONV_B: conv_bias[32'(bidx) / CHN][32'(bidx) % CHN] <= s_axil_wdata;
          R_FC_B:   fc_bias[bidx] <= s_axil_wdata;
          default: ;
        endcase
      end
    end
  end

  // Read path.
  region_e rreg;
  logic [9:0] ridx;
  assign rreg           = decode(s_axil_araddr);
  assign ridx           = s_axil_araddr[11:2];
  assign s_axil_arready = !s_axil_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0; s_axil_rdata <= '0; s_axil_rresp <= 2'b00;
    end else begin
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (s_axil_arvalid && s_axil_arready) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rresp  <= 2'b00;
        s_axil_rdata  <= '0;
        case (rreg)
          R_RO:     s_axil_rdata <= (s_axil_araddr[11:0] == 12'h004)
                                    ? {16'd0, pred_class, 5'd0, frame_err, done_q, busy}
                                    : cycles;
          R_SHIFT:  s_axil_rdata <= 32'(shift[32'(ridx) - 2]);
          R_CONV_B: s_axil_rdata <= conv_bias[32'(ridx) / CHN][32'(ridx) % CHN];
          R_FC_B:   s_axil_rdata <= fc_bias[ridx];
          R_CTRL:   s_axil_rdata <= '0;
          default:  s_axil_rresp <= 2'b10; // weights are write-only
        endcase
      end
    end
  end

  // AXI-lite rule: a response stays valid until it is taken.
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));

endmodule
