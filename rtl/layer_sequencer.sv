// layer_sequencer: top-level controller that runs one inference through the
// layers in order: load frame -> conv1 (+ReLU, pool) -> conv2 (+ReLU, pool)
// -> conv3 (+ReLU) -> flatten + FC -> output.
//
// On start it arms the input interface for an H x W frame, then starts each
// convolution layer with its settings (size, pooling, source bank, shift),
// then the FC layer over the (H/4) x (W/4) final map, and waits for the result
// to leave the output stream. Each stage is started with a one-cycle pulse and
// the next begins the cycle after its done pulse. The feature banks alternate:
// the frame is in bank 0, conv1 writes bank 1, conv2 bank 0, conv3 bank 1,
// and the FC layer reads bank 1. `cycles` counts the clock cycles from start
// to the end of the output and holds the last value. `load_pix` (H*W) and
// `fc_pix` (H/4 * W/4) are fixed by the parameters, so they are constants
// after synthesis; they are ports so that the counters they feed stay generic.
// The layer order and pooling placement follow the published network (three
// convolutions with ReLU, two max-pooling layers, one FC layer); the control
// handshake and bank plan are this design's choices.
module layer_sequencer
  import dnn_pkg::*;
#(
  parameter int unsigned H = IMG_H,
  parameter int unsigned W = IMG_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [NUM_CONV-1:0][4:0] shift,
  input  logic                  load_done,
  input  logic                  conv_done,
  input  logic                  fc_done,
  input  logic                  out_done,
  output phase_e                phase,
  output logic [1:0]            layer,
  output logic                  load_start,
  output logic [31:0]           load_pix,
  output logic                  conv_start,
  output conv_cfg_t             conv_cfg,
  output logic                  rd_bank,
  output logic                  wr_bank,
  output logic                  fc_start,
  output logic [31:0]           fc_pix,
  output logic                  busy,
  output logic                  done,
  output logic [31:0]           cycles
);

  assign load_pix = 32'(H * W);
  assign fc_pix   = 32'((H / 4) * (W / 4));

  // Settings of the current convolution layer.
  always_comb begin
    conv_cfg.layer    = layer;
    conv_cfg.height   = 16'(H >> layer);
    conv_cfg.width    = 16'(W >> layer);
    conv_cfg.pool     = (layer != 2'd2);
    conv_cfg.src_bank = layer[0];
    conv_cfg.shift    = shift[layer];
  end

  assign rd_bank = (phase == PH_FC) ? 1'b1 : layer[0];
  assign wr_bank = !layer[0];
  assign busy    = (phase != PH_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE; layer <= '0; load_start <= 1'b0; conv_start <= 1'b0;
      fc_start <= 1'b0; done <= 1'b0; cycles <= '0;
    end else begin
      load_start <= 1'b0; conv_start <= 1'b0; fc_start <= 1'b0; done <= 1'b0;
      if (phase != PH_IDLE) cycles <= cycles + 1;
      case (phase)
        PH_IDLE: if (start) begin
          phase <= PH_LOAD; layer <= '0; load_start <= 1'b1; cycles <= 32'd1;
        end
        PH_LOAD: if (load_done) begin
          phase <= PH_CONV; conv_start <= 1'b1;
        end
        PH_CONV: if (conv_done) begin
          if (32'(layer) == NUM_CONV - 1) begin
            phase <= PH_FC; fc_start <= 1'b1;
          end else begin
            layer <= layer + 2'd1; conv_start <= 1'b1;
          end
        end
        PH_FC: if (fc_done) phase <= PH_OUT;
        PH_OUT: if (out_done) begin
          phase <= PH_IDLE; done <= 1'b1;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

endmodule
