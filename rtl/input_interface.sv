// input_interface: AXI-stream slave that writes one preprocessed image frame
// into the input feature buffer.
//
// Each beat carries one pixel: channel i (int8) in tdata[8*i+7:8*i] for the
// INC image channels; the remaining channels of the feature word are written
// as zero. Pixels arrive in raster order and go to addresses 0..n_pix-1.
// start arms the interface for n_pix beats; tready is high only while armed,
// so the sender is held off at other times. done pulses after the last beat.
// frame_err is set if tlast is not seen exactly on the last beat, and is
// cleared by the next start.
// Timing: one pixel per cycle at full rate; the write is issued in the cycle
// the beat is accepted.
// Streaming input over AXI-stream into BRAM follows the published design; the
// beat format and frame length check are this design's choices.
module input_interface
  import dnn_pkg::*;
#(
  parameter int unsigned CHN = CH,
  parameter int unsigned INC = IN_CH,
  parameter int unsigned AW  = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [31:0]         n_pix,
  input  logic [31:0]         s_axis_tdata,
  input  logic                s_axis_tvalid,
  output logic                s_axis_tready,
  input  logic                s_axis_tlast,
  output logic                wr_en,
  output logic [AW-1:0]       wr_addr,
  output logic [CHN-1:0][7:0] wr_data,
  output logic                done,
  output logic                frame_err
);

  logic        armed;
  logic [31:0] cnt, n_q;
  logic        beat, final_beat;

  assign s_axis_tready = armed;
  assign beat          = s_axis_tvalid && s_axis_tready;
  assign final_beat    = (cnt == n_q - 1);

  always_comb begin
    wr_data = '0;
    for (int i = 0; i < INC; i++) wr_data[i] = s_axis_tdata[8*i +: 8];
  end
  assign wr_en   = beat;
  assign wr_addr = AW'(cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed <= 1'b0; cnt <= '0; n_q <= '0; done <= 1'b0; frame_err <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        armed <= (n_pix != 0); cnt <= '0; n_q <= n_pix; frame_err <= 1'b0;
      end else if (beat) begin
        cnt <= cnt + 1;
        if (s_axis_tlast != final_beat) frame_err <= 1'b1;
        if (final_beat) begin
          armed <= 1'b0;
          done  <= 1'b1;
        end
      end
    end
  end

endmodule
