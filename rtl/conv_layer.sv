// conv_layer: one 3x3 convolution layer with ReLU and optional 2x2 max pool,
// run from one feature buffer into another.
//
// Structure (input buffer -> MAC array -> output buffer, under a control FSM,
// with a weight fetch from the weight memory):
//   conv_ctrl    issues one kernel tap per cycle: feature address + pad flag
//   feature rd   the source buffer returns the pixel's channel vector (zeros
//                are substituted for padded taps)
//   weight rd    the weight memory returns the CH x CH weights of that tap
//   mac_array    CH x CH MACs accumulate the 9 taps of one output pixel
//   requant_relu adds the bias, rescales by 2^-shift, ReLU, saturates to int8
//   maxpool2x2   (cfg.pool) halves both dimensions, else the pixel is written
//                straight to the same position
// Interface: start with cfg sampled in that cycle; bias holds the layer's
// per-output-channel biases for the whole run. Feature and weight reads are
// synchronous (data one cycle after the enable). done pulses once the last
// output pixel has been written.
// Timing: 9 cycles per output pixel plus a pipeline tail of about 5 cycles.
// The MAC array, control FSM, ReLU and max-pool stages follow the published
// design; the tap-serial schedule, padding and buffer handling are this
// design's own.
module conv_layer
  import dnn_pkg::*;
#(
  parameter int unsigned CHN   = CH,
  parameter int unsigned MAXW  = IMG_W,
  parameter int unsigned AW    = 16,
  parameter int unsigned WAW   = 5
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  conv_cfg_t                    cfg,
  input  logic [CHN-1:0][ACC_W-1:0]    bias,
  output logic                         busy,
  output logic                         done,
  // source feature buffer
  output logic                         fm_rd_en,
  output logic [AW-1:0]                fm_rd_addr,
  input  logic [CHN-1:0][7:0]          fm_rd_data,
  // weight memory
  output logic                         wt_rd_en,
  output logic [WAW-1:0]               wt_rd_addr,
  input  logic [CHN-1:0][CHN-1:0][7:0] wt_rd_data,
  // destination feature buffer
  output logic                         fm_wr_en,
  output logic [AW-1:0]                fm_wr_addr,
  output logic [CHN-1:0][7:0]          fm_wr_data
);

  conv_cfg_t cfg_q;
  logic      running;
  logic [31:0] expected, written;

  // Control FSM.
  logic          c_valid, c_pad, c_first, c_last, c_busy, c_done;
  logic [AW-1:0] c_addr;
  logic [3:0]    c_tap;
  logic [15:0]   c_x, c_y;

  conv_ctrl #(.AW(AW)) u_ctrl (
    .clk, .rst_n, .start,
    .height(cfg.height), .width(cfg.width),
    .busy(c_busy), .done(c_done),
    .valid(c_valid), .rd_addr(c_addr), .pad(c_pad), .tap(c_tap),
    .first(c_first), .last(c_last), .x(c_x), .y(c_y)
  );

  assign fm_rd_en   = c_valid && !c_pad;
  assign fm_rd_addr = c_addr;
  assign wt_rd_en   = c_valid;
  assign wt_rd_addr = WAW'(32'(cfg_q.layer) * KTAPS + 32'(c_tap));

  // Align control with the read data.
  logic        v1, pad1, first1, last1;
  logic [15:0] x1, y1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; pad1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0; x1 <= '0; y1 <= '0;
    end else begin
      v1 <= c_valid; pad1 <= c_pad; first1 <= c_first; last1 <= c_last;
      x1 <= c_x; y1 <= c_y;
    end
  end

  logic [CHN-1:0][7:0] act;
  assign act = pad1 ? '0 : fm_rd_data;

  logic                      m_valid;
  logic [31:0]               m_tag;
  logic [CHN-1:0][ACC_W-1:0] m_acc;

  mac_array #(.ROWS(CHN), .COLS(CHN), .ACC_W(ACC_W), .TAG_W(32)) u_mac (
    .clk, .rst_n,
    .in_valid(v1), .in_first(first1), .in_last(last1), .in_tag({y1, x1}),
    .act, .wgt(wt_rd_data),
    .out_valid(m_valid), .out_tag(m_tag), .acc(m_acc)
  );

  logic [CHN-1:0][7:0] q;
  requant_relu #(.N(CHN), .ACC_W(ACC_W)) u_rq (
    .acc(m_acc), .bias, .shift(cfg_q.shift), .relu_en(1'b1), .q
  );

  // Pooled path.
  logic                p_valid;
  logic [AW-1:0]       p_addr;
  logic [CHN-1:0][7:0] p_vec;
  maxpool2x2 #(.CH(CHN), .MAXW(MAXW), .AW(AW)) u_pool (
    .clk, .rst_n, .start,
    .in_valid(m_valid && cfg_q.pool), .in_x(m_tag[15:0]), .in_y(m_tag[31:16]),
    .in_vec(q),
    .out_valid(p_valid), .out_addr(p_addr), .out_vec(p_vec)
  );

  // Direct path: registered write in raster order.
  logic                d_valid;
  logic [AW-1:0]       d_addr;
  logic [CHN-1:0][7:0] d_vec;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0; d_addr <= '0; d_vec <= '0;
    end else begin
      d_valid <= m_valid && !cfg_q.pool;
      d_addr  <= AW'(32'(m_tag[31:16]) * 32'(cfg_q.width) + 32'(m_tag[15:0]));
      d_vec   <= q;
    end
  end

  assign fm_wr_en   = cfg_q.pool ? p_valid : d_valid;
  assign fm_wr_addr = cfg_q.pool ? p_addr  : d_addr;
  assign fm_wr_data = cfg_q.pool ? p_vec   : d_vec;

  // Completion: count written output pixels.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q <= '0; running <= 1'b0; expected <= '0; written <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        cfg_q    <= cfg;
        running  <= 1'b1;
        written  <= '0;
        expected <= cfg.pool ? 32'(cfg.height >> 1) * 32'(cfg.width >> 1)
                             : 32'(cfg.height) * 32'(cfg.width);
      end else if (running) begin
        if (fm_wr_en) written <= written + 1;
        if (fm_wr_en && written + 1 == expected) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  assign busy = running;

endmodule
