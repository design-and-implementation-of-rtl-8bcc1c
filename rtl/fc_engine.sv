// fc_engine: fully connected layer as a matrix-vector multiplier,
// Y = Q(W) * X + B.
//
// The flattened input X is the final feature map read pixel by pixel (each
// read gives all CHN channels of a pixel, flattened index = pixel*CHN +
// channel). In every cycle one pixel and the matching weight word (NCLS x CHN
// int8 weights) enter an NCLS x CHN MAC array, so all NCLS outputs are
// computed in parallel. After the last pixel the 32-bit bias is added.
// Interface: start with n_pix (pixels of the flattened map); reads of the
// feature buffer and weight memory are synchronous and share one address.
// Timing: n_pix issue cycles, then 3 cycles of pipeline; `done` pulses with
// `scores` valid, and scores hold until the next run ends.
// The matrix-vector form and the int8 weights follow the published design;
// the pixel-serial schedule is this design's choice.
module fc_engine
  import dnn_pkg::*;
#(
  parameter int unsigned CHN   = CH,
  parameter int unsigned NCL   = NCLS,
  parameter int unsigned AW    = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [31:0]                  n_pix,
  input  logic [NCL-1:0][ACC_W-1:0]    bias,
  output logic                         busy,
  output logic                         done,
  output logic                         fm_rd_en,
  output logic [AW-1:0]                rd_addr,
  input  logic [CHN-1:0][7:0]          fm_rd_data,
  output logic                         wt_rd_en,
  input  logic [NCL-1:0][CHN-1:0][7:0] wt_rd_data,
  output logic [NCL-1:0][ACC_W-1:0]    scores
);

  logic        issuing;
  logic [31:0] p, n_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0; p <= '0; n_q <= '0;
    end else if (start) begin
      issuing <= (n_pix != 0); p <= '0; n_q <= n_pix;
    end else if (issuing) begin
      p <= p + 1;
      if (p == n_q - 1) issuing <= 1'b0;
    end
  end

  assign fm_rd_en = issuing;
  assign wt_rd_en = issuing;
  assign rd_addr  = AW'(p);

  logic v1, first1, last1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0;
    end else begin
      v1     <= issuing;
      first1 <= issuing && (p == 0);
      last1  <= issuing && (p == n_q - 1);
    end
  end

  logic                      m_valid;
  logic [NCL-1:0][ACC_W-1:0] m_acc;
  logic [0:0]                m_tag;

  mac_array #(.ROWS(NCL), .COLS(CHN), .ACC_W(ACC_W), .TAG_W(1)) u_mac (
    .clk, .rst_n,
    .in_valid(v1), .in_first(first1), .in_last(last1), .in_tag(1'b0),
    .act(fm_rd_data), .wgt(wt_rd_data),
    .out_valid(m_valid), .out_tag(m_tag), .acc(m_acc)
  );

  logic active;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0; scores <= '0; active <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) active <= 1'b1;
      if (m_valid && active) begin
        for (int k = 0; k < NCL; k++) scores[k] <= m_acc[k] + bias[k];
        done   <= 1'b1;
        active <= 1'b0;
      end
    end
  end

  assign busy = issuing || active;

endmodule
