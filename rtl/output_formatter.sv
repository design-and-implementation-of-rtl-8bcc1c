// output_formatter: post-processing and output formatting of the class scores.
//
// On start it captures the NCL 32-bit scores of the FC layer and finds the
// predicted class (argmax; on a tie the lower index wins). It then sends NCL+1
// beats on an AXI-stream master: beats 0..NCL-1 carry the scores in class
// order, the last beat carries the class index and has tlast set. The
// exponential normalisation of a softmax is not done here: it does not change
// which class is largest and is left to the host. pred_class holds the index
// from the cycle after start. done pulses when the last beat is accepted.
// Timing: one beat per cycle when tready stays high; tvalid/tdata hold while
// tready is low.
// The output post-processing/formatting stage follows the published design;
// the beat layout and doing only the argmax in hardware are this design's
// choices.
module output_formatter
  import dnn_pkg::*;
#(
  parameter int unsigned NCL = NCLS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [NCL-1:0][ACC_W-1:0] scores,
  output logic [31:0]               m_axis_tdata,
  output logic                      m_axis_tvalid,
  input  logic                      m_axis_tready,
  output logic                      m_axis_tlast,
  output logic [7:0]                pred_class,
  output logic                      busy,
  output logic                      done
);

  logic [NCL-1:0][ACC_W-1:0] sc_q;
  logic [7:0]                best;
  logic [7:0]                idx;

  always_comb begin
    best = '0;
    for (int k = 1; k < NCL; k++)
      if ($signed(scores[k]) > $signed(scores[best])) best = 8'(k);
  end

  assign m_axis_tdata = (32'(idx) < NCL) ? sc_q[idx] : 32'(pred_class);
  assign m_axis_tlast = (32'(idx) == NCL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sc_q <= '0; pred_class <= '0; idx <= '0; m_axis_tvalid <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        sc_q          <= scores;
        pred_class    <= best;
        idx           <= '0;
        m_axis_tvalid <= 1'b1;
      end else if (m_axis_tvalid && m_axis_tready) begin
        if (m_axis_tlast) begin
          m_axis_tvalid <= 1'b0;
          done          <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  assign busy = m_axis_tvalid;

  // AXI-stream rule: once asserted, tvalid stays high and tdata stable until accepted.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (m_axis_tvalid && !m_axis_tready && !start) |=> (m_axis_tvalid && $stable(m_axis_tdata));
  endproperty
  a_hold: assert property (p_hold);

endmodule
