// requant_relu: brings 32-bit accumulators back to the 8-bit activation format.
//
// For each of N lanes: s = acc + bias; s is shifted right arithmetically by
// `shift` with round-half-up (2^(shift-1) added first), ReLU clamps negative
// results to 0 when relu_en is set, and the value saturates to [-128, 127].
// This is the hardware side of the 2^s fixed-point scaling of the quantizer
// Q(w) = round(w * 2^s): with weights scaled by 2^s the product sum carries
// that scale, and the shift removes it. Purely combinational.
// The 8-bit format, the rounding and the ReLU follow the published design;
// the per-layer shift as the rescaling method and saturation are this
// design's choices.
module requant_relu #(
  parameter int unsigned N     = 8,
  parameter int unsigned ACC_W = 32
) (
  input  logic [N-1:0][ACC_W-1:0] acc,
  input  logic [N-1:0][ACC_W-1:0] bias,
  input  logic [4:0]              shift,
  input  logic                    relu_en,
  output logic [N-1:0][7:0]       q
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic signed [ACC_W:0] s, r;
      s = $signed({acc[i][ACC_W-1], acc[i]}) + $signed({bias[i][ACC_W-1], bias[i]});
      if (shift != 0) s = s + ((ACC_W+1)'(1) <<< (shift - 5'd1));
      r = s >>> shift;
      if (relu_en && r < 0)         q[i] = 8'sd0;
      else if (r > 127)             q[i] = 8'sd127;
      else if (r < -128)            q[i] = -8'sd128;
      else                          q[i] = r[7:0];
    end
  end

endmodule
