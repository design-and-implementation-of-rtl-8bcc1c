// tb_requant_relu: checks rounding shift, ReLU and saturation against an
// integer reference for random and corner values.
module tb_requant_relu;
  localparam int N = 4;
  logic [N-1:0][31:0] acc, bias;
  logic [4:0] shift;
  logic relu_en;
  logic [N-1:0][7:0] q;
  int checks = 0, failures = 0;
  int n_sat = 0, n_relu = 0;

  requant_relu #(.N(N), .ACC_W(32)) dut (.*);

  function automatic int ref_q(longint a, longint b, int sh, bit relu);
    longint s = a + b;
    longint r;
    if (sh > 0) s += (longint'(1) << (sh - 1));
    r = (s >= 0) ? (s >> sh) : -((-s + (longint'(1) << sh) - 1) >> sh); // floor division
    if (relu && r < 0) return 0;
    if (r > 127) return 127;
    if (r < -128) return -128;
    return int'(r);
  endfunction

  initial begin
    fork begin #1000000; failures++; $display("watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int it = 0; it < 3000; it++) begin
      shift = 5'($urandom % 16);
      relu_en = $urandom % 2;
      for (int i = 0; i < N; i++) begin
        int mag;
        mag = $urandom % 4;
        acc[i]  = (mag == 0) ? 32'($signed($urandom % 512) - 256) : (mag == 1) ? $urandom : 32'($signed($urandom % 200000) - 100000);
        bias[i] = 32'($signed($urandom % 2000) - 1000);
      end
      if (it == 0) begin shift = 0; relu_en = 1; acc[0] = 32'd5; bias[0] = 0; acc[1] = -32'sd5; bias[1] = 0; end
      #1;
      for (int i = 0; i < N; i++) begin
        int e;
        e = ref_q(longint'($signed(acc[i])), longint'($signed(bias[i])), int'(shift), relu_en);
        checks++;
        if (e == 127 || e == -128) n_sat++;
        if (relu_en && e == 0) n_relu++;
        if ($signed(q[i]) != e) begin
          failures++;
          if (failures < 10) $display("acc=%0d bias=%0d sh=%0d relu=%0d got %0d exp %0d",
            $signed(acc[i]), $signed(bias[i]), shift, relu_en, $signed(q[i]), e);
        end
      end
      #1;
    end
    checks++; if (n_sat == 0 || n_relu == 0) begin failures++; $display("corner cases not reached"); end
    $display("saturations=%0d relu_zero=%0d", n_sat, n_relu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
