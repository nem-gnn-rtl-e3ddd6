// tb_aux_control: ReLU of a row; softmax control over num_classes elements:
// argmax class, e^(x-max) in Q1.16 within 7% of the true exponential (the
// linear fraction approximation), the sum of the exponentials, and the cycle
// counts 2 (ReLU only) and 2*num_classes + 2 (with softmax).
module tb_aux_control;
  localparam int FEAT = 8, ACC = 32;
  logic clk = 0, rst_n = 0, start = 0, softmax_en = 0, busy, done;
  logic signed [ACC-1:0] vec [FEAT], relu_vec [FEAT];
  logic [3:0] num_classes = 0, cls;
  logic [16:0] exp_vec [FEAT];
  logic [31:0] exp_sum;
  int checks = 0, failures = 0;

  aux_control #(.FEAT(FEAT), .ACC(ACC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < FEAT; f++) vec[f] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int nc, cyc, mx, am, sum;
      int r [FEAT];
      nc = (t % 3 == 0) ? 0 : $urandom_range(1, FEAT);
      for (int f = 0; f < FEAT; f++) begin
        vec[f] = $signed($urandom_range(0, 2000)) - 700;
        r[f] = (vec[f] < 0) ? 0 : int'(vec[f]);
      end
      softmax_en = (nc != 0); num_classes = 4'(nc);
      start = 1; @(negedge clk); start = 0;
      for (int f = 0; f < FEAT; f++) vec[f] = '0;
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != ((nc == 0) ? 2 : 2 * nc + 2)) begin failures++; $display("FAIL cycles %0d nc %0d", cyc, nc); end
      for (int f = 0; f < FEAT; f++) begin
        checks++;
        if (int'(relu_vec[f]) != r[f]) begin failures++; $display("FAIL relu f%0d", f); end
      end
      if (nc != 0) begin
        mx = r[0]; am = 0;
        for (int f = 1; f < nc; f++) if (r[f] > mx) begin mx = r[f]; am = f; end
        checks++;
        if (int'(cls) != am) begin failures++; $display("FAIL class %0d exp %0d", cls, am); end
        sum = 0;
        for (int f = 0; f < nc; f++) begin
          real ex;
          ex = $exp(-real'(mx - r[f]) / 256.0) * 65536.0;
          sum += int'(exp_vec[f]);
          checks++;
          if (real'(exp_vec[f]) - ex > 0.07 * 65536.0 || ex - real'(exp_vec[f]) > 0.07 * 65536.0) begin
            failures++; $display("FAIL exp f%0d: %0d exp %f", f, exp_vec[f], ex);
          end
        end
        checks++;
        if (int'(exp_sum) != sum) begin failures++; $display("FAIL exp sum"); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
