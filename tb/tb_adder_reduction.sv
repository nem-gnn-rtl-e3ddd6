// tb_adder_reduction: column sums over N banks (N not a power of two),
// registered one cycle after in_valid, held while in_valid is low.
module tb_adder_reduction;
  localparam int N = 5, NOUT = 3, IW = 16, ACC = 32;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [IW-1:0] in [N][NOUT];
  logic signed [ACC-1:0] out [NOUT];
  int checks = 0, failures = 0;

  adder_reduction #(.N(N), .NOUT(NOUT), .IW(IW), .ACC(ACC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v [NOUT];
    for (int b = 0; b < N; b++) for (int y = 0; y < NOUT; y++) in[b][y] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      for (int y = 0; y < NOUT; y++) exp_v[y] = 0;
      for (int b = 0; b < N; b++)
        for (int y = 0; y < NOUT; y++) begin
          in[b][y] = (t == 0) ? -16'sd32768 : IW'($urandom);
          exp_v[y] += int'(in[b][y]);
        end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL out_valid"); end
      for (int y = 0; y < NOUT; y++) begin
        checks++;
        if (int'(out[y]) != exp_v[y]) begin failures++; $display("FAIL y%0d %0d exp %0d", y, out[y], exp_v[y]); end
      end
      // change inputs without in_valid: output must hold
      for (int b = 0; b < N; b++) for (int y = 0; y < NOUT; y++) in[b][y] = IW'($urandom);
      @(negedge clk);
      checks++;
      if (out_valid || int'(out[0]) != exp_v[0]) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
