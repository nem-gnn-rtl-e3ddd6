// tb_agg_array: random read-modify-writes on port A against a model, port B
// reads, and a one-cycle clear that makes every row read as zero.
module tb_agg_array;
  localparam int NODES = 8, FEAT = 3, ACC = 32;
  logic clk = 0, rst_n = 0, clear = 0, a_we = 0;
  logic [2:0] a_idx = 0, b_idx = 0;
  logic signed [ACC-1:0] a_rdata [FEAT], a_wdata [FEAT], b_rdata [FEAT];
  int model [NODES][FEAT];
  int checks = 0, failures = 0;

  agg_array #(.NODES(NODES), .FEAT(FEAT), .ACC(ACC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < FEAT; f++) a_wdata[f] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NODES; n++) for (int f = 0; f < FEAT; f++) model[n][f] = 0;
    for (int t = 0; t < 400; t++) begin
      int n, m;
      n = $urandom_range(0, NODES-1); m = $urandom_range(0, NODES-1);
      a_idx = 3'(n); b_idx = 3'(m);
      #1;
      for (int f = 0; f < FEAT; f++) begin
        checks += 2;
        if (int'(a_rdata[f]) != model[n][f]) begin failures++; $display("FAIL A n%0d", n); end
        if (int'(b_rdata[f]) != model[m][f]) begin failures++; $display("FAIL B m%0d", m); end
      end
      if (t % 97 == 96) begin
        clear = 1;
        @(negedge clk);
        clear = 0;
        for (int k = 0; k < NODES; k++) for (int f = 0; f < FEAT; f++) model[k][f] = 0;
      end else begin
        a_we = 1;
        for (int f = 0; f < FEAT; f++) begin
          a_wdata[f] = a_rdata[f] + ACC'($urandom_range(0, 1000));
          model[n][f] = int'(a_wdata[f]);
        end
        @(negedge clk);
        a_we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
