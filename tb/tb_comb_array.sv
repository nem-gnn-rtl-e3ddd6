// tb_comb_array: first pass overwrites, later passes accumulate, no change
// without acc_en.
module tb_comb_array;
  localparam int E = 4, ACC = 32;
  logic clk = 0, rst_n = 0, acc_en = 0, first = 0;
  logic signed [ACC-1:0] din [E], vec [E];
  int model [E];
  int checks = 0, failures = 0;

  comb_array #(.ENTRIES(E), .ACC(ACC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < E; y++) din[y] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int op;
      op = $urandom_range(0, 2);
      for (int y = 0; y < E; y++) din[y] = $signed($urandom_range(0, 200000)) - 100000;
      acc_en = (op != 0);
      first  = (op == 1) || (t == 0);
      if (t == 0) acc_en = 1;
      @(negedge clk);
      for (int y = 0; y < E; y++) begin
        if (acc_en) model[y] = first ? int'(din[y]) : model[y] + int'(din[y]);
        checks++;
        if (int'(vec[y]) != model[y]) begin failures++; $display("FAIL t%0d y%0d %0d exp %0d", t, y, vec[y], model[y]); end
      end
      acc_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
