// tb_ect_unit: CAM match sets the valid bit and loads the ECT register once;
// the per-row selects follow BR / ECT / zero as the valid bit and H bits say.
module tb_ect_unit;
  import nem_pkg::*;
  localparam int COLS = 16;
  logic clk = 0, rst_n = 0, clear = 0, cam_en = 0, h_bit = 0;
  logic [COLS-1:0] rbl = 0;
  logic [H_BITS-1:0] h_vec = 0;
  logic valid;
  logic [COLS-1:0] ect_reg;
  pp_sel_e sel [H_BITS];
  int checks = 0, failures = 0;

  ect_unit #(.COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int p;
      h_vec = H_BITS'($urandom);
      clear = 1; @(negedge clk); clear = 0;
      expect_true(!valid, "valid cleared");
      for (int r = 0; r < H_BITS; r++) expect_true(sel[r] == PP_BR, "BR before match");
      p = -1;
      for (int k = 0; k < H_BITS; k++) if (p < 0 && h_vec[k]) p = k;
      for (int k = 0; k < H_BITS; k++) begin
        cam_en = 1; h_bit = h_vec[k]; rbl = COLS'($urandom) | 1;
        @(negedge clk);
        if (k == p) begin
          expect_true(valid, "valid after first 1");
          expect_true(ect_reg == rbl, "ECT register holds the read");
        end else if (p < 0 || k < p) begin
          expect_true(!valid, "no valid before a 1");
        end
      end
      cam_en = 0;
      if (p >= 0) begin
        for (int r = 0; r < H_BITS; r++)
          expect_true(sel[r] == (h_vec[r] ? PP_ECT : PP_ZERO), "select after match");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
