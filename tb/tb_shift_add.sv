// tb_shift_add: the shift-and-add of bit-serial partial products must equal
// the signed-weight x unsigned-feature product, and in general sum_k row_k*2^k.
module tb_shift_add;
  import nem_pkg::*;
  logic [W_BITS-1:0] pp [H_BITS];
  logic signed [W_BITS+H_BITS-1:0] prod;
  int checks = 0, failures = 0;

  shift_add dut (.pp, .prod);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int w, h, exp_v;
      w = (t < 4) ? ((t == 0) ? -128 : (t == 1) ? 127 : (t == 2) ? -1 : 0) : int'($urandom_range(0, 255)) - 128;
      h = (t < 4) ? 255 : int'($urandom_range(0, 255));
      for (int k = 0; k < H_BITS; k++) pp[k] = h[k] ? W_BITS'(w) : '0;
      #1;
      exp_v = w * h;
      checks++;
      if (int'(prod) != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL w=%0d h=%0d got %0d exp %0d", w, h, prod, exp_v);
      end
    end
    // arbitrary rows: sum of signed rows weighted by 2^k
    for (int t = 0; t < 500; t++) begin
      int exp_v;
      exp_v = 0;
      for (int k = 0; k < H_BITS; k++) begin
        pp[k] = W_BITS'($urandom);
        exp_v += int'($signed(pp[k])) * (1 << k);
      end
      #1;
      checks++;
      if (int'(prod) != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL rows got %0d exp %0d", prod, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
