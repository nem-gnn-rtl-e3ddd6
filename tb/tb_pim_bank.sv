// tb_pim_bank: checks the 8T bank's write port, its compute read (row AND RWL
// bit) and a normal read, against a copy of the written rows kept here.
module tb_pim_bank;
  localparam int ROWS = 8, COLS = 64;
  logic clk = 0, we = 0, rd_en = 0, rwl = 0;
  logic [2:0] waddr = 0, raddr = 0;
  logic [COLS-1:0] wdata = 0, rbl;
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  pim_bank #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic [COLS-1:0] exp_v, input string what);
    checks++;
    if (rbl !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, rbl, exp_v);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      model[r] = {$urandom, $urandom};
      we = 1; waddr = 3'(r); wdata = model[r];
      @(negedge clk);
    end
    we = 0;
    for (int r = 0; r < ROWS; r++) begin
      for (int b = 0; b < 2; b++) begin
        rd_en = 1; raddr = 3'(r); rwl = b[0];
        @(negedge clk);
        rd_en = 0;
        check(b[0] ? model[r] : '0, $sformatf("compute read row %0d rwl %0d", r, b));
      end
    end
    // read data holds while no read is issued
    @(negedge clk);
    check(model[ROWS-1], "hold");
    // write and read the same row in one cycle: old contents are read
    we = 1; waddr = 3'd2; wdata = ~model[2]; rd_en = 1; raddr = 3'd2; rwl = 1;
    @(negedge clk);
    we = 0; rd_en = 0;
    check(model[2], "read during write");
    model[2] = ~model[2];
    rd_en = 1; raddr = 3'd2; rwl = 1;
    @(negedge clk);
    rd_en = 0;
    check(model[2], "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
