// tb_adj_buffer: CSR row pointers and entries written through the store ports
// read back unchanged on both read ports.
module tb_adj_buffer;
  import nem_pkg::*;
  localparam int NODES = 8, ME = 16;
  logic clk = 0;
  logic rp_we = 0, ent_we = 0;
  logic [3:0] rp_waddr = 0, a_node = 0, b_node = 0;
  logic [4:0] rp_wdata = 0, a_lo, a_hi, b_lo, b_hi;
  logic [3:0] ent_waddr = 0, a_eaddr = 0, b_eaddr = 0;
  adj_entry_t ent_wdata, a_entry, b_entry;
  logic [4:0] rp_m [NODES+1];
  adj_entry_t ent_m [ME];
  int checks = 0, failures = 0;

  adj_buffer #(.NODES(NODES), .MAX_EDGES(ME)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ent_wdata = '0;
    @(negedge clk);
    for (int n = 0; n <= NODES; n++) begin
      rp_m[n] = 5'(2 * n);
      rp_we = 1; rp_waddr = 4'(n); rp_wdata = rp_m[n];
      @(negedge clk);
    end
    rp_we = 0;
    for (int e = 0; e < ME; e++) begin
      ent_m[e] = adj_entry_t'($urandom);
      ent_we = 1; ent_waddr = 4'(e); ent_wdata = ent_m[e];
      @(negedge clk);
    end
    ent_we = 0;
    for (int t = 0; t < 100; t++) begin
      int na, nb, ea, eb;
      na = $urandom_range(0, NODES-1); nb = $urandom_range(0, NODES-1);
      ea = $urandom_range(0, ME-1);    eb = $urandom_range(0, ME-1);
      a_node = 4'(na); b_node = 4'(nb); a_eaddr = 4'(ea); b_eaddr = 4'(eb);
      #1;
      checks++;
      if (a_lo != rp_m[na] || a_hi != rp_m[na+1] || b_lo != rp_m[nb] || b_hi != rp_m[nb+1]) begin
        failures++; $display("FAIL rowptr");
      end
      checks++;
      if (a_entry != ent_m[ea] || b_entry != ent_m[eb]) begin failures++; $display("FAIL entry"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
