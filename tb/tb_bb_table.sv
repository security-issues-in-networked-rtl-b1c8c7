// tb_bb_table: writes random entries into the basic-block table through its
// load port and reads them back on both read ports, checking the one-cycle
// read latency against a reference array kept in the testbench.
module tb_bb_table;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [8:0] a_idx = 0, b_idx = 0, ld_idx = 0, ld_nexthop = 0, a_nexthop;
  logic       a_valid, a_jump, b_valid, ld_we = 0, ld_valid = 0, ld_jump = 0;
  logic [7:0] a_bb, b_bb, ld_bb = 0;
  logic [18:0] ref_mem [512];
  int checks = 0, failures = 0;

  bb_table #(.IDX_W(9), .BB_W(8)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [18:0] v;
    for (int i = 0; i < 512; i++) begin
      v = 19'($urandom);
      ref_mem[i] = v;
      ld_we <= 1; ld_idx <= 9'(i);
      {ld_valid, ld_jump, ld_bb, ld_nexthop} <= v;
      @(posedge clk);
    end
    ld_we <= 0;
    for (int n = 0; n < 600; n++) begin
      int ia, ib;
      ia = $urandom_range(511); ib = $urandom_range(511);
      a_idx <= 9'(ia); b_idx <= 9'(ib);
      @(posedge clk);
      #1;
      checks++;
      if ({a_valid, a_jump, a_bb, a_nexthop} !== ref_mem[ia] ||
          b_valid !== ref_mem[ib][18] || b_bb !== ref_mem[ib][16:9]) begin
        failures++;
        $display("FAIL: read %0d/%0d", ia, ib);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
