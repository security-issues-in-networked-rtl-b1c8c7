// tb_imem_secure: loads a program, corrupts the active bank through the
// processor write port, and checks that one recovery pulse makes every fetch
// return the loaded program again in the very next cycle, that the infected
// bank is rewritten in the background in 2**IDX_W cycles, and that a second
// attack during a reload is served from the golden copy.
module tb_imem_secure;
  localparam int IDX_W = 6;
  localparam int N = 2**IDX_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [IDX_W-1:0] rd_addr = 0, wr_addr = 0, ld_addr = 0;
  logic [31:0] rd_data, wr_data = 0, ld_data = 0;
  logic wr_en = 0, ld_we = 0, recover = 0, active_bank, reloading;
  logic [15:0] reload_count;
  int checks = 0, failures = 0;

  imem_secure #(.IDX_W(IDX_W)) dut (.*);

  function automatic logic [31:0] prog(int i);
    return 32'hA500_0000 + 32'(i * 7);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // fetch every word and compare; 'corrupt' lists words expected to be bad
  task automatic fetch_all(bit expect_clean, string what);
    int bad = 0;
    for (int i = 0; i < N; i++) begin
      rd_addr <= IDX_W'(i);
      @(posedge clk); #1;
      if (rd_data !== prog(i)) bad++;
    end
    if (expect_clean) check(bad == 0, $sformatf("%s: %0d corrupted words", what, bad));
    else              check(bad != 0, $sformatf("%s: corruption not visible", what));
  endtask

  task automatic corrupt(int first, int cnt);
    for (int i = first; i < first + cnt; i++) begin
      wr_en <= 1; wr_addr <= IDX_W'(i); wr_data <= 32'hDEAD_0000 | 32'(i);
      @(posedge clk);
    end
    wr_en <= 0;
  endtask

  task automatic pulse_recover();
    recover <= 1; @(posedge clk); recover <= 0; #1;
  endtask

  initial begin
    int t0;
    rst_n <= 0; repeat (2) @(posedge clk); rst_n <= 1;
    for (int i = 0; i < N; i++) begin
      ld_we <= 1; ld_addr <= IDX_W'(i); ld_data <= prog(i); @(posedge clk);
    end
    ld_we <= 0;
    fetch_all(1, "after load");
    check(active_bank == 0, "bank 0 active after reset");

    // attack 1: corrupt bank 0, recover
    corrupt(10, 5);
    fetch_all(0, "attack 1");
    pulse_recover();
    check(active_bank == 1, "switched to bank 1");
    fetch_all(1, "right after recovery 1");
    t0 = 0;
    while (reloading) begin @(posedge clk); t0++; end
    @(posedge clk); #1;
    check(reload_count == 1, "one reload completed");
    check(t0 <= N + 2, $sformatf("reload took %0d cycles", t0));

    // attack 2: corrupt bank 1, recover to the reloaded bank 0
    corrupt(0, 3);
    fetch_all(0, "attack 2");
    pulse_recover();
    check(active_bank == 0, "switched back to bank 0");
    fetch_all(1, "bank 0 after reload");

    // attack 3 and 4 back to back, before the reload ends
    corrupt(20, 4);
    pulse_recover();          // bank 1 still being reloaded -> golden copy
    corrupt(30, 2);           // writes the (dirty) active bank
    pulse_recover();
    fetch_all(1, "during double reload");
    while (reloading) @(posedge clk);
    repeat (2) @(posedge clk);
    fetch_all(1, "after double reload");
    pulse_recover();
    repeat (2) @(posedge clk);
    fetch_all(1, "other bank after double reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
