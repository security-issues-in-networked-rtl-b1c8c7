// tb_instr_monitor: self-checking test of the instruction-level monitor.
//
// Loads the basic-block table of the test program, then drives instruction
// address traces: valid runs through every kind of transition (same block,
// fall-through, taken jumps and the loop back), the attack of a jump from
// 0x214 to 0x1E4, a jump from a non-jump instruction into a valid block, a
// wrong start address after flush and a gap-filled (bubbly) valid stream. Each
// trace is compared with the expected drop pulse, which must come exactly
// four cycles after the offending address.
module tb_instr_monitor;
  import tb_prog_pkg::*;

  logic clk = 0, rst_n = 0, flush = 0;
  logic [31:0] iaddr = 0;
  logic ivalid = 0;
  logic ld_we = 0;
  logic [8:0] ld_idx = 0, ld_nexthop = 0;
  logic ld_valid = 0, ld_jump = 0;
  logic [7:0] ld_bb = 0;
  logic drop;
  logic [15:0] viol;

  int checks = 0, failures = 0;
  int cycle = 0;
  int drop_cycles[$];

  instr_monitor #(.IDX_W(9), .BB_W(8), .ENTRY_ADDR(ENTRY)) dut (
    .clk, .rst_n, .flush, .iaddr, .ivalid,
    .ld_we, .ld_idx, .ld_valid, .ld_jump, .ld_bb, .ld_nexthop,
    .drop_o(drop), .viol_count(viol)
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (drop) drop_cycles.push_back(cycle);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // present one address per cycle; returns the cycle it was presented in
  task automatic issue(logic [31:0] a, output int at);
    iaddr  <= a;
    ivalid <= 1;
    @(posedge clk);
    at = cycle;
  endtask

  task automatic idle();
    ivalid <= 0;
    @(posedge clk);
  endtask

  task automatic restart();
    ivalid <= 0;
    flush <= 1;
    @(posedge clk);
    flush <= 0;
    drop_cycles.delete();
  endtask

  // run one pass of the packet loop; body iterations = n
  task automatic valid_pass(int n, bit bubbles);
    int t;
    for (logic [31:0] a = 32'h200; a <= 32'h20C; a += 4) begin issue(a, t); if (bubbles) idle(); end
    for (logic [31:0] a = 32'h210; a <= 32'h214; a += 4) issue(a, t);
    for (int k = 0; k < n; k++)
      for (logic [31:0] a = 32'h218; a <= 32'h238; a += 4) begin issue(a, t); if (bubbles && a[2]) idle(); end
    for (logic [31:0] a = 32'h23C; a <= 32'h244; a += 4) issue(a, t);
  endtask

  task automatic expect_drops(int expected_at[$], string what);
    ivalid <= 0;
    repeat (8) @(posedge clk);
    check(drop_cycles.size() == expected_at.size(), $sformatf("%s: %0d drops, expected %0d", what, drop_cycles.size(), expected_at.size()));
    foreach (expected_at[i])
      if (i < drop_cycles.size())
        check(drop_cycles[i] == expected_at[i] + 4,
              $sformatf("%s: drop at %0d, expected %0d", what, drop_cycles[i], expected_at[i] + 4));
  endtask

  initial begin
    int t, t_bad;
    int none[$];
    entry_t e;
    // load the table: every entry, unknown ones invalid
    @(posedge clk);
    for (int i = 0; i < 512; i++) begin
      e = prog_entry(32'(i) << 2);
      ld_we <= 1; ld_idx <= 9'(i); ld_valid <= e.valid; ld_jump <= e.jump;
      ld_bb <= e.bb; ld_nexthop <= e.nexthop;
      @(posedge clk);
    end
    ld_we <= 0;
    rst_n <= 1;
    @(posedge clk);
    drop_cycles.delete();

    // 1: valid execution, three packet loops
    none = {};
    valid_pass(3, 0); valid_pass(1, 0); valid_pass(2, 0);
    expect_drops(none, "valid trace");

    // 2: valid execution with gaps in the stream
    restart();
    valid_pass(2, 1); valid_pass(1, 1);
    expect_drops(none, "valid trace with gaps");

    // 3: attack - 0x214 jumps to 0x1E4 instead of 0x218
    restart();
    valid_pass(1, 0);
    for (logic [31:0] a = 32'h200; a <= 32'h214; a += 4) issue(a, t);
    issue(ATTACK_PC, t_bad);
    for (logic [31:0] a = 32'h1E8; a <= 32'h1FC; a += 4) issue(a, t);
    expect_drops('{t_bad}, "jump to attack code");
    check(viol == 16'd1, "violation counter after attack");

    // 4: after flush, silent again; stream must restart at the entry
    restart();
    valid_pass(1, 0);
    expect_drops(none, "valid after recovery");

    // 5: jump from inside block 2 (not a jump instruction) to block 0
    restart();
    for (logic [31:0] a = 32'h200; a <= 32'h214; a += 4) issue(a, t);
    issue(32'h218, t); issue(32'h21C, t);
    issue(32'h200, t_bad);
    expect_drops('{t_bad}, "jump from a non-jump instruction");

    // 6: jump instruction at 0x244 to a valid address that is not its target
    restart();
    valid_pass(1, 0);
    for (logic [31:0] a = 32'h200; a <= 32'h214; a += 4) issue(a, t);
    for (logic [31:0] a = 32'h218; a <= 32'h238; a += 4) issue(a, t);
    for (logic [31:0] a = 32'h23C; a <= 32'h244; a += 4) issue(a, t);
    issue(32'h218, t_bad);
    expect_drops('{t_bad}, "jump to wrong target");

    // 7: skipping a block (block 1 to block 3 without a jump)
    restart();
    for (logic [31:0] a = 32'h200; a <= 32'h214; a += 4) issue(a, t);
    issue(32'h23C, t_bad);
    expect_drops('{t_bad}, "block skipped");

    // 8: first address after flush must be the entry point
    restart();
    issue(32'h218, t_bad);
    expect_drops('{t_bad}, "wrong start address");

    // 9: address outside the table's range
    restart();
    issue(32'h200, t);
    issue(32'h0001_0204, t_bad);
    expect_drops('{t_bad}, "address out of range");

    check(viol == 16'd6, $sformatf("violation counter %0d, expected 6", viol));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
