// tb_ppu: one packet processing unit with the behavioural core, running the
// attack scenario of the design: normal packets, a TTL-expired packet, an
// attack packet whose processing jumps to 0x1E4 followed by three normal
// packets, a duplication packet and an I/O-monitor alarm. Checks: forwarded
// packets carry the decremented TTL, drops happen, the monitor's drop comes
// 4 cycles after 0x1E4 is executed and the packet is gone one cycle later, the
// core is held in reset for exactly 6 cycles and runs again 11 cycles after
// the first attack instruction, the instruction memory is
// switched and reloaded so no corrupted word is ever fetched, and every
// packet after the attack is forwarded.
module tb_ppu;
  import tb_prog_pkg::*;
  import tb_pkt_gen::*;

  localparam int LOOPS = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic in_valid = 0, in_sop = 0, in_eop = 0, in_ready;
  logic [63:0] in_data = 0;
  logic out_valid, out_sop, out_eop, out_ready = 1;
  logic [63:0] out_data;
  logic ld_imem_we = 0, ld_bb_we = 0, ld_bb_valid = 0, ld_bb_jump = 0, io_alarm = 0;
  logic [8:0] ld_idx = 0, ld_bb_nexthop = 0;
  logic [31:0] ld_word = 0;
  logic [7:0] ld_bb = 0;
  logic core_rst, ivalid, dwe, dre, attack_drop, active_bank;
  logic [31:0] iaddr, idata, daddr, dwdata, drdata;
  logic [3:0] dbe;
  logic [15:0] viol_count, fwd_count, drop_count, reload_count;
  int fetch_errors, attacks_started;

  ppu dut (
    .clk, .rst_n, .in_valid, .in_data, .in_sop, .in_eop, .in_ready,
    .out_valid, .out_data, .out_sop, .out_eop, .out_ready,
    .ld_imem_we, .ld_bb_we, .ld_idx, .ld_word, .ld_bb_valid, .ld_bb_jump, .ld_bb, .ld_bb_nexthop,
    .io_alarm, .core_rst, .core_iaddr(iaddr), .core_ivalid(ivalid), .core_idata(idata),
    .core_daddr(daddr), .core_dwdata(dwdata), .core_dbe(dbe), .core_dwe(dwe), .core_dre(dre),
    .core_drdata(drdata), .attack_drop, .viol_count, .fwd_count, .drop_count, .reload_count, .reloading(),
    .active_bank
  );

  core_model #(.BODY_LOOPS(LOOPS)) cpu (
    .clk, .core_rst, .iaddr, .ivalid, .idata, .daddr, .dwdata, .dbe, .dwe, .dre, .drdata,
    .fetch_errors, .attacks_started
  );

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output
  pkt_t exp_q[$], cur_out, e;
  int n_out = 0;
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      if (out_sop) cur_out = {};
      cur_out.push_back(out_data);
      if (out_eop) begin
        n_out++;
        if (exp_q.size() == 0) check(0, "unexpected output packet");
        else begin
          e = exp_q.pop_front();
          check(e == cur_out, $sformatf("output packet %0d differs: got id %h len %0d exp id %h len %0d", n_out, cur_out[1][63:32], cur_out.size(), e[1][63:32], e.size()));
        end
      end
    end
  end

  // attack timing probes
  int t_attack = -1, t_drop = -1, rst_cycles = 0, rst_first = -1, t_resume = -1;
  always @(posedge clk) begin
    if (ivalid && iaddr == ATTACK_PC && t_attack < 0) t_attack = cycle;
    if (attack_drop && t_drop < 0) t_drop = cycle;
    if (rst_first >= 0 && t_resume < 0 && !core_rst && ivalid) t_resume = cycle;
    if (rst_n && core_rst) begin
      rst_cycles++;
      if (rst_first < 0) rst_first = cycle;
    end
  end

  task automatic send(pkt_t p);
    #1;
    for (int w = 0; w < p.size(); w++) begin
      in_valid = 1; in_data = p[w]; in_sop = (w == 0); in_eop = (w == p.size() - 1);
      do begin @(posedge clk); #1; end while (!in_ready_s);
    end
    in_valid = 0;
  endtask
  logic in_ready_s;
  always @(negedge clk) in_ready_s = in_ready;

  function automatic pkt_t fwd(pkt_t p);
    pkt_t q = p;
    put_byte(q, 30, get_byte(p, 30) - 1);
    return q;
  endfunction

  task automatic wait_out(int n);
    int guard = 0;
    while (exp_q.size() > n && guard < 20000) begin @(posedge clk); guard++; end
  endtask

  initial begin
    pkt_t p;
    entry_t en;
    @(posedge clk); #1;
    for (int i = 0; i < 512; i++) begin
      en = prog_entry(32'(i) << 2);
      ld_imem_we = 1; ld_bb_we = 1; ld_idx = 9'(i); ld_word = code_word(i);
      ld_bb_valid = en.valid; ld_bb_jump = en.jump; ld_bb = en.bb; ld_bb_nexthop = en.nexthop;
      @(posedge clk); #1;
    end
    ld_imem_we = 0; ld_bb_we = 0;
    rst_n = 1;

    // normal packets
    for (int i = 0; i < 3; i++) begin
      p = make_pkt(12 + i, 8'd64, 8'd6, 32'h0A000001, 32'h0A000002, 32'h0, i);
      exp_q.push_back(fwd(p));
      send(p);
    end
    // TTL already 0: dropped by the program
    send(make_pkt(10, 8'd0, 8'd6, 32'h0A000001, 32'h0A000002, 32'h0, 9));
    wait_out(0);
    repeat (LOOPS * 12) @(posedge clk);
    check(exp_q.size() == 0, "normal packets forwarded");
    check(drop_count == 1, $sformatf("TTL-expired packet dropped (%0d)", drop_count));
    check(rst_cycles == 0, "no recovery without an attack");

    // attack packet and three normal packets back to back
    send(make_pkt(16, 8'd64, 8'd17, 32'h0A000003, 32'h0A000004, 32'hBADC0DE0, 20));
    for (int i = 0; i < 3; i++) begin
      p = make_pkt(9, 8'd32, 8'd6, 32'h0A000001, 32'h0A000002, 32'h0, 21 + i);
      exp_q.push_back(fwd(p));
      send(p);
    end
    wait_out(0);
    repeat (600) @(posedge clk);
    check(exp_q.size() == 0, "packets after the attack forwarded");
    check(attacks_started == 1, "attack path taken");
    check(t_drop - t_attack == 4, $sformatf("monitor drop %0d cycles after attack code (expected 4)", t_drop - t_attack));
    check(rst_first == t_drop + 1, "core reset starts the cycle after the drop");
    check(rst_cycles == 6, $sformatf("recovery held the core %0d cycles (expected 6)", rst_cycles));
    // attack code in cycle t, processing resumes in cycle t+11 (400 -> 411)
    check(t_resume - t_attack == 11, $sformatf("core resumed %0d cycles after the attack (expected 11)", t_resume - t_attack));
    check(viol_count == 1, "one violation");
    check(drop_count == 2, "attack packet dropped");
    check(active_bank == 1, "instruction memory switched to the clean bank");
    check(reload_count == 1, "infected bank reloaded");
    check(fetch_errors == 0, $sformatf("%0d corrupted instruction fetches", fetch_errors));

    // duplication: valid code that sends LOOPS copies plus the packet itself
    p = make_pkt(10, 8'd64, 8'd6, 32'h0A000005, 32'h0A000006, 32'hD0D0D0D0, 30);
    for (int i = 0; i < LOOPS; i++) exp_q.push_back(fwd(p));  // copies follow the TTL update
    exp_q.push_back(fwd(p));
    send(p);
    wait_out(0);
    check(exp_q.size() == 0, "copies sent");
    check(viol_count == 1, "duplication is invisible to the instruction monitor");

    // I/O monitor alarm while packets are queued: all are flushed
    rst_cycles = 0;
    out_ready = 0;
    for (int i = 0; i < 3; i++) send(make_pkt(9, 8'd5, 8'd6, 32'h1, 32'h2, 32'h0, 40 + i));
    repeat (5) @(posedge clk);
    #1 io_alarm = 1; @(posedge clk); #1 io_alarm = 0;
    out_ready = 1;
    repeat (LOOPS * 40) @(posedge clk);
    check(rst_cycles == 6, "core reset after I/O alarm");
    check(drop_count == 5, $sformatf("queued packets flushed (drops %0d)", drop_count));
    // and normal operation continues
    p = make_pkt(12, 8'd3, 8'd6, 32'h0A000001, 32'h0A000002, 32'h0, 50);
    exp_q.push_back(fwd(p));
    send(p);
    wait_out(0);
    check(exp_q.size() == 0, "forwarding after I/O alarm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
