// tb_secure_np_top: end-to-end test of the four-PPU secure packet processor at
// its default (full) size, with one behavioural core per PPU running a
// forwarding program of about 600 cycles per packet.
//
// Phases
//   A  normal traffic from many flows, some with TTL 0, some multicast, with
//      random output back-pressure: every packet with TTL > 0 must come out
//      once with its TTL decremented, TTL-0 packets must be dropped.
//   B  attack packets (their processing jumps into injected code) mixed with
//      normal traffic: each attack must be detected 4 cycles after the first
//      attack instruction, the core held in reset for 6 cycles, the packet
//      dropped and the infected instruction memory restored; all normal
//      packets, including those queued behind the attack, must come out.
//   C  a duplication attack made of valid instructions: the instruction
//      monitor cannot see it, the I/O monitor must raise an alarm and reset
//      that PPU before all copies are out.
//   D  normal traffic again, with the output blocked for 6000 cycles at first:
//      the system must be fully working, and packets that waited longer than
//      the 4096-cycle delay limit must raise the time-stamp delay alarm.
//   E  packets of the smallest and largest sizes, 64 and 1512 bytes (9 and
//      190 words with the header word), must come out intact.
// Each mechanism (input stall, output stall, arbitration contention, TTL drop,
// multicast, attack drop, recovery, memory reload, I/O alarm, copy, delay
// alarm) is counted and the test fails if one never happened.
module tb_secure_np_top;
  import sp_pkg::*;
  import tb_prog_pkg::*;
  import tb_pkt_gen::*;

  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic in_valid = 0, in_sop = 0, in_eop = 0, in_ready;
  logic [63:0] in_data = 0;
  logic out_valid, out_sop, out_eop, out_ready = 1;
  logic [63:0] out_data;
  logic [N-1:0] ld_sel = 0;
  logic ld_imem_we = 0, ld_bb_we = 0, ld_bb_valid = 0, ld_bb_jump = 0;
  logic [8:0] ld_idx = 0, ld_bb_nexthop = 0;
  logic [31:0] ld_word = 0;
  logic [7:0] ld_bb = 0;
  logic [N-1:0] core_rst, core_ivalid, core_dwe, core_dre;
  logic [31:0] core_iaddr[N], core_idata[N], core_daddr[N], core_dwdata[N], core_drdata[N];
  logic [3:0] core_dbe[N];
  logic [N-1:0] attack_drop, io_alarm, active_bank, reloading;
  logic [15:0] viol_count[N], fwd_count[N], drop_count[N], reload_count[N];
  logic [15:0] io_in_win[N], io_out_win[N], io_alarm_count;
  logic [31:0] pkts_in, pkts_out;
  logic delay_alarm;
  logic [15:0] delay_count, max_age;

  secure_np_top dut (.*);

  int fetch_errors[N], attacks_started[N];
  for (genvar p = 0; p < N; p++) begin : g_core
    core_model cpu (
      .clk, .core_rst(core_rst[p]), .iaddr(core_iaddr[p]), .ivalid(core_ivalid[p]),
      .idata(core_idata[p]), .daddr(core_daddr[p]), .dwdata(core_dwdata[p]),
      .dbe(core_dbe[p]), .dwe(core_dwe[p]), .dre(core_dre[p]), .drdata(core_drdata[p]),
      .fetch_errors(fetch_errors[p]), .attacks_started(attacks_started[p])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // expected outputs, keyed by packet id (word 1 bits [47:32])
  pkt_t exp_pkt[int];
  int   exp_cnt[int];     // outstanding outputs per id
  int   seen_cnt[int];
  int   dup_id = -1;
  pkt_t cur;
  int   n_out = 0, n_unexpected = 0;

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      if (out_sop) cur = {};
      cur.push_back(out_data);
      if (out_eop) begin
        int id;
        id = int'(cur[1][47:32]);
        n_out++;
        if (seen_cnt.exists(id)) seen_cnt[id]++; else seen_cnt[id] = 1;
        if (id == dup_id) ;
        else if (!exp_cnt.exists(id) || exp_cnt[id] == 0) begin
          n_unexpected++;
          check(0, $sformatf("unexpected output packet id %0d", id));
        end else begin
          pkt_t e;
          e = exp_pkt[id];
          exp_cnt[id]--;
          check(cur.size() == e.size(), $sformatf("packet %0d length", id));
          for (int w = 1; w < e.size() && w < cur.size(); w++)
            check(cur[w] == e[w], $sformatf("packet %0d word %0d", id, w));
          check(cur[0][51:48] < 4'(N), "header word carries a PPU index");
        end
      end
    end
  end

  function automatic int outstanding();
    int n = 0;
    foreach (exp_cnt[i]) n += exp_cnt[i];
    return n;
  endfunction

  // ------------------------------------------------------------------
  // mechanism counters and per-PPU attack timing probes
  int in_stalls = 0, out_stalls = 0, contention = 0, mcast_in = 0;
  int recoveries = 0, io_alarms = 0, attack_drops = 0, copies = 0, delay_alarms = 0;
  int t_attack[N], rst_len[N], timing_bad = 0, timing_ok = 0;
  logic [N-1:0] core_rst_d = '1;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) in_stalls++;
    if (out_valid && !out_ready) out_stalls++;
    if ($countones(dut.ppu_valid) > 1 && !dut.u_arb.busy) contention++;
    if (dut.disp_valid && dut.disp_mcast) mcast_in++;
    if (io_alarm != 0) io_alarms++;
    if (delay_alarm) delay_alarms++;
    for (int p = 0; p < N; p++) begin
      if (core_ivalid[p] && !core_rst[p] && core_iaddr[p] == ATTACK_PC) t_attack[p] = cycle;
      if (attack_drop[p]) begin
        attack_drops++;
        if (cycle - t_attack[p] == 4) timing_ok++;
        else begin timing_bad++; $display("PPU %0d: drop %0d cycles after attack code", p, cycle - t_attack[p]); end
      end
      if (core_rst[p]) rst_len[p]++;
      if (core_rst_d[p] && !core_rst[p] && rst_len[p] > 0) begin
        recoveries++;
        check(rst_len[p] == 6, $sformatf("PPU %0d core reset lasted %0d cycles", p, rst_len[p]));
        rst_len[p] = 0;
      end
    end
    core_rst_d <= core_rst;
  end

  logic [N-1:0] copy_ev;
  for (genvar p = 0; p < N; p++) begin : g_copy_probe
    assign copy_ev[p] = dut.g_ppu[p].u_ppu.u_pkt.copy_start;
  end
  always @(posedge clk) if (rst_n) copies += $countones(copy_ev);

  // ------------------------------------------------------------------
  logic in_ready_s;
  always @(negedge clk) in_ready_s = in_ready;
  bit bp_on = 1, hold_out = 0;
  always @(posedge clk) out_ready <= #2 !hold_out && (!bp_on || ($urandom_range(0, 7) != 0));

  task automatic send(pkt_t p);
    #1;
    for (int w = 0; w < p.size(); w++) begin
      in_valid = 1; in_data = p[w]; in_sop = (w == 0); in_eop = (w == p.size() - 1);
      do begin @(posedge clk); #1; end while (!in_ready_s);
    end
    in_valid = 0;
  endtask

  int next_id = 1;
  int pkt_words = 0;   // 0: random length of 8 to 40 words
  task automatic send_normal(logic [7:0] ttl, bit mcast);
    pkt_t p, q;
    logic [31:0] src, dst;
    src = 32'h0A00_0000 | $urandom_range(0, 255);
    dst = mcast ? 32'hE000_0000 | $urandom_range(0, 255) : 32'h0A01_0000 | $urandom_range(0, 255);
    p = make_pkt((pkt_words != 0) ? pkt_words : $urandom_range(8, 40), ttl, ($urandom_range(0, 1) != 0) ? 8'd17 : 8'd6,
                 src, dst, 32'h0, next_id);
    for (int w = 0; w < p.size(); w++) p[w][47:32] = 16'(next_id);
    for (int w = 8; w < p.size(); w++) p[w][31:0] = $urandom;
    put_byte(p, 56, 8'h0);   // marker word stays clear
    q = p;
    put_byte(q, 30, ttl - 1);
    if (ttl != 0) begin
      exp_pkt[next_id] = q;
      exp_cnt[next_id] = 1;
    end
    next_id++;
    send(p);
  endtask

  task automatic send_marked(logic [31:0] marker, output int id);
    pkt_t p;
    p = make_pkt(12, 8'd64, 8'd6, 32'h0B00_0000 | $urandom_range(0, 255), 32'h0A01_0001, marker, next_id);
    for (int w = 0; w < p.size(); w++) p[w][47:32] = 16'(next_id);
    put_byte(p, 56, marker[31:24]); put_byte(p, 57, marker[23:16]);
    put_byte(p, 58, marker[15:8]);  put_byte(p, 59, marker[7:0]);
    id = next_id;
    next_id++;
    send(p);
  endtask

  task automatic drain(int limit);
    int g = 0;
    while (outstanding() > 0 && g < limit) begin @(posedge clk); g++; end
  endtask

  initial begin
    int ttl0 = 0, attack_ids[$], aid;
    entry_t en;
    for (int p = 0; p < N; p++) begin t_attack[p] = -100; rst_len[p] = 0; end
    @(posedge clk); #1;
    // load program and basic-block table into all four PPUs
    ld_sel = '1;
    for (int i = 0; i < 512; i++) begin
      en = prog_entry(32'(i) << 2);
      ld_imem_we = 1; ld_bb_we = 1; ld_idx = 9'(i); ld_word = code_word(i);
      ld_bb_valid = en.valid; ld_bb_jump = en.jump; ld_bb = en.bb; ld_bb_nexthop = en.nexthop;
      @(posedge clk); #1;
    end
    ld_imem_we = 0; ld_bb_we = 0; ld_sel = '0;
    rst_n = 1;
    repeat (10) @(posedge clk);

    // phase A
    for (int i = 0; i < 60; i++) begin
      bit z;
      z = ($urandom_range(0, 9) == 0);
      if (z) ttl0++;
      send_normal(z ? 8'd0 : 8'($urandom_range(1, 255)), $urandom_range(0, 7) == 0);
    end
    drain(200000);
    check(outstanding() == 0, $sformatf("phase A: %0d packets missing", outstanding()));
    check(attack_drops == 0 && io_alarms == 0, "phase A: no security events on normal traffic");
    begin
      int d = 0;
      for (int p = 0; p < N; p++) d += drop_count[p];
      check(d == ttl0, $sformatf("phase A: %0d drops for %0d TTL-0 packets", d, ttl0));
    end

    // phase B
    for (int i = 0; i < 40; i++) begin
      if (i % 8 == 3) begin
        send_marked(32'hBADC0DE0, aid);
        attack_ids.push_back(aid);
      end else send_normal(8'($urandom_range(1, 255)), 0);
    end
    drain(200000);
    repeat (2000) @(posedge clk);
    check(outstanding() == 0, $sformatf("phase B: %0d packets missing", outstanding()));
    foreach (attack_ids[i]) check(!seen_cnt.exists(attack_ids[i]), "attack packet never leaves");
    check(attack_drops == attack_ids.size(), $sformatf("phase B: %0d detections for %0d attacks", attack_drops, attack_ids.size()));
    check(timing_bad == 0 && timing_ok == attack_ids.size(), "detection 4 cycles after the first attack instruction");
    begin
      int r = 0, e = 0;
      for (int p = 0; p < N; p++) begin r += reload_count[p]; e += fetch_errors[p]; end
      check(r == attack_ids.size(), $sformatf("phase B: %0d memory reloads", r));
      check(e == 0, $sformatf("phase B: %0d corrupted instruction fetches", e));
      check(reloading == 0, "reloads complete");
    end

    // phase C: duplication attack on one PPU while the output is free
    bp_on = 0;
    repeat (5000) @(posedge clk);   // let the I/O monitor window cap old credit
    send_marked(32'hD0D0D0D0, dup_id);
    repeat (3000) @(posedge clk);
    check(io_alarms > 0, "phase C: I/O monitor alarm on duplication");
    check(seen_cnt.exists(dup_id) ? seen_cnt[dup_id] < 67 : 1,
          $sformatf("phase C: duplication cut short (%0d copies out)", seen_cnt.exists(dup_id) ? seen_cnt[dup_id] : 0));

    // phase D
    bp_on = 1;
    // the output is blocked for a while so that several PPUs wait at the
    // arbiter at the same time
    hold_out = 1;
    fork begin repeat (6000) @(posedge clk); hold_out = 0; end join_none
    for (int i = 0; i < 30; i++) send_normal(8'($urandom_range(1, 255)), $urandom_range(0, 7) == 0);
    drain(200000);
    check(outstanding() == 0, $sformatf("phase D: %0d packets missing", outstanding()));

    // phase E: the smallest and largest packet sizes, 64 and 1512 bytes of
    // frame plus the 8-byte header word (9 and 190 words)
    for (int i = 0; i < 8; i++) begin
      pkt_words = (i % 2 == 0) ? 9 : 190;
      send_normal(8'($urandom_range(1, 255)), 0);
    end
    pkt_words = 0;
    drain(200000);
    check(outstanding() == 0, $sformatf("phase E: %0d packets missing", outstanding()));

    // every mechanism must have happened
    $display("mechanisms: in_stalls=%0d out_stalls=%0d contention=%0d ttl_drops=%0d mcast=%0d attack_drops=%0d recoveries=%0d io_alarms=%0d copies=%0d delay_alarms=%0d (max age %0d) outputs=%0d",
             in_stalls, out_stalls, contention, ttl0, mcast_in, attack_drops, recoveries, io_alarms, copies, delay_alarms, max_age, n_out);
    check(in_stalls > 0, "input stall happened");
    check(out_stalls > 0, "output stall happened");
    check(contention > 0, "output arbitration between PPUs happened");
    check(ttl0 > 0, "TTL drop happened");
    check(mcast_in > 0, "multicast dispatch happened");
    check(attack_drops > 0, "attack drop happened");
    check(recoveries == attack_drops + io_alarms, $sformatf("one recovery per event (%0d)", recoveries));
    check(io_alarms > 0, "I/O alarm happened");
    check(copies > 0, "packet copy happened");
    check(delay_alarms > 0 && delay_count == 16'(delay_alarms), "delay alarm happened (output held back in phase D)");
    check(n_unexpected == 0, "no unexpected packets");
    check(pkts_in == 32'(next_id - 1), "I/O monitor counted every input packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
