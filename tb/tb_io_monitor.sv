// tb_io_monitor: random input/output packet events for four PPUs against a
// reference model of the credit rule. Checks the alarm (one cycle after the
// offending output, only for the PPU that sent more than it received), the
// window and total counters, the window-end cap, multicast fan-out, and that
// a well-behaved unicast PPU never raises an alarm. Output packets carry
// random time-stamps; the delay alarm, its count and the largest age are
// checked against the same reference.
module tb_io_monitor;
  localparam int N = 4, WIN = 64, FAN = 4, NB = 4, MAXD = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_pkt = 0, in_mcast = 0, out_pkt = 0;
  logic [1:0] in_ppu = 0, out_ppu = 0;
  logic [N-1:0] alarm;
  logic [15:0] in_win[N], out_win[N], alarm_count;
  logic [31:0] in_total, out_total;
  logic [15:0] out_stamp = 0, now, delay_count, max_age;
  logic delay_alarm;

  io_monitor #(.NUM_PPU(N), .WINDOW(WIN), .FANOUT(FAN), .NUM_BUF(NB), .MAX_DELAY(MAXD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, updated with the same events at the same edges
  int credit[N], iw[N], ow[N], tick = 0, alarms = 0, ti = 0, to = 0;
  logic [N-1:0] exp_alarm = 0;
  bit exp_delay = 0;
  int n_delay = 0;
  logic [15:0] ref_now = 0, exp_max = 0;
  int bad_ppu = 0;       // the PPU that is allowed to misbehave in phase 2
  bit phase2 = 0;
  always @(posedge clk) if (rst_n) begin
    check(alarm == exp_alarm, $sformatf("alarm %b expected %b", alarm, exp_alarm));
    for (int p = 0; p < N; p++) begin
      check(in_win[p] == 16'(iw[p]) && out_win[p] == 16'(ow[p]), $sformatf("window counters PPU %0d", p));
      if (alarm[p]) check(phase2 && p == bad_ppu, "alarm only for the misbehaving PPU");
    end
    check(in_total == 32'(ti) && out_total == 32'(to) && alarm_count == 16'(alarms), "totals");
    check(delay_alarm == exp_delay && delay_count == 16'(n_delay) && max_age == exp_max, "delay alarm, count and largest age");
    check(now == ref_now, "time base");
    exp_alarm = 0;
    exp_delay = out_pkt && 16'(ref_now - out_stamp) > MAXD;
    if (exp_delay) n_delay++;
    if (out_pkt && 16'(ref_now - out_stamp) > exp_max) exp_max = 16'(ref_now - out_stamp);
    ref_now = ref_now + 1;
    if (in_pkt) ti++;
    if (out_pkt) to++;
    for (int p = 0; p < N; p++) begin
      bit i, o;
      i = in_pkt && in_ppu == p;
      o = out_pkt && out_ppu == p;
      if (i) credit[p] += in_mcast ? FAN : 1;
      if (o) begin
        if (credit[p] == 0) begin exp_alarm[p] = 1; alarms++; end
        else credit[p]--;
      end
      if (tick == WIN - 1) begin
        if (credit[p] > NB * FAN) credit[p] = NB * FAN;
        iw[p] = i; ow[p] = o;
      end else begin
        iw[p] += i; ow[p] += o;
      end
    end
    tick = (tick == WIN - 1) ? 0 : tick + 1;
  end

  // stimulus: packets held per PPU so that well-behaved PPUs only send what
  // they have (multicast may send FAN copies); the bad PPU sends extra
  int held[N];
  int n_alarm_seen = 0, n_mcast = 0, n_capped = 0;
  always @(posedge clk) if (alarm != 0) n_alarm_seen++;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      @(posedge clk); #1;
      phase2 = (c >= 3000);
      in_pkt = $urandom_range(0, 2) == 0;
      in_ppu = 2'($urandom);
      in_mcast = $urandom_range(0, 7) == 0;
      // a PPU holds at most NB packets (each with up to FAN outputs)
      if (held[in_ppu] + (in_mcast ? FAN : 1) > NB * FAN) in_pkt = 0;
      if (in_pkt) begin
        held[in_ppu] += in_mcast ? FAN : 1;
        if (in_mcast) n_mcast++;
      end
      out_pkt = 0;
      out_ppu = 2'($urandom);
      out_stamp = now - 16'($urandom_range(0, 2 * MAXD));
      if ($urandom_range(0, 2) == 0) begin
        if (held[out_ppu] > 0) begin
          out_pkt = 1;
          held[out_ppu]--;
        end else if (phase2 && out_ppu == 2'(bad_ppu)) out_pkt = 1;   // duplication
      end
      // a well-behaved PPU may lose packets (drops); mimic that
      if ($urandom_range(0, 50) == 0) held[$urandom_range(0, N - 1)] = 0;
    end
    @(posedge clk); #1 in_pkt = 0; out_pkt = 0;
    repeat (3) @(posedge clk);
    check(n_alarm_seen > 0, "duplication detected");
    check(n_mcast > 0, "multicast exercised");
    check(n_delay > 0, "delay alarm exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
