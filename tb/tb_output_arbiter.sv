// tb_output_arbiter: four sources offer random-length packets with random gaps
// while the output applies random back-pressure. Checks that every packet
// arrives whole and uninterleaved, in per-source order, that pkt_valid and
// pkt_src report each packet start (and pkt_hdr its first word) one cycle
// after that word, and that
// with all sources busy the grants rotate strictly round robin.
module tb_output_arbiter;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] in_valid = 0, in_sop = 0, in_eop = 0, in_ready;
  logic [63:0] in_data[N];
  logic out_valid, out_sop, out_eop, out_ready = 1, pkt_valid;
  logic [63:0] out_data;
  logic [1:0] pkt_src;
  logic [63:0] pkt_hdr, sop_word_d;
  initial for (int k = 0; k < N; k++) in_data[k] = 0;

  output_arbiter #(.NUM_PPU(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word format: [63:60] source, [59:40] packet number, [39:32] word index,
  // [31:0] random
  int len_q[N][$];
  int next_pkt[N];
  int cur_src = -1, cur_idx = 0, cur_len = 0, got = 0, stalls = 0;
  int sop_src_d = -1, last_src = -1, rr_ok = 0, rr_bad = 0;
  bit all_busy = 0, all_busy_d = 0;
  always @(posedge clk) if (rst_n) begin
    // packet start report
    if (sop_src_d >= 0) check(pkt_valid && int'(pkt_src) == sop_src_d && pkt_hdr == sop_word_d,
                              "pkt_valid/pkt_src/pkt_hdr one cycle after sop");
    else check(!pkt_valid, "no spurious pkt_valid");
    sop_src_d = -1;
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      int s;
      s = int'(out_data[63:60]);
      if (out_sop) begin
        check(cur_src < 0, "new packet only after eop");
        cur_src = s; cur_idx = 0;
        check(len_q[s].size() > 0, "packet expected from source");
        cur_len = len_q[s].pop_front();
        check(int'(out_data[59:40]) == next_pkt[s], "per-source order");
        next_pkt[s]++;
        sop_src_d = s;
        sop_word_d = out_data;
        if (all_busy_d && last_src >= 0) begin
          if (s == (last_src + 1) % N) rr_ok++; else rr_bad++;
        end
        last_src = s;
      end
      check(s == cur_src && int'(out_data[39:32]) == cur_idx, "word belongs to the current packet");
      cur_idx++;
      if (out_eop) begin
        check(cur_idx == cur_len, "packet length");
        cur_src = -1; got++;
      end
    end
    all_busy_d = all_busy;
  end

  always @(posedge clk) out_ready <= #2 ($urandom_range(0, 3) != 0);

  int total[N];
  int phase = 0;  // 0: random gaps, 1: all sources continuously busy
  for (genvar k = 0; k < N; k++) begin : g_src
    initial begin
      repeat (3) @(posedge clk);
      for (int i = 0; i < 300; i++) begin
        int len;
        len = $urandom_range(1, 12);
        len_q[k].push_back(len);
        for (int w = 0; w < len; w++) begin
          #1;
          in_valid[k] = 1; in_sop[k] = (w == 0); in_eop[k] = (w == len - 1);
          in_data[k] = {4'(k), 20'(i), 8'(w), $urandom};
          do @(negedge clk); while (!in_ready[k]);
          @(posedge clk);
          #1 in_valid[k] = 0;
          if (phase == 0 && $urandom_range(0, 3) == 0) @(posedge clk);
        end
        if (phase == 0 && $urandom_range(0, 1) == 0) repeat ($urandom_range(1, 20)) @(posedge clk);
      end
      total[k] = 300;
    end
  end

  always @(negedge clk) all_busy = (phase == 1) && (in_valid == '1);

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (next_pkt[0] + next_pkt[1] + next_pkt[2] + next_pkt[3] >= 400);
    phase = 1;
    wait (got == 4 * 300);
    repeat (10) @(posedge clk);
    check(got == 1200, "all packets delivered");
    check(stalls > 0, "back-pressure exercised");
    check(rr_ok > 50, $sformatf("round-robin grants observed (%0d)", rr_ok));
    check(rr_bad == 0, $sformatf("%0d grants out of round-robin order", rr_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
