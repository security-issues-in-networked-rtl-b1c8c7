// tb_pkt_buffer: random packets stream into the buffer pool while a
// testbench "processor" takes the current packet, reads it, rewrites one byte
// and then forwards, drops, copies-then-forwards it or has the monitor drop
// it. The output stream (with random back-pressure) is compared packet by
// packet with a model. A directed phase fills every buffer, checks that
// the input is then held off, and flushes the queued packets.
module tb_pkt_buffer;
  localparam int NB = 4, BW = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_sop = 0, in_eop = 0, in_ready;
  logic [63:0] in_data = 0;
  logic cur_avail;
  logic [5:0] cur_len;
  logic [4:0] c_addr = 0;
  logic c_re = 0, c_we = 0, c_forward = 0, c_drop = 0, c_copy = 0, drop_cur = 0, flush = 0;
  logic [7:0] c_be = 0;
  logic [63:0] c_wdata = 0, c_rdata;
  logic out_valid, out_sop, out_eop, out_ready = 0;
  logic [63:0] out_data;
  logic [15:0] fwd_count, drop_count;

  pkt_buffer #(.NUM_BUF(NB), .BUF_WORDS(BW)) dut (.*);

  typedef logic [63:0] pkt_t[$];
  pkt_t rx_q[$];       // packets received, waiting for the processor
  pkt_t exp_q[$];      // packets expected at the output
  int checks = 0, failures = 0, sent = 0, n_out = 0, n_drop = 0;
  bit hold_core = 0, hold_in = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // in_ready as seen at the last clock edge
  logic in_ready_s;
  always @(negedge clk) in_ready_s = in_ready;

  // input driver
  task automatic send_pkt(int nwords, int id);
    pkt_t p;
    for (int w = 0; w < nwords; w++) p.push_back({16'(id), 16'(w), 32'($urandom)});
    rx_q.push_back(p);
    #1;
    for (int w = 0; w < nwords; w++) begin
      in_valid = 1; in_data = p[w]; in_sop = (w == 0); in_eop = (w == nwords - 1);
      do begin @(posedge clk); #1; end while (!in_ready_s);
    end
    in_valid = 0;
    sent++;
  endtask

  // output monitor
  pkt_t cur_out, exp_pkt;
  always @(posedge clk) begin
    out_ready <= ($urandom_range(3) != 0);
    if (out_valid && out_ready) begin
      if (out_sop) cur_out = {};
      cur_out.push_back(out_data);
      if (out_eop) begin
        n_out++;
        if (exp_q.size() == 0) check(0, "unexpected output packet");
        else begin
          exp_pkt = exp_q.pop_front();
          check(exp_pkt == cur_out, $sformatf("output packet %0d differs (%0d vs %0d words)", n_out, cur_out.size(), exp_pkt.size()));
        end
      end
    end
  end

  // processor model
  task automatic process_one(int action);
    pkt_t p;
    logic [63:0] w1;
    #1;
    while (!cur_avail || hold_core) begin @(posedge clk); #1; end
    p = rx_q.pop_front();
    check(cur_len == 6'(p.size()), $sformatf("current packet length %0d vs %0d (%h)", cur_len, p.size(), p[0]));
    c_addr <= 5'd1; c_re <= 1; @(posedge clk); c_re <= 0; @(posedge clk);
    check(c_rdata == p[1], $sformatf("core read of word 1: %h vs %h len %0d t=%0t", c_rdata, p[1], p.size(), $time));
    c_we <= 1; c_be <= 8'b0001_0000; c_wdata <= 64'h0000_0000_5A00_0000; @(posedge clk); c_we <= 0;
    p[1][31:24] = 8'h5A;
    c_addr <= 5'd1; c_re <= 1; @(posedge clk); c_re <= 0; @(posedge clk);
    check(c_rdata == p[1], "core read after byte write");
    case (action)
      0: begin c_forward <= 1; @(posedge clk); c_forward <= 0; exp_q.push_back(p); end
      1: begin c_drop <= 1; @(posedge clk); c_drop <= 0; n_drop++; end
      2: begin
           c_copy <= 1; @(posedge clk); c_copy <= 0; exp_q.push_back(p);
           repeat ($urandom_range(20)) @(posedge clk);
           c_forward <= 1; @(posedge clk); c_forward <= 0; exp_q.push_back(p);
         end
      default: begin drop_cur <= 1; @(posedge clk); drop_cur <= 0; n_drop++; end
    endcase
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    // phase 1: random traffic
    fork
      for (int i = 0; i < 60; i++) begin
        repeat ($urandom_range(4)) begin @(posedge clk); #1; end
        send_pkt($urandom_range(BW, 2), i);
      end
      for (int i = 0; i < 60; i++) process_one($urandom_range(3));
    join
    repeat (200) @(posedge clk);
    check(exp_q.size() == 0, "all expected packets left");
    check(drop_count == 16'(n_drop), "drop counter");

    // phase 2: fill all buffers, then flush
    hold_core = 1;
    for (int i = 0; i < NB; i++) send_pkt(5, 100 + i);
    in_valid = 1; in_sop = 1; in_eop = 0;
    repeat (3) @(posedge clk);
    #1;
    check(!in_ready, "input held off when all buffers are full");
    in_valid = 0;
    flush = 1; @(posedge clk); #1; flush = 0;
    rx_q.delete();
    repeat (10) @(posedge clk);
    check(!cur_avail, "no packet left after flush");
    check(drop_count == 16'(n_drop + NB), "flushed packets counted as drops");
    hold_core = 0;
    // traffic resumes
    fork
      for (int i = 0; i < 8; i++) send_pkt($urandom_range(BW, 2), 200 + i);
      for (int i = 0; i < 8; i++) process_one(0);
    join
    repeat (200) @(posedge clk);
    check(exp_q.size() == 0, "all packets after flush left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
