// tb_flow_classifier: random IPv4/UDP/multicast/non-IP packets of random length
// (1 to 40 words) with random per-PPU back-pressure. A reference model
// computes the flow hash and expected header word; every packet must come out
// of exactly the PPU port it names, unchanged apart from the header word, in
// order, with one dispatch event per packet. All packets of one flow must go
// to the same PPU.
module tb_flow_classifier;
  import sp_pkg::*;
  import tb_pkt_gen::*;

  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_sop = 0, in_eop = 0, in_ready;
  logic [63:0] in_data = 0;
  logic [N-1:0] out_valid, out_ready = '1;
  logic [63:0] out_data;
  logic out_sop, out_eop, disp_valid, disp_mcast;
  logic [1:0] disp_ppu;
  logic [15:0] stamp_now = 0;
  always @(posedge clk) stamp_now <= stamp_now + 16'd1;

  flow_classifier #(.NUM_PPU(N)) dut (.*);

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

  // reference model
  function automatic logic [63:0] exp_hdr(pkt_t p, output int tgt, output bit mc);
    logic [31:0] s, d, h;
    logic [7:0] pr;
    bit ip;
    ip = p.size() >= 6 && get_byte(p, 20) == 8'h08 && get_byte(p, 21) == 8'h00;
    s = {get_byte(p, 34), get_byte(p, 35), get_byte(p, 36), get_byte(p, 37)};
    d = {get_byte(p, 38), get_byte(p, 39), get_byte(p, 40), get_byte(p, 41)};
    pr = get_byte(p, 31);
    h = s ^ {d[15:0], d[31:16]} ^ {24'h0, pr};
    h = h ^ (h >> 16);
    h = h ^ (h >> 8);
    tgt = int'(h % N);
    mc = ip && d[31:28] == 4'hE;
    return make_hdr((ip && pr == 8'd17) ? APP_CM_HDR : APP_IPV4_FWD, mc, 4'(tgt), h, 16'h0);
  endfunction

  typedef struct { int id; int tgt; bit mc; logic [72:0] flow; } exp_t;
  pkt_t exp_pkt[int];
  exp_t port_q[N][$];
  exp_t disp_q[$];
  int flow_ppu[logic [72:0]];
  pkt_t cur[N];
  int got = 0, disp_seen = 0, stalls = 0, n_mc = 0, n_cm = 0;
  int hits[N];

  always @(posedge clk) begin
    if (rst_n && disp_valid) begin
      exp_t e;
      disp_seen++;
      if (disp_q.size() == 0) check(0, "dispatch without a packet");
      else begin
        e = disp_q.pop_front();
        check(int'(disp_ppu) == e.tgt && disp_mcast == e.mc, "dispatch event fields");
        // disp_valid is registered in the decision cycle, one cycle ago
        exp_pkt[e.id][0][47:32] = stamp_now - 16'd1;
        hits[e.tgt]++;
        if (e.mc) n_mc++;
        if (exp_pkt[e.id][0][63:56] == 8'(APP_CM_HDR)) n_cm++;
      end
    end
    for (int k = 0; k < N; k++) begin
      if (out_valid[k] && !out_ready[k]) stalls++;
      if (out_valid[k] && out_ready[k]) begin
        if (out_sop) cur[k] = {};
        cur[k].push_back(out_data);
        if (out_eop) begin
          got++;
          if (port_q[k].size() == 0) check(0, $sformatf("unexpected packet on port %0d", k));
          else begin
            exp_t e;
            e = port_q[k].pop_front();
            check(cur[k] == exp_pkt[e.id], $sformatf("packet on port %0d differs", k));
            
            if (exp_pkt[e.id].size() < 6) ;  // key fields not all present
            else if (flow_ppu.exists(e.flow)) check(flow_ppu[e.flow] == k, "flow kept on one PPU");
            else flow_ppu[e.flow] = k;
          end
        end
      end
    end
    check($onehot0(out_valid), "at most one PPU addressed");
  end

  always @(posedge clk) out_ready <= #2 4'($urandom) | 4'($urandom);
  logic in_ready_s;
  always @(negedge clk) in_ready_s = in_ready;

  task automatic send(pkt_t p);
    #1;
    for (int w = 0; w < p.size(); w++) begin
      in_valid = 1; in_data = p[w]; in_sop = (w == 0); in_eop = (w == p.size() - 1);
      do begin @(posedge clk); #1; end while (!in_ready_s);
      in_valid = 0;
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      pkt_t p;
      exp_t e;
      int kind;
      logic [31:0] src, dst;
      logic [7:0] pr;
      kind = $urandom_range(0, 3);
      src  = 32'h0A00_0000 | $urandom_range(0, 15);
      dst  = (kind == 2) ? 32'hE000_0001 : 32'h0A01_0000 | $urandom_range(0, 15);
      pr   = (kind == 1) ? 8'd17 : 8'd6;
      p = make_pkt($urandom_range(1, 40), 8'd64, pr, src, dst, $urandom, i);
      if (kind == 3) begin put_byte(p, 20, 8'h86); put_byte(p, 21, 8'hDD); end
      for (int w = 1; w < p.size(); w++) if (w >= 8) p[w] = {$urandom, $urandom};
      e.id = i;
      exp_pkt[i] = p;
      exp_pkt[i][0] = exp_hdr(p, e.tgt, e.mc);
      e.flow = {kind == 3, src, dst, pr};
      port_q[e.tgt].push_back(e);
      disp_q.push_back(e);
      send(p);
    end
    repeat (200) @(posedge clk);
    check(got == 600, $sformatf("all packets delivered (%0d)", got));
    check(disp_seen == 600, "one dispatch per packet");
    check(stalls > 0, "back-pressure exercised");
    for (int k = 0; k < N; k++) check(hits[k] > 0, $sformatf("PPU %0d used", k));
    check(n_mc > 0 && n_cm > 0, "multicast and CM-application packets seen");
    for (int k = 0; k < N; k++) check(port_q[k].size() == 0, "port queues empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
