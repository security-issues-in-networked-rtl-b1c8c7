// io_monitor: protocol-level monitor that correlates the packets entering
// each PPU with the packets leaving it.
//
// Two counters per PPU count incoming packets (handed to the PPU by the flow
// classifier) and outgoing packets (started on the output by the arbiter)
// within a window of WINDOW cycles; the window counts are visible on the
// ports together with running totals. The check itself keeps, per PPU, a
// credit of packets the PPU may still send: each incoming unicast packet adds
// one, each incoming multicast packet adds FANOUT (one packet in may become N
// out), each outgoing packet takes one. A unicast PPU must therefore never
// send more packets than it received; an outgoing packet without credit
// raises alarm[p] for one cycle, which flushes that PPU's packet memory and
// resets its processor. At the end of each window the credit is capped at
// NUM_BUF*FANOUT, the most a PPU can legitimately hold, so credit left by
// dropped packets cannot be saved up for a later burst.
//
// Time-stamps: the monitor also keeps the time base `now` (a free-running
// 16-bit cycle counter). The flow classifier writes it into every packet's
// header word on arrival; when the packet starts on the output its age,
// now - stamp (modulo 2**16), is compared with MAX_DELAY. An older packet
// raises delay_alarm for one cycle and is counted in delay_count: it signals
// that processing has slowed down abnormally. Unlike the count check this
// only reports; it does not flush or reset anything. max_age holds the
// largest age seen. Ages are only meaningful below 2**16 cycles.
//
// Timing: an event on cycle t updates the counters at the end of t; the alarm
// is high in cycle t+1.
//
// Following the design description: an input and an output packet counter
// within a window, unicast traffic must not leave more packets than arrive,
// multicast may multiply by N, and on a violation the packet memory is
// flushed and the processor reset. Own choices: the credit formulation, the
// window length, FANOUT and the cap.
module io_monitor #(
  parameter int unsigned NUM_PPU = 4,
  parameter int unsigned WINDOW  = 4096,
  parameter int unsigned FANOUT  = 4,
  parameter int unsigned NUM_BUF = 4,
  parameter int unsigned MAX_DELAY = 4096
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_pkt,      // packet handed to a PPU
  input  logic [$clog2(NUM_PPU)-1:0] in_ppu,
  input  logic                       in_mcast,
  input  logic                       out_pkt,     // packet sent by a PPU
  input  logic [$clog2(NUM_PPU)-1:0] out_ppu,
  input  logic [15:0]                out_stamp,   // time-stamp of that packet
  output logic [15:0]                now,
  output logic                       delay_alarm,
  output logic [15:0]                delay_count,
  output logic [15:0]                max_age,
  output logic [NUM_PPU-1:0]         alarm,
  output logic [15:0]                in_win   [NUM_PPU],
  output logic [15:0]                out_win  [NUM_PPU],
  output logic [31:0]                in_total,
  output logic [31:0]                out_total,
  output logic [15:0]                alarm_count
);

  localparam int unsigned CW  = 16;
  localparam logic [CW-1:0] CAP = CW'(NUM_BUF * FANOUT);

  logic [CW-1:0]               credit [NUM_PPU];
  logic [$clog2(WINDOW)-1:0]   tick;
  logic                        win_end;
  assign win_end = (tick == '1) || (32'(tick) == WINDOW - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tick        <= '0;
      alarm       <= '0;
      in_total    <= '0;
      out_total   <= '0;
      alarm_count <= '0;
      for (int p = 0; p < NUM_PPU; p++) begin
        credit[p]  <= '0;
        in_win[p]  <= '0;
        out_win[p] <= '0;
      end
    end else begin
      tick  <= win_end ? '0 : tick + 1'b1;
      alarm <= '0;
      if (in_pkt)  in_total  <= in_total + 1'b1;
      if (out_pkt) out_total <= out_total + 1'b1;
      for (int p = 0; p < NUM_PPU; p++) begin
        logic [CW-1:0] c;
        logic          is_in, is_out;
        is_in  = in_pkt  && (int'(in_ppu)  == p);
        is_out = out_pkt && (int'(out_ppu) == p);
        c = credit[p];
        if (is_in) c = c + (in_mcast ? CW'(FANOUT) : CW'(1));
        if (is_out) begin
          if (c == '0) begin
            alarm[p]    <= 1'b1;
            alarm_count <= alarm_count + 1'b1;
          end else begin
            c = c - 1'b1;
          end
        end
        if (win_end && c > CAP) c = CAP;
        credit[p] <= c;
        if (win_end) begin
          in_win[p]  <= is_in  ? 16'd1 : 16'd0;
          out_win[p] <= is_out ? 16'd1 : 16'd0;
        end else begin
          if (is_in)  in_win[p]  <= in_win[p] + 1'b1;
          if (is_out) out_win[p] <= out_win[p] + 1'b1;
        end
      end
    end
  end

  // time-stamp check
  logic [15:0] age;
  assign age = now - out_stamp;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      now         <= '0;
      delay_alarm <= 1'b0;
      delay_count <= '0;
      max_age     <= '0;
    end else begin
      now         <= now + 16'd1;
      delay_alarm <= out_pkt && (32'(age) > MAX_DELAY);
      if (out_pkt && 32'(age) > MAX_DELAY) delay_count <= delay_count + 16'd1;
      if (out_pkt && age > max_age) max_age <= age;
    end
  end

endmodule
