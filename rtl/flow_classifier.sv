// flow_classifier: assigns every incoming packet to one packet processing
// unit and writes the control information the PPU program needs into the
// packet's header word.
//
// The first HOLD_WORDS words of a packet (header word, Ethernet and IPv4
// header up to the destination address) are held, the flow key is read from
// them, and then the held words and the rest of the packet are passed to the
// chosen PPU without further storage (cut-through). All packets of a flow go
// to the same PPU: the PPU index is a hash of the IPv4 source address,
// destination address and protocol, modulo NUM_PPU. The header word (word 0)
// is replaced by: application id (UDP packets use the CM header-insertion
// application, all others IPv4 forwarding), a multicast flag (destination in
// 224.0.0.0/4), the PPU index, the arrival time-stamp `stamp_now` (taken in
// the decision cycle, used by the I/O monitor to measure how long the packet
// stays in the processor) and the flow hash (sp_pkg::make_hdr). For each
// packet handed over, disp_valid pulses with the PPU index and the multicast
// flag, which the I/O monitor counts.
//
// Byte b of a packet is in word b/8, bits [63-8*(b%8) -: 8]; byte 8 is the
// first byte of the Ethernet frame. A packet costs one idle cycle for the
// decision. Stream handshake: valid/ready with sop/eop.
//
// Following the design description: flow classification into the PPUs and
// control information that selects the application and tells the I/O monitor
// the protocol type. Own choices: the hash, the header-word format, the
// application rule and the hold-then-cut-through organisation.
module flow_classifier
  import sp_pkg::*;
#(
  parameter int unsigned NUM_PPU    = 4,
  parameter int unsigned HOLD_WORDS = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [15:0]                stamp_now,   // time base for the time-stamp
  // from the I/O system
  input  logic                       in_valid,
  input  logic [63:0]                in_data,
  input  logic                       in_sop,
  input  logic                       in_eop,
  output logic                       in_ready,
  // to the PPUs (shared data, one valid/ready per PPU)
  output logic [NUM_PPU-1:0]         out_valid,
  output logic [63:0]                out_data,
  output logic                       out_sop,
  output logic                       out_eop,
  input  logic [NUM_PPU-1:0]         out_ready,
  // dispatch event
  output logic                       disp_valid,
  output logic [$clog2(NUM_PPU)-1:0] disp_ppu,
  output logic                       disp_mcast
);

  localparam int unsigned PW = $clog2(NUM_PPU);
  localparam int unsigned HW = $clog2(HOLD_WORDS + 1);

  typedef enum logic [1:0] {S_COLLECT, S_DECIDE, S_EMIT, S_PASS} state_e;
  state_e state;

  logic [63:0]   hold [HOLD_WORDS];
  logic [HW-1:0] held, emit_idx;
  logic          eop_seen;

  logic [PW-1:0] tgt;
  logic [63:0]   hdr_word;

  function automatic logic [7:0] pkt_byte(int unsigned b);
    return hold[b / 8][63 - 8 * (b % 8) -: 8];
  endfunction

  // flow key and decision, from the held words
  logic [31:0] src_ip, dst_ip, hash;
  logic [7:0]  proto;
  logic        is_ip, mcast;
  app_id_e     app;
  always_comb begin
    is_ip  = {pkt_byte(20), pkt_byte(21)} == 16'h0800;
    proto  = pkt_byte(31);
    src_ip = {pkt_byte(34), pkt_byte(35), pkt_byte(36), pkt_byte(37)};
    dst_ip = {pkt_byte(38), pkt_byte(39), pkt_byte(40), pkt_byte(41)};
    hash   = src_ip ^ {dst_ip[15:0], dst_ip[31:16]} ^ {24'h0, proto};
    hash   = hash ^ (hash >> 16);
    hash   = hash ^ (hash >> 8);
    mcast  = is_ip && (dst_ip[31:28] == 4'hE);
    app    = (is_ip && proto == 8'd17) ? APP_CM_HDR : APP_IPV4_FWD;
  end

  logic out_fire_any;
  assign out_fire_any = |(out_valid & out_ready);

  always_comb begin
    out_valid = '0;
    out_data  = in_data;
    out_sop   = 1'b0;
    out_eop   = in_eop;
    in_ready  = 1'b0;
    unique case (state)
      S_COLLECT: in_ready = 1'b1;
      S_DECIDE:  ;
      S_EMIT: begin
        out_valid[tgt] = 1'b1;
        out_data       = (emit_idx == '0) ? hdr_word : hold[emit_idx];
        out_sop        = (emit_idx == '0);
        out_eop        = eop_seen && (emit_idx == held - 1'b1);
      end
      S_PASS: begin
        out_valid[tgt] = in_valid;
        in_ready       = out_ready[tgt];
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_COLLECT;
      held       <= '0;
      emit_idx   <= '0;
      eop_seen   <= 1'b0;
      tgt        <= '0;
      hdr_word   <= '0;
      disp_valid <= 1'b0;
      disp_ppu   <= '0;
      disp_mcast <= 1'b0;
      for (int i = 0; i < HOLD_WORDS; i++) hold[i] <= '0;
    end else begin
      disp_valid <= 1'b0;
      unique case (state)
        S_COLLECT: if (in_valid) begin
          if (in_sop || held != '0) begin
            if (in_sop) begin
              for (int i = 1; i < HOLD_WORDS; i++) hold[i] <= '0;
              hold[0] <= in_data;
              held    <= 1;
            end else begin
              hold[held] <= in_data;
              held       <= held + 1'b1;
            end
            if (in_eop || (!in_sop && held == HW'(HOLD_WORDS - 1))) begin
              eop_seen <= in_eop;
              state    <= S_DECIDE;
            end
          end
        end
        S_DECIDE: begin
          tgt        <= PW'(hash % NUM_PPU);
          hdr_word   <= make_hdr(app, mcast, 4'(hash % NUM_PPU), hash, stamp_now);
          emit_idx   <= '0;
          disp_valid <= 1'b1;
          disp_ppu   <= PW'(hash % NUM_PPU);
          disp_mcast <= mcast;
          state      <= S_EMIT;
        end
        S_EMIT: if (out_fire_any) begin
          emit_idx <= emit_idx + 1'b1;
          if (emit_idx == held - 1'b1) begin
            held  <= '0;
            state <= eop_seen ? S_COLLECT : S_PASS;
          end
        end
        S_PASS: if (in_valid && in_ready && in_eop) state <= S_COLLECT;
      endcase
    end
  end

endmodule
