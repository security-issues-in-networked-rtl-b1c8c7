// output_arbiter: merges the processed-packet streams of the PPUs onto the
// single outgoing interface.
//
// Whole packets are switched: when the output is free the arbiter grants, in
// round-robin order starting after the last winner, the next PPU that offers
// a packet, and keeps that grant until the packet's eop has been accepted.
// The granted input is connected straight to the output (no storage), so a
// beat passes in the same cycle. For every packet that starts on the output,
// pkt_valid pulses with the index of the PPU it came from and its first
// (header) word in pkt_hdr; the I/O monitor
// counts these as outgoing packets.
//
// Following the design description: one output arbiter that sends the
// processed packets to the outgoing interface. Own choices: round robin,
// packet-granular switching and the valid/ready sop/eop handshake.
module output_arbiter #(
  parameter int unsigned NUM_PPU = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NUM_PPU-1:0]         in_valid,
  input  logic [63:0]                in_data [NUM_PPU],
  input  logic [NUM_PPU-1:0]         in_sop,
  input  logic [NUM_PPU-1:0]         in_eop,
  output logic [NUM_PPU-1:0]         in_ready,
  output logic                       out_valid,
  output logic [63:0]                out_data,
  output logic                       out_sop,
  output logic                       out_eop,
  input  logic                       out_ready,
  output logic                       pkt_valid,
  output logic [$clog2(NUM_PPU)-1:0] pkt_src,
  output logic [63:0]                pkt_hdr
);

  localparam int unsigned PW = $clog2(NUM_PPU);

  logic          busy;
  logic [PW-1:0] grant, last;

  // next requester after `last`, round robin
  logic          pick_ok;
  logic [PW-1:0] pick;
  always_comb begin
    pick_ok = 1'b0;
    pick    = last;
    for (int k = 1; k <= NUM_PPU; k++) begin
      logic [PW-1:0] c;
      c = PW'((int'(last) + k) % NUM_PPU);
      if (!pick_ok && in_valid[c]) begin
        pick_ok = 1'b1;
        pick    = PW'(c);
      end
    end
  end

  logic [PW-1:0] sel;
  logic          sel_ok;
  assign sel    = busy ? grant : pick;
  assign sel_ok = busy || pick_ok;

  always_comb begin
    in_ready       = '0;
    in_ready[sel]  = sel_ok && out_ready;
    out_valid      = sel_ok && in_valid[sel];
    out_data       = in_data[sel];
    out_sop        = in_sop[sel];
    out_eop        = in_eop[sel];
  end

  logic fire;
  assign fire = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      grant     <= '0;
      last      <= PW'(NUM_PPU - 1);
      pkt_valid <= 1'b0;
      pkt_src   <= '0;
      pkt_hdr   <= '0;
    end else begin
      pkt_valid <= fire && out_sop;
      pkt_src   <= sel;
      if (fire && out_sop) pkt_hdr <= out_data;
      if (fire) begin
        if (out_eop) begin
          busy <= 1'b0;
          last <= sel;
        end else if (!busy) begin
          busy  <= 1'b1;
          grant <= sel;
        end
      end
    end
  end

  // a packet starts with sop
  always_ff @(posedge clk)
    if (rst_n && fire && !busy)
      a_first_sop: assert (out_sop) else $error("packet granted without sop");

endmodule
