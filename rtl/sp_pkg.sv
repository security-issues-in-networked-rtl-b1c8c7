// sp_pkg: types and constants shared by the secure packet processor.
//
// The internal packet stream is 64 bits wide, matching the 64-bit data path of
// the prototype. Each packet starts with one 64-bit header word (as on the
// NetFPGA internal bus) that the flow classifier fills with the control
// information; the Ethernet frame follows from word 1. The layout of that
// header word, the address map seen by a processor core and the entry format
// of the basic-block table are this design's own choices; the packet window
// base 0x1000_0000 follows the static-reference programming model in which
// the IP TTL byte of the current packet sits at 0x1000_001E.
//
// Only the PPU uses the address-map and command constants; when a module
// that does not is compiled on its own, lint lists them as unused.
package sp_pkg;

  localparam int unsigned DATA_W = 64;   // packet data path width

  // One beat of the internal packet stream.
  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic              sop;
    logic              eop;
  } pkt_beat_t;

  // Applications preloaded on every PPU (the two the design is evaluated with).
  typedef enum logic [7:0] {
    APP_IPV4_FWD = 8'd0,
    APP_CM_HDR   = 8'd1
  } app_id_e;

  // Header word fields written by the flow classifier.
  //   [63:56] application id, [55] multicast, [51:48] PPU index,
  //   [47:32] arrival time-stamp (low 16 bits of the cycle count),
  //   [31:0]  flow hash.
  function automatic logic [DATA_W-1:0] make_hdr(app_id_e app, logic mcast,
                                                 logic [3:0] ppu_idx,
                                                 logic [31:0] hash,
                                                 logic [15:0] stamp);
    logic [DATA_W-1:0] h;
    h        = '0;
    h[63:56] = app;
    h[55]    = mcast;
    h[51:48] = ppu_idx;
    h[47:32] = stamp;
    h[31:0]  = hash;
    return h;
  endfunction

  // Address map of a processor core's data port, selected by address bits
  // [31:28]: 0x0xxx_xxxx data memory (flow, local and global state; also any
  // region not listed), 0x1000_0000 current packet, 0x2000_0000 packet
  // control / status, 0x4000_0000 instruction memory window.
  localparam logic [3:0]  MAP_PKT  = 4'h1;
  localparam logic [3:0]  MAP_CTRL = 4'h2;
  localparam logic [3:0]  MAP_IMEM = 4'h4;

  // Commands written to CTRL_ADDR by the packet program.
  localparam logic [1:0] CMD_FORWARD = 2'd1;  // send current packet, free it
  localparam logic [1:0] CMD_DROP    = 2'd2;  // discard current packet
  localparam logic [1:0] CMD_COPY    = 2'd3;  // send a copy, keep processing

endpackage
