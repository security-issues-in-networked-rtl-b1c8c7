// secure_np_top: four-core secure packet processor.
//
// What it does
//   Packets arrive on one 64-bit stream. The flow classifier picks a packet
//   processing unit (PPU) per flow and tags the header word. Each PPU holds the
//   packet in its buffer while its processor core runs the application on it;
//   an instruction-level hardware monitor checks every executed instruction
//   address against the program's control-flow graph, and on a mismatch the
//   PPU drops the packet, resets the core and restores the instruction memory.
//   The output arbiter merges the PPU output streams round robin onto one
//   output stream. The I/O monitor counts packets into and out of every PPU
//   and, if a PPU emits more packets than it was given (beyond multicast
//   fan-out), flushes that PPU's packet memory and resets its core.
//
// Structure
//   flow_classifier -> ppu[0..NUM_PPU-1] -> output_arbiter, with io_monitor
//   watching the classifier's dispatch events and the arbiter's packet-start
//   events. The processor cores are not part of this design: each PPU's core
//   bus (instruction fetch, data access, reset) is brought out as an array
//   port so a core can be attached per PPU.
//
// Interface and timing
//   in_* / out_*      valid/ready streams, sop/eop mark the first and last
//                     64-bit word, one word per cycle when both sides agree.
//   ld_*              trusted loader: writes one instruction word and one
//                     basic-block table entry per cycle into every PPU whose
//                     bit is set in ld_sel. Used while the system is idle.
//   core_*[p]         core bus of PPU p: instruction word returned one cycle
//                     after the address, data read one cycle after dre.
//   attack_drop[p]    monitor detection; four cycles after the offending
//                     address. The packet is gone and core_rst[p] is raised
//                     in the next cycle for RECOVERY_CYCLES cycles.
//   io_alarm[p]       I/O monitor alarm, one cycle after the offending output.
//   (Only the time-stamp field of the header word the arbiter reports is used
//   here; lint lists the other bits as unused.)
//   delay_alarm       a packet left more than MAX_DELAY cycles after it
//                     arrived (time-stamp in its header word); report only.
//
// Document versus design choices
//   The four-PPU layout, the 64-bit data path, the per-core instruction
//   monitor with a basic-block table and two-entry FIFO, recovery by packet
//   drop plus core reset plus instruction-memory restore, and the I/O monitor
//   that compares input and output packet counts all follow the document. The
//   stream handshakes, the loader bus, the header-word layout and the I/O
//   monitor's credit rule are this design's own choices.
module secure_np_top
  import sp_pkg::*;
#(
  parameter int unsigned NUM_PPU         = 4,
  parameter int unsigned IMEM_IDX_W      = 9,
  parameter int unsigned BB_W            = 8,
  parameter int unsigned DMEM_WORDS      = 1024,
  parameter int unsigned NUM_BUF         = 4,
  parameter int unsigned BUF_WORDS       = 256,
  parameter int unsigned RECOVERY_CYCLES = 6,
  parameter logic [31:0] ENTRY_ADDR      = 32'h0000_0200,
  parameter int unsigned IO_WINDOW       = 4096,
  parameter int unsigned MCAST_FANOUT    = 4,
  parameter int unsigned MAX_DELAY       = 4096
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // network input
  input  logic                    in_valid,
  input  logic [63:0]             in_data,
  input  logic                    in_sop,
  input  logic                    in_eop,
  output logic                    in_ready,
  // network output
  output logic                    out_valid,
  output logic [63:0]             out_data,
  output logic                    out_sop,
  output logic                    out_eop,
  input  logic                    out_ready,
  // trusted loader
  input  logic [NUM_PPU-1:0]      ld_sel,
  input  logic                    ld_imem_we,
  input  logic                    ld_bb_we,
  input  logic [IMEM_IDX_W-1:0]   ld_idx,
  input  logic [31:0]             ld_word,
  input  logic                    ld_bb_valid,
  input  logic                    ld_bb_jump,
  input  logic [BB_W-1:0]         ld_bb,
  input  logic [IMEM_IDX_W-1:0]   ld_bb_nexthop,
  // processor cores, one bus per PPU
  output logic [NUM_PPU-1:0]      core_rst,
  input  logic [31:0]             core_iaddr  [NUM_PPU],
  input  logic [NUM_PPU-1:0]      core_ivalid,
  output logic [31:0]             core_idata  [NUM_PPU],
  input  logic [31:0]             core_daddr  [NUM_PPU],
  input  logic [31:0]             core_dwdata [NUM_PPU],
  input  logic [3:0]              core_dbe    [NUM_PPU],
  input  logic [NUM_PPU-1:0]      core_dwe,
  input  logic [NUM_PPU-1:0]      core_dre,
  output logic [31:0]             core_drdata [NUM_PPU],
  // status
  output logic [NUM_PPU-1:0]      attack_drop,
  output logic [NUM_PPU-1:0]      io_alarm,
  output logic [15:0]             viol_count   [NUM_PPU],
  output logic [15:0]             fwd_count    [NUM_PPU],
  output logic [15:0]             drop_count   [NUM_PPU],
  output logic [15:0]             reload_count [NUM_PPU],
  output logic [NUM_PPU-1:0]      active_bank,
  output logic [NUM_PPU-1:0]      reloading,
  output logic [15:0]             io_in_win    [NUM_PPU],
  output logic [15:0]             io_out_win   [NUM_PPU],
  output logic [31:0]             pkts_in,
  output logic [31:0]             pkts_out,
  output logic [15:0]             io_alarm_count,
  output logic                    delay_alarm,
  output logic [15:0]             delay_count,
  output logic [15:0]             max_age
);

  localparam int unsigned PW = $clog2(NUM_PPU);

  // classifier -> PPUs
  logic [NUM_PPU-1:0] cls_valid, cls_ready;
  logic [63:0]        cls_data;
  logic               cls_sop, cls_eop;
  logic               disp_valid, disp_mcast;
  logic [PW-1:0]      disp_ppu;

  logic [15:0] now;

  flow_classifier #(.NUM_PPU(NUM_PPU)) u_cls (
    .clk, .rst_n, .stamp_now(now),
    .in_valid, .in_data, .in_sop, .in_eop, .in_ready,
    .out_valid(cls_valid), .out_data(cls_data), .out_sop(cls_sop), .out_eop(cls_eop),
    .out_ready(cls_ready),
    .disp_valid, .disp_ppu, .disp_mcast
  );

  // PPUs -> arbiter
  logic [NUM_PPU-1:0] ppu_valid, ppu_sop, ppu_eop, ppu_ready;
  logic [63:0]        ppu_data [NUM_PPU];

  for (genvar p = 0; p < NUM_PPU; p++) begin : g_ppu
    ppu #(
      .IMEM_IDX_W(IMEM_IDX_W), .BB_W(BB_W), .DMEM_WORDS(DMEM_WORDS),
      .NUM_BUF(NUM_BUF), .BUF_WORDS(BUF_WORDS),
      .RECOVERY_CYCLES(RECOVERY_CYCLES), .ENTRY_ADDR(ENTRY_ADDR)
    ) u_ppu (
      .clk, .rst_n,
      .in_valid(cls_valid[p]), .in_data(cls_data), .in_sop(cls_sop), .in_eop(cls_eop),
      .in_ready(cls_ready[p]),
      .out_valid(ppu_valid[p]), .out_data(ppu_data[p]), .out_sop(ppu_sop[p]),
      .out_eop(ppu_eop[p]), .out_ready(ppu_ready[p]),
      .ld_imem_we(ld_imem_we && ld_sel[p]), .ld_bb_we(ld_bb_we && ld_sel[p]),
      .ld_idx, .ld_word, .ld_bb_valid, .ld_bb_jump, .ld_bb, .ld_bb_nexthop,
      .io_alarm(io_alarm[p]),
      .core_rst(core_rst[p]), .core_iaddr(core_iaddr[p]), .core_ivalid(core_ivalid[p]),
      .core_idata(core_idata[p]), .core_daddr(core_daddr[p]), .core_dwdata(core_dwdata[p]),
      .core_dbe(core_dbe[p]), .core_dwe(core_dwe[p]), .core_dre(core_dre[p]),
      .core_drdata(core_drdata[p]),
      .attack_drop(attack_drop[p]), .viol_count(viol_count[p]), .fwd_count(fwd_count[p]),
      .drop_count(drop_count[p]), .reload_count(reload_count[p]),
      .active_bank(active_bank[p]), .reloading(reloading[p])
    );
  end

  logic          arb_pkt;
  logic [PW-1:0] arb_src;
  logic [63:0]   arb_hdr;

  output_arbiter #(.NUM_PPU(NUM_PPU)) u_arb (
    .clk, .rst_n,
    .in_valid(ppu_valid), .in_data(ppu_data), .in_sop(ppu_sop), .in_eop(ppu_eop),
    .in_ready(ppu_ready),
    .out_valid, .out_data, .out_sop, .out_eop, .out_ready,
    .pkt_valid(arb_pkt), .pkt_src(arb_src), .pkt_hdr(arb_hdr)
  );

  io_monitor #(
    .NUM_PPU(NUM_PPU), .WINDOW(IO_WINDOW), .FANOUT(MCAST_FANOUT), .NUM_BUF(NUM_BUF),
    .MAX_DELAY(MAX_DELAY)
  ) u_iomon (
    .clk, .rst_n,
    .in_pkt(disp_valid), .in_ppu(disp_ppu), .in_mcast(disp_mcast),
    .out_pkt(arb_pkt), .out_ppu(arb_src), .out_stamp(arb_hdr[47:32]),
    .now, .delay_alarm, .delay_count, .max_age,
    .alarm(io_alarm), .in_win(io_in_win), .out_win(io_out_win),
    .in_total(pkts_in), .out_total(pkts_out), .alarm_count(io_alarm_count)
  );

endmodule
