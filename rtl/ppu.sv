// ppu: one packet processing unit of the secure packet processor.
//
// A PPU surrounds a 32-bit processor core (outside this module; its ports are
// the core_* signals) with everything the core needs to process packets from
// local memory only:
//   - imem_secure    instruction memory with a protected copy for recovery,
//   - a data memory  for flow, local and global processing state,
//   - pkt_buffer     the packet buffers, the current packet mapped to a fixed
//                    address window,
//   - instr_monitor  the instruction-level security monitor watching the
//                    core's instruction address stream,
// and the recovery controller that ties the monitor to the rest.
//
// Core data-port address map (byte addresses, sp_pkg):
//   0x1000_0000 +   current packet; header word at offset 0, the Ethernet
//                   frame from offset 8 (so the IPv4 TTL is at 0x1000_001E)
//   0x2000_0000     write: 1 forward, 2 drop, 3 send a copy;
//                   read:  [31:16] packet length in 64-bit words, [0] packet
//                   available
//   0x4000_0000 +   instruction memory (write only)
//   anything else   data memory, DMEM_WORDS words from address 0
// Byte lanes are big-endian: core_dbe[3] selects bits [31:24], the byte at the
// lowest address. Fetch and load data return one cycle after the address.
// Only address bits [31:28] (region) and the word index inside the region are
// decoded; bits [1:0] are replaced by core_dbe and the middle bits (27:12 at
// the default sizes) are ignored, so each window repeats within its region.
// Lint reports these unused address bits; that is intended.
//
// Recovery: when the monitor raises its drop (cycle t+4 for an offending
// address in cycle t) the current packet is dropped at the end of that cycle,
// the instruction memory switches to its clean bank, and the core is held in
// reset (core_rst) for RECOVERY_CYCLES cycles, during which the monitor is
// flushed. The core then restarts at its entry point with the next packet. An
// alarm from the I/O monitor flushes all queued packets and resets the core
// the same way, without touching the instruction memory.
//
// Following the design description: local instruction, data and packet
// memories, static addressing of the current packet, the four-stage monitor,
// packet drop and instruction-memory restore on detection, and a recovery of
// about six cycles. Own choices: the address map, the command register, the
// data-memory size and the gating of the monitor stream during reset.
module ppu
  import sp_pkg::*;
#(
  parameter int unsigned IMEM_IDX_W      = 9,     // 512 instructions
  parameter int unsigned BB_W            = 8,
  parameter int unsigned DMEM_WORDS      = 1024,  // 4 KiB data memory
  parameter int unsigned NUM_BUF         = 4,
  parameter int unsigned BUF_WORDS       = 256,
  parameter int unsigned RECOVERY_CYCLES = 6,
  parameter logic [31:0] ENTRY_ADDR      = 32'h0000_0200
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // packets in (from the flow classifier)
  input  logic                    in_valid,
  input  logic [63:0]             in_data,
  input  logic                    in_sop,
  input  logic                    in_eop,
  output logic                    in_ready,
  // packets out (to the output arbiter)
  output logic                    out_valid,
  output logic [63:0]             out_data,
  output logic                    out_sop,
  output logic                    out_eop,
  input  logic                    out_ready,
  // trusted loader: program and basic-block table
  input  logic                    ld_imem_we,
  input  logic                    ld_bb_we,
  input  logic [IMEM_IDX_W-1:0]   ld_idx,
  input  logic [31:0]             ld_word,
  input  logic                    ld_bb_valid,
  input  logic                    ld_bb_jump,
  input  logic [BB_W-1:0]         ld_bb,
  input  logic [IMEM_IDX_W-1:0]   ld_bb_nexthop,
  // I/O monitor alarm for this PPU
  input  logic                    io_alarm,
  // processor core
  output logic                    core_rst,
  input  logic [31:0]             core_iaddr,
  input  logic                    core_ivalid,
  output logic [31:0]             core_idata,
  input  logic [31:0]             core_daddr,
  input  logic [31:0]             core_dwdata,
  input  logic [3:0]              core_dbe,
  input  logic                    core_dwe,
  input  logic                    core_dre,
  output logic [31:0]             core_drdata,
  // status
  output logic                    attack_drop,     // monitor drop taken
  output logic [15:0]             viol_count,
  output logic [15:0]             fwd_count,
  output logic [15:0]             drop_count,
  output logic [15:0]             reload_count,
  output logic                    reloading,       // golden copy being restored
  output logic                    active_bank
);

  localparam int unsigned WW = $clog2(BUF_WORDS);
  localparam int unsigned DW = $clog2(DMEM_WORDS);

  // ---------------------------------------------------------------------
  // recovery controller
  typedef enum logic {P_RUN, P_RECOVER} pstate_e;
  pstate_e                            pstate;
  logic [$clog2(RECOVERY_CYCLES+1)-1:0] rcnt;
  logic                               mon_drop;

  assign attack_drop = mon_drop && (pstate == P_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pstate <= P_RUN;
      rcnt   <= '0;
    end else if ((attack_drop || io_alarm) && pstate == P_RUN) begin
      pstate <= P_RECOVER;
      rcnt   <= ($bits(rcnt))'(RECOVERY_CYCLES - 1);
    end else if (pstate == P_RECOVER) begin
      if (rcnt == '0) pstate <= P_RUN;
      else            rcnt   <= rcnt - 1'b1;
    end
  end

  assign core_rst = !rst_n || (pstate == P_RECOVER);

  // ---------------------------------------------------------------------
  // instruction-level monitor
  instr_monitor #(.IDX_W(IMEM_IDX_W), .BB_W(BB_W), .ENTRY_ADDR(ENTRY_ADDR)) u_mon (
    .clk, .rst_n,
    .flush(pstate == P_RECOVER),
    .iaddr(core_iaddr), .ivalid(core_ivalid && !core_rst),
    .ld_we(ld_bb_we), .ld_idx, .ld_valid(ld_bb_valid), .ld_jump(ld_bb_jump),
    .ld_bb, .ld_nexthop(ld_bb_nexthop),
    .drop_o(mon_drop), .viol_count
  );

  // ---------------------------------------------------------------------
  // data-port decode
  logic [3:0] region;
  assign region = core_daddr[31:28];

  logic is_pkt, is_ctrl, is_imem, is_dmem;
  assign is_pkt  = (region == MAP_PKT);
  assign is_ctrl = (region == MAP_CTRL);
  assign is_imem = (region == MAP_IMEM);
  assign is_dmem = !(is_pkt || is_ctrl || is_imem);

  // instruction memory
  imem_secure #(.IDX_W(IMEM_IDX_W)) u_imem (
    .clk, .rst_n,
    .rd_addr(core_iaddr[IMEM_IDX_W+1:2]), .rd_data(core_idata),
    .wr_en(core_dwe && is_imem && !core_rst),
    .wr_addr(core_daddr[IMEM_IDX_W+1:2]), .wr_data(core_dwdata),
    .ld_we(ld_imem_we), .ld_addr(ld_idx), .ld_data(ld_word),
    .recover(attack_drop), .active_bank, .reloading, .reload_count
  );

  // packet buffers
  logic          cur_avail;
  logic [WW:0]   cur_len;
  logic [7:0]    pkt_be;
  logic [63:0]   pkt_rdata;
  logic          cmd_wr;
  assign cmd_wr = core_dwe && is_ctrl && !core_rst;
  assign pkt_be = core_daddr[2] ? {core_dbe[0], core_dbe[1], core_dbe[2], core_dbe[3], 4'b0000}
                                : {4'b0000, core_dbe[0], core_dbe[1], core_dbe[2], core_dbe[3]};

  pkt_buffer #(.NUM_BUF(NUM_BUF), .BUF_WORDS(BUF_WORDS)) u_pkt (
    .clk, .rst_n,
    .in_valid, .in_data, .in_sop, .in_eop, .in_ready,
    .cur_avail, .cur_len,
    .c_addr(core_daddr[WW+2:3]), .c_re(core_dre && is_pkt),
    .c_we(core_dwe && is_pkt && !core_rst), .c_be(pkt_be),
    .c_wdata({core_dwdata, core_dwdata}), .c_rdata(pkt_rdata),
    .c_forward(cmd_wr && core_dwdata[1:0] == CMD_FORWARD),
    .c_drop(cmd_wr && core_dwdata[1:0] == CMD_DROP),
    .c_copy(cmd_wr && core_dwdata[1:0] == CMD_COPY),
    .drop_cur(attack_drop), .flush(io_alarm),
    .out_valid, .out_data, .out_sop, .out_eop, .out_ready,
    .fwd_count, .drop_count
  );

  // data memory
  logic [31:0] dmem [DMEM_WORDS];
  logic [31:0] dmem_q;
  always_ff @(posedge clk) begin
    if (core_dwe && is_dmem && !core_rst)
      for (int i = 0; i < 4; i++)
        if (core_dbe[i]) dmem[core_daddr[DW+1:2]][8*i +: 8] <= core_dwdata[8*i +: 8];
    if (core_dre && is_dmem) dmem_q <= dmem[core_daddr[DW+1:2]];
  end

  // read-data select, one cycle after the request
  logic [1:0]  rsel;      // 0 dmem, 1 pkt upper, 2 pkt lower, 3 ctrl
  logic [31:0] ctrl_q;
  always_ff @(posedge clk) begin
    if (core_dre) begin
      rsel   <= is_pkt ? (core_daddr[2] ? 2'd2 : 2'd1) : (is_ctrl ? 2'd3 : 2'd0);
      ctrl_q <= {16'(cur_len), 15'd0, cur_avail};
    end
  end

  always_comb begin
    unique case (rsel)
      2'd1:    core_drdata = pkt_rdata[63:32];
      2'd2:    core_drdata = pkt_rdata[31:0];
      2'd3:    core_drdata = ctrl_q;
      default: core_drdata = dmem_q;
    endcase
  end

endmodule
