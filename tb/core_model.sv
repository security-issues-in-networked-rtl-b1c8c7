// core_model: behavioural stand-in for the 32-bit processor core of a PPU,
// used only by testbenches. It is not a processor: it walks the instruction
// addresses of the test program in tb_prog_pkg one per cycle and makes the
// data accesses that program would make.
//
// Per packet: poll the control register until a packet is available (block
// 0), read a marker word from the payload at packet offset 0x38 (block 1),
// then run the body (block 2) BODY_LOOPS times: in the first pass read the IP
// TTL at 0x1000_001E, write it back decremented and count the packet in data
// memory word 0; if the marker is DUP_MAGIC, ask for a copy of the packet in
// every pass (a duplication attack made of valid instructions). Block 3
// forwards the packet, or drops it if the TTL was already 0. If the marker is
// ATTACK_MAGIC, 0x214 jumps to 0x1E4 instead: that code overwrites the
// instruction word at 0x218 (first attack instruction) and, five instructions
// later, asks for a copy of the packet; the monitor stops the core before that
// request is made, so only the memory write lands and has to be repaired.
//
// While core_rst is high the model restarts at the entry point. It also
// checks every fetched instruction word against the program image and counts
// mismatches in fetch_errors.
module core_model
  import tb_prog_pkg::*;
#(
  parameter int          BODY_LOOPS   = 66,            // about 600 cycles per packet
  parameter logic [31:0] ATTACK_MAGIC = 32'hBADC0DE0,
  parameter logic [31:0] DUP_MAGIC    = 32'hD0D0D0D0
) (
  input  logic        clk,
  input  logic        core_rst,
  output logic [31:0] iaddr,
  output logic        ivalid,
  input  logic [31:0] idata,
  output logic [31:0] daddr,
  output logic [31:0] dwdata,
  output logic [3:0]  dbe,
  output logic        dwe,
  output logic        dre,
  input  logic [31:0] drdata,
  output int          fetch_errors,
  output int          attacks_started
);

  localparam logic [31:0] CTRL = 32'h2000_0000;
  localparam logic [31:0] PKT  = 32'h1000_0000;

  logic [31:0] pc = ENTRY;
  logic        avail = 0, dup = 0, ttl_zero = 0;
  int          iter = 0;
  logic [31:0] last_pc = 0;
  logic        last_valid = 0;

  initial begin
    fetch_errors    = 0;
    attacks_started = 0;
  end

  assign iaddr  = pc;
  assign ivalid = !core_rst;

  // data accesses of the instruction at pc
  always_comb begin
    daddr = 0; dwdata = 0; dbe = 4'hF; dwe = 0; dre = 0;
    if (!core_rst) begin
      case (pc)
        32'h200: begin dre = 1; daddr = CTRL; end
        32'h210: begin dre = 1; daddr = PKT + 32'h38; end
        32'h21C: if (iter == 0) begin dre = 1; daddr = PKT + 32'h1C; end
        32'h220: if (iter == 0 && drdata[15:8] != 0) begin
                   dwe = 1; daddr = PKT + 32'h1C; dbe = 4'b0010;
                   dwdata = {16'h0, drdata[15:8] - 8'd1, 8'h0};
                 end
        32'h224: if (dup) begin dwe = 1; daddr = CTRL; dwdata = 32'd3; end
        32'h228: if (iter == 0) begin dre = 1; daddr = 32'h0; end
        32'h22C: if (iter == 0) begin dwe = 1; daddr = 32'h0; dwdata = drdata + 1; end
        32'h23C: begin dwe = 1; daddr = CTRL; dwdata = ttl_zero ? 32'd2 : 32'd1; end
        32'h1E4: begin dwe = 1; daddr = 32'h4000_0218; dwdata = 32'hDEAD_BEEF; end
        32'h1F8: begin dwe = 1; daddr = CTRL; dwdata = 32'd3; end
        default: ;
      endcase
    end
  end

  always @(posedge clk) begin
    // fetch check: the word for last cycle's address arrives now
    if (last_valid && !core_rst && idata !== code_word(widx(last_pc))) fetch_errors <= fetch_errors + 1;
    last_pc    <= pc;
    last_valid <= !core_rst;
    if (core_rst) begin
      pc   <= ENTRY;
      iter <= 0;
      dup  <= 0;
    end else begin
      case (pc)
        32'h204: avail <= drdata[0];
        32'h20C: pc <= avail ? 32'h210 : 32'h200;
        32'h214: begin
          dup  <= (drdata == DUP_MAGIC);
          iter <= 0;
          if (drdata == ATTACK_MAGIC) attacks_started <= attacks_started + 1;
          pc   <= (drdata == ATTACK_MAGIC) ? ATTACK_PC : 32'h218;
        end
        32'h220: if (iter == 0) ttl_zero <= (drdata[15:8] == 0);
        32'h238: begin
          iter <= iter + 1;
          pc   <= (iter + 1 < BODY_LOOPS) ? 32'h218 : 32'h23C;
        end
        32'h244: pc <= 32'h200;
        32'h1FC: pc <= 32'h1E4;
        default: ;
      endcase
      if (!(pc inside {32'h20C, 32'h214, 32'h238, 32'h244, 32'h1FC})) pc <= pc + 4;
    end
  end

endmodule
