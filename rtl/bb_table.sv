// bb_table: basic-block data structure of the instruction-level monitor.
//
// A block RAM indexed by instruction (word) address. Each entry says whether
// the address belongs to the analysed program, which basic block it is in,
// whether it ends its block with a jump or branch, and the next-hop (target)
// word address of that jump. The entries come from offline analysis of the
// program binary and are written through the load port, which only the
// trusted loader drives; the processor cannot reach it.
//
// Two synchronous read ports: port A serves the monitor's first stage
// (instruction address lookup), port B its fourth stage (next-hop lookup).
// Read data appear one cycle after the address, as in a block RAM. Contents
// are not reset; the loader must write every entry that can be read.
//
// Following the design description: indexing by instruction address, the
// basic-block and next-hop fields, one-cycle read. Own choices: the valid and
// jump bits, the field widths and the second read port.
module bb_table #(
  parameter int unsigned IDX_W = 9,   // 512 instruction words
  parameter int unsigned BB_W  = 8    // up to 256 basic blocks
) (
  input  logic                       clk,
  // port A
  input  logic [IDX_W-1:0]           a_idx,
  output logic                       a_valid,
  output logic                       a_jump,
  output logic [BB_W-1:0]            a_bb,
  output logic [IDX_W-1:0]           a_nexthop,
  // port B
  input  logic [IDX_W-1:0]           b_idx,
  output logic                       b_valid,
  output logic [BB_W-1:0]            b_bb,
  // load port
  input  logic                       ld_we,
  input  logic [IDX_W-1:0]           ld_idx,
  input  logic                       ld_valid,
  input  logic                       ld_jump,
  input  logic [BB_W-1:0]            ld_bb,
  input  logic [IDX_W-1:0]           ld_nexthop
);

  localparam int unsigned ENTRY_W = 2 + BB_W + IDX_W;

  logic [ENTRY_W-1:0] mem [2**IDX_W];
  logic [ENTRY_W-1:0] a_q, b_q;

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_idx] <= {ld_valid, ld_jump, ld_bb, ld_nexthop};
    a_q <= mem[a_idx];
    b_q <= mem[b_idx];
  end

  assign {a_valid, a_jump, a_bb, a_nexthop} = a_q;
  assign b_valid = b_q[ENTRY_W-1];
  assign b_bb    = b_q[IDX_W +: BB_W];

endmodule
