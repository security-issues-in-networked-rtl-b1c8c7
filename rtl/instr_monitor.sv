// instr_monitor: instruction-level security monitor for one packet
// processing unit.
//
// The processor streams the address of every instruction it executes. The
// monitor checks the stream against the basic-block table, which holds the
// valid execution paths found by offline analysis of the program binary, and
// raises drop_o when the control flow leaves them. Only addresses of the
// analysed program are valid; a jump into any other code (for example code
// carried in a packet payload) is caught.
//
// Pipeline, one cycle per stage:
//   1  take the instruction address, index the table (port A);
//   2  receive basic block and next hop, push the basic block into the
//      two-entry FIFO of executed blocks;
//   3  compare with the previous instruction's block (FIFO head): same block
//      is valid, the following block number (fall-through) is valid, an
//      address absent from the table is an error; anything else needs a jump
//      check and the previous instruction's next hop indexes the table
//      (port B);
//   4  the jump is valid if the previous instruction ends its block with a
//      jump whose next hop is this address and the table places this address
//      in the same block as the lookup. Otherwise drop_o is raised.
// drop_o is a one-cycle pulse in the fourth cycle after the offending
// address was presented (address in cycle t, drop_o high in cycle t+4). After
// a drop the monitor stays silent until flush, which the recovery logic holds
// while the processor is reset. After flush the first address must be the
// program entry point ENTRY_ADDR.
//
// The four stages, the table contents, the FIFO and the decision order follow
// the design description. Own choices: the valid bit for unknown addresses,
// the entry-point rule after a flush, reading "within the next basic block"
// as "basic-block number one higher", and the violation counter.
module instr_monitor #(
  parameter int unsigned IDX_W      = 9,
  parameter int unsigned BB_W       = 8,
  parameter logic [31:0] ENTRY_ADDR = 32'h0000_0200
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  // monitoring stream from the processor
  input  logic [31:0]      iaddr,
  input  logic             ivalid,
  // table load port (trusted loader)
  input  logic             ld_we,
  input  logic [IDX_W-1:0] ld_idx,
  input  logic             ld_valid,
  input  logic             ld_jump,
  input  logic [BB_W-1:0]  ld_bb,
  input  logic [IDX_W-1:0] ld_nexthop,
  // result
  output logic             drop_o,
  output logic [15:0]      viol_count
);

  localparam logic [IDX_W-1:0] ENTRY_IDX = ENTRY_ADDR[IDX_W+1:2];

  // ---- stage 1 ----------------------------------------------------------
  logic             in_range;
  logic [IDX_W-1:0] in_idx;
  assign in_idx   = iaddr[IDX_W+1:2];
  assign in_range = (iaddr[31:IDX_W+2] == '0) && (iaddr[1:0] == 2'b00);

  logic             s1_v, s1_inr;
  logic [IDX_W-1:0] s1_idx;

  logic             a_valid, a_jump;
  logic [BB_W-1:0]  a_bb;
  logic [IDX_W-1:0] a_nexthop;
  logic [IDX_W-1:0] b_idx;
  logic             b_valid;
  logic [BB_W-1:0]  b_bb;

  bb_table #(.IDX_W(IDX_W), .BB_W(BB_W)) u_table (
    .clk, .a_idx(in_idx), .a_valid, .a_jump, .a_bb, .a_nexthop,
    .b_idx, .b_valid, .b_bb,
    .ld_we, .ld_idx, .ld_valid, .ld_jump, .ld_bb, .ld_nexthop
  );

  // ---- stage 2 ----------------------------------------------------------
  logic             s2_v, s2_known, s2_jump;
  logic [IDX_W-1:0] s2_idx, s2_nh;
  logic [BB_W-1:0]  s2_bb;

  logic [BB_W-1:0]  prev_bb;
  logic [1:0]       fifo_count;
  logic             started;      // an instruction has been checked since flush

  bb_fifo #(.W(BB_W)) u_fifo (
    .clk, .rst(flush || !rst_n),
    .wr_en(s1_v), .data_in(a_bb),
    .rd_en(s2_v && started), .data_out(prev_bb), .count(fifo_count)
  );

  // ---- stage 3 ----------------------------------------------------------
  logic             prev_jump;
  logic [IDX_W-1:0] prev_nh;
  logic             err3, need_jump;

  always_comb begin
    err3      = 1'b0;
    need_jump = 1'b0;
    if (!s2_known)                        err3 = 1'b1;
    else if (!started)                    err3 = (s2_idx != ENTRY_IDX);
    else if (s2_bb == prev_bb)            err3 = 1'b0;
    else if (s2_bb == prev_bb + 1'b1)     err3 = 1'b0;
    else                                  need_jump = 1'b1;
  end

  assign b_idx = prev_nh;   // next hop of the previous instruction

  logic             s3_v, s3_err, s3_need_jump, s3_prev_jump;
  logic [IDX_W-1:0] s3_idx, s3_prev_nh;
  logic [BB_W-1:0]  s3_bb;

  // ---- stage 4 ----------------------------------------------------------
  logic jump_ok, err4, alarmed;
  assign jump_ok = s3_prev_jump && (s3_idx == s3_prev_nh) && b_valid && (b_bb == s3_bb);
  assign err4    = s3_err || (s3_need_jump && !jump_ok);

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      s1_v       <= 1'b0;
      s2_v       <= 1'b0;
      s3_v       <= 1'b0;
      started    <= 1'b0;
      alarmed    <= 1'b0;
      drop_o     <= 1'b0;
      prev_jump  <= 1'b0;
      prev_nh    <= '0;
      if (!rst_n) viol_count <= '0;
    end else begin
      // stage 1
      s1_v   <= ivalid;
      s1_idx <= in_idx;
      s1_inr <= in_range;
      // stage 2
      s2_v     <= s1_v;
      s2_idx   <= s1_idx;
      s2_known <= s1_inr && a_valid;
      s2_jump  <= a_jump;
      s2_bb    <= a_bb;
      s2_nh    <= a_nexthop;
      // stage 3
      s3_v <= s2_v;
      if (s2_v) begin
        started      <= 1'b1;
        prev_jump    <= s2_jump;
        prev_nh      <= s2_nh;
        s3_err       <= err3;
        s3_need_jump <= need_jump;
        s3_idx       <= s2_idx;
        s3_bb        <= s2_bb;
        s3_prev_jump <= prev_jump;
        s3_prev_nh   <= prev_nh;
      end
      // stage 4
      drop_o <= 1'b0;
      if (s3_v && err4 && !alarmed) begin
        drop_o     <= 1'b1;
        alarmed    <= 1'b1;
        viol_count <= viol_count + 16'd1;
      end
    end
  end

  // The FIFO holds at most the previous and the current block.
  a_fifo_depth: assert property (@(posedge clk) disable iff (!rst_n) fifo_count <= 2'd2);

endmodule
