// tb_prog_pkg: the packet program the testbenches run and its basic-block
// table, as the offline analysis of its binary would produce it.
//
// The program (byte addresses) is a packet loop:
//   block 0  0x200..0x20C  poll for a packet; 0x20C branches back to 0x200
//   block 1  0x210..0x214  read header; 0x214 jumps to 0x218
//   block 2  0x218..0x238  processing body; 0x238 branches back to 0x218
//   block 3  0x23C..0x244  hand the packet back; 0x244 jumps to 0x200
// Code at 0x1E4..0x1FC is not part of the program (it stands for code that an
// attack packet brings along) and has no entry in the table.
package tb_prog_pkg;

  localparam logic [31:0] ENTRY      = 32'h200;
  localparam logic [31:0] ATTACK_PC  = 32'h1E4;

  typedef struct packed {
    logic       valid;
    logic       jump;
    logic [7:0] bb;
    logic [8:0] nexthop;   // word index
  } entry_t;

  function automatic logic [8:0] widx(logic [31:0] a);
    return a[10:2];
  endfunction

  function automatic entry_t prog_entry(logic [31:0] a);
    entry_t e;
    e = '0;
    if      (a >= 32'h200 && a <= 32'h20C) begin e.valid = 1; e.bb = 0; end
    else if (a >= 32'h210 && a <= 32'h214) begin e.valid = 1; e.bb = 1; end
    else if (a >= 32'h218 && a <= 32'h238) begin e.valid = 1; e.bb = 2; end
    else if (a >= 32'h23C && a <= 32'h244) begin e.valid = 1; e.bb = 3; end
    case (a)
      32'h20C: begin e.jump = 1; e.nexthop = widx(32'h200); end
      32'h214: begin e.jump = 1; e.nexthop = widx(32'h218); end
      32'h238: begin e.jump = 1; e.nexthop = widx(32'h218); end
      32'h244: begin e.jump = 1; e.nexthop = widx(32'h200); end
      default: ;
    endcase
    return e;
  endfunction

  // Contents of the instruction memory used by the testbenches: any word
  // that differs from address to address will do.
  function automatic logic [31:0] code_word(int unsigned widx_i);
    return 32'h2400_0000 ^ (widx_i * 32'h0001_0003);
  endfunction

endpackage
