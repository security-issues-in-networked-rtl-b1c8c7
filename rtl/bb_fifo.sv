// bb_fifo: two-entry FIFO that holds the basic-block numbers of the
// previously and the currently executed instruction.
//
// The monitor's second stage writes the basic block of each instruction
// (wr_en); its third stage reads the head, which is then the basic block of
// the instruction before (rd_en). A read and a write in the same cycle keep
// the occupancy unchanged, so in steady state the FIFO holds exactly the
// previous and the current block. data_out shows the head combinationally;
// count says how many entries are held. rst empties it synchronously.
//
// The two-entry depth and the data_in/data_out/rd_en/wr_en/rst interface
// follow the design description; the width and the count output are this
// design's own.
module bb_fifo #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_en,
  input  logic [W-1:0] data_in,
  input  logic         rd_en,
  output logic [W-1:0] data_out,
  output logic [1:0]   count
);

  logic [W-1:0] slot [2];   // slot[0] is the head

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= 2'd0;
    end else begin
      unique case ({wr_en, rd_en && count != 2'd0})
        2'b10: if (count != 2'd2) begin
          slot[count[0]] <= data_in;
          count          <= count + 2'd1;
        end
        2'b01: begin
          slot[0] <= slot[1];
          count   <= count - 2'd1;
        end
        2'b11: begin
          if (count == 2'd1) slot[0] <= data_in;
          else begin
            slot[0] <= slot[1];
            slot[1] <= data_in;
          end
        end
        default: ;
      endcase
    end
  end

  assign data_out = slot[0];

endmodule
