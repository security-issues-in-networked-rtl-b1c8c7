// tb_bb_fifo: drives random writes and reads into the two-entry FIFO and
// compares head, occupancy and ordering with a queue model, including the
// simultaneous read and write that the monitor uses every cycle.
module tb_bb_fifo;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0;
  logic [7:0] data_in = 0, data_out;
  logic [1:0] count;
  logic [7:0] model[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  bb_fifo #(.W(8)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); rst <= 0; @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      bit w, r;
      w = $urandom_range(1);
      r = $urandom_range(1);
      wr_en <= w; rd_en <= r; data_in <= 8'($urandom);
      #1;
      // model of the same cycle
      @(posedge clk);
      if (r && model.size() != 0) void'(model.pop_front());
      if (w && (model.size() < 2 || (r && model.size() == 2))) model.push_back(data_in);
      #1;
      checks++;
      if (count != 2'(model.size()) || (model.size() != 0 && data_out != model[0])) begin
        failures++;
        $display("FAIL: count %0d head %h, expected %0d %h", count, data_out, model.size(),
                 model.size() ? model[0] : 8'h0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
