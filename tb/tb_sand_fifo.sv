// Self-checking testbench for sand_fifo (small depth): random pushes and pops
// against a queue model, including fill to full, simultaneous push and pop
// when full, and drain to empty. Checks data order, empty, full and count.
module tb_sand_fifo;
  logic        clk = 0, rst_n = 0;
  logic        wr_en = 0, rd_en = 0;
  logic [15:0] wr_data = 0, rd_data;
  logic        empty, full;
  logic [4:0]  count;
  int          checks = 0, failures = 0, n_full = 0, n_both_full = 0;
  logic [15:0] model[$];

  sand_fifo #(.W(16), .DEPTH(16)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data,
                                       .empty, .full, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int phase;
      @(negedge clk);
      // check state
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == 16) ||
          int'(count) != model.size() || (model.size() > 0 && rd_data != model[0])) begin
        failures++;
        $display("FAIL i=%0d empty=%0b full=%0b count=%0d size=%0d", i, empty, full, count,
                 model.size());
      end
      if (full) n_full++;
      phase = (i / 200) % 3;   // 0: mostly push, 1: mixed, 2: mostly pop
      wr_en   = (phase == 0) ? ($urandom_range(0, 9) < 8) :
                (phase == 1) ? 1'($urandom) : ($urandom_range(0, 9) < 2);
      rd_en   = (phase == 2) ? ($urandom_range(0, 9) < 8) :
                (phase == 1) ? 1'($urandom) : ($urandom_range(0, 9) < 2);
      if (model.size() == 0) rd_en = 0;
      if (model.size() == 16 && !rd_en) wr_en = 0;
      if (model.size() == 16 && rd_en && wr_en) n_both_full++;
      wr_data = 16'($urandom);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    if (n_full == 0 || n_both_full == 0) begin
      failures++; $display("FAIL full=%0d both=%0d", n_full, n_both_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
