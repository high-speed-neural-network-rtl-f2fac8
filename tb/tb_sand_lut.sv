// Self-checking testbench for sand_lut at its full default size: random
// writes, then reads back with the one-cycle read latency, including a
// sequential burst like the result bus reading activation values and a read of an
// address being written in the same cycle (old data is returned).
module tb_sand_lut;
  logic        clk = 0;
  logic        wr_en = 0;
  logic [15:0] wr_addr = 0, wr_data = 0, rd_addr = 0, rd_data;
  int          checks = 0, failures = 0;
  logic [15:0] model [int];

  sand_lut dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // a sequential block and random addresses
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      wr_en = 1;
      wr_addr = (i < 300) ? 16'(1000 + i) : 16'($urandom);
      wr_data = 16'($urandom);
      model[int'(wr_addr)] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    foreach (model[a]) begin
      @(negedge clk); rd_addr = 16'(a);
      @(negedge clk);
      checks++;
      if (rd_data != model[a]) begin
        failures++; $display("FAIL addr %0d: %h exp %h", a, rd_data, model[a]);
      end
    end
    // streaming reads: data follows the address by one cycle
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); rd_addr = 16'(1000 + i);
      if (i > 0) begin
        checks++;
        if (rd_data != model[1000 + i - 1]) begin failures++; $display("FAIL stream %0d", i); end
      end
    end
    // read during write of the same address returns the old word
    @(negedge clk); rd_addr = 16'd1000; wr_en = 1; wr_addr = 16'd1000; wr_data = ~model[1000];
    @(negedge clk); wr_en = 0;
    checks++;
    if (rd_data != model[1000]) begin failures++; $display("FAIL read-during-write"); end
    @(negedge clk);
    checks++;
    if (rd_data != ~model[1000]) begin failures++; $display("FAIL write not stored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
