// Self-checking testbench for sand_cfg_ram: random byte writes to all 256
// bytes, then every one of the 64 layer words is read and compared with the
// four bytes assembled little-endian; a rewrite of one byte changes only its
// own word.
module tb_sand_cfg_ram;
  logic        clk = 0;
  logic        wr_en = 0;
  logic [7:0]  wr_addr = 0, wr_data = 0;
  logic [5:0]  layer = 0;
  logic [31:0] cfg_word;
  logic [7:0]  model [256];
  int          checks = 0, failures = 0;

  sand_cfg_ram dut (.clk, .wr_en, .wr_addr, .wr_data, .layer, .cfg_word);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int l = 0; l < 64; l++) begin
      @(negedge clk); layer = 6'(l); #1;
      checks++;
      if (cfg_word != {model[4*l+3], model[4*l+2], model[4*l+1], model[4*l]}) begin
        failures++; $display("FAIL layer %0d: %h", l, cfg_word);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 8'(i); wr_data = 8'($urandom); model[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    check_all();
    @(negedge clk); wr_en = 1; wr_addr = 8'd42; wr_data = ~model[42]; model[42] = wr_data;
    @(negedge clk); wr_en = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
