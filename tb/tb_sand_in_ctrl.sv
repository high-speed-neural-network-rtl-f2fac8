// Self-checking testbench for sand_in_ctrl: nine events of 5 words arrive
// with random gaps; the consumer takes batches late at first, so the input
// must stall once two batches wait. A flush closes the last, single-event
// group. Checks batch masks, that FIFO_in[e] holds exactly event e of each
// group in order, the event acknowledgements and the stall.
module tb_sand_in_ctrl;
  import sand_pkg::*;

  localparam int NIN = 5, NEV = 9;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, flush = 0, batch_take = 0;
  word_t       in_data = 0;
  logic        in_ready, ev_ack, batch_valid;
  logic [3:0]  batch_mask, rd_en = 0, rd_empty;
  word_t       rd_data [NPAT];
  int          checks = 0, failures = 0, n_ack = 0, n_stall = 0;

  sand_in_ctrl #(.DEPTH(64)) dut (.clk, .rst_n, .n_in(10'(NIN)), .in_valid, .in_data, .in_ready,
    .flush, .ev_ack, .batch_valid, .batch_mask, .batch_take, .rd_en, .rd_data, .rd_empty);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && ev_ack) n_ack++;
    if (rst_n && in_valid && !in_ready) n_stall++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t word_of(int ev, int j);
    return word_t'(ev * 100 + j);
  endfunction

  // producer
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < NEV; ev++)
      for (int j = 0; j < NIN; j++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = word_of(ev, j);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    flush = 1;
    @(negedge clk); flush = 0;
  end

  // consumer
  initial begin
    static int first_ev = 0;
    @(posedge rst_n);
    repeat (150) @(negedge clk);      // late: lets two batches pile up
    for (int b = 0; b < 3; b++) begin
      logic [3:0] m;
      while (!batch_valid) @(negedge clk);
      m = batch_mask;
      checks++;
      if (m != ((b < 2) ? 4'b1111 : 4'b0001)) begin failures++; $display("FAIL mask %b", m); end
      batch_take = 1; @(negedge clk); batch_take = 0;
      for (int e = 0; e < 4; e++) if (m[e])
        for (int j = 0; j < NIN; j++) begin
          checks++;
          if (rd_empty[e] || rd_data[e] != word_of(first_ev + e, j)) begin
            failures++; $display("FAIL batch %0d event %0d word %0d: %0d", b, e, j, rd_data[e]);
          end
          rd_en = 4'(1 << e); @(negedge clk); rd_en = 0;
        end
      first_ev += 4;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (batch_valid || rd_empty != 4'b1111) begin failures++; $display("FAIL leftovers"); end
    checks++;
    if (n_ack != NEV) begin failures++; $display("FAIL acks %0d", n_ack); end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL input never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
