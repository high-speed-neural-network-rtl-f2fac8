// Self-checking testbench for sand_postproc: pass mode (every value on both
// outputs one cycle later), then maximum and minimum search over random
// streams with a flush, including a pattern that saw no input and ties.
module tb_sand_postproc;
  import sand_pkg::*;

  logic       clk = 0, rst_n = 0;
  pp_e        mode = PP_PASS;
  logic       in_valid = 0, flush = 0;
  word_t      in_val = 0;
  logic [9:0] in_idx = 0;
  logic [1:0] in_pat = 0;
  logic       out_valid;
  word_t      out_addr, out_data;
  logic [1:0] out_pat;
  logic [9:0] out_idx;
  int         checks = 0, failures = 0;
  int         n_pass = 0, n_max = 0, n_min = 0;

  sand_postproc #(.IW(10)) dut (.clk, .rst_n, .mode, .in_valid, .in_val, .in_idx, .in_pat,
                                .flush, .out_valid, .out_addr, .out_data, .out_pat, .out_idx);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input word_t v, input int pat, input int idx);
    @(posedge clk); #1;
    checks++;
    if (!out_valid || out_addr != v || out_data != v || out_pat != 2'(pat) || out_idx != 10'(idx)) begin
      failures++;
      $display("FAIL v=%0b %0d/%0d pat=%0d/%0d idx=%0d/%0d", out_valid, out_data, v,
               out_pat, pat, out_idx, idx);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // pass mode
    for (int i = 0; i < 50; i++) begin
      word_t v;
      v = word_t'($urandom);
      @(negedge clk);
      mode = PP_PASS; in_valid = 1; in_val = v; in_pat = 2'(i); in_idx = 10'(i);
      expect_out(v, i % 4, i);
      n_pass++;
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1; checks++;
    if (out_valid) begin failures++; $display("FAIL output without input"); end
    // search modes
    for (int r = 0; r < 20; r++) begin
      pp_e m;
      word_t best [4];
      int    bidx [4];
      bit    have [4];
      int    n;
      m = (r % 2 == 1) ? PP_MIN : PP_MAX;
      n = $urandom_range(1, 40);
      for (int p = 0; p < 4; p++) have[p] = 0;
      for (int i = 0; i < n; i++) begin
        word_t v;
        int p;
        v = (r == 4 && i == 3) ? best[0] : word_t'($urandom);  // a tie
        p = (r == 2) ? 1 : $urandom_range(0, 3);                // r=2: patterns without input
        @(negedge clk);
        mode = m; in_valid = 1; in_val = v; in_pat = 2'(p); in_idx = 10'(i);
        if (!have[p] || (m == PP_MAX ? v > best[p] : v < best[p])) begin
          best[p] = v; bidx[p] = i; have[p] = 1;
        end
      end
      @(negedge clk); in_valid = 0; flush = 1;
      @(negedge clk); flush = 0;
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        if (!have[p]) begin
          best[p] = (m == PP_MAX) ? -16'sh8000 : 16'sh7fff;
          bidx[p] = 0;
        end
        #1 checks++;
        if (!out_valid || out_data != best[p] || out_addr != best[p] || out_pat != 2'(p)
            || out_idx != 10'(bidx[p])) begin
          failures++;
          $display("FAIL search r=%0d p=%0d got %0b %0d idx %0d exp %0d idx %0d", r, p,
                   out_valid, out_data, out_idx, best[p], bidx[p]);
        end
        @(negedge clk);
      end
      #1 checks++;
      if (out_valid) begin failures++; $display("FAIL extra output"); end
      if (m == PP_MAX) n_max++; else n_min++;
    end
    if (n_pass == 0 || n_max == 0 || n_min == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
