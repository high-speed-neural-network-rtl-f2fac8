// Self-checking testbench for sand_pe: one PE computes neurons for four
// interleaved patterns. The weight bus carries the right weight only in the
// cycle of a pattern-0 activity and garbage otherwise, so the PE must latch
// it then and hold it for four cycles. Checks the forwarded activity (one
// cycle delay), the register bank against a reference (auto-cut with
// saturation), the saturation flag and the latency of 5 cycles.
module tb_sand_pe;
  import sand_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       rnd = 0;
  logic [4:0] shift = 0;
  word_t      act_i = 0, wgt_i = 0, act_o;
  tag_t       tag_i = '0, tag_o;
  word_t      bank [NPAT];
  logic       bank_done, sat;
  int         checks = 0, failures = 0, cycle = 0, n_sat = 0;

  sand_pe dut (.clk, .rst_n, .shift, .rnd, .act_i, .tag_i, .wgt_i,
               .act_o, .tag_o, .bank, .bank_done, .sat);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t cut(longint s, int sh, bit r);
    longint q;
    q = s;
    if (r && sh > 0) q += 64'sd1 <<< (sh - 1);
    q = q >>> sh;
    if (q > 32767) return 16'sh7fff;
    if (q < -32768) return -16'sh8000;
    return word_t'(q);
  endfunction

  // forwarded activity must equal the input of the previous cycle
  word_t prev_act;
  tag_t  prev_tag;
  always @(posedge clk) begin
    if (rst_n && cycle > 5) begin
      checks++;
      if (act_o != prev_act || tag_o != prev_tag) begin
        failures++; $display("FAIL forwarding at %0d", cycle);
      end
    end
    prev_act <= act_i;
    prev_tag <= tag_i;
  end

  word_t exp_bank [NPAT];
  bit    exp_sat;
  int    exp_cyc;
  bit    pending = 0;

  always @(posedge clk) if (rst_n) begin
    if (bank_done) begin
      checks++;
      if (!pending || cycle != exp_cyc) begin
        failures++; $display("FAIL bank_done at %0d, expected %0d", cycle, exp_cyc);
      end
      for (int p = 0; p < NPAT; p++) begin
        checks++;
        if (bank[p] != exp_bank[p]) begin
          failures++; $display("FAIL bank[%0d]=%0d exp %0d", p, bank[p], exp_bank[p]);
        end
      end
      checks++;
      if (sat != exp_sat) begin failures++; $display("FAIL sat=%0b exp %0b", sat, exp_sat); end
      if (sat) n_sat++;
      pending = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 40; g++) begin
      int n, sh;
      bit o, r;
      longint sum [NPAT];
      word_t w;
      n  = $urandom_range(1, 20);
      o  = 1'($urandom);
      r  = 1'($urandom);
      sh = (g % 3 == 0) ? 0 : $urandom_range(8, 20);
      for (int j = 0; j < n; j++) begin
        w = word_t'($urandom);
        for (int p = 0; p < NPAT; p++) begin
          word_t a;
          a = word_t'($urandom);
          @(negedge clk);
          rnd = r; shift = 5'(sh);
          act_i = a;
          wgt_i = (p == 0) ? w : word_t'($urandom);
          tag_i = '{valid: 1'b1, op: o, pat: 2'(p), first: j == 0, last: j == n - 1};
          if (j == 0) sum[p] = 0;
          sum[p] += o ? (longint'(a) - longint'(w)) ** 2 : longint'(a) * longint'(w);
          if (j == n - 1) begin
            longint q;
            q = sum[p];
            exp_bank[p] = cut(q, sh, r);
            if (p == 0) exp_sat = 0;
            if (r && sh > 0) q += 64'sd1 <<< (sh - 1);
            q = q >>> sh;
            if (q > 32767 || q < -32768) exp_sat = 1;
            if (p == NPAT - 1) begin
              exp_cyc = cycle + 5;
              pending = 1;
            end
          end
        end
      end
      // wait for the set to leave before changing the cut settings
      @(negedge clk); tag_i = '0;
      repeat (6) @(negedge clk);
      if (pending) begin failures++; $display("FAIL bank %0d never completed", g); pending = 0; end
    end
    if (n_sat == 0) begin failures++; $display("FAIL saturation never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
