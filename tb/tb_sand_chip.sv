// Self-checking testbench for sand_chip, driven as in the systolic scheme:
// activities o[j][p] in the order j-major / pattern-minor, one per cycle, and
// in the cycle of o[j][k] the weight w[k][j] on the weight bus. Segments of
// random fan-in run back to back (the weight bus never idles between them).
// Checks every result of four neurons x four patterns against a reference
// (multiply-accumulate or squared distance, then the 16-bit cut), their
// order and neuron index, the latency of 10 cycles from the last activity to
// the first result, and a min and a max search over several segments with
// neurons beyond n_out excluded.
module tb_sand_chip;
  import sand_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       op = 0, rnd = 0, flush = 0, seg_clr = 0;
  logic [4:0] shift = 0;
  pp_e        pp = PP_PASS;
  word_t      act_i = 0, wgt_i = 0;
  tag_t       tag_i = '0;
  logic [1:0] chip_id = 2'd2;
  logic [9:0] n_out = 10'd1023;
  logic       out_valid, sat;
  word_t      out_addr, out_data;
  logic [1:0] out_pat;
  logic [9:0] out_idx;
  int         checks = 0, failures = 0, cycle = 0;
  int         n_seg = 0, n_search = 0, n_lat = 0;

  sand_chip #(.IW(10)) dut (.clk, .rst_n, .op, .shift, .rnd, .pp, .act_i, .tag_i, .wgt_i,
    .flush, .seg_clr, .chip_id, .n_out, .out_valid, .out_addr, .out_data, .out_pat,
    .out_idx, .sat);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int cyc; word_t v; int pat; int idx; } exp_t;
  exp_t exp_q[$];

  function automatic word_t cut(longint s, int sh, bit r);
    longint q;
    q = s;
    if (r && sh > 0) q += 64'sd1 <<< (sh - 1);
    q = q >>> sh;
    if (q > 32767) return 16'sh7fff;
    if (q < -32768) return -16'sh8000;
    return word_t'(q);
  endfunction

  // every output must be the next expected one (cyc < 0: any cycle)
  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected output %0d", out_data);
    end else begin
      e = exp_q.pop_front();
      if (out_data != e.v || out_addr != e.v || int'(out_pat) != e.pat || int'(out_idx) != e.idx
          || (e.cyc >= 0 && e.cyc != cycle)) begin
        failures++;
        $display("FAIL out %0d pat %0d idx %0d at %0d, exp %0d pat %0d idx %0d at %0d",
                 out_data, out_pat, out_idx, cycle, e.v, e.pat, e.idx, e.cyc);
      end else if (e.cyc >= 0) n_lat++;
    end
  end

  // run one segment; returns the 16 cut results
  task automatic segment(input int n, input bit o, input int sh, input bit r, input int seg,
                         input bit expect_pass, output word_t res [4][4]);
    word_t  w [4][];
    word_t  a [][4];
    longint s [4][4];
    int     t_last;
    a = new[n];
    for (int k = 0; k < 4; k++) w[k] = new[n];
    for (int j = 0; j < n; j++)
      for (int k = 0; k < 4; k++) begin
        w[k][j] = word_t'($urandom_range(0, 2000)) - 16'sd1000;
        a[j][k] = word_t'($urandom_range(0, 4000)) - 16'sd2000;
      end
    for (int k = 0; k < 4; k++) for (int p = 0; p < 4; p++) s[k][p] = 0;
    for (int j = 0; j < n; j++)
      for (int p = 0; p < 4; p++) begin
        @(negedge clk);
        op = o; shift = 5'(sh); rnd = r;
        act_i = a[j][p];
        wgt_i = w[p][j];
        tag_i = '{valid: 1'b1, op: 1'b0, pat: 2'(p), first: j == 0, last: j == n - 1};
        t_last = cycle;
        for (int k = 0; k < 4; k++)
          s[k][p] += o ? (longint'(a[j][p]) - longint'(w[k][j])) ** 2
                       : longint'(a[j][p]) * longint'(w[k][j]);
      end
    for (int k = 0; k < 4; k++)
      for (int p = 0; p < 4; p++) begin
        exp_t e;
        res[k][p] = cut(s[k][p], sh, r);
        if (expect_pass) begin
          e.cyc = t_last + 10 + 4 * k + p;
          e.v = res[k][p]; e.pat = p; e.idx = seg * 16 + 2 * 4 + k;
          exp_q.push_back(e);
        end
      end
    n_seg++;
  endtask

  initial begin
    word_t res [4][4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // pass mode, segments back to back
    @(negedge clk); seg_clr = 1; @(negedge clk); seg_clr = 0;
    for (int g = 0; g < 12; g++)
      segment($urandom_range(4, 24), 1'(g % 2), 9, 1'b1, g, 1, res);
    @(negedge clk); tag_i = '0;
    repeat (40) @(negedge clk);
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    exp_q.delete();
    // search modes over 3 segments; n_out = 16 * 2 + 8 + 2 -> in segment 2 only
    // neurons 40, 41 count for this chip (chip 2 holds 8..11 of each segment)
    for (int m = 0; m < 2; m++) begin
      word_t best [4];
      int    bidx [4];
      bit    have [4];
      pp = (m == 1) ? PP_MIN : PP_MAX;
      n_out = 10'd42;
      for (int p = 0; p < 4; p++) have[p] = 0;
      @(negedge clk); seg_clr = 1; @(negedge clk); seg_clr = 0;
      for (int g = 0; g < 3; g++) begin
        segment(16, 1'(m), 6, 1'b1, g, 0, res);
        for (int k = 0; k < 4; k++)
          for (int p = 0; p < 4; p++)
            if (g * 16 + 8 + k < 42 &&
                (!have[p] || ((m == 1) ? res[k][p] < best[p] : res[k][p] > best[p]))) begin
              best[p] = res[k][p]; bidx[p] = g * 16 + 8 + k; have[p] = 1;
            end
      end
      @(negedge clk); tag_i = '0;
      repeat (30) @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        exp_t e;
        e.cyc = -1; e.v = best[p]; e.pat = p; e.idx = bidx[p];
        exp_q.push_back(e);
      end
      flush = 1; @(negedge clk); flush = 0;
      repeat (8) @(negedge clk);
      if (exp_q.size() != 0) begin
        failures++; $display("FAIL search results missing"); exp_q.delete();
      end
      n_search++;
    end
    if (n_lat < 100 || n_search != 2) begin
      failures++; $display("FAIL coverage lat=%0d search=%0d", n_lat, n_search);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
