// Self-checking testbench for sand_alu: back-to-back sums of random length
// for four interleaved patterns, in multiply-accumulate and square-accumulate
// mode. Every finished sum is compared with a reference computed here, and
// must appear exactly 3 cycles after its last term.
module tb_sand_alu;
  import sand_pkg::*;

  logic       clk = 0, rst_n = 0;
  word_t      act, wgt;
  tag_t       tag;
  logic       res_valid;
  logic [1:0] res_pat;
  acc_t       res_acc;
  int         checks = 0, failures = 0, cycle = 0;
  int         n_mac = 0, n_sqr = 0;

  typedef struct { int cyc; int pat; longint val; } exp_t;
  exp_t exp_q[$];

  sand_alu dut (.clk, .rst_n, .act, .wgt, .tag, .res_valid, .res_pat, .res_acc);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  always @(posedge clk) if (rst_n && res_valid) begin
    exp_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected result");
    end else begin
      e = exp_q.pop_front();
      if (e.cyc != cycle || e.pat != int'(res_pat) || e.val != longint'(res_acc)) begin
        failures++;
        $display("FAIL cyc=%0d/%0d pat=%0d/%0d val=%0d/%0d", cycle, e.cyc, res_pat, e.pat,
                 res_acc, e.val);
      end
    end
  end

  initial begin
    act = '0; wgt = '0; tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 60; g++) begin
      int n;
      bit o;
      longint sum [4];
      n = (g < 4) ? 512 : $urandom_range(1, 9);
      o = (g >= 2 && g < 4) ? 1'b1 : 1'($urandom);
      if (g == 0 || g == 2) n = 512;
      for (int j = 0; j < n; j++) begin
        for (int p = 0; p < 4; p++) begin
          word_t a, w;
          longint d;
          a = (g < 4) ? ((g % 2 == 0) ? 16'sh7fff : -16'sh8000) : word_t'($urandom);
          w = (g < 4) ? ((g == 2) ? 16'sh8000 : 16'sh7fff) : word_t'($urandom);
          @(negedge clk);
          act = a; wgt = w;
          tag = '{valid: 1'b1, op: o, pat: 2'(p), first: j == 0, last: j == n - 1};
          d = longint'(a) - longint'(w);
          if (j == 0) sum[p] = 0;
          sum[p] += o ? d * d : longint'(a) * longint'(w);
          if (j == n - 1) begin
            exp_t e;
            longint s40;
            s40 = sum[p] & 64'hff_ffff_ffff;
            if (s40 >= 64'h80_0000_0000) s40 = s40 - 64'sh100_0000_0000;
            e.cyc = cycle + 3; e.pat = p; e.val = s40;
            exp_q.push_back(e);
          end
        end
        // an occasional idle cycle
        if ($urandom_range(0, 7) == 0) begin
          @(negedge clk); tag = '0;
        end
      end
      if (o) n_sqr++; else n_mac++;
    end
    @(negedge clk); tag = '0;
    repeat (10) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    if (n_mac == 0 || n_sqr == 0) begin failures++; $display("FAIL mode not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
