// Self-checking testbench for sand_out_ctrl: two batches of interleaved
// results (the first with a dummy event 2, the second with only event 0)
// are written, then a batch in which event 2 is real again; the output is read with random back-pressure. Checks that the
// words come out event by event in order, dummy results are dropped, the
// last-word flag, the pending count, and the yes/no threshold output.
module tb_sand_out_ctrl;
  import sand_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        ob_start = 0, res_valid = 0, ob_done = 0, thr_en = 0, out_ready = 0;
  logic [3:0]  ob_mask = 0;
  logic [1:0]  res_pat = 0, pending, out_event;
  word_t       res_data = 0, thr = 16'sd50, out_data;
  logic [10:0] ob_count = 0;
  logic        out_valid, out_last, out_yes;
  int          checks = 0, failures = 0, n_bp = 0;

  typedef struct { word_t v; int ev; bit last; } exp_t;
  exp_t exp_q[$];

  sand_out_ctrl #(.DEPTH(64)) dut (.clk, .rst_n, .ob_start, .ob_mask, .res_valid, .res_pat,
    .res_data, .ob_done, .ob_count, .pending, .thr_en, .thr, .out_valid, .out_data,
    .out_event, .out_last, .out_yes, .out_ready);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) n_bp++;
    if (out_valid && out_ready) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = exp_q.pop_front();
        if (out_data != e.v || int'(out_event) != e.ev || out_last != e.last) begin
          failures++;
          $display("FAIL out %0d ev %0d last %0b, exp %0d ev %0d last %0b", out_data, out_event,
                   out_last, e.v, e.ev, e.last);
        end
      end
    end
  end

  task automatic batch(input logic [3:0] m, input int cnt, input int base);
    word_t vals [4][];
    for (int e = 0; e < 4; e++) begin
      vals[e] = new[cnt];
      for (int j = 0; j < cnt; j++) vals[e][j] = word_t'(base + 10 * e + j);
    end
    @(negedge clk); ob_start = 1; ob_mask = m;
    @(negedge clk); ob_start = 0;
    for (int j = 0; j < cnt; j++)
      for (int p = 0; p < 4; p++) begin
        @(negedge clk); res_valid = 1; res_pat = 2'(p); res_data = vals[p][j];
      end
    @(negedge clk); res_valid = 0; ob_done = 1; ob_count = 11'(cnt);
    @(negedge clk); ob_done = 0;
    for (int e = 0; e < 4; e++) if (m[e])
      for (int j = 0; j < cnt; j++) begin
        exp_t x;
        x.v = thr_en ? ((vals[e][j] >= thr) ? 16'sd1 : 16'sd0) : vals[e][j];
        x.ev = e; x.last = (j == cnt - 1);
        exp_q.push_back(x);
      end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    batch(4'b1011, 3, 100);
    @(negedge clk); checks++;
    if (pending != 2'd1) begin failures++; $display("FAIL pending %0d", pending); end
    batch(4'b0001, 2, 0);
    @(negedge clk); checks++;
    if (pending != 2'd2) begin failures++; $display("FAIL pending %0d", pending); end
    // drain with random back-pressure
    repeat (200) begin @(negedge clk); out_ready = 1'($urandom); end
    out_ready = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || pending != 0) begin failures++; $display("FAIL not drained"); end
    // event 2 was a dummy in the first batches: now real, no stale words
    batch(4'b0110, 2, 200);
    repeat (30) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL third batch not drained"); end
    // yes/no output: values around the threshold
    thr_en = 1;
    batch(4'b0100, 2, 35);     // event 2 gets 55, 56 -> yes
    batch(4'b0001, 2, 40);     // event 0 gets 40, 41 -> no
    repeat (30) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL threshold batches not drained"); end
    checks++;
    if (n_bp == 0) begin failures++; $display("FAIL no back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
