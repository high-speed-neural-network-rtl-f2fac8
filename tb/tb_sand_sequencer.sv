// Self-checking testbench for sand_sequencer with a model of its
// surroundings: a configuration table, four FIFO_in models, real FIFO_A and
// FIFO_B, and a stand-in for the result bus that, when a layer's activities
// have all been issued, writes n_out * 4 marker results into the layer's
// destination (FIFO_B, FIFO_A or the output), holding rp_idle low meanwhile.
// Network: 6:20 (two segments), 20:18 (two segments, with the constant bias
// input after the 20 real ones), 18:3 (last), batch
// with events 0 and 1 only (2 and 3 dummy), then a 5:7 min-search layer.
// Checks the activity stream word by word (event data, dummy zeros, FIFO_A
// circular reuse, marker results of the previous layer), the tags, the
// weight address counting up by one per activity, the minimum segment
// length, output batch start/done with the word count, and the chip and
// merger flushes in search mode.
module tb_sand_sequencer;
  import sand_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [5:0]  cfg_layer;
  layer_cfg_t  cfg_word;
  logic        batch_valid = 0, batch_take;
  logic [3:0]  batch_mask = 0, in_rd_en, in_empty;
  word_t       in_rd_data [NPAT];
  logic        a_rd_en, a_empty, a_wr_en, b_rd_en, b_empty, b_wr_en;
  word_t       a_rd_data, a_wr_data, b_rd_data, b_wr_data;
  logic [1:0]  out_pending = 0, dest;
  logic        ob_start, ob_done, chip_flush, seg_clr, merge_flush, nonlin, busy, op, rnd;
  logic [3:0]  ob_mask;
  logic [10:0] ob_count;
  logic [4:0]  shift;
  pp_e         pp;
  logic [9:0]  n_out;
  word_t       act_o;
  tag_t        tag_o;
  logic [15:0] waddr;
  int          checks = 0, failures = 0, cycle = 0;

  logic        rp_idle = 1;

  sand_sequencer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // configuration table
  layer_cfg_t cfgs [8];
  assign cfg_word = cfgs[cfg_layer[2:0]];

  // FIFO_in models
  word_t inq [4][$];
  always_comb for (int e = 0; e < 4; e++) begin
    in_empty[e]   = inq[e].size() == 0;
    in_rd_data[e] = in_empty[e] ? '0 : inq[e][0];
  end

  // result bus stand-in
  logic  r_valid;
  word_t r_data;
  sand_fifo #(.W(16), .DEPTH(2048)) u_a (.clk, .rst_n,
    .wr_en(a_wr_en || (r_valid && dest == 2'd1)), .wr_data(a_wr_en ? a_wr_data : r_data),
    .rd_en(a_rd_en), .rd_data(a_rd_data), .empty(a_empty), .full(), .count());
  sand_fifo #(.W(16), .DEPTH(2048)) u_b (.clk, .rst_n,
    .wr_en(b_wr_en || (r_valid && dest == 2'd0)), .wr_data(b_wr_en ? b_wr_data : r_data),
    .rd_en(b_rd_en), .rd_data(b_rd_data), .empty(b_empty), .full(), .count());

  function automatic word_t marker(int layer, int n, int p);
    return word_t'(1000 * (layer + 1) + 4 * n + p);
  endfunction

  // expected activity stream
  typedef struct { word_t v; int pat; bit first, last; } exp_t;
  exp_t exp_q[$];
  int   n_out_words = 0, n_flush_chip = 0, n_flush_merge = 0, n_done = 0, n_start = 0;
  int   seg_start, min_seg_len = 1 << 30, last_wa = -1;

  task automatic expect_layer(int layer, int nin, int nout, word_t src [][4], bit bias = 0);
    for (int s = 0; s < (nout + 15) / 16; s++)
      for (int j = 0; j < nin + int'(bias); j++)
        for (int p = 0; p < 4; p++) begin
          exp_t e;
          e.v = (j == nin) ? BIAS_ACT : src[j][p];
          e.pat = p; e.first = (j == 0); e.last = (j == nin - 1 + int'(bias));
          exp_q.push_back(e);
        end
  endtask

  // monitor of the activity stream, weight address and pops
  int issued_in_layer = 0;
  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < 4; e++) if (in_rd_en[e]) void'(inq[e].pop_front());
    if (tag_o.valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected activity"); end
      else begin
        e = exp_q.pop_front();
        if (act_o != e.v || int'(tag_o.pat) != e.pat || tag_o.first != e.first ||
            tag_o.last != e.last) begin
          failures++;
          $display("FAIL act %0d pat %0d f%0b l%0b exp %0d pat %0d f%0b l%0b at %0d", act_o,
                   tag_o.pat, tag_o.first, tag_o.last, e.v, e.pat, e.first, e.last, cycle);
        end
      end
      if (tag_o.first && tag_o.pat == 2'd0) begin
        if (issued_in_layer > 0 && cycle - seg_start < min_seg_len) min_seg_len = cycle - seg_start;
        seg_start = cycle;
      end
      issued_in_layer++;
    end
    if (seg_clr) issued_in_layer = 0;
    if (ob_start) n_start++;
    if (ob_done) begin
      n_done++;
      checks++;
      if (int'(ob_count) != ((pp == PP_PASS) ? int'(n_out) : 2)) begin
        failures++; $display("FAIL ob_count %0d", ob_count);
      end
    end
    if (chip_flush) n_flush_chip++;
    if (merge_flush) n_flush_merge++;
  end

  // weight address: one step per issued activity (checked on the stream)
  logic [15:0] wa_prev;
  logic        issue_prev = 0;
  always @(posedge clk) if (rst_n) begin
    if (issue_prev) begin
      checks++;
      if (waddr != wa_prev + 16'd1) begin failures++; $display("FAIL waddr %0d after %0d", waddr, wa_prev); end
    end
    issue_prev <= |in_rd_en || a_rd_en || b_rd_en || (dut.issue);
    wa_prev    <= waddr;
  end

  // result writer: after a layer's last activity, write its results
  initial begin
    r_valid = 0; r_data = 0;
    forever begin
      @(negedge clk);
      if (dut.st == dut.S_DRAIN && dut.tmr == 8'd2) begin
        int L, nout;
        L = int'(cfg_layer); nout = int'(n_out);
        rp_idle = 0;
        for (int n = 0; n < ((pp == PP_PASS) ? nout : 2); n++)
          for (int p = 0; p < 4; p++) begin
            r_valid = 1; r_data = marker(L, n, p);
            if (dest == 2'd2) n_out_words++;
            @(negedge clk);
          end
        r_valid = 0;
        rp_idle = 1;
      end
    end
  end

  function automatic layer_cfg_t mk(int nin, int nout, int ppm, bit last);
    layer_cfg_t c;
    c = '0; c.n_in = 10'(nin); c.n_out = 10'(nout); c.pp = pp_e'(ppm); c.last = last;
    c.shift = 5'd3;
    return c;
  endfunction

  initial begin
    word_t x [][4];
    word_t h [][4];
    cfgs[0] = mk(6, 20, 0, 0);
    cfgs[1] = mk(20, 18, 0, 0);
    cfgs[1].bias = 1'b1;
    cfgs[2] = mk(18, 3, 0, 1);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // batch 1: events 0 and 1
    x = new[6];
    for (int j = 0; j < 6; j++)
      for (int p = 0; p < 4; p++) begin
        x[j][p] = (p < 2) ? word_t'(10 * p + j + 1) : '0;
        if (p < 2) inq[p].push_back(x[j][p]);
      end
    expect_layer(0, 6, 20, x);
    h = new[20];
    for (int n = 0; n < 20; n++) for (int p = 0; p < 4; p++) h[n][p] = marker(0, n, p);
    expect_layer(1, 20, 18, h, 1);
    h = new[18];
    for (int n = 0; n < 18; n++) for (int p = 0; p < 4; p++) h[n][p] = marker(1, n, p);
    expect_layer(2, 18, 3, h);
    @(negedge clk); batch_valid = 1; batch_mask = 4'b0011;
    @(negedge clk); batch_valid = 0;
    while (n_done < 1) @(negedge clk);
    checks++;
    if (n_out_words != 12 || exp_q.size() != 0 || !a_empty || !b_empty) begin
      failures++; $display("FAIL net 1: out %0d left %0d", n_out_words, exp_q.size());
    end
    // batch 2: one search layer 5:7, all four events
    cfgs[0] = mk(5, 7, 2, 1);
    x = new[5];
    for (int j = 0; j < 5; j++)
      for (int p = 0; p < 4; p++) begin
        x[j][p] = word_t'(-100 * p - j);
        inq[p].push_back(x[j][p]);
      end
    expect_layer(0, 5, 7, x);
    @(negedge clk); batch_valid = 1; batch_mask = 4'b1111;
    @(negedge clk); batch_valid = 0;
    while (n_done < 2) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_flush_chip != 1 || n_flush_merge != 1 || n_start != 2 ||
        n_out_words != 20) begin
      failures++;
      $display("FAIL net 2: left %0d flushes %0d %0d starts %0d out %0d", exp_q.size(),
               n_flush_chip, n_flush_merge, n_start, n_out_words);
    end
    checks++;
    if (min_seg_len < 64) begin failures++; $display("FAIL segment of %0d cycles", min_seg_len); end
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
