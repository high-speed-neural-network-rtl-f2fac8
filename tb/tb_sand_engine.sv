// Self-checking testbench for sand_engine (sequencer, four SAND chips, four
// WRAMs, lookup table, FIFO_A/FIFO_B, result bus) with models of the
// configuration memory, the four FIFO_in and the output controller.
// A 10:20:3 network (table activation in the hidden layer) runs on a batch
// of three events plus one dummy, then a 10:40 maximum-search layer on four
// events. Every result on the engine's output is compared, per event and in
// order, with a reference model.
module tb_sand_engine;
  import sand_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [5:0]  cfg_layer;
  layer_cfg_t  cfg_word;
  logic        batch_valid = 0, batch_take;
  logic [3:0]  batch_mask = 0, in_rd_en, in_empty;
  word_t       in_rd_data [NPAT];
  logic [1:0]  out_pending = 0, res_pat;
  logic        ob_start, ob_done, res_valid, busy;
  logic [3:0]  ob_mask, sat;
  logic [10:0] ob_count;
  word_t       res_data;
  logic        wl_start = 0, wl_valid = 0, lut_wr_en = 0;
  logic [9:0]  wl_n_in = 0;
  logic [15:0] wl_base = 0, wl_data = 0, wl_next_base, lut_wr_addr = 0, lut_wr_data = 0;
  int          checks = 0, failures = 0;

  sand_engine dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  layer_cfg_t cfgs [4];
  assign cfg_word = cfgs[cfg_layer[1:0]];

  word_t inq [4][$];
  always_comb for (int e = 0; e < 4; e++) begin
    in_empty[e]   = inq[e].size() == 0;
    in_rd_data[e] = in_empty[e] ? '0 : inq[e][0];
  end
  always @(posedge clk) for (int e = 0; e < 4; e++) if (in_rd_en[e]) void'(inq[e].pop_front());

  function automatic word_t lut_f(logic [15:0] a);
    return word_t'((int'(signed'(a)) * 5) >>> 4) - 16'sd3;
  endfunction

  function automatic word_t cut(longint s, int sh);
    longint q;
    q = s;
    if (sh > 0) q += 64'sd1 <<< (sh - 1);
    q = q >>> sh;
    if (q > 32767) return 16'sh7fff;
    if (q < -32768) return -16'sh8000;
    return word_t'(q);
  endfunction

  // expected results per event
  word_t expq [4][$];
  logic [3:0] cur_mask;
  always @(posedge clk) if (rst_n && res_valid) begin
    checks++;
    if (expq[res_pat].size() == 0) begin
      if (cur_mask[res_pat]) begin failures++; $display("FAIL unexpected result event %0d", res_pat); end
    end else if (res_data != expq[res_pat].pop_front()) begin
      failures++; $display("FAIL event %0d got %0d", res_pat, res_data);
    end
  end

  task automatic load_layer(int li, int nin, int nout, int ppm, int sh, bit nl, bit last,
                            input logic [15:0] base, output word_t w [][]);
    layer_cfg_t c;
    c = '0; c.n_in = 10'(nin); c.n_out = 10'(nout); c.pp = pp_e'(ppm); c.shift = 5'(sh);
    c.rnd = 1; c.nonlin = nl; c.last = last;
    cfgs[li] = c;
    w = new[nout];
    @(negedge clk); wl_start = 1; wl_n_in = 10'(nin); wl_base = base;
    @(negedge clk); wl_start = 0;
    foreach (w[n]) begin
      w[n] = new[nin];
      foreach (w[n][j]) begin
        w[n][j] = word_t'($urandom_range(0, 600)) - 16'sd300;
        wl_valid = 1; wl_data = w[n][j];
        @(negedge clk);
      end
    end
    wl_valid = 0;
  endtask

  function automatic void layer_model(input word_t x [], input word_t w [][], int sh, bit nl,
                                      int ppm, output word_t y []);
    word_t v [];
    v = new[w.size()];
    foreach (w[n]) begin
      longint s;
      s = 0;
      foreach (x[j]) s += longint'(x[j]) * longint'(w[n][j]);
      v[n] = cut(s, sh);
    end
    if (ppm == 0) begin
      y = new[v.size()];
      foreach (v[n]) y[n] = nl ? lut_f(v[n]) : v[n];
    end else begin
      int b;
      b = 0;
      foreach (v[n]) if (v[n] > v[b]) b = n;
      y = new[2];
      y[0] = nl ? lut_f(v[b]) : v[b];
      y[1] = word_t'(b);
    end
  endfunction

  initial begin
    word_t w0 [][], w1 [][];
    logic [15:0] nb;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 65536; a++) begin
      @(negedge clk); lut_wr_en = 1; lut_wr_addr = 16'(a); lut_wr_data = lut_f(16'(a));
    end
    @(negedge clk); lut_wr_en = 0;
    // network 1: 10:20:3
    load_layer(0, 10, 20, 0, 7, 1, 0, 16'd0, w0);
    nb = wl_next_base;
    load_layer(1, 20, 3, 0, 6, 0, 1, nb, w1);
    cur_mask = 4'b0111;
    for (int e = 0; e < 3; e++) begin
      word_t x [], h [], y [];
      x = new[10];
      foreach (x[j]) begin x[j] = word_t'($urandom_range(0, 600)) - 16'sd300; inq[e].push_back(x[j]); end
      layer_model(x, w0, 7, 1, 0, h);
      layer_model(h, w1, 6, 0, 0, y);
      foreach (y[i]) expq[e].push_back(y[i]);
    end
    @(negedge clk); batch_valid = 1; batch_mask = 4'b0111;
    @(negedge clk); batch_valid = 0;
    @(posedge ob_done);
    repeat (3) @(negedge clk);
    checks++;
    if (expq[0].size() + expq[1].size() + expq[2].size() != 0) begin
      failures++; $display("FAIL network 1 results missing");
    end
    // network 2: 10:40 maximum search, four events
    load_layer(0, 10, 40, 1, 5, 0, 1, 16'd0, w0);
    cur_mask = 4'b1111;
    for (int e = 0; e < 4; e++) begin
      word_t x [], y [];
      x = new[10];
      foreach (x[j]) begin x[j] = word_t'($urandom_range(0, 600)) - 16'sd300; inq[e].push_back(x[j]); end
      layer_model(x, w0, 5, 0, 1, y);
      foreach (y[i]) expq[e].push_back(y[i]);
    end
    @(negedge clk); batch_valid = 1; batch_mask = 4'b1111;
    @(negedge clk); batch_valid = 0;
    @(posedge ob_done);
    repeat (3) @(negedge clk);
    checks++;
    if (expq[0].size() + expq[1].size() + expq[2].size() + expq[3].size() != 0) begin
      failures++; $display("FAIL network 2 results missing");
    end
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
