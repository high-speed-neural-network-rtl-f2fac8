// Workload testbench: runs the network sizes used to rate the board on the
// processing engine at its default sizes and measures the computation time.
//   * two-layer nets N:16:16, N:32:16 and N:64:16 for N = 16, 64, 128, 256
//     (hidden layer through the lookup table, linear output layer);
//   * 64:64:1 and 16:5:1, the trigger nets of the comparison with other
//     neural processors;
//   * 512:128:128:128:16, the largest fan-in with three hidden layers.
// Each net runs one batch of four events. All results are compared with a
// reference model; the cycles from the batch request to the last result
// (four events) are printed and compared with the expected count
//   sum over layers of ceil(n_out/16) * max(4*n_in, 64) + per-layer overhead,
// which must stay within 90 cycles per layer (drain of the pipeline and
// result path between layers).
module tb_sand_workloads;
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
    repeat (2000000) @(posedge clk);
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

  function automatic int cdiv(int a, int b);
    return (a + b - 1) / b;
  endfunction

  task automatic run_net(int nin, int nh, int nout);
    word_t w0 [][], w1 [][];
    logic [15:0] nb;
    int t0, t1, ideal, cyc;
    load_layer(0, nin, nh, 0, 9, 1, 0, 16'd0, w0);
    nb = wl_next_base;
    load_layer(1, nh, nout, 0, 7, 0, 1, nb, w1);
    cur_mask = 4'b1111;
    for (int e = 0; e < 4; e++) begin
      word_t x [], h [], y [];
      x = new[nin];
      foreach (x[j]) begin x[j] = word_t'($urandom_range(0, 600)) - 16'sd300; inq[e].push_back(x[j]); end
      layer_model(x, w0, 9, 1, 0, h);
      layer_model(h, w1, 7, 0, 0, y);
      foreach (y[i]) expq[e].push_back(y[i]);
    end
    @(negedge clk); batch_valid = 1; batch_mask = 4'b1111;
    t0 = cycle;
    @(negedge clk); batch_valid = 0;
    @(posedge ob_done);
    t1 = cycle;
    repeat (3) @(negedge clk);
    checks++;
    if (expq[0].size() + expq[1].size() + expq[2].size() + expq[3].size() != 0) begin
      failures++; $display("FAIL %0d:%0d:%0d results missing", nin, nh, nout);
    end
    cyc = t1 - t0;
    ideal = cdiv(nh, 16) * ((4 * nin > 64) ? 4 * nin : 64) + cdiv(nout, 16) * ((4 * nh > 64) ? 4 * nh : 64);
    $display("net %0d:%0d:%0d  %0d cycles per 4 events (streaming %0d), %0d ns per event at 20 ns",
             nin, nh, nout, cyc, ideal, cyc * 20 / 4);
    checks++;
    if (cyc < ideal || cyc > ideal + 180) begin
      failures++; $display("FAIL %0d:%0d:%0d cycle count %0d", nin, nh, nout, cyc);
    end
  endtask

  // deep net: sz[0] inputs, then the layer sizes; hidden layers through the
  // table, last layer linear
  task automatic run_deep(int sz [], int sh []);
    word_t w [][][];
    logic [15:0] nb;
    int t0, t1, ideal, cyc, nl;
    nl = sz.size() - 1;
    w = new[nl];
    nb = 16'd0;
    ideal = 0;
    for (int l = 0; l < nl; l++) begin
      load_layer(l, sz[l], sz[l + 1], 0, sh[l], l != nl - 1, l == nl - 1, nb, w[l]);
      nb = wl_next_base;
      ideal += cdiv(sz[l + 1], 16) * ((4 * sz[l] > 64) ? 4 * sz[l] : 64);
    end
    cur_mask = 4'b1111;
    for (int e = 0; e < 4; e++) begin
      word_t x [], y [];
      x = new[sz[0]];
      foreach (x[j]) begin x[j] = word_t'($urandom_range(0, 600)) - 16'sd300; inq[e].push_back(x[j]); end
      for (int l = 0; l < nl; l++) begin
        layer_model(x, w[l], sh[l], l != nl - 1, 0, y);
        x = y;
      end
      foreach (y[i]) expq[e].push_back(y[i]);
    end
    @(negedge clk); batch_valid = 1; batch_mask = 4'b1111;
    t0 = cycle;
    @(negedge clk); batch_valid = 0;
    @(posedge ob_done);
    t1 = cycle;
    repeat (3) @(negedge clk);
    checks++;
    if (expq[0].size() + expq[1].size() + expq[2].size() + expq[3].size() != 0) begin
      failures++; $display("FAIL deep net results missing");
    end
    cyc = t1 - t0;
    $display("net %0d:%0d:%0d:%0d:%0d  %0d cycles per 4 events (streaming %0d), %0d ns per event at 20 ns",
             sz[0], sz[1], sz[2], sz[3], sz[4], cyc, ideal, cyc * 20 / 4);
    checks++;
    if (cyc < ideal || cyc > ideal + 90 * nl) begin
      failures++; $display("FAIL deep net cycle count %0d", cyc);
    end
  endtask

  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    static int ns [4] = '{16, 64, 128, 256};
    static int hs [3] = '{16, 32, 64};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 65536; a++) begin
      @(negedge clk); lut_wr_en = 1; lut_wr_addr = 16'(a); lut_wr_data = lut_f(16'(a));
    end
    @(negedge clk); lut_wr_en = 0;
    foreach (hs[h]) foreach (ns[n]) run_net(ns[n], hs[h], 16);
    run_net(64, 64, 1);
    run_net(16, 5, 1);
    run_deep('{512, 128, 128, 128, 16}, '{12, 10, 10, 8});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
