// End-to-end testbench for sand_vme_board at its default sizes.
//
// The host side loads a 64K-entry activation table, then four networks one
// after the other, each with its configuration words and weights, and sends
// events through the input stream; the output stream is read with random
// back-pressure. Every output word is compared with a reference model of the
// network written here (multiply-accumulate or squared distance, 16-bit cut
// with rounding and saturation, table lookup, min/max search with neuron
// index, yes/no threshold).
//   net 1: 20:20:18:3 feed-forward, two segments in the first two layers,
//          hidden layers in FIFO_B then FIFO_A, 14 events (last group has two
//          dummy events), input stalls while two groups wait
//          (the 20:18 layer has a bias input)
//   net 2: 8:12 feed-forward (with bias) followed by a 12:37 squared-distance layer with
//          minimum search (a Kohonen-style winner), 3 events
//   net 3: 8:21 maximum search through the table, 5 events, with a small
//          shift so that sums saturate
//   net 4: 8:5 linear layer with yes/no threshold output, 4 events
// Each mechanism is counted and must have happened at least once.
module tb_sand_vme_board;
  import sand_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        cfg_wr_en = 0;
  logic [7:0]  cfg_wr_addr = 0, cfg_wr_data = 0;
  logic        wl_start = 0, wl_valid = 0;
  logic [9:0]  wl_n_in = 0;
  logic [15:0] wl_base = 0, wl_data = 0, wl_next_base;
  logic        lut_wr_en = 0;
  logic [15:0] lut_wr_addr = 0, lut_wr_data = 0;
  logic        thr_en = 0;
  word_t       thr = 0;
  logic        in_valid = 0, in_ready, in_flush = 0, ev_ack;
  word_t       in_data = 0;
  logic        out_valid, out_last, out_yes, out_ready = 0;
  word_t       out_data;
  logic [1:0]  out_event;
  logic        busy;
  logic [3:0]  sat;

  sand_vme_board dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0, cycle = 0;
  // mechanism counters
  int n_multiseg = 0, n_pingpong = 0, n_dummy = 0, n_lut = 0, n_linear = 0, n_sqr = 0;
  int n_bias = 0, n_min = 0, n_max = 0, n_thr = 0, n_sat = 0, n_sat_model = 0, n_in_stall = 0, n_out_bp = 0, n_events = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid && !in_ready) n_in_stall++;
    if (rst_n && out_valid && !out_ready) n_out_bp++;
    if (rst_n && |sat) n_sat++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  function automatic word_t lut_f(logic [15:0] a);
    // a monotone squashing table: f(x) = 3x/8 + 7, evaluated on signed x
    return word_t'((int'(signed'(a)) * 3) >>> 3) + 16'sd7;
  endfunction

  function automatic word_t cut(longint s, int sh, bit r);
    longint q;
    q = s;
    if (r && sh > 0) q += 64'sd1 <<< (sh - 1);
    q = q >>> sh;
    if (q > 32767) return 16'sh7fff;
    if (q < -32768) return -16'sh8000;
    return word_t'(q);
  endfunction

  typedef struct {
    int nin, nout, op, pp, shift, rnd, nonlin, bias;
  } layer_t;

  layer_t      L [$];
  word_t       W [$][][];      // W[layer][neuron][input]

  function automatic logic [31:0] cfg_of(layer_t l, bit last);
    layer_cfg_t c;
    c = '0;
    c.n_in = 10'(l.nin); c.n_out = 10'(l.nout); c.op = 1'(l.op); c.pp = pp_e'(l.pp);
    c.shift = 5'(l.shift); c.rnd = 1'(l.rnd); c.nonlin = 1'(l.nonlin); c.last = last;
    c.bias = 1'(l.bias);
    return 32'(c);
  endfunction

  // run the network on one event, return the output words
  // (a bias input is modelled as one more input holding BIAS_ACT)
  task automatic model(input word_t x [], output word_t y []);
    word_t o [];
    o = x;
    for (int li = 0; li < L.size(); li++) begin
      word_t r [];
      word_t v [];
      if (L[li].bias != 0) begin
        o = new[o.size() + 1](o);
        o[o.size() - 1] = BIAS_ACT;
      end
      v = new[L[li].nout];
      for (int n = 0; n < L[li].nout; n++) begin
        longint s;
        s = 0;
        for (int j = 0; j < L[li].nin + L[li].bias; j++)
          s += (L[li].op == 1) ? (longint'(o[j]) - longint'(W[li][n][j])) ** 2
                               : longint'(o[j]) * longint'(W[li][n][j]);
        v[n] = cut(s, L[li].shift, L[li].rnd[0]);
        if (v[n] == 16'sh7fff || v[n] == -16'sh8000) n_sat_model++;
      end
      if (L[li].pp == 0) begin
        r = new[L[li].nout];
        foreach (v[n]) r[n] = (L[li].nonlin != 0) ? lut_f(v[n]) : v[n];
      end else begin
        int b;
        b = 0;
        foreach (v[n])
          if ((L[li].pp == 1) ? v[n] > v[b] : v[n] < v[b]) b = n;
        r = new[2];
        r[0] = (L[li].nonlin != 0) ? lut_f(v[b]) : v[b];
        r[1] = word_t'(b);
      end
      o = r;
    end
    y = o;
  endtask

  // ---------------------------------------------------------------- host
  task automatic load_lut();
    for (int a = 0; a < 65536; a++) begin
      @(negedge clk);
      lut_wr_en = 1; lut_wr_addr = 16'(a); lut_wr_data = lut_f(16'(a));
    end
    @(negedge clk); lut_wr_en = 0;
  endtask

  task automatic load_net();
    logic [15:0] base;
    base = 0;
    for (int li = 0; li < L.size(); li++) begin
      logic [31:0] c;
      c = cfg_of(L[li], li == L.size() - 1);
      for (int b = 0; b < 4; b++) begin
        @(negedge clk);
        cfg_wr_en = 1; cfg_wr_addr = 8'(4 * li + b); cfg_wr_data = c[8*b +: 8];
      end
      @(negedge clk); cfg_wr_en = 0;
      wl_start = 1; wl_n_in = 10'(L[li].nin + L[li].bias); wl_base = base;
      @(negedge clk); wl_start = 0;
      for (int n = 0; n < L[li].nout; n++)
        for (int j = 0; j < L[li].nin + L[li].bias; j++) begin
          @(negedge clk); wl_valid = 1; wl_data = W[li][n][j];
        end
      @(negedge clk); wl_valid = 0;
      base = wl_next_base;
      if ((L[li].nout + 15) / 16 > 1) n_multiseg++;
      if (li >= 2) n_pingpong++;
      if (L[li].op == 1) n_sqr++;
      if (L[li].bias != 0) n_bias++;
      if (L[li].pp == 1) n_max++;
      if (L[li].pp == 2) n_min++;
      if (L[li].nonlin != 0) n_lut++; else n_linear++;
    end
  endtask

  // expected output words, in order
  typedef struct { word_t v; int ev; bit last; } exp_t;
  exp_t exp_q[$];
  int   ev_base;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    exp_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected output %0d", out_data);
    end else begin
      e = exp_q.pop_front();
      if (out_data != e.v || int'(out_event) != e.ev % 4 || out_last != e.last) begin
        failures++;
        if (failures < 20)
          $display("FAIL out %0d ev %0d last %0b, exp %0d ev %0d last %0b (cycle %0d)",
                   out_data, out_event, out_last, e.v, e.ev % 4, e.last, cycle);
      end
    end
  end

  // send events, with a flush after the last one; fill exp_q
  task automatic run_events(input int nev, input int amp);
    for (int ev = 0; ev < nev; ev++) begin
      word_t x [];
      word_t y [];
      x = new[L[0].nin];
      foreach (x[j]) x[j] = word_t'($urandom_range(0, 2 * amp)) - word_t'(amp);
      model(x, y);
      foreach (y[i]) begin
        exp_t e;
        e.v = thr_en ? ((y[i] >= thr) ? 16'sd1 : 16'sd0) : y[i];
        e.ev = ev; e.last = (i == y.size() - 1);
        exp_q.push_back(e);
      end
      foreach (x[j]) begin
        @(negedge clk);
        in_valid = 1; in_data = x[j];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      n_events++;
    end
    @(negedge clk); in_valid = 0;
    if (nev % 4 != 0) n_dummy++;
    repeat (2) @(negedge clk);
    in_flush = 1;
    @(negedge clk); in_flush = 0;
    // wait until everything is out
    while (exp_q.size() != 0) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  task automatic new_layer(int nin, int nout, int op, int pp, int shift, int rnd, int nonlin,
                           int wamp, int bias = 0);
    layer_t l;
    word_t  w [][];
    l = '{nin: nin, nout: nout, op: op, pp: pp, shift: shift, rnd: rnd, nonlin: nonlin,
          bias: bias};
    L.push_back(l);
    w = new[nout];
    foreach (w[n]) begin
      w[n] = new[nin + bias];
      foreach (w[n][j]) w[n][j] = word_t'($urandom_range(0, 2 * wamp)) - word_t'(wamp);
      // bias weight: small, BIAS_ACT is large
      if (bias != 0) w[n][nin] = word_t'($urandom_range(0, 2 * (wamp / 32))) - word_t'(wamp / 32);
    end
    W.push_back(w);
  endtask

  // random output back-pressure
  initial forever begin
    @(negedge clk);
    out_ready = ($urandom_range(0, 3) != 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_lut();

    // net 1: 20:20:18:3
    L.delete(); W.delete();
    new_layer(20, 20, 0, 0, 9, 1, 1, 300);
    new_layer(20, 18, 0, 0, 8, 0, 0, 300, 1);
    new_layer(18, 3, 0, 0, 8, 1, 1, 300);
    load_net();
    run_events(14, 300);
    $display("net 1 done at cycle %0d", cycle);

    // net 2: 8:12 then 12:37 squared distance, minimum search
    L.delete(); W.delete();
    new_layer(8, 12, 0, 0, 6, 1, 1, 200, 1);
    new_layer(12, 37, 1, 2, 10, 1, 0, 2000);
    load_net();
    run_events(3, 300);
    $display("net 2 done at cycle %0d", cycle);

    // net 3: 8:21 maximum search through the table
    L.delete(); W.delete();
    new_layer(8, 21, 0, 1, 1, 1, 1, 300);
    load_net();
    run_events(5, 300);
    $display("net 3 done at cycle %0d", cycle);

    // net 4: 8:5 linear, yes/no threshold
    L.delete(); W.delete();
    thr_en = 1; thr = 16'sd0;
    new_layer(8, 5, 0, 0, 8, 1, 0, 300);
    load_net();
    run_events(4, 300);
    n_thr++;
    $display("net 4 done at cycle %0d", cycle);

    $display("mechanisms: bias=%0d multiseg=%0d pingpong=%0d dummy=%0d lut=%0d linear=%0d sqr=%0d min=%0d max=%0d thr=%0d sat=%0d in_stall=%0d out_bp=%0d events=%0d",
             n_bias, n_multiseg, n_pingpong, n_dummy, n_lut, n_linear, n_sqr, n_min, n_max, n_thr,
             n_sat, n_in_stall, n_out_bp, n_events);
    $display("model saturations: %0d", n_sat_model);
    if (n_multiseg == 0) begin failures++; $display("FAIL no multi-segment layer"); end
    if (n_pingpong == 0) begin failures++; $display("FAIL no third layer"); end
    if (n_dummy == 0)    begin failures++; $display("FAIL no dummy events"); end
    if (n_lut == 0 || n_linear == 0) begin failures++; $display("FAIL activation modes"); end
    if (n_bias == 0)     begin failures++; $display("FAIL no bias input"); end
    if (n_sqr == 0)      begin failures++; $display("FAIL no square-accumulate"); end
    if (n_min == 0 || n_max == 0) begin failures++; $display("FAIL search modes"); end
    if (n_thr == 0)      begin failures++; $display("FAIL no threshold output"); end
    if (n_sat == 0 || n_sat_model == 0) begin failures++; $display("FAIL no saturation"); end
    if (n_in_stall == 0) begin failures++; $display("FAIL input never stalled"); end
    if (n_out_bp == 0)   begin failures++; $display("FAIL no output back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
