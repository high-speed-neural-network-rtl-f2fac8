// sand_result_path: the output bus of the processing engine (BUS_O).
//
// The four SAND chips deliver their results at the same time; each chip's
// results are first taken into a small buffer. The buffers are then read
// chip by chip, 16 results of a segment per chip (neurons 16s..16s+15 in
// order, each for patterns 0..3), so the words leave in the order the next
// layer reads them: input-major, pattern-minor. Results of padding neurons
// (index >= n_out) are dropped.
//
// A second post-processor merges the four chips in search mode: it sees the
// per-chip extremes (4 per chip) and, on `merge_flush`, emits the extreme of
// the whole layer for each pattern. In search mode a layer therefore yields
// two words per pattern: first the four extremal values, then the four
// winning neuron indices.
// Values pass the activation lookup table when `nonlin` is set (address =
// result, one cycle read latency), otherwise they are used linearly.
// `idle` is high when nothing is buffered or in flight after the merger.
//
// The single output bus, the lookup table on it and the two kinds of output
// follow the processing-engine description; the per-chip buffers, the drain
// order and the merge stage are this design's choice.
module sand_result_path
  import sand_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  pp_e         pp,
  input  logic        nonlin,
  input  logic [9:0]  n_out,
  input  logic        merge_flush,
  // chip outputs
  input  logic        c_valid [NCHIP],
  input  word_t       c_data  [NCHIP],
  input  logic [1:0]  c_pat   [NCHIP],
  input  logic [9:0]  c_idx   [NCHIP],
  // activation lookup table read port
  output logic [15:0] lut_addr,
  input  logic [15:0] lut_data,
  // results
  output logic        res_valid,
  output logic [1:0]  res_pat,
  output word_t       res_data,
  output logic        idle
);

  localparam int unsigned BW = 10 + 2 + DW;

  logic [BW-1:0] b_rd   [NCHIP];
  logic          b_empty[NCHIP];
  logic [NCHIP-1:0] b_rd_en;
  logic [1:0]    dc;
  logic [3:0]    dw;
  logic [3:0]    quota;
  logic          pop;
  logic [9:0]    p_idx;
  logic [1:0]    p_pat;
  word_t         p_val;

  for (genvar c = 0; c < NCHIP; c++) begin : g_buf
    logic full;
    logic [5:0] cnt;
    sand_fifo #(.W(BW), .DEPTH(32)) u_buf (
      .clk, .rst_n,
      .wr_en(c_valid[c]), .wr_data({c_idx[c], c_pat[c], c_data[c]}),
      .rd_en(b_rd_en[c]), .rd_data(b_rd[c]),
      .empty(b_empty[c]), .full(full), .count(cnt)
    );
  end

  always_comb begin
    quota   = (pp == PP_PASS) ? 4'd15 : 4'd3;
    pop     = !b_empty[dc];
    b_rd_en = pop ? NCHIP'(1 << dc) : '0;
    {p_idx, p_pat, p_val} = b_rd[dc];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc <= '0;
      dw <= '0;
    end else if (pop) begin
      if (dw == quota) begin
        dw <= '0;
        dc <= dc + 2'd1;
      end else begin
        dw <= dw + 4'd1;
      end
    end
  end

  // merge stage
  logic        m_valid;
  word_t       m_addr, m_data;
  logic [1:0]  m_pat;
  logic [9:0]  m_idx;

  sand_postproc #(.IW(10)) u_merge (
    .clk, .rst_n, .mode(pp),
    .in_valid(pop && (pp != PP_PASS || p_idx < n_out)),
    .in_val(p_val), .in_idx(p_idx), .in_pat(p_pat),
    .flush(merge_flush),
    .out_valid(m_valid), .out_addr(m_addr), .out_data(m_data),
    .out_pat(m_pat), .out_idx(m_idx)
  );

  assign lut_addr = m_addr;

  // lookup-table stage
  logic        v1;
  word_t       d1;
  logic [1:0]  pat1;
  logic [9:0]  idxbuf [NPAT];
  logic [2:0]  ipend;
  logic [1:0]  inext;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1    <= 1'b0;
      d1    <= '0;
      pat1  <= '0;
      ipend <= '0;
      for (int i = 0; i < NPAT; i++) idxbuf[i] <= '0;
    end else begin
      v1   <= m_valid;
      d1   <= m_data;
      pat1 <= m_pat;
      if (m_valid && pp != PP_PASS) begin
        idxbuf[m_pat] <= m_idx;
        if (m_pat == 2'd3) ipend <= 3'd4;
      end else if (!v1 && ipend != 3'd0) begin
        ipend <= ipend - 3'd1;
      end
    end
  end

  always_comb begin
    inext = 2'(3'd4 - ipend);
    if (v1) begin
      res_valid = 1'b1;
      res_pat   = pat1;
      res_data  = nonlin ? lut_data : d1;
    end else if (ipend != 3'd0) begin
      res_valid = 1'b1;
      res_pat   = inext;
      res_data  = DW'(idxbuf[inext]);
    end else begin
      res_valid = 1'b0;
      res_pat   = '0;
      res_data  = '0;
    end
    idle = !pop && !m_valid && !v1 && ipend == 3'd0;
  end

endmodule
