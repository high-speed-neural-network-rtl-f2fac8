// sand_engine: the SAND processing engine of the board.
//
// Four SAND chips share the activity bus (BUS_A) and each reads its own
// weight memory (WRAM1..4); the command sequencer drives the bus and the
// weight addresses. The chips' results share one output bus (BUS_O) with
// the activation lookup table; that bus writes the hidden-layer buffer
// FIFO_B (or FIFO_A for every second hidden layer) or, in the last layer,
// the output controller. FIFO_A also keeps a layer's input activities as a
// circular buffer for the layer's later segments.
//
// Host side: weights are loaded through the weight distributor (sand_wload),
// the lookup table through a plain write port. The weight address width
// WAW sets the WRAM size (2^WAW words per chip). Everything between the
// chips, WRAMs, LUT and the two FIFOs follows the processing-engine diagram.
// Each chip's lookup-table address output carries the same value as its
// linear data output, so only the data output travels on; c_addr is left
// unused on purpose (a lint tool reports it as an unused signal).
module sand_engine
  import sand_pkg::*;
#(
  parameter int unsigned WAW    = 16,     // WRAM address width
  parameter int unsigned LUT_AW = 16,     // lookup-table address width
  parameter int unsigned BUF_D  = 2048    // depth of FIFO_A and FIFO_B
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration memory
  output logic [5:0]      cfg_layer,
  input  layer_cfg_t      cfg_word,
  // batches and FIFO_in
  input  logic            batch_valid,
  input  logic [3:0]      batch_mask,
  output logic            batch_take,
  output logic [3:0]      in_rd_en,
  input  word_t           in_rd_data [NPAT],
  input  logic [3:0]      in_empty,
  // output controller
  input  logic [1:0]      out_pending,
  output logic            ob_start,
  output logic [3:0]      ob_mask,
  output logic            ob_done,
  output logic [10:0]     ob_count,
  output logic            res_valid,
  output logic [1:0]      res_pat,
  output word_t           res_data,
  // host: weights and lookup table
  input  logic            wl_start,
  input  logic [9:0]      wl_n_in,
  input  logic [WAW-1:0]  wl_base,
  input  logic            wl_valid,
  input  logic [15:0]     wl_data,
  output logic [WAW-1:0]  wl_next_base,
  input  logic            lut_wr_en,
  input  logic [LUT_AW-1:0] lut_wr_addr,
  input  logic [15:0]     lut_wr_data,
  // status
  output logic            busy,
  output logic [NCHIP-1:0] sat
);

  // sequencer
  logic        op, rnd, chip_flush, seg_clr, merge_flush, nonlin, rp_idle;
  logic [4:0]  shift;
  pp_e         pp;
  logic [9:0]  n_out;
  word_t       act;
  tag_t        tag;
  logic [WAW-1:0] waddr;
  logic [1:0]  dest;
  logic        a_rd_en, a_empty, a_full, a_seq_wr, b_rd_en, b_empty, b_full, b_seq_wr;
  word_t       a_rd_data, a_seq_data, b_rd_data, b_seq_data;
  logic        rp_valid;
  logic [1:0]  rp_pat;
  word_t       rp_data;

  sand_sequencer #(.WAW(WAW)) u_seq (
    .clk, .rst_n,
    .cfg_layer, .cfg_word,
    .batch_valid, .batch_mask, .batch_take,
    .in_rd_en, .in_rd_data, .in_empty,
    .a_rd_en, .a_rd_data, .a_empty, .a_wr_en(a_seq_wr), .a_wr_data(a_seq_data),
    .b_rd_en, .b_rd_data, .b_empty, .b_wr_en(b_seq_wr), .b_wr_data(b_seq_data),
    .out_pending, .ob_start, .ob_mask, .ob_done, .ob_count,
    .op, .shift, .rnd, .pp, .n_out,
    .act_o(act), .tag_o(tag), .waddr,
    .chip_flush, .seg_clr,
    .rp_idle, .merge_flush, .nonlin, .dest,
    .busy
  );

  // FIFO_A and FIFO_B: written by the sequencer (copy / circular push-back)
  // or by the result bus, never both in one cycle
  logic a_res_wr, b_res_wr;
  assign a_res_wr  = rp_valid && dest == 2'd1;
  assign b_res_wr  = rp_valid && dest == 2'd0;

  sand_fifo #(.W(DW), .DEPTH(BUF_D)) u_fifo_a (
    .clk, .rst_n,
    .wr_en(a_seq_wr || a_res_wr), .wr_data(a_seq_wr ? a_seq_data : rp_data),
    .rd_en(a_rd_en), .rd_data(a_rd_data), .empty(a_empty), .full(a_full), .count()
  );
  sand_fifo #(.W(DW), .DEPTH(BUF_D)) u_fifo_b (
    .clk, .rst_n,
    .wr_en(b_seq_wr || b_res_wr), .wr_data(b_seq_wr ? b_seq_data : rp_data),
    .rd_en(b_rd_en), .rd_data(b_rd_data), .empty(b_empty), .full(b_full), .count()
  );

  a_one_writer_a: assert property (@(posedge clk) disable iff (!rst_n) !(a_seq_wr && a_res_wr));
  a_one_writer_b: assert property (@(posedge clk) disable iff (!rst_n) !(b_seq_wr && b_res_wr));

  // weight distribution and WRAMs
  logic [3:0]     w_wr_en;
  logic [WAW-1:0] w_wr_addr;
  logic [15:0]    w_wr_data;

  sand_wload #(.WAW(WAW)) u_wload (
    .clk, .rst_n,
    .start(wl_start), .n_in(wl_n_in), .base(wl_base),
    .w_valid(wl_valid), .w_data(wl_data),
    .wr_en(w_wr_en), .wr_addr(w_wr_addr), .wr_data(w_wr_data),
    .next_base(wl_next_base)
  );

  logic        c_valid [NCHIP];
  word_t       c_data  [NCHIP];
  word_t       c_addr  [NCHIP];
  logic [1:0]  c_pat   [NCHIP];
  logic [9:0]  c_idx   [NCHIP];

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    logic [15:0] wgt;
    sand_wram #(.DEPTH(2**WAW)) u_wram (
      .clk,
      .wr_en(w_wr_en[c]), .wr_addr(w_wr_addr), .wr_data(w_wr_data),
      .rd_addr(waddr), .rd_data(wgt)
    );
    sand_chip #(.IW(10)) u_sand (
      .clk, .rst_n, .op, .shift, .rnd, .pp,
      .act_i(act), .tag_i(tag), .wgt_i(wgt),
      .flush(chip_flush), .seg_clr, .chip_id(2'(c)), .n_out,
      .out_valid(c_valid[c]), .out_addr(c_addr[c]), .out_data(c_data[c]),
      .out_pat(c_pat[c]), .out_idx(c_idx[c]), .sat(sat[c])
    );
  end

  // output bus with lookup table
  logic [15:0] lut_addr, lut_data;

  sand_result_path u_bus_o (
    .clk, .rst_n, .pp, .nonlin, .n_out, .merge_flush,
    .c_valid, .c_data, .c_pat, .c_idx,
    .lut_addr, .lut_data,
    .res_valid(rp_valid), .res_pat(rp_pat), .res_data(rp_data), .idle(rp_idle)
  );

  sand_lut #(.AW(LUT_AW)) u_lut (
    .clk, .wr_en(lut_wr_en), .wr_addr(lut_wr_addr), .wr_data(lut_wr_data),
    .rd_addr(lut_addr[LUT_AW-1:0]), .rd_data(lut_data)
  );

  assign res_valid = rp_valid && dest == 2'd2;
  assign res_pat   = rp_pat;
  assign res_data  = rp_data;

endmodule
