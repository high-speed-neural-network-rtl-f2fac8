// sand_vme_board: neural trigger processor board with four SAND chips.
//
// The board runs a feed-forward network (or an RBF / Kohonen layer with a
// min/max search) on events that arrive one after another, four events at a
// time. Three processes run concurrently:
//   * input: sand_in_ctrl sorts the event-by-event word stream into four
//     FIFO_in, one per event, and offers groups of up to four events;
//   * computation: the processing engine (command sequencer, four SAND chips,
//     four WRAMs, lookup table, FIFO_A, FIFO_B) runs the layers stored in the
//     ANN configuration memory on a group, replacing missing events by dummy
//     data;
//   * output: sand_out_ctrl turns the interleaved results back into an
//     event-by-event stream, drops dummy events and optionally reduces each
//     value to yes/no against a threshold.
//
// Host side (normally behind the VME interface, which is not part of this
// RTL): byte writes to the configuration memory, a weight stream per layer
// (start pulse with fan-in and base address, then the weights neuron by
// neuron), and writes to the lookup table. The data source (FPDP or VME DMA)
// and the output port (VME, ECL/NIM) appear as plain streams.
//
// Everything is synchronous to `clk` (50 MHz in the original), reset is
// asynchronous, active low. The block structure is that of the board; the
// stream handshakes, register map and memory sizes are this design's.
module sand_vme_board
  import sand_pkg::*;
#(
  parameter int unsigned WAW    = 16,    // WRAM address width per chip
  parameter int unsigned LUT_AW = 16,    // lookup-table address width
  parameter int unsigned FIFO_D = 2048   // depth of every FIFO_in/out, FIFO_A/B
) (
  input  logic              clk,
  input  logic              rst_n,
  // host: ANN configuration memory (256 x 8)
  input  logic              cfg_wr_en,
  input  logic [7:0]        cfg_wr_addr,
  input  logic [7:0]        cfg_wr_data,
  // host: weights
  input  logic              wl_start,
  input  logic [9:0]        wl_n_in,
  input  logic [WAW-1:0]    wl_base,
  input  logic              wl_valid,
  input  logic [15:0]       wl_data,
  output logic [WAW-1:0]    wl_next_base,
  // host: lookup table
  input  logic              lut_wr_en,
  input  logic [LUT_AW-1:0] lut_wr_addr,
  input  logic [15:0]       lut_wr_data,
  // output type
  input  logic              thr_en,
  input  word_t             thr,
  // input data stream
  input  logic              in_valid,
  input  word_t             in_data,
  output logic              in_ready,
  input  logic              in_flush,
  output logic              ev_ack,
  // output data stream
  output logic              out_valid,
  output word_t             out_data,
  output logic [1:0]        out_event,
  output logic              out_last,
  output logic              out_yes,
  input  logic              out_ready,
  // status
  output logic              busy,
  output logic [NCHIP-1:0]  sat
);

  logic [5:0]  cfg_layer;
  logic [31:0] cfg_word;
  logic [31:0] cfg_first;
  layer_cfg_t  cfg0;
  logic        batch_valid, batch_take;
  logic [3:0]  batch_mask, in_rd_en, in_empty;
  word_t       in_rd_data [NPAT];
  logic [1:0]  out_pending;
  logic        ob_start, ob_done, res_valid;
  logic [3:0]  ob_mask;
  logic [10:0] ob_count;
  logic [1:0]  res_pat;
  word_t       res_data;

  // The configuration memory has one read port for the sequencer; the input
  // controller needs the first layer's fan-in, kept in a shadow register
  // updated on every write to bytes 0..3.
  sand_cfg_ram #(.BYTES(256)) u_cfg (
    .clk, .wr_en(cfg_wr_en), .wr_addr(cfg_wr_addr), .wr_data(cfg_wr_data),
    .layer(cfg_layer), .cfg_word
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_first <= '0;
    else if (cfg_wr_en && cfg_wr_addr[7:2] == '0)
      cfg_first[8*cfg_wr_addr[1:0] +: 8] <= cfg_wr_data;
  end
  assign cfg0 = layer_cfg_t'(cfg_first);

  sand_in_ctrl #(.DEPTH(FIFO_D)) u_in (
    .clk, .rst_n, .n_in(cfg0.n_in),
    .in_valid, .in_data, .in_ready, .flush(in_flush), .ev_ack,
    .batch_valid, .batch_mask, .batch_take,
    .rd_en(in_rd_en), .rd_data(in_rd_data), .rd_empty(in_empty)
  );

  sand_engine #(.WAW(WAW), .LUT_AW(LUT_AW), .BUF_D(FIFO_D)) u_engine (
    .clk, .rst_n,
    .cfg_layer, .cfg_word(layer_cfg_t'(cfg_word)),
    .batch_valid, .batch_mask, .batch_take,
    .in_rd_en, .in_rd_data, .in_empty,
    .out_pending, .ob_start, .ob_mask, .ob_done, .ob_count,
    .res_valid, .res_pat, .res_data,
    .wl_start, .wl_n_in, .wl_base, .wl_valid, .wl_data, .wl_next_base,
    .lut_wr_en, .lut_wr_addr, .lut_wr_data,
    .busy, .sat
  );

  sand_out_ctrl #(.DEPTH(FIFO_D)) u_out (
    .clk, .rst_n,
    .ob_start, .ob_mask, .res_valid, .res_pat, .res_data,
    .ob_done, .ob_count, .pending(out_pending),
    .thr_en, .thr,
    .out_valid, .out_data, .out_event, .out_last, .out_yes, .out_ready
  );

endmodule
