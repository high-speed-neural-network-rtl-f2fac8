// sand_in_ctrl: input data stream controller with the four FIFO_in.
//
// Input activities arrive event by event as a stream of 16-bit words
// (valid/ready handshake), n_in words per event, n_in being the fan-in of the
// network's first layer. Event e of a group goes into FIFO_in[e], so the four
// FIFOs together turn the event-by-event stream into four parallel streams
// that the command sequencer reads interleaved (o[j] of event 0..3).
// After each complete event `ev_ack` pulses. When four events are stored, or
// when `flush` is high at an event boundary with at least one event stored,
// the group is closed and offered to the sequencer as a batch with a mask of
// the events it holds; missing events are later replaced by dummy data.
// Up to two closed batches wait; input stalls (in_ready low) beyond that or
// when the FIFO to write is full.
//
// Four FIFO_in, the regrouping into four interleaved events and the dummy
// events follow the board description; the handshake, the flush input and
// the batch queue are this design's choice.
module sand_in_ctrl
  import sand_pkg::*;
#(
  parameter int unsigned DEPTH = 2048   // words per FIFO_in
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [9:0]  n_in,         // words per event
  // input stream (FPDP or VME DMA)
  input  logic        in_valid,
  input  word_t       in_data,
  output logic        in_ready,
  input  logic        flush,        // close a partly filled group
  output logic        ev_ack,       // an event has been taken completely
  // batches to the sequencer
  output logic        batch_valid,
  output logic [3:0]  batch_mask,
  input  logic        batch_take,
  // read side of the four FIFO_in
  input  logic [3:0]  rd_en,
  output word_t       rd_data [NPAT],
  output logic [3:0]  rd_empty
);

  logic [1:0]  cur_ev;
  logic [9:0]  wcnt;
  logic [3:0]  q_mask [2];
  logic [1:0]  q_cnt;
  logic [3:0]  full;
  logic        wr;
  logic        ev_end;
  logic        close_full, close_flush, do_close;
  logic [3:0]  close_mask;

  for (genvar e = 0; e < NPAT; e++) begin : g_fifo
    logic [$clog2(DEPTH):0] cnt;
    sand_fifo #(.W(DW), .DEPTH(DEPTH)) u_fifo_in (
      .clk, .rst_n,
      .wr_en(wr && cur_ev == 2'(e)), .wr_data(in_data),
      .rd_en(rd_en[e]), .rd_data(rd_data[e]),
      .empty(rd_empty[e]), .full(full[e]), .count(cnt)
    );
  end

  always_comb begin
    in_ready    = (q_cnt < 2'd2) && !full[cur_ev];
    wr          = in_valid && in_ready;
    ev_end      = wr && (wcnt == n_in - 10'd1);
    close_full  = ev_end && cur_ev == 2'd3;
    close_flush = flush && !wr && wcnt == '0 && cur_ev != 2'd0 && q_cnt < 2'd2;
    do_close    = close_full || close_flush;
    close_mask  = close_full ? 4'b1111 : 4'((5'd1 << cur_ev) - 5'd1);
    batch_valid = q_cnt != 2'd0;
    batch_mask  = q_mask[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_ev    <= '0;
      wcnt      <= '0;
      q_cnt     <= '0;
      q_mask[0] <= '0;
      q_mask[1] <= '0;
      ev_ack    <= 1'b0;
    end else begin
      ev_ack <= ev_end;
      if (wr) begin
        if (ev_end) begin
          wcnt   <= '0;
          cur_ev <= cur_ev + 2'd1;
        end else begin
          wcnt <= wcnt + 10'd1;
        end
      end
      if (close_flush) cur_ev <= '0;
      // batch queue: take from the head, append at the tail
      case ({do_close, batch_take && batch_valid})
        2'b10: begin
          q_mask[q_cnt[0]] <= close_mask;
          q_cnt <= q_cnt + 2'd1;
        end
        2'b01: begin
          q_mask[0] <= q_mask[1];
          q_cnt <= q_cnt - 2'd1;
        end
        2'b11: begin
          if (q_cnt == 2'd1) q_mask[0] <= close_mask;
          else begin
            q_mask[0] <= q_mask[1];
            q_mask[1] <= close_mask;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
