// sand_out_ctrl: output data stream controller with the four FIFO_out.
//
// Results of the network's last layer arrive interleaved over the four events
// of a batch, each tagged with its event (pattern) number. A result of event
// e goes into FIFO_out[e] if e holds a real event; results of dummy events
// are dropped. When the sequencer reports the batch complete (`ob_done`,
// with the number of words per event) the batch is queued; queued batches
// are sent out event by event, `count` words each, over a valid/ready stream
// with the event number and a last-word flag. Batches are streamed while the
// next one is being computed; `pending` tells the sequencer how many batches
// are queued or streaming (at most two may exist).
//
// The final output type is selectable: continuous 16-bit values, or yes/no
// against a threshold (the comparator: out_data is 1 when the value is
// >= thr, else 0). `out_yes` always carries the comparison.
// Four FIFO_out, the reverse regrouping, the dropping of dummy results and
// the yes/no threshold follow the board description; the handshake and the
// batch queue are this design's choice.
module sand_out_ctrl
  import sand_pkg::*;
#(
  parameter int unsigned DEPTH = 2048   // words per FIFO_out
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the sequencer
  input  logic        ob_start,      // a batch starts, ob_mask holds its events
  input  logic [3:0]  ob_mask,
  input  logic        res_valid,
  input  logic [1:0]  res_pat,
  input  word_t       res_data,
  input  logic        ob_done,       // the current batch is complete
  input  logic [10:0] ob_count,      // words per event of that batch
  output logic [1:0]  pending,
  // output type
  input  logic        thr_en,        // 1: yes/no output, 0: 16-bit values
  input  word_t       thr,
  // output stream (VME or ECL/NIM)
  output logic        out_valid,
  output word_t       out_data,
  output logic [1:0]  out_event,
  output logic        out_last,
  output logic        out_yes,
  input  logic        out_ready
);

  logic [3:0]  wmask;
  logic [3:0]  q_mask  [2];
  logic [10:0] q_count [2];
  logic [1:0]  q_cnt;
  logic        streaming;
  logic [3:0]  s_mask;
  logic [10:0] s_count, s_w;
  logic [1:0]  s_ev;
  logic [3:0]  rd_en, empty, full;
  word_t       rd_data [NPAT];
  logic        pop, s_end, head_take;

  for (genvar e = 0; e < NPAT; e++) begin : g_fifo
    logic [$clog2(DEPTH):0] cnt;
    sand_fifo #(.W(DW), .DEPTH(DEPTH)) u_fifo_out (
      .clk, .rst_n,
      .wr_en(res_valid && res_pat == 2'(e) && wmask[e]), .wr_data(res_data),
      .rd_en(rd_en[e]), .rd_data(rd_data[e]),
      .empty(empty[e]), .full(full[e]), .count(cnt)
    );
  end

  // next event of the mask after event `ev` (4 if none)
  function automatic logic [2:0] next_ev(input logic [3:0] m, input logic [2:0] from);
    next_ev = 3'd4;
    for (int i = 3; i >= 0; i--)
      if (m[i] && 3'(i) >= from) next_ev = 3'(i);
  endfunction

  always_comb begin
    out_valid = streaming && !empty[s_ev];
    out_yes   = rd_data[s_ev] >= thr;
    out_data  = thr_en ? (out_yes ? 16'sd1 : 16'sd0) : rd_data[s_ev];
    out_event = s_ev;
    out_last  = s_w == s_count - 11'd1;
    pop       = out_valid && out_ready;
    rd_en     = pop ? 4'(1 << s_ev) : 4'b0;
    s_end     = pop && out_last && next_ev(s_mask, 3'(s_ev) + 3'd1) == 3'd4;
    head_take = !streaming && q_cnt != 2'd0;
    pending   = q_cnt + 2'(streaming);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wmask      <= '0;
      q_cnt      <= '0;
      q_mask[0]  <= '0; q_mask[1]  <= '0;
      q_count[0] <= '0; q_count[1] <= '0;
      streaming  <= 1'b0;
      s_mask     <= '0;
      s_count    <= '0;
      s_w        <= '0;
      s_ev       <= '0;
    end else begin
      if (ob_start) wmask <= ob_mask;
      // start streaming the head batch
      if (head_take) begin
        streaming <= q_mask[0] != 4'b0;
        s_mask    <= q_mask[0];
        s_count   <= q_count[0];
        s_w       <= '0;
        s_ev      <= next_ev(q_mask[0], 3'd0) == 3'd4 ? 2'd0 : 2'(next_ev(q_mask[0], 3'd0));
      end else if (pop) begin
        if (out_last) begin
          s_w  <= '0;
          if (s_end) streaming <= 1'b0;
          else       s_ev <= 2'(next_ev(s_mask, 3'(s_ev) + 3'd1));
        end else begin
          s_w <= s_w + 11'd1;
        end
      end
      // batch queue
      case ({ob_done, head_take})
        2'b10: begin
          q_mask[q_cnt[0]]  <= wmask;
          q_count[q_cnt[0]] <= ob_count;
          q_cnt <= q_cnt + 2'd1;
        end
        2'b01: begin
          q_mask[0]  <= q_mask[1];
          q_count[0] <= q_count[1];
          q_cnt <= q_cnt - 2'd1;
        end
        2'b11: begin
          if (q_cnt == 2'd1) begin
            q_mask[0]  <= wmask;
            q_count[0] <= ob_count;
          end else begin
            q_mask[0]  <= q_mask[1];
            q_count[0] <= q_count[1];
            q_mask[1]  <= wmask;
            q_count[1] <= ob_count;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
