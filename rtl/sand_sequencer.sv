// sand_sequencer: command sequencer of the SAND processing engine.
//
// On a batch request (up to four events waiting in FIFO_in) the sequencer
// runs the network stored in the ANN configuration memory, layer by layer,
// and each layer segment by segment: a segment is 16 neurons, four per chip.
// For every segment it streams all n_in inputs of the four events,
// interleaved (o[j] of event 0..3, then o[j+1] ...), one activity per cycle,
// and in the same cycle addresses the weight memories. Weights are stored in
// exactly this read order (layer after layer; inside a layer segment after
// segment; inside a segment input after input; inside an input PE 0..3, each
// chip's WRAM holding its own neurons), so the weight address simply counts
// up by one per activity: word address of w[n][j] in layer L, with
// n = 16s + 4c + k, is base(L) + (s*n_in + j)*4 + k in the WRAM of chip c
// (n_in counting the bias input, if the layer has one).
//
// Activity sources: the first segment of the first layer reads FIFO_in
// (missing events read as dummy zeros) and copies every word to FIFO_A; later
// segments read FIFO_A, which acts as a circular buffer: each word read is
// pushed back unless this is the layer's last segment. Layer L > 0 reads the
// buffer layer L-1 wrote, also circularly. Results go to FIFO_B (even
// layers), FIFO_A (odd layers) or, for the last layer, to the output
// controller.
// With the layer's bias bit set, each neuron gets one more input after the
// n_in real ones: the constant BIAS_ACT, generated here (no buffer is read
// or written for it). Its weight, stored after the neuron's n_in weights,
// is the threshold term of the neuron.
// A segment lasts at least MIN_SEG cycles so that the single result bus can
// carry the 64 results of one segment before the next arrive. After the last
// segment the sequencer waits for the results to drain (and, in search mode,
// flushes the chips' and then the merger's search) before the next layer.
//
// The segment-by-segment operation, FIFO_A as circular buffer, FIFO_B for the
// hidden layer, one configuration word per layer and dummy events follow the
// board description; the state machine, the ping-pong use of FIFO_A and
// FIFO_B for deeper networks, the bias input and all timings are this
// design's choice.
module sand_sequencer
  import sand_pkg::*;
#(
  parameter int unsigned WAW     = 16,  // weight address width
  parameter int unsigned MIN_SEG = 64,  // minimum cycles per segment
  parameter int unsigned T_DRAIN = 40   // cycles from last activity to results in buffers
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration memory
  output logic [5:0]      cfg_layer,
  input  layer_cfg_t      cfg_word,
  // batches from the input controller
  input  logic            batch_valid,
  input  logic [3:0]      batch_mask,
  output logic            batch_take,
  // FIFO_in read side
  output logic [3:0]      in_rd_en,
  input  word_t           in_rd_data [NPAT],
  input  logic [3:0]      in_empty,
  // FIFO_A and FIFO_B (sequencer side)
  output logic            a_rd_en,
  input  word_t           a_rd_data,
  input  logic            a_empty,
  output logic            a_wr_en,
  output word_t           a_wr_data,
  output logic            b_rd_en,
  input  word_t           b_rd_data,
  input  logic            b_empty,
  output logic            b_wr_en,
  output word_t           b_wr_data,
  // output controller
  input  logic [1:0]      out_pending,
  output logic            ob_start,
  output logic [3:0]      ob_mask,
  output logic            ob_done,
  output logic [10:0]     ob_count,
  // to the chips and WRAMs
  output logic            op,
  output logic [4:0]      shift,
  output logic            rnd,
  output pp_e             pp,
  output logic [9:0]      n_out,
  output word_t           act_o,      // registered, aligned with WRAM data
  output tag_t            tag_o,
  output logic [WAW-1:0]  waddr,      // WRAM read address (data next cycle)
  output logic            chip_flush,
  output logic            seg_clr,
  // result path
  input  logic            rp_idle,
  output logic            merge_flush,
  output logic            nonlin,
  output logic [1:0]      dest,       // 0: FIFO_B, 1: FIFO_A, 2: output
  // status
  output logic            busy
);

  typedef enum logic [3:0] {
    S_IDLE, S_LCFG, S_RUN, S_PAD, S_DRAIN, S_CWAIT, S_MWAIT, S_LDONE
  } state_e;

  state_e      st;
  layer_cfg_t  cfg;
  logic [3:0]  mask;
  logic [5:0]  layer;
  logic [6:0]  nseg, seg;
  logic [9:0]  j;
  logic [1:0]  p;
  logic [7:0]  cyc;
  logic [7:0]  tmr;
  logic [WAW-1:0] wa;

  logic        from_in, src_b, last_seg, src_ok, issue, in_bias;
  logic [9:0]  j_last;      // index of the last input of a neuron
  word_t       src_data;

  assign cfg_layer = layer;
  assign op        = cfg.op;
  assign shift     = cfg.shift;
  assign rnd       = cfg.rnd;
  assign pp        = cfg.pp;
  assign n_out     = cfg.n_out;
  assign nonlin    = cfg.nonlin;
  assign dest      = cfg.last ? 2'd2 : (layer[0] ? 2'd1 : 2'd0);
  assign waddr     = wa;
  assign busy      = st != S_IDLE;
  assign ob_mask   = batch_mask;

  always_comb begin
    from_in  = layer == '0 && seg == '0;
    src_b    = layer[0];
    last_seg = seg == nseg - 7'd1;
    j_last   = cfg.bias ? cfg.n_in : cfg.n_in - 10'd1;
    in_bias  = cfg.bias && j == cfg.n_in;
    if (in_bias) begin
      src_ok   = 1'b1;
      src_data = BIAS_ACT;
    end else if (from_in) begin
      src_ok   = !mask[p] || !in_empty[p];
      src_data = mask[p] ? in_rd_data[p] : '0;
    end else if (src_b) begin
      src_ok   = !b_empty;
      src_data = b_rd_data;
    end else begin
      src_ok   = !a_empty;
      src_data = a_rd_data;
    end
    issue = st == S_RUN && src_ok;

    in_rd_en  = (issue && !in_bias && from_in && mask[p]) ? 4'(1 << p) : 4'b0;
    a_rd_en   = issue && !in_bias && !from_in && !src_b;
    b_rd_en   = issue && !in_bias && !from_in && src_b;
    // copy to FIFO_A during the first segment, push back while segments remain
    a_wr_en   = issue && !in_bias && !last_seg && (from_in || !src_b);
    b_wr_en   = issue && !in_bias && !last_seg && !from_in && src_b;
    a_wr_data = src_data;
    b_wr_data = src_data;

    batch_take = st == S_IDLE && batch_valid && out_pending < 2'd2;
    ob_start   = batch_take;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      cfg         <= '0;
      mask        <= '0;
      layer       <= '0;
      nseg        <= '0;
      seg         <= '0;
      j           <= '0;
      p           <= '0;
      cyc         <= '0;
      tmr         <= '0;
      wa          <= '0;
      act_o       <= '0;
      tag_o       <= '0;
      chip_flush  <= 1'b0;
      seg_clr     <= 1'b0;
      merge_flush <= 1'b0;
      ob_done     <= 1'b0;
      ob_count    <= '0;
    end else begin
      tag_o       <= '0;
      chip_flush  <= 1'b0;
      seg_clr     <= 1'b0;
      merge_flush <= 1'b0;
      ob_done     <= 1'b0;
      unique case (st)
        S_IDLE: begin
          if (batch_take) begin
            mask  <= batch_mask;
            layer <= '0;
            wa    <= '0;
            st    <= S_LCFG;
          end
        end
        S_LCFG: begin
          cfg     <= cfg_word;
          nseg    <= 7'((cfg_word.n_out + 10'd15) >> 4);
          seg     <= '0;
          j       <= '0;
          p       <= '0;
          cyc     <= '0;
          seg_clr <= 1'b1;
          st      <= S_RUN;
        end
        S_RUN: begin
          if (cyc != 8'hff) cyc <= cyc + 8'd1;
          if (issue) begin
            act_o <= src_data;
            tag_o <= '{valid: 1'b1, op: cfg.op, pat: p, first: j == '0,
                      last: j == j_last};
            wa    <= wa + 1'b1;
            p     <= p + 2'd1;
            if (p == 2'd3) begin
              j <= j + 10'd1;
              if (j == j_last) st <= S_PAD;
            end
          end
        end
        S_PAD: begin
          if (cyc != 8'hff) cyc <= cyc + 8'd1;
          if (cyc >= 8'(MIN_SEG - 1)) begin
            cyc <= '0;
            j   <= '0;
            p   <= '0;
            if (last_seg) begin
              tmr <= '0;
              st  <= S_DRAIN;
            end else begin
              seg <= seg + 7'd1;
              st  <= S_RUN;
            end
          end
        end
        S_DRAIN: begin
          if (tmr != 8'hff) tmr <= tmr + 8'd1;
          if (tmr >= 8'(T_DRAIN) && rp_idle) begin
            tmr <= '0;
            if (cfg.pp != PP_PASS) begin
              chip_flush <= 1'b1;
              st <= S_CWAIT;
            end else begin
              st <= S_LDONE;
            end
          end
        end
        S_CWAIT: begin
          if (tmr != 8'hff) tmr <= tmr + 8'd1;
          if (tmr >= 8'd8 && rp_idle) begin
            tmr <= '0;
            merge_flush <= 1'b1;
            st <= S_MWAIT;
          end
        end
        S_MWAIT: begin
          if (tmr != 8'hff) tmr <= tmr + 8'd1;
          if (tmr >= 8'd12 && rp_idle) st <= S_LDONE;
        end
        S_LDONE: begin
          if (cfg.last) begin
            ob_done  <= 1'b1;
            ob_count <= (cfg.pp != PP_PASS) ? 11'd2 : 11'(cfg.n_out);
            st       <= S_IDLE;
          end else begin
            layer <= layer + 6'd1;
            st    <= S_LCFG;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
