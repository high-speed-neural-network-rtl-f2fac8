// sand_postproc: post-processing of the SAND result stream.
//
// In PP_PASS mode every result is passed on, registered, to both outputs:
// `addr` (meant for the activation lookup table) and `data` (the linear
// value f(x) = x). In PP_MAX / PP_MIN mode the unit searches the extremal
// result per pattern over all results it sees until `flush`; then it emits
// four results, pattern 0..3 in consecutive cycles, each with the index of
// the neuron that produced it (ties keep the earlier neuron). Searching for a
// maximum or a minimum, and the two outputs for the lookup table and for
// linear data, follow the SAND description; returning the winner's index and
// the flush protocol are this design's choice (the index is what a Kohonen
// map or an RBF classifier needs).
//
// Timing: PASS outputs follow their inputs by one cycle. The four search
// results appear in four consecutive cycles starting two cycles after the
// flush pulse; no input may be
// valid during those cycles, and patterns that saw no input report index 0
// and the neutral value (-32768 for max, +32767 for min).
module sand_postproc
  import sand_pkg::*;
#(
  parameter int unsigned IW = 10  // width of the neuron index
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pp_e           mode,
  input  logic          in_valid,
  input  word_t         in_val,
  input  logic [IW-1:0] in_idx,
  input  logic [1:0]    in_pat,
  input  logic          flush,
  output logic          out_valid,
  output word_t         out_addr,
  output word_t         out_data,
  output logic [1:0]    out_pat,
  output logic [IW-1:0] out_idx
);

  word_t         best [NPAT];
  logic [IW-1:0] bidx [NPAT];
  logic          emitting;
  logic [1:0]    ecnt;
  logic          have [NPAT];
  logic          better;
  word_t         neutral;

  always_comb begin
    neutral = (mode == PP_MIN) ? 16'sh7fff : -16'sh8000;
    better  = !have[in_pat] ||
              ((mode == PP_MIN) ? (in_val < best[in_pat]) : (in_val > best[in_pat]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPAT; i++) begin
        best[i] <= '0;
        bidx[i] <= '0;
        have[i] <= 1'b0;
      end
      emitting  <= 1'b0;
      ecnt      <= '0;
      out_valid <= 1'b0;
      out_addr  <= '0;
      out_data  <= '0;
      out_pat   <= '0;
      out_idx   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (mode == PP_PASS) begin
        emitting <= 1'b0;
        if (in_valid) begin
          out_valid <= 1'b1;
          out_addr  <= in_val;
          out_data  <= in_val;
          out_pat   <= in_pat;
          out_idx   <= in_idx;
        end
      end else if (emitting) begin
        out_valid  <= 1'b1;
        out_addr   <= have[ecnt] ? best[ecnt] : neutral;
        out_data   <= have[ecnt] ? best[ecnt] : neutral;
        out_pat    <= ecnt;
        out_idx    <= have[ecnt] ? bidx[ecnt] : '0;
        have[ecnt] <= 1'b0;
        ecnt       <= ecnt + 2'd1;
        if (ecnt == 2'(NPAT-1)) emitting <= 1'b0;
      end else begin
        if (in_valid && better) begin
          best[in_pat] <= in_val;
          bidx[in_pat] <= in_idx;
          have[in_pat] <= 1'b1;
        end
        if (flush) begin
          emitting <= 1'b1;
          ecnt     <= '0;
        end
      end
    end
  end

endmodule
