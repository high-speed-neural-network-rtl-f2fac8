// sand_alu: the arithmetic unit of one SAND processing element.
//
// Three pipeline stages follow the PE's input registers:
//   1. pre-adder   d = activity - weight            (17 bits)
//   2. multiplier  p = activity * weight   (tag.op = 0, MAC)
//                  p = d * d               (tag.op = 1, squared distance)
//   3. accumulator acc[pat] = (first ? 0 : acc[pat]) + p  (40 bits)
// There is one accumulation register per pattern, since four patterns are
// interleaved cycle by cycle. When the term tagged `last` has been added,
// the finished sum leaves on `res_*` one cycle later (latency 3 cycles from
// the inputs to res_valid). A new term can be accepted every cycle, and a new
// sum can start (first) right after the last term of the previous one. The
// operation is a field of the tag and travels with its term, so it may change
// between any two terms.
//
// The multiplier, the 40-bit adder, the additional adder for the Euclidean
// distance and the four accumulation registers are taken from the SAND
// description; the pipeline cut points and the accumulator wrapping on
// overflow are choices of this design. The multiplier takes 17-bit operands
// so that the full difference can be squared. 512 products of two 16-bit
// numbers always fit in 40 bits. A square-accumulate sum can exceed them only
// when the differences approach the full 17-bit range; it then wraps.
module sand_alu
  import sand_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  word_t act,         // activity o_j of pattern tag.pat
  input  word_t wgt,         // weight w_ij of this PE's neuron
  input  tag_t  tag,
  output logic       res_valid,
  output logic [1:0] res_pat,
  output acc_t       res_acc
);

  // stage 1: pre-adder
  tag_t                 t1;
  word_t                a1, w1;
  logic signed [DW:0]   d1;
  // stage 2: multiplier
  tag_t                 t2;
  logic signed [2*DW+1:0] p2;
  // stage 3: accumulators
  acc_t                 acc [NPAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1 <= '0; t2 <= '0;
      a1 <= '0; w1 <= '0; d1 <= '0; p2 <= '0;
      res_valid <= 1'b0; res_pat <= '0; res_acc <= '0;
      for (int i = 0; i < NPAT; i++) acc[i] <= '0;
    end else begin
      t1 <= tag;
      a1 <= act;
      w1 <= wgt;
      d1 <= (DW+1)'(act) - (DW+1)'(wgt);

      t2 <= t1;
      if (t1.op) p2 <= (2*DW+2)'(d1) * (2*DW+2)'(d1);
      else    p2 <= (2*DW+2)'(a1) * (2*DW+2)'(w1);

      res_valid <= 1'b0;
      if (t2.valid) begin
        acc[t2.pat] <= (t2.first ? '0 : acc[t2.pat]) + AW'(p2);
        if (t2.last) begin
          res_valid <= 1'b1;
          res_pat   <= t2.pat;
          res_acc   <= (t2.first ? '0 : acc[t2.pat]) + AW'(p2);
        end
      end
    end
  end

endmodule
