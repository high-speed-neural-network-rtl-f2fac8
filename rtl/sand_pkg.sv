// sand_pkg: types and constants shared by the SAND neural processor and its
// VME board.
//
// SAND is a systolic array of four processing elements (PEs). Each PE owns
// one neuron of the current segment and computes it for four input patterns
// (events) at once, so one weight is reused for four cycles while activities
// stream past. Data words are 16-bit two's complement; the accumulator is 40
// bits wide, enough for 512 products of two 16-bit operands (the documented
// maximum fan-in).
//
// The layer configuration word is 32 bits, one per layer. Which fields it has
// (fan-in, node count, operation, cut mode, activation type) follows the
// description of the board; the bit layout below is this design's own.
package sand_pkg;

  localparam int unsigned DW       = 16;  // activity / weight / result width
  localparam int unsigned AW       = 40;  // accumulator width
  localparam int unsigned NPE      = 4;   // processing elements per chip
  localparam int unsigned NPAT     = 4;   // patterns (events) processed together
  localparam int unsigned MAX_NIN  = 512; // largest fan-in of a layer
  localparam int unsigned NCHIP    = 4;   // SAND chips on one board
  localparam int unsigned SEG      = NPE * NCHIP; // neurons per segment (16)

  // Constant activity of the bias input (1.0 in a format with 14 fraction
  // bits), so the bias weight has the scale of the other weights.
  localparam logic signed [DW-1:0] BIAS_ACT = 16'sh4000;

  typedef logic signed [DW-1:0] word_t;
  typedef logic signed [AW-1:0] acc_t;

  // Operation executed on the input activities.
  typedef enum logic [1:0] {
    OP_MAC = 2'd0,  // sum_j w_ij * o_j               (feed-forward)
    OP_SQR = 2'd1   // sum_j (o_j - w_ij)^2           (RBF / Kohonen distance)
  } op_e;

  // Post-processing of the stream of results.
  typedef enum logic [1:0] {
    PP_PASS = 2'd0, // every result is output
    PP_MAX  = 2'd1, // only the largest result per pattern, with its neuron index
    PP_MIN  = 2'd2  // only the smallest result per pattern, with its neuron index
  } pp_e;

  // Layer configuration word (32 bits):
  //   [9:0]   n_in    number of input activities, 1..512
  //   [19:10] n_out   number of nodes of the layer, 1..1023
  //   [20]    op      0 multiply-accumulate, 1 square-accumulate
  //   [22:21] pp      0 pass, 1 max search, 2 min search
  //   [27:23] shift   position of the 16-bit window in the 40-bit sum (0..24)
  //   [28]    rnd     round to nearest when cutting (automatic accuracy step)
  //   [29]    nonlin  1: result goes through the activation lookup table
  //   [30]    last    1: last layer of the network, results go to the output
  //   [31]    bias    1: every neuron has one more input, the constant
  //                   BIAS_ACT, whose weight is the neuron's threshold
  typedef struct packed {
    logic       bias;
    logic       last;
    logic       nonlin;
    logic       rnd;
    logic [4:0] shift;
    pp_e        pp;
    logic       op;
    logic [9:0] n_out;
    logic [9:0] n_in;
  } layer_cfg_t;

  // Tag that travels with every activity through the systolic array.
  typedef struct packed {
    logic       valid;
    logic       op;     // operation for this term: 0 MAC, 1 square-accumulate
    logic [1:0] pat;    // pattern (event) index 0..3
    logic       first;  // first input of the neuron's sum
    logic       last;   // last input of the neuron's sum
  } tag_t;

endpackage
