// sand_chip: the SAND neural processor, four PEs in a systolic array.
//
// The chip computes up to four neurons of a layer for four patterns (events)
// at once, turning the matrix/vector product into a matrix/matrix product:
// every cycle one activity and one weight enter. Activities arrive ordered by
// input j, then pattern p (o[j][0], o[j][1], o[j][2], o[j][3], o[j+1][0] ...)
// and move from PE to PE through registers. The weight bus carries, in the
// cycle of o[j][k], the weight w[k][j] of PE k; PE k latches it when o[j][0]
// reaches it, k cycles later, and uses it for four cycles.
//
// When PE 3 completes its register bank (all four neurons of the segment
// are then finished), the four banks are copied to an output buffer and the
// 16 results leave in 16 cycles, neuron 0 patterns 0..3 first, through the
// post-processor (pass, or min/max search with neuron index). The next
// segment's results may follow after 16 cycles, so a segment must last at
// least 16 cycles (4 or more inputs, or idle cycles in between).
//
// Latency: last activity of a segment in at t, first result on out_* at t+10.
// Every result carries its neuron's index in the layer, segment * 16 +
// chip_id * 4 + PE (segments are counted from seg_clr). In search mode only
// neurons below n_out take part, so padding neurons of the last segment
// cannot win.
// The PE chain, the weight reuse over four cycles, the post-processor and the
// address/data outputs follow the SAND architecture; the output buffer and
// its order are this design's choice.
module sand_chip
  import sand_pkg::*;
#(
  parameter int unsigned IW = 10   // width of the neuron index output
) (
  input  logic          clk,
  input  logic          rst_n,
  // layer configuration, static while a layer runs
  input  logic          op,         // operation, taken with each activity
  input  logic [4:0]    shift,      // shift, rnd and pp act on results: keep
                                    // them constant until a layer has drained
  input  logic          rnd,
  input  pp_e           pp,
  // systolic inputs
  input  word_t         act_i,
  input  tag_t          tag_i,
  input  word_t         wgt_i,
  input  logic          flush,      // end of layer for the min/max search
  input  logic          seg_clr,    // start of layer: segment count to 0
  input  logic [1:0]    chip_id,    // position of this chip on the board
  input  logic [IW-1:0] n_out,      // neurons of the layer (search ignores the rest)
  // outputs
  output logic          out_valid,
  output word_t         out_addr,   // to the activation lookup table
  output word_t         out_data,   // linear result
  output logic [1:0]    out_pat,
  output logic [IW-1:0] out_idx,
  output logic          sat         // a result (of a neuron < n_out) of the last
                                    // completed segment saturated
);

  word_t acts  [NPE+1];
  tag_t  tags  [NPE+1];
  word_t banks [NPE][NPAT];
  logic  done  [NPE];
  logic  sats  [NPE];

  assign acts[0] = act_i;
  // the operation enters the array with its activity and moves along with it
  assign tags[0] = '{valid: tag_i.valid, op: op, pat: tag_i.pat,
                     first: tag_i.first, last: tag_i.last};

  for (genvar k = 0; k < NPE; k++) begin : g_pe
    sand_pe u_pe (
      .clk, .rst_n, .shift, .rnd,
      .act_i(acts[k]), .tag_i(tags[k]), .wgt_i,
      .act_o(acts[k+1]), .tag_o(tags[k+1]),
      .bank(banks[k]), .bank_done(done[k]), .sat(sats[k])
    );
  end

  // output buffer and serialiser
  word_t            obuf [NPE*NPAT];
  logic             busy;
  logic [3:0]       ocnt;
  logic [IW-5:0]    seg_cnt;      // segment of the set being output
  logic [IW-5:0]    load_cnt;     // segment of the next set to complete
  logic [NPE-1:0]   real_pe;      // PEs of that set holding neurons < n_out
  logic             s_valid;
  word_t            s_val;
  logic [IW-1:0]    s_idx;
  logic [1:0]       s_pat;
  logic             pe_sat [NPE];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPE*NPAT; i++) obuf[i] <= '0;
      for (int k = 0; k < NPE; k++) pe_sat[k] <= 1'b0;
      busy    <= 1'b0;
      ocnt    <= '0;
      seg_cnt <= '0;
      load_cnt <= '0;
      sat     <= 1'b0;
    end else begin
      for (int k = 0; k < NPE; k++)
        if (done[k]) pe_sat[k] <= sats[k];
      if (busy) begin
        ocnt <= ocnt + 4'd1;
        if (ocnt == 4'(NPE*NPAT-1)) begin
          busy    <= 1'b0;
          seg_cnt <= seg_cnt + 1'b1;
        end
      end
      // a new set may arrive in the cycle the previous one leaves
      if (done[NPE-1]) begin
        for (int k = 0; k < NPE; k++)
          for (int p = 0; p < NPAT; p++)
            obuf[k*NPAT+p] <= banks[k][p];
        busy     <= 1'b1;
        ocnt     <= '0;
        load_cnt <= load_cnt + 1'b1;
        sat      <= |(real_pe & {sats[NPE-1], pe_sat[2], pe_sat[1], pe_sat[0]});
      end
      if (seg_clr) begin
        seg_cnt  <= '0;
        load_cnt <= '0;
      end
    end
  end

  always_comb begin
    for (int k = 0; k < NPE; k++)
      real_pe[k] = {load_cnt, chip_id, 2'(k)} < n_out;
  end

  always_comb begin
    s_val   = obuf[ocnt];
    s_pat   = ocnt[1:0];
    s_idx   = {seg_cnt, chip_id, ocnt[3:2]};
    s_valid = busy && (pp == PP_PASS || s_idx < n_out);
  end

  sand_postproc #(.IW(IW)) u_pp (
    .clk, .rst_n, .mode(pp),
    .in_valid(s_valid), .in_val(s_val), .in_idx(s_idx), .in_pat(s_pat),
    .flush,
    .out_valid, .out_addr, .out_data, .out_pat, .out_idx
  );

endmodule
