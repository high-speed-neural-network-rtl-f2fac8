// sand_pe: one processing element (PE) of the SAND systolic array.
//
// Input stage: the activity and its tag are registered; that register is
// also the PE's output to the next PE, so activities move one PE per cycle.
// The weight register loads the weight bus only when a pattern-0 activity
// arrives, i.e. once every four cycles, and holds it while the four patterns
// of the same input pass (every PE works four cycles with one weight).
// Behind it sit the ALU (pre-adder, multiplier, four 40-bit accumulators),
// the auto-cut (40 -> 16 bits) and a register bank of four 16-bit results,
// one per pattern. `bank_done` pulses when the pattern-3 result of a neuron
// has been written, i.e. when the bank holds a complete set.
//
// Timing: activity in at cycle t, act_o at t+1, result of a sum whose last
// term entered at t is in the bank at t+5 (bank_done high in that cycle).
// The structure (registers, ADD, ALU, Auto-Cut, Registerbank) is the one of
// the SAND PE; stage boundaries and the weight-load rule are this design's.
module sand_pe
  import sand_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] shift,     // auto-cut window position
  input  logic       rnd,       // auto-cut rounding
  input  word_t      act_i,     // activity from the previous PE / chip input
  input  tag_t       tag_i,
  input  word_t      wgt_i,     // weight bus
  output word_t      act_o,     // activity to the next PE
  output tag_t       tag_o,
  output word_t      bank [NPAT],  // register bank, one result per pattern
  output logic       bank_done,    // bank just completed
  output logic       sat           // a result of the completed set saturated
);

  word_t      w_r;
  logic       res_valid;
  logic [1:0] res_pat;
  acc_t       res_acc;
  word_t      cut;
  logic       ovf, unf, sat_acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_o <= '0;
      tag_o <= '0;
      w_r   <= '0;
    end else begin
      act_o <= act_i;
      tag_o <= tag_i;
      if (tag_i.valid && tag_i.pat == 2'd0) w_r <= wgt_i;
    end
  end

  sand_alu u_alu (
    .clk, .rst_n,
    .act(act_o), .wgt(w_r), .tag(tag_o),
    .res_valid, .res_pat, .res_acc
  );

  sand_autocut u_cut (.acc(res_acc), .shift, .rnd, .y(cut), .ovf, .unf);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPAT; i++) bank[i] <= '0;
      bank_done <= 1'b0;
      sat       <= 1'b0;
      sat_acc   <= 1'b0;
    end else begin
      bank_done <= 1'b0;
      if (res_valid) begin
        bank[res_pat] <= cut;
        if (res_pat == 2'(NPAT-1)) begin
          bank_done <= 1'b1;
          sat       <= sat_acc | ovf | unf;
          sat_acc   <= 1'b0;
        end else begin
          sat_acc   <= (res_pat == 2'd0 ? 1'b0 : sat_acc) | ovf | unf;
        end
      end
    end
  end

endmodule
