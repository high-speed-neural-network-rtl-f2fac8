// sand_autocut: cuts a 16-bit result window out of a 40-bit accumulator sum.
//
// The window starts at bit `shift` (0..24, larger values are taken as 24), so
// the result is sum / 2^shift. The user picks the shift to match the range of
// the weights. The cut checks for over- and underflow: a quotient that does
// not fit in 16 bits is saturated to +32767 or -32768 and flagged. As a second
// step, when `rnd` is set, the dropped low bits are rounded to nearest
// (half away from minus infinity) instead of truncated, which halves the worst
// cut error.
//
// Purely combinational. The window position, the saturating over/underflow
// check and an accuracy step come from the description of SAND; rounding as
// that accuracy step and the saturation values are this design's choice.
module sand_autocut
  import sand_pkg::*;
(
  input  acc_t       acc,    // 40-bit accumulator sum
  input  logic [4:0] shift,  // window position
  input  logic       rnd,    // round to nearest instead of truncating
  output word_t      y,      // 16-bit result
  output logic       ovf,    // sum too large, y saturated to max
  output logic       unf     // sum too small, y saturated to min
);

  localparam int unsigned MAXSH = AW - DW;  // 24

  logic [4:0]          sh;
  logic signed [AW:0]  ext;
  logic signed [AW:0]  half;
  logic signed [AW:0]  q;

  always_comb begin
    sh   = (shift > 5'(MAXSH)) ? 5'(MAXSH) : shift;
    ext  = {acc[AW-1], acc};
    half = '0;
    if (rnd && sh != 5'd0) half[6'(sh) - 6'd1] = 1'b1;
    q    = (ext + half) >>> sh;
    ovf  = q > (AW+1)'(signed'(32'sd32767));
    unf  = q < (AW+1)'(signed'(-32'sd32768));
    if (ovf)      y = 16'sh7fff;
    else if (unf) y = -16'sh8000;
    else          y = q[DW-1:0];
  end

endmodule
