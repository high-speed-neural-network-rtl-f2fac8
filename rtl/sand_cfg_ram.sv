// sand_cfg_ram: the ANN configuration memory, 256 x 8 bit.
//
// The host writes bytes. The command sequencer reads the 32-bit layer
// configuration word of layer L from bytes 4L..4L+3 (little endian), so the
// memory holds up to 64 layers. The read is combinational. The 256 x 8
// organisation is printed on the board diagram; one 32-bit word per layer
// is stated in the text; the byte order is this design's choice.
module sand_cfg_ram #(
  parameter int unsigned BYTES = 256
) (
  input  logic                         clk,
  input  logic                         wr_en,
  input  logic [$clog2(BYTES)-1:0]     wr_addr,
  input  logic [7:0]                   wr_data,
  input  logic [$clog2(BYTES)-3:0]     layer,
  output logic [31:0]                  cfg_word
);

  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_comb begin
    for (int b = 0; b < 4; b++) cfg_word[8*b +: 8] = mem[{layer, 2'(b)}];
  end

endmodule
