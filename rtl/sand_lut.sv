// sand_lut: free-programmable lookup table for the activation function.
//
// The 16-bit result of a neuron, read as an unsigned address, selects a
// 16-bit activation value, e.g. a sampled sigmoid f(x) = 1/(1+exp(-a x)).
// One synchronous read per cycle (data one clock after the address); the
// host loads the table through the write port. A full 64K-word table over
// the 16-bit address follows from the 16-bit address output of SAND; the
// read timing is this design's choice.
module sand_lut #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [15:0]   wr_data,
  input  logic [AW-1:0] rd_addr,
  output logic [15:0]   rd_data
);

  logic [15:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
