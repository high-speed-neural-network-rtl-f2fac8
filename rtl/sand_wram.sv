// sand_wram: weight memory (WRAM) of one SAND chip.
//
// 16-bit words, one synchronous read per cycle: the weight at `rd_addr`
// appears on `rd_data` one clock later, which is how a continuous flow of
// weights is kept on the chip's weight bus. The host writes through a
// separate port. The command sequencer lays the weights out so that a
// segment is read at consecutive addresses (see sand_sequencer).
// Depth is this design's choice: 64K words, enough for 512 inputs times 128
// neuron groups of four.
module sand_wram #(
  parameter int unsigned DEPTH = 65536
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [15:0]              wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [15:0]              rd_data
);

  logic [15:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
