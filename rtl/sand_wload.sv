// sand_wload: distributes a layer's weight matrix over the four WRAMs.
//
// The host sends the weights of one layer in natural order, neuron n = 0, 1,
// ... and, for each neuron, input j = 0 .. n_in-1, after a `start` pulse that
// gives the layer's fan-in and its base address in the WRAMs. The loader
// writes w[n][j] into the WRAM of chip c = (n / 4) mod 4 at address
// base + (s * n_in + j) * 4 + k, with s = n / 16 and k = n mod 4 -- the
// order in which the command sequencer reads them. So the host needs to know
// neither the number of chips nor the interleaving. `next_base` is where the
// following layer may start (after the last complete or partial segment).
// One weight per cycle, no back-pressure. Distributing the weights is the
// sequencer's job on the board; the exact layout is this design's choice.
module sand_wload #(
  parameter int unsigned WAW = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [9:0]     n_in,
  input  logic [WAW-1:0] base,
  input  logic           w_valid,
  input  logic [15:0]    w_data,
  output logic [3:0]     wr_en,       // one per chip
  output logic [WAW-1:0] wr_addr,
  output logic [15:0]    wr_data,
  output logic [WAW-1:0] next_base
);

  logic [9:0]     nin_r, j;
  logic [3:0]     n_lo;         // neuron number mod 16
  logic           any;          // a neuron of the current segment was written
  logic [WAW-1:0] seg_base;

  always_comb begin
    wr_en     = w_valid ? 4'(1 << n_lo[3:2]) : 4'b0;
    wr_addr   = seg_base + WAW'({j, n_lo[1:0]});
    wr_data   = w_data;
    next_base = any ? seg_base + WAW'({nin_r, 2'b00}) : seg_base;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nin_r    <= '0;
      j        <= '0;
      n_lo     <= '0;
      any      <= 1'b0;
      seg_base <= '0;
    end else if (start) begin
      nin_r    <= n_in;
      j        <= '0;
      n_lo     <= '0;
      any      <= 1'b0;
      seg_base <= base;
    end else if (w_valid) begin
      any <= 1'b1;
      if (j == nin_r - 10'd1) begin
        j    <= '0;
        n_lo <= n_lo + 4'd1;
        if (n_lo == 4'd15) begin
          seg_base <= seg_base + WAW'({nin_r, 2'b00});
          any      <= 1'b0;
        end
      end else begin
        j <= j + 10'd1;
      end
    end
  end

endmodule
