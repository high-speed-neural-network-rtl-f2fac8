// sand_fifo: synchronous first-in first-out buffer with show-ahead output.
//
// The board uses it as FIFO_in (one per event), FIFO_out (one per event),
// FIFO_A (circular buffer of a layer's input activities, which are pushed
// back after being read while more segments of the layer remain) and FIFO_B
// (hidden-layer activities). `rd_data` shows the oldest word whenever
// `empty` is low; `rd_en` removes it at the clock edge. A push and a pop in
// the same cycle are allowed, also when the FIFO is full. Pushing into a full
// FIFO or popping an empty one is a protocol error (asserted) and is ignored.
// Storage is a plain array (a dual-port RAM), pointers are one bit wider than
// the address to tell full from empty. Depth must be a power of two.
module sand_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 2048
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned A = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [A:0]   wp, rp;
  logic         do_wr, do_rd;

  assign count   = wp - rp;
  assign empty   = (count == '0);
  assign full    = (count == (A+1)'(DEPTH));
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign rd_data = mem[rp[A-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[A-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
