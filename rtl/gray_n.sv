// gray_n -- Gray code counter of parameterizable width built from a chain
// of one-bit slices.
//
// The counter keeps one extra flip-flop, the auxiliary bit q[0], which
// toggles on every clock and so behaves like bit 0 of a binary counter.
// It is the parity bit of the Gray word: q[0] = 1 exactly when the Gray
// word q[WIDTH:1] has an even number of ones. With that bit appended to
// the right of the Gray word, bit i (1 <= i < WIDTH) toggles when the
// bits below it read 1,0,...,0. Each bit is a gray_1 slice: it takes
// qin = q[i-1] and zin = "all of q[i-2:0] are 0" and hands on
// zout = zin & ~qin to the next slice. The MSB slice is the exception:
// it must also toggle when the lower bits read 0,...,0, which happens in
// the last state of the cycle (1,0,...,0 with the auxiliary bit 0) and
// returns the counter to zero. An OR gate feeds it qin = q[WIDTH-1] |
// q[WIDTH] instead of q[WIDTH-1]: while the MSB is 1 its own value
// stands in for the lower bit, so the "all zero" pattern also fires it.
//
// Sequence for WIDTH = 3 (q[3:1]): 000 001 011 010 110 111 101 100 000 ...
//
// Interface
//   async_rst  asynchronous reset, active high: Gray word 0, q[0] = 1
//   clock      rising-edge clock; the counter advances on every edge
//   q          q[WIDTH:1] Gray word, q[0] auxiliary (parity) bit
//
// Timing: one count per clock, no enable. The first rising edge after
// reset is released gives Gray word 1. The slowest path is the zin/zout
// ripple through all WIDTH slices.
//
// Structure, reset values and the OR gate for the MSB follow the
// document. WIDTH must be at least 1; that bound is this design's own.
module gray_n #(
  parameter int unsigned WIDTH = 3
) (
  input  logic           async_rst,
  input  logic           clock,
  output logic [WIDTH:0] q
);

  // z[i]: all of q[i:0] are zero, formed along the slice chain.
  // z[0] is the chain seed: nothing lies below the auxiliary bit.
  logic [WIDTH:0] z;
  logic           msb_qin;

  assign z[0] = 1'b1;

  // Auxiliary (parity) bit: a D flip-flop fed by its own complement.
  always_ff @(posedge clock or posedge async_rst) begin
    if (async_rst) q[0] <= 1'b1;
    else           q[0] <= ~q[0];
  end

  // Lower Gray bits 1 .. WIDTH-1.
  for (genvar i = 1; i < WIDTH; i++) begin : g_bit
    gray_1 u_bit (
      .arst (async_rst),
      .clk  (clock),
      .qin  (q[i-1]),
      .zin  (z[i-1]),
      .qout (q[i]),
      .zout (z[i])
    );
  end

  // MSB with the OR gate glue that lets it wrap back to zero.
  assign msb_qin = q[WIDTH-1] | q[WIDTH];

  gray_1 u_msb (
    .arst (async_rst),
    .clk  (clock),
    .qin  (msb_qin),
    .zin  (z[WIDTH-1]),
    .qout (q[WIDTH]),
    .zout (z[WIDTH])
  );

  // The Gray word must have at least one bit.
  initial assert (WIDTH >= 1) else $error("gray_n: WIDTH must be at least 1");

endmodule
