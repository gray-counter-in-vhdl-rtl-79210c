// gray_1 -- one bit slice of the chained Gray counter (gray_n).
//
// Each slice holds one bit of the Gray code word in a T-type flip-flop.
// The bit toggles on a rising clock edge when the next lower bit of the
// chain (qin) is 1 and every bit below that one is 0 (zin = 1). In other
// words a bit changes when the lower part of the extended word, auxiliary
// parity bit included, reads 1,0,...,0. The slice also passes the "all
// lower bits are zero" condition up the chain: zout = zin & ~qin.
//
// Interface
//   arst  asynchronous reset, active high, clears qout to 0
//   clk   rising-edge clock
//   qin   next less significant bit of the chain
//   zin   1 when all bits below qin are 0
//   qout  this bit of the Gray word (registered)
//   zout  1 when qin and all bits below it are 0 (combinational)
//
// Timing: qout changes one clock edge after qin & zin is seen high; zout
// is a pure combinational function of qin and zin, so a chain of N slices
// has an N-gate ripple path from the auxiliary bit to the MSB toggle
// condition. Toggle condition, zout equation and active-high asynchronous
// reset follow the document; nothing here is an own choice.
module gray_1 (
  input  logic arst,
  input  logic clk,
  input  logic qin,
  input  logic zin,
  output logic qout,
  output logic zout
);

  logic toggle;

  assign toggle = qin & zin;
  assign zout   = zin & ~qin;

  always_ff @(posedge clk or posedge arst) begin
    if (arst) qout <= 1'b0;
    else if (toggle) qout <= ~qout;
  end

endmodule
