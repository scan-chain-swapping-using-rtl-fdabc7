// scan_ff: mux-D scan flip-flop, the storage cell of every scan chain in the
// stack.
//
// On each rising clock edge the cell loads either its functional input `d`
// (scan_en low: normal operation and the capture cycle of a test) or its
// serial scan input `si` (scan_en high: shift). `q` drives both the layer's
// logic and the scan input of the next cell in the chain, which may sit on
// the other die layer when the cell is at the edge of a swap zone.
//
// The cell itself is the ordinary scan flip-flop of scan design; the
// asynchronous active-low reset to 0 is this design's own choice, so that a
// chain starts from a known state before the first pattern.
//
// Timing: one cycle from d/si to q.
module scan_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic scan_en,  // 1: shift (q <= si), 0: capture (q <= d)
  input  logic d,        // functional data from the layer's logic
  input  logic si,       // serial scan input
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= 1'b0;
    else if (scan_en) q <= si;
    else              q <= d;
  end

endmodule
