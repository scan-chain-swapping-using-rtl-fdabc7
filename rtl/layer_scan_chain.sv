// layer_scan_chain: the scan chain of one die layer of a two-layer 3D stack,
// prepared for scan chain swapping.
//
// Cells are numbered 1..CHAIN_LEN from the scan input to the scan output;
// in shift mode data moves from cell i to cell i+1 on every clock. With
// SWAP_EN set, cells SWAP_FIRST..SWAP_LAST form the swap zone: instead of
// being fed from this layer's cell SWAP_FIRST-1, cell SWAP_FIRST takes its
// scan input from the other layer through a TSV (tsv_entry_in), and the
// cell after the zone, SWAP_LAST+1, takes its scan input from the other
// layer's cell SWAP_LAST (tsv_exit_in). In the same way this layer sends
// the value of its cell SWAP_FIRST-1 (or its scan input when the zone starts
// at cell 1) down/up the entry TSV, and the value of its cell SWAP_LAST up/
// down the exit TSV. Two such layers wired crosswise make two scan paths
// that each run through their own layer outside the zone and through the
// other layer inside it. When the zone ends at the last cell, the scan
// output pin is fed by the exit TSV.
//
// The crossing at the zone's two edges, the cell numbering from the scan
// input and the default sizes (7 cells, zone 5..6) follow the paper's
// worked example; the generic entry/exit port pair, SWAP_EN and allowing
// the zone to touch either end of the chain are this design's choices.
//
// Timing: purely the flip-flops' one-cycle shift; the TSV paths are wires.
module layer_scan_chain #(
  parameter int unsigned CHAIN_LEN  = 7,
  parameter bit          SWAP_EN    = 1'b1,
  parameter int unsigned SWAP_FIRST = 5,
  parameter int unsigned SWAP_LAST  = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 scan_en,
  input  logic                 scan_in,
  output logic                 scan_out,
  input  logic [CHAIN_LEN:1]   d,            // functional data, bit i to cell i
  output logic [CHAIN_LEN:1]   q,            // cell contents, bit i from cell i
  // TSV side
  output logic                 tsv_entry_out, // to the other layer's cell SWAP_FIRST
  input  logic                 tsv_entry_in,  // from the other layer's cell SWAP_FIRST-1
  output logic                 tsv_exit_out,  // to the other layer's cell SWAP_LAST+1
  input  logic                 tsv_exit_in    // from the other layer's cell SWAP_LAST
);

  initial begin
    assert (CHAIN_LEN >= 1)
      else $fatal(1, "CHAIN_LEN must be at least 1");
    assert (!SWAP_EN || (SWAP_FIRST >= 1 && SWAP_FIRST <= SWAP_LAST && SWAP_LAST <= CHAIN_LEN))
      else $fatal(1, "swap zone %0d..%0d does not fit a chain of %0d cells",
                  SWAP_FIRST, SWAP_LAST, CHAIN_LEN);
  end

  // chain[i] is the value offered to cell i+1 by its predecessor in this
  // layer: chain[0] is the scan input, chain[i] the output of cell i.
  logic [CHAIN_LEN:0] chain;
  logic [CHAIN_LEN:1] si;

  assign chain = {q, scan_in};

  always_comb begin
    for (int unsigned i = 1; i <= CHAIN_LEN; i++) begin
      if (SWAP_EN && i == SWAP_FIRST)          si[i] = tsv_entry_in;
      else if (SWAP_EN && i == SWAP_LAST + 1)  si[i] = tsv_exit_in;
      else                                     si[i] = chain[i-1];
    end
  end

  for (genvar i = 1; i <= CHAIN_LEN; i++) begin : g_cell
    scan_ff u_ff (
      .clk     (clk),
      .rst_n   (rst_n),
      .scan_en (scan_en),
      .d       (d[i]),
      .si      (si[i]),
      .q       (q[i])
    );
  end

  if (SWAP_EN) begin : g_tsv
    assign tsv_entry_out = chain[SWAP_FIRST-1];
    assign tsv_exit_out  = chain[SWAP_LAST];
    assign scan_out      = (SWAP_LAST == CHAIN_LEN) ? tsv_exit_in : chain[CHAIN_LEN];
  end else begin : g_no_tsv
    // No zone: the TSV outputs carry nothing and are held low.
    assign tsv_entry_out = 1'b0;
    assign tsv_exit_out  = 1'b0;
    assign scan_out      = chain[CHAIN_LEN];
  end

endmodule
