// scan3d_top: scan chains of a two-layer 3D IC with a TSV-based swap zone.
//
// Each die layer holds one scan chain (layer_scan_chain). The top layer is
// the one next to the heat sink, the bottom layer lies below it. Two pairs
// of crossing TSVs exchange a zone of cells, SWAP_FIRST..SWAP_LAST, between
// the chains:
//
//   path A: top_scan_in -> top cells 1..F-1 -> bottom cells F..L -> top cells L+1.. -> top_scan_out
//   path B: bot_scan_in -> bottom cells 1..F-1 -> top cells F..L -> bottom cells L+1.. -> bot_scan_out
//
// (F = SWAP_FIRST, L = SWAP_LAST.) The tester therefore loads the top
// layer's pattern bits for positions outside the zone together with the
// bottom layer's bits for positions inside it through top_scan_in, and the
// reverse through bot_scan_in. Patterns chosen this way (see the README)
// cut the number of flip-flop toggles per layer during shift. Functional
// mode and the capture cycle are unchanged: every cell still takes its own
// layer's functional data when scan_en is low.
//
// The two-layer structure, the crossing at the zone edges, the example
// sizes (7 cells per layer, zone 5..6) and the possibility of layers of
// different length (the common length bounds the zone) follow the paper.
// Port naming, the reset and SWAP_EN (build the same stack without the
// swap, for comparison) are this design's choices.
//
// Interface: one scan input and output per layer, a shared scan_en, and the
// functional d/q of every cell, where the layer's logic would connect.
// The shift-rule assertion at the end samples rst_n synchronously while the
// flip-flops use it asynchronously; lint reports that mix, and it is
// intended.
//
// Timing: a full load takes max(TOP_LEN, BOT_LEN) shift cycles; a bit
// entering a scan input reaches cell i after i cycles whichever layer cell
// i is on.
module scan3d_top #(
  parameter int unsigned TOP_LEN    = 7,
  parameter int unsigned BOT_LEN    = 7,
  parameter bit          SWAP_EN    = 1'b1,
  parameter int unsigned SWAP_FIRST = 5,
  parameter int unsigned SWAP_LAST  = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               scan_en,
  // top layer (adjacent to the heat sink)
  input  logic               top_scan_in,
  output logic               top_scan_out,
  input  logic [TOP_LEN:1]   top_d,
  output logic [TOP_LEN:1]   top_q,
  // bottom layer
  input  logic               bot_scan_in,
  output logic               bot_scan_out,
  input  logic [BOT_LEN:1]   bot_d,
  output logic [BOT_LEN:1]   bot_q
);

  localparam int unsigned COMMON_LEN = (TOP_LEN < BOT_LEN) ? TOP_LEN : BOT_LEN;

  initial begin
    assert (!SWAP_EN || SWAP_LAST <= COMMON_LEN)
      else $fatal(1, "swap zone must lie within the common chain length %0d", COMMON_LEN);
  end

  // The four TSVs: entry and exit of the swap zone, one in each direction.
  logic tsv_entry_down, tsv_entry_up;  // top->bottom and bottom->top at the zone entry
  logic tsv_exit_down,  tsv_exit_up;   // top->bottom and bottom->top after the zone

  layer_scan_chain #(
    .CHAIN_LEN (TOP_LEN),
    .SWAP_EN   (SWAP_EN),
    .SWAP_FIRST(SWAP_FIRST),
    .SWAP_LAST (SWAP_LAST)
  ) u_top (
    .clk          (clk),
    .rst_n        (rst_n),
    .scan_en      (scan_en),
    .scan_in      (top_scan_in),
    .scan_out     (top_scan_out),
    .d            (top_d),
    .q            (top_q),
    .tsv_entry_out(tsv_entry_down),
    .tsv_entry_in (tsv_entry_up),
    .tsv_exit_out (tsv_exit_down),
    .tsv_exit_in  (tsv_exit_up)
  );

  layer_scan_chain #(
    .CHAIN_LEN (BOT_LEN),
    .SWAP_EN   (SWAP_EN),
    .SWAP_FIRST(SWAP_FIRST),
    .SWAP_LAST (SWAP_LAST)
  ) u_bot (
    .clk          (clk),
    .rst_n        (rst_n),
    .scan_en      (scan_en),
    .scan_in      (bot_scan_in),
    .scan_out     (bot_scan_out),
    .d            (bot_d),
    .q            (bot_q),
    .tsv_entry_out(tsv_entry_up),
    .tsv_entry_in (tsv_entry_down),
    .tsv_exit_out (tsv_exit_up),
    .tsv_exit_in  (tsv_exit_down)
  );

  // Shift rule across the zone entry: after a shift cycle, the first cell of
  // each layer's zone holds what the other layer's path offered to it.
  if (SWAP_EN) begin : g_chk
    property p_entry_cross;
      @(posedge clk) disable iff (!rst_n)
        scan_en |=> (bot_q[SWAP_FIRST] == $past(tsv_entry_down)) &&
                    (top_q[SWAP_FIRST] == $past(tsv_entry_up));
    endproperty
    a_entry_cross: assert property (p_entry_cross);
  end

endmodule
