// tb_scan3d_workload: the shift-transition experiment on three layer pairs
// sized like the benchmark circuit pairs of the evaluation, plus the
// paper's second worked example.
//
// Each pair runs the full flow in tb_swap_flow (pattern generation, swap
// zone selection, all-zero, low-power and swapped fills, loading through
// three scan3d_top stacks, transition counting and checks). The circuit
// placed next to the heat sink is the top layer, the other the bottom
// layer. The chain lengths are the flip-flop counts of the ISCAS'89
// circuits, each taken as one scan chain: s13207 (669) over s15850 (597),
// s38417 (1636) over s35932 (1728), s38584 (1426) over s35932 (1728), and
// the first pair once more with the two circuits exchanged. The
// patterns are synthetic (see tb_swap_flow), so the counts show the
// mechanism and do not reproduce published figures.
//
// Second example: 7 cells, zone 4..5, top pattern 0010X10 and bottom
// pattern 110XX01 (cells 1..7). Filling the two swapped scan paths must set
// the bottom layer's X to 1 and the top layer's X to 0, and loading the
// filled paths must leave 0010010 in the top layer and 1101101 in the
// bottom layer.
module tb_scan3d_workload;
  localparam int NPAT = 16;

  logic [3:0] done;
  int c [4], f [4], z [4];
  int checks = 0, failures = 0;

  tb_swap_flow #(.TOP_LEN(669),  .BOT_LEN(597),  .NPAT(NPAT), .SEED(1),
                 .LABEL("s13207 over s15850")) u_pair1 (
    .done(done[0]), .checks(c[0]), .failures(f[0]), .zone_len(z[0]));
  tb_swap_flow #(.TOP_LEN(1636), .BOT_LEN(1728), .NPAT(NPAT), .SEED(2),
                 .LABEL("s38417 over s35932")) u_pair2 (
    .done(done[1]), .checks(c[1]), .failures(f[1]), .zone_len(z[1]));
  tb_swap_flow #(.TOP_LEN(1426), .BOT_LEN(1728), .NPAT(NPAT), .SEED(3),
                 .LABEL("s38584 over s35932")) u_pair3 (
    .done(done[2]), .checks(c[2]), .failures(f[2]), .zone_len(z[2]));
  // the first pair again with the two circuits exchanged
  tb_swap_flow #(.TOP_LEN(597),  .BOT_LEN(669),  .NPAT(NPAT), .SEED(4),
                 .LABEL("s15850 over s13207")) u_pair4 (
    .done(done[3]), .checks(c[3]), .failures(f[3]), .zone_len(z[3]));

  // ------------------------------------------------------ second example
  logic clk = 1'b0, rst_n = 1'b0, scan_en = 1'b0;
  logic tsi = 1'b0, bsi = 1'b0, tso, bso;
  logic [7:1] tq, bq;

  scan3d_top #(.TOP_LEN(7), .BOT_LEN(7), .SWAP_EN(1'b1), .SWAP_FIRST(4), .SWAP_LAST(5)) u_ex (
    .clk(clk), .rst_n(rst_n), .scan_en(scan_en),
    .top_scan_in(tsi), .top_scan_out(tso), .top_d('0), .top_q(tq),
    .bot_scan_in(bsi), .bot_scan_out(bso), .bot_d('0), .bot_q(bq));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Nearest-earlier-specified fill (2 = don't-care), as in tb_swap_flow.
  function automatic logic [7:1] fill7(input int v [1:7]);
    logic [7:1] r;
    int last;
    last = 2;
    for (int i = 1; i <= 7; i++) if (v[i] != 2) begin last = v[i]; break; end
    for (int i = 1; i <= 7; i++) begin
      if (v[i] != 2) last = v[i];
      r[i] = 1'(last);
    end
    return r;
  endfunction

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex_t [1:7];
    int ex_b [1:7];
    int pa [1:7];
    int pb [1:7];
    logic [7:1] fa, fb;
    ex_t = '{0, 0, 1, 0, 2, 1, 0};
    ex_b = '{1, 1, 0, 2, 2, 0, 1};
    for (int i = 1; i <= 7; i++) begin
      pa[i] = (i >= 4 && i <= 5) ? ex_b[i] : ex_t[i];
      pb[i] = (i >= 4 && i <= 5) ? ex_t[i] : ex_b[i];
    end
    fa = fill7(pa);
    fb = fill7(pb);
    chk(fa[4] == 1'b1 && fa[5] == 1'b1, "example: bottom-layer X filled with 1");
    chk(fb[5] == 1'b0, "example: top-layer X filled with 0");
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 1; t <= 7; t++) begin
      @(negedge clk);
      scan_en = 1'b1;
      tsi = fa[8-t];
      bsi = fb[8-t];
      @(posedge clk);
    end
    @(negedge clk);
    scan_en = 1'b0;
    chk(tq == 7'b0100100, $sformatf("example: top layer holds %b", tq));
    chk(bq == 7'b1011011, $sformatf("example: bottom layer holds %b", bq));

    wait (&done);
    for (int k = 0; k < 4; k++) begin
      $display("pair %0d: swap zone of %0d cells", k + 1, z[k]);
      checks += c[k];
      failures += f[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
