// tb_swap_flow: one run of the scan-swapping test flow on a pair of layers,
// used by tb_scan3d_workload. It plays the tester for three stacks of the
// same size and reports shift transitions per layer for each.
//
// Workload. Two circuits of scan length TOP_LEN and BOT_LEN get NPAT
// patterns each, generated by a fixed hash from SEED: about 30% of the bits
// are specified, the rest are don't-care (X). Specified bits inside a band
// of positions (the middle third of the common length) lean (99%) to 1 in the top
// layer and to 0 in the bottom layer, and the other way round outside it.
// This is a synthetic stand-in for ATPG output with that structure.
//
// Swap zone. Chosen at elaboration by a constant function that follows the
// published procedure: on the bottom layer's patterns (the layer away from
// the heat sink), within the common length, count at each position i the
// 0-to-1 and the 1-to-0 transitions (a specified bit whose next specified
// bit differs), take for each kind the position that maximises count*i, and
// swap the cells after the smaller of the two positions up to and
// including the larger. The result sets SWAP_FIRST/SWAP_LAST of stack SS.
//
// Stacks and fills. AZ: each layer's pattern with X set to 0, unswapped
// stack. LP: X set to the nearest specified bit before it in the chain (the
// first specified bit for leading X), unswapped. SS: the same fill applied
// to each scan path of the swapped stack, so an X inside the zone takes its
// value from the neighbouring cells of the other layer's path.
//
// Patterns are loaded back to back; the stacks hold their contents when
// scan_en is low (d is fed back from q), so only shift cycles toggle cells.
// Checks: after every load each layer holds every specified bit of its
// pattern in all three stacks; the toggles measured on each layer's
// flip-flops equal a count worked out from the scan streams alone (prefix
// sums over the sequence each cell sees); the bottom layer toggles less
// with SS than with LP, and less with LP than with AZ.
module tb_swap_flow #(
  parameter int    TOP_LEN = 40,
  parameter int    BOT_LEN = 36,
  parameter int    NPAT    = 32,
  parameter int    SEED    = 1,
  parameter string LABEL   = "pair"
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   zone_len
);
  localparam int MAXLEN  = (TOP_LEN > BOT_LEN) ? TOP_LEN : BOT_LEN;
  localparam int COMMON  = (TOP_LEN < BOT_LEN) ? TOP_LEN : BOT_LEN;
  localparam int BAND_LO = COMMON / 3 + 1;
  localparam int BAND_HI = (2 * COMMON) / 3;

  // ---------------------------------------------------------------- patterns
  // Pattern bit encoding: 0, 1, or 2 for don't-care.
  function automatic int unsigned mix(input int unsigned x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic int pbit(input int layer, input int p, input int pos);
    int unsigned h1, h2;
    bit in_band, one;
    h1 = mix(32'(SEED * 15485863 + layer * 1000003 + p * 7919 + pos * 104729 + 17));
    h2 = mix(h1 ^ 32'h9e3779b9);
    if (h1 % 100 >= 30) return 2;
    in_band = pos >= BAND_LO && pos <= BAND_HI;
    one = (h2 % 100) < 99;               // the leaning value, 99% of the time
    if (layer == 0) return (in_band ? one : !one) ? 1 : 0;
    else            return (in_band ? !one : one) ? 1 : 0;
  endfunction

  // --------------------------------------------------- swap-zone selection
  // {first cell, last cell} of the zone; both 0 when there is none.
  function automatic longint zone_bounds();
    int t01 [1:COMMON];
    int t10 [1:COMMON];
    int st01, st10, best01, best10, lo, hi, a, b;
    lo = 1;
    for (int i = 1; i <= COMMON; i++) begin t01[i] = 0; t10[i] = 0; end
    for (int p = 0; p < NPAT; p++) begin
      a = 2;
      for (int i = 1; i <= COMMON; i++) begin
        b = pbit(1, p, i);
        if (b != 2) begin
          if (a == 0 && b == 1) t01[lo]++;
          if (a == 1 && b == 0) t10[lo]++;
          a  = b;
          lo = i;                          // position of the last specified bit
        end
      end
    end
    st01 = 0; st10 = 0; best01 = 0; best10 = 0;
    for (int i = 1; i <= COMMON; i++) begin
      if (t01[i] * i > best01) begin best01 = t01[i] * i; st01 = i; end
      if (t10[i] * i > best10) begin best10 = t10[i] * i; st10 = i; end
    end
    lo = (st01 < st10) ? st01 : st10;
    hi = (st01 < st10) ? st10 : st01;
    if (lo == hi) return 0;
    return {32'(lo + 1), 32'(hi)};
  endfunction

  localparam longint ZONE = zone_bounds();
  localparam int  ZF      = int'(ZONE[63:32]);
  localparam int  ZL      = int'(ZONE[31:0]);
  localparam bit  ZONE_OK = ZF >= 1;
  localparam int  ZF_P    = ZONE_OK ? ZF : 1;
  localparam int  ZL_P    = ZONE_OK ? ZL : 1;

  // ------------------------------------------------------------ the stacks
  logic clk = 1'b0, rst_n = 1'b0, scan_en = 1'b0;
  logic [2:0] tsi, bsi;                      // scan inputs: [0]=AZ [1]=LP [2]=SS
  logic [2:0] tso, bso;
  logic [TOP_LEN:1] tq [3];
  logic [BOT_LEN:1] bq [3];

  scan3d_top #(.TOP_LEN(TOP_LEN), .BOT_LEN(BOT_LEN), .SWAP_EN(1'b0)) u_az (
    .clk(clk), .rst_n(rst_n), .scan_en(scan_en),
    .top_scan_in(tsi[0]), .top_scan_out(tso[0]), .top_d(tq[0]), .top_q(tq[0]),
    .bot_scan_in(bsi[0]), .bot_scan_out(bso[0]), .bot_d(bq[0]), .bot_q(bq[0]));
  scan3d_top #(.TOP_LEN(TOP_LEN), .BOT_LEN(BOT_LEN), .SWAP_EN(1'b0)) u_lp (
    .clk(clk), .rst_n(rst_n), .scan_en(scan_en),
    .top_scan_in(tsi[1]), .top_scan_out(tso[1]), .top_d(tq[1]), .top_q(tq[1]),
    .bot_scan_in(bsi[1]), .bot_scan_out(bso[1]), .bot_d(bq[1]), .bot_q(bq[1]));
  scan3d_top #(.TOP_LEN(TOP_LEN), .BOT_LEN(BOT_LEN), .SWAP_EN(1'b1),
               .SWAP_FIRST(ZF_P), .SWAP_LAST(ZL_P)) u_ss (
    .clk(clk), .rst_n(rst_n), .scan_en(scan_en),
    .top_scan_in(tsi[2]), .top_scan_out(tso[2]), .top_d(tq[2]), .top_q(tq[2]),
    .bot_scan_in(bsi[2]), .bot_scan_out(bso[2]), .bot_d(bq[2]), .bot_q(bq[2]));

  always #5 clk = ~clk;

  // Measured toggles: layer contents sampled between clock edges and
  // compared with the previous sample.
  longint meas_top [3], meas_bot [3];
  logic [TOP_LEN:1] tlast [3];
  logic [BOT_LEN:1] blast [3];
  always @(negedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < 3; s++) begin tlast[s] = '0; blast[s] = '0; end
    end else begin
      for (int s = 0; s < 3; s++) begin
        meas_top[s] += 64'($countones(tq[s] ^ tlast[s]));
        meas_bot[s] += 64'($countones(bq[s] ^ blast[s]));
        tlast[s] = tq[s];
        blast[s] = bq[s];
      end
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %s", LABEL, what);
    end
  endtask

  // ------------------------------------------------------- software helpers
  typedef int vec_t [1:MAXLEN];

  // Nearest-earlier-specified fill of v[1..len]; leading X take the first
  // specified bit, an all-X vector becomes all 0.
  function automatic vec_t lp_fill(input vec_t v, input int len);
    vec_t r;
    int last;
    last = 2;
    for (int i = 1; i <= len; i++) if (v[i] != 2) begin last = v[i]; break; end
    if (last == 2) last = 0;
    for (int i = 1; i <= MAXLEN; i++) begin
      if (i <= len && v[i] != 2) last = v[i];
      r[i] = (i <= len) ? last : 0;
    end
    return r;
  endfunction

  // Toggles of every position of a path of length len during a load of
  // MAXLEN cycles from old contents o to new contents n. Cell i sees the
  // sequence y(1-i) .. y(MAXLEN-i+1), where y(u) = o[1-u] for u <= 0 and
  // y(u) is the u-th bit shifted in for u >= 1 (the first MAXLEN-len bits
  // are padding equal to n[len]); its toggles are the changes of y inside
  // that window, read from a prefix sum.
  typedef int cnt_t [1:MAXLEN];
  function automatic cnt_t path_toggles(input vec_t o, input vec_t n, input int len);
    cnt_t r;
    int y  [0:2*MAXLEN];   // y(u) stored at u + MAXLEN
    int ps [0:2*MAXLEN];   // ps[k] = changes of y up to index k
    for (int u = 1 - len; u <= MAXLEN; u++) begin
      if (u <= 0)                y[u + MAXLEN] = o[1 - u];
      else if (u <= MAXLEN - len) y[u + MAXLEN] = n[len];
      else                       y[u + MAXLEN] = n[MAXLEN - u + 1];
    end
    ps[MAXLEN + 1 - len] = 0;
    for (int k = MAXLEN + 2 - len; k <= 2 * MAXLEN; k++)
      ps[k] = ps[k-1] + ((y[k] != y[k-1]) ? 1 : 0);
    for (int i = 1; i <= MAXLEN; i++)
      r[i] = (i <= len) ? ps[2 * MAXLEN - i + 1] - ps[MAXLEN + 1 - i] : 0;
    return r;
  endfunction

  task automatic drive_load(input vec_t pa [3], input vec_t pb [3]);
    for (int t = 1; t <= MAXLEN; t++) begin
      @(negedge clk);
      scan_en = 1'b1;
      for (int s = 0; s < 3; s++) begin
        int j;
        j = MAXLEN - t + 1;
        tsi[s] = 1'(j <= TOP_LEN ? pa[s][j] : pa[s][TOP_LEN]);
        bsi[s] = 1'(j <= BOT_LEN ? pb[s][j] : pb[s][BOT_LEN]);
      end
      @(posedge clk);
    end
    @(negedge clk);
    scan_en = 1'b0;
  endtask

  longint pred_top [3], pred_bot [3];
  int cross_loads;

  initial begin
    vec_t tp, bp, pa [3], pb [3], oa [3], ob [3], path;
    cnt_t ca, cb;
    done = 1'b0; checks = 0; failures = 0; cross_loads = 0;
    zone_len = ZONE_OK ? ZL - ZF + 1 : 0;
    tsi = '0; bsi = '0;
    for (int s = 0; s < 3; s++) begin
      meas_top[s] = 0; meas_bot[s] = 0; pred_top[s] = 0; pred_bot[s] = 0;
      for (int i = 1; i <= MAXLEN; i++) begin oa[s][i] = 0; ob[s][i] = 0; end
    end
    chk(ZONE_OK, "the swap-zone procedure found a zone");
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int p = 0; p < NPAT; p++) begin
      for (int i = 1; i <= MAXLEN; i++) begin
        tp[i] = (i <= TOP_LEN) ? pbit(0, p, i) : 0;
        bp[i] = (i <= BOT_LEN) ? pbit(1, p, i) : 0;
      end
      for (int i = 1; i <= MAXLEN; i++) begin
        pa[0][i] = (tp[i] == 1) ? 1 : 0;
        pb[0][i] = (bp[i] == 1) ? 1 : 0;
      end
      pa[1] = lp_fill(tp, TOP_LEN);
      pb[1] = lp_fill(bp, BOT_LEN);
      for (int i = 1; i <= MAXLEN; i++) path[i] = (i >= ZF && i <= ZL) ? bp[i] : tp[i];
      pa[2] = lp_fill(path, TOP_LEN);
      for (int i = 1; i <= MAXLEN; i++) path[i] = (i >= ZF && i <= ZL) ? tp[i] : bp[i];
      pb[2] = lp_fill(path, BOT_LEN);
      for (int i = ZF; i <= ZL; i++)
        if (tp[i] != 2 && bp[i] != 2 && tp[i] != bp[i]) begin cross_loads++; break; end

      // predicted toggles, attributed to the layer each path cell sits on
      for (int s = 0; s < 3; s++) begin
        ca = path_toggles(oa[s], pa[s], TOP_LEN);
        cb = path_toggles(ob[s], pb[s], BOT_LEN);
        for (int i = 1; i <= TOP_LEN; i++)
          if (s == 2 && i >= ZF && i <= ZL) pred_bot[s] += 64'(ca[i]); else pred_top[s] += 64'(ca[i]);
        for (int i = 1; i <= BOT_LEN; i++)
          if (s == 2 && i >= ZF && i <= ZL) pred_top[s] += 64'(cb[i]); else pred_bot[s] += 64'(cb[i]);
      end

      drive_load(pa, pb);

      for (int s = 0; s < 3; s++) begin
        bit ok;
        ok = 1'b1;
        for (int i = 1; i <= TOP_LEN; i++) if (tp[i] != 2 && tq[s][i] != 1'(tp[i])) ok = 1'b0;
        for (int i = 1; i <= BOT_LEN; i++) if (bp[i] != 2 && bq[s][i] != 1'(bp[i])) ok = 1'b0;
        chk(ok, $sformatf("pattern %0d stack %0d holds the specified bits", p, s));
        oa[s] = pa[s];
        ob[s] = pb[s];
      end
    end
    @(negedge clk);
    #1;

    $display("%s: %0d/%0d cells, %0d patterns, swap zone cells %0d..%0d",
             LABEL, TOP_LEN, BOT_LEN, NPAT, ZF, ZL);
    $display("  shift transitions   top layer   bottom layer");
    $display("  AZ                 %10d   %10d", meas_top[0], meas_bot[0]);
    $display("  LP                 %10d   %10d", meas_top[1], meas_bot[1]);
    $display("  SS                 %10d   %10d", meas_top[2], meas_bot[2]);
    $display("  bottom layer, SS against LP: %0.2f%% fewer; top layer: %0.2f%% fewer",
             100.0 * real'(meas_bot[1] - meas_bot[2]) / real'(meas_bot[1]),
             100.0 * real'(meas_top[1] - meas_top[2]) / real'(meas_top[1]));
    for (int s = 0; s < 3; s++) begin
      chk(meas_top[s] == pred_top[s],
          $sformatf("stack %0d top toggles %0d predicted %0d", s, meas_top[s], pred_top[s]));
      chk(meas_bot[s] == pred_bot[s],
          $sformatf("stack %0d bottom toggles %0d predicted %0d", s, meas_bot[s], pred_bot[s]));
    end
    chk(meas_bot[2] < meas_bot[1], "swapping reduces bottom-layer shift transitions");
    chk(meas_bot[1] < meas_bot[0], "low-power fill beats all-zero fill");
    chk(cross_loads > 0, "some pattern carries differing data through the zone");
    done = 1'b1;
  end
endmodule
