// tb_scan3d_top: end-to-end test of the two-layer swapped scan stack at its
// default size (7 cells per layer, swap zone 5..6).
//
// The testbench plays the tester. For every pattern it is given the values
// each physical layer must hold, maps them onto the two scan paths (path A
// starts at the top layer's scan input and runs through the bottom layer
// inside the zone, path B the reverse), serialises them last cell first and
// shifts both paths in parallel. After each load it checks that every cell
// of both layers holds its layer's pattern bit; it then applies a capture
// cycle with random functional data and, during the next load, checks that
// the captured responses come out of the two scan outputs in path order.
//
// The first pattern is the paper's worked example: top layer 0000110 and
// bottom layer 1111001 (cells 1..7), whose two swapped scan streams carry
// no transition at all. Loaded from reset, this costs 2 toggles in the top
// layer and 5 in the bottom layer, against 10 and 17 for the same patterns
// in an unswapped pair of chains (worked out by hand from the shift
// sequence); the testbench checks the two swapped counts.
//
// Mechanisms counted, each of which must occur: shift cycles, capture
// cycles, loads in which the zone carried the other layer's data with a
// different value, and unloads in which a zone response left through the
// other layer's scan output.
module tb_scan3d_top;
  localparam int N = 7, F = 5, L = 6;

  logic clk = 1'b0, rst_n = 1'b0, scan_en = 1'b0;
  logic top_si = 1'b0, bot_si = 1'b0;
  logic [N:1] top_d = '0, bot_d = '0;
  logic top_so, bot_so;
  logic [N:1] top_q, bot_q;

  int checks = 0, failures = 0;
  int n_shift = 0, n_capture = 0, n_cross_load = 0, n_cross_unload = 0;
  int top_toggles = 0, bot_toggles = 0;
  logic [N:1] top_prev, bot_prev;

  scan3d_top dut (
    .clk(clk), .rst_n(rst_n), .scan_en(scan_en),
    .top_scan_in(top_si), .top_scan_out(top_so), .top_d(top_d), .top_q(top_q),
    .bot_scan_in(bot_si), .bot_scan_out(bot_so), .bot_d(bot_d), .bot_q(bot_q));

  always #5 clk = ~clk;

  // Per-layer flip-flop toggles on every clock edge.
  always @(posedge clk) begin
    top_prev <= top_q;
    bot_prev <= bot_q;
  end
  always @(negedge clk) if (rst_n) begin
    top_toggles += $countones(top_q ^ top_prev);
    bot_toggles += $countones(bot_q ^ bot_prev);
  end

  function automatic bit in_zone(input int i);
    return i >= F && i <= L;
  endfunction

  task automatic chk(input logic [N:1] got, input logic [N:1] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // What the two scan paths hold, position by position, when the top layer
  // holds t and the bottom layer b.
  function automatic logic [N:1] path_a(input logic [N:1] t, input logic [N:1] b);
    logic [N:1] p;
    for (int i = 1; i <= N; i++) p[i] = in_zone(i) ? b[i] : t[i];
    return p;
  endfunction
  function automatic logic [N:1] path_b(input logic [N:1] t, input logic [N:1] b);
    logic [N:1] p;
    for (int i = 1; i <= N; i++) p[i] = in_zone(i) ? t[i] : b[i];
    return p;
  endfunction

  // Load layer contents t/b while unloading the current contents, which
  // must be old_t/old_b.
  task automatic load(input logic [N:1] t, input logic [N:1] b,
                      input logic [N:1] old_t, input logic [N:1] old_b);
    logic [N:1] pa, pb, oa, ob, ua, ub;
    pa = path_a(t, b);         pb = path_b(t, b);
    oa = path_a(old_t, old_b); ob = path_b(old_t, old_b);
    for (int i = F; i <= L; i++) if (t[i] != b[i]) begin n_cross_load++; break; end
    for (int i = F; i <= L; i++) if (old_t[i] != old_b[i]) begin n_cross_unload++; break; end
    for (int k = 1; k <= N; k++) begin
      @(negedge clk);
      scan_en = 1'b1;
      top_si = pa[N-k+1];     // last cell's bit first
      bot_si = pb[N-k+1];
      #1;
      ua[N-k+1] = top_so;     // path position leaving the stack now
      ub[N-k+1] = bot_so;
      @(posedge clk);
      n_shift++;
    end
    chk(ua, oa, "path A unload");
    chk(ub, ob, "path B unload");
    #1;
    chk(top_q, t, "top layer after load");
    chk(bot_q, b, "bottom layer after load");
  endtask

  task automatic capture(input logic [N:1] dt, input logic [N:1] db);
    @(negedge clk);
    scan_en = 1'b0;
    top_d = dt; bot_d = db;
    @(posedge clk);
    n_capture++;
    #1;
    chk(top_q, dt, "top capture");
    chk(bot_q, db, "bottom capture");
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N:1] t, b, ct, cb, fig_t, fig_b;
    repeat (2) @(posedge clk);
    #1;
    chk(top_q, '0, "top reset");
    chk(bot_q, '0, "bottom reset");
    @(negedge clk) rst_n = 1'b1;

    // Worked example; bit i of a vector is cell i.
    fig_t = 7'b0110000;   // cells 7..1 = 0,1,1,0,0,0,0
    fig_b = 7'b1001111;   // cells 7..1 = 1,0,0,1,1,1,1
    chk(path_a(fig_t, fig_b), '0, "example path A stream is all zero");
    chk(path_b(fig_t, fig_b), '1, "example path B stream is all one");
    top_toggles = 0; bot_toggles = 0;
    load(fig_t, fig_b, '0, '0);
    @(negedge clk);
    #1;
    $display("example load toggles: top=%0d bottom=%0d (unswapped chains: 10 and 17)",
             top_toggles, bot_toggles);
    checks++; if (top_toggles != 2) begin failures++; $display("FAIL top toggles %0d", top_toggles); end
    checks++; if (bot_toggles != 5) begin failures++; $display("FAIL bottom toggles %0d", bot_toggles); end

    t = fig_t; b = fig_b;
    for (int n = 0; n < 60; n++) begin
      ct = N'($urandom); cb = N'($urandom);
      capture(ct, cb);
      t = N'($urandom); b = N'($urandom);
      load(t, b, ct, cb);
    end
    // unload the last pattern
    load('0, '0, t, b);

    $display("shifts=%0d captures=%0d cross_loads=%0d cross_unloads=%0d",
             n_shift, n_capture, n_cross_load, n_cross_unload);
    checks++; if (n_shift == 0)        begin failures++; $display("FAIL no shift"); end
    checks++; if (n_capture == 0)      begin failures++; $display("FAIL no capture"); end
    checks++; if (n_cross_load == 0)   begin failures++; $display("FAIL no crossing load"); end
    checks++; if (n_cross_unload == 0) begin failures++; $display("FAIL no crossing unload"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
