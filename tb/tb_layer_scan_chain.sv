// tb_layer_scan_chain: self-checking test of one layer's scan chain with its
// TSV ports.
//
// Three instances run side by side from the same random stimulus: the
// default zone (cells 5..6 of 7), a zone covering the whole chain (1..7,
// so the entry TSV carries the scan input and the scan output comes from
// the exit TSV), and a chain built without a zone. The tester drives the
// TSV inputs as the other layer would. After every clock the testbench
// checks each cell against the rule "a cell holds what its scan source
// offered one cycle earlier" (scan source: the scan input for cell 1, the
// entry TSV for the first zone cell, the exit TSV for the cell after the
// zone, the previous cell otherwise), or its d input in capture cycles; it
// also checks the three outputs that leave the layer. It counts how often
// each TSV path carried a 1, so that a missing crossing cannot pass
// unnoticed.
module tb_layer_scan_chain;
  localparam int N = 7;

  logic clk = 1'b0, rst_n = 1'b0, scan_en = 1'b0, scan_in = 1'b0;
  logic [N:1] d = '0;
  logic entry_in = 1'b0, exit_in = 1'b0;

  logic [N:1] q_a, q_b, q_c;
  logic so_a, so_b, so_c, eo_a, eo_b, eo_c, xo_a, xo_b, xo_c;

  int checks = 0, failures = 0;
  int entry_used = 0, exit_used = 0, captures = 0, shifts = 0;

  layer_scan_chain #(.CHAIN_LEN(N), .SWAP_EN(1'b1), .SWAP_FIRST(5), .SWAP_LAST(6)) dut_a (
    .clk(clk), .rst_n(rst_n), .scan_en(scan_en), .scan_in(scan_in), .scan_out(so_a),
    .d(d), .q(q_a), .tsv_entry_out(eo_a), .tsv_entry_in(entry_in),
    .tsv_exit_out(xo_a), .tsv_exit_in(exit_in));

  layer_scan_chain #(.CHAIN_LEN(N), .SWAP_EN(1'b1), .SWAP_FIRST(1), .SWAP_LAST(N)) dut_b (
    .clk(clk), .rst_n(rst_n), .scan_en(scan_en), .scan_in(scan_in), .scan_out(so_b),
    .d(d), .q(q_b), .tsv_entry_out(eo_b), .tsv_entry_in(entry_in),
    .tsv_exit_out(xo_b), .tsv_exit_in(exit_in));

  layer_scan_chain #(.CHAIN_LEN(N), .SWAP_EN(1'b0)) dut_c (
    .clk(clk), .rst_n(rst_n), .scan_en(scan_en), .scan_in(scan_in), .scan_out(so_c),
    .d(d), .q(q_c), .tsv_entry_out(eo_c), .tsv_entry_in(entry_in),
    .tsv_exit_out(xo_c), .tsv_exit_in(exit_in));

  always #5 clk = ~clk;

  // Expected next contents of a chain with zone f..l (en=0: no zone).
  function automatic logic [N:1] next_q(input logic [N:1] q, input bit en, input int f,
                                        input int l, input logic se, input logic sin,
                                        input logic ein, input logic xin, input logic [N:1] dd);
    logic [N:1] r;
    for (int i = 1; i <= N; i++) begin
      if (!se)                    r[i] = dd[i];
      else if (en && i == f)      r[i] = ein;
      else if (en && i == l + 1)  r[i] = xin;
      else if (i == 1)            r[i] = sin;
      else                        r[i] = q[i-1];
    end
    return r;
  endfunction

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic chkv(input logic [N:1] got, input logic [N:1] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N:1] ea, eb, ec;
    repeat (2) @(posedge clk);
    #1;
    chkv(q_a, '0, "reset a"); chkv(q_b, '0, "reset b"); chkv(q_c, '0, "reset c");
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      scan_en  = ($urandom % 8) != 0;   // mostly shift, some capture cycles
      scan_in  = 1'($urandom);
      entry_in = 1'($urandom);
      exit_in  = 1'($urandom);
      d        = N'($urandom);
      #1;
      // combinational outputs of the layer
      chk(eo_a, q_a[4], "a entry_out = cell 4");
      chk(xo_a, q_a[6], "a exit_out = cell 6");
      chk(so_a, q_a[N], "a scan_out = cell 7");
      chk(eo_b, scan_in, "b entry_out = scan_in");
      chk(xo_b, q_b[N], "b exit_out = cell 7");
      chk(so_b, exit_in, "b scan_out = exit TSV");
      chk(so_c, q_c[N], "c scan_out = cell 7");
      ea = next_q(q_a, 1'b1, 5, 6, scan_en, scan_in, entry_in, exit_in, d);
      eb = next_q(q_b, 1'b1, 1, N, scan_en, scan_in, entry_in, exit_in, d);
      ec = next_q(q_c, 1'b0, 0, 0, scan_en, scan_in, entry_in, exit_in, d);
      if (scan_en) begin
        shifts++;
        if (entry_in) entry_used++;
        if (exit_in)  exit_used++;
      end else begin
        captures++;
      end
      @(posedge clk);
      #1;
      chkv(q_a, ea, "a contents");
      chkv(q_b, eb, "b contents");
      chkv(q_c, ec, "c contents");
    end
    $display("shifts=%0d captures=%0d entry_tsv_ones=%0d exit_tsv_ones=%0d",
             shifts, captures, entry_used, exit_used);
    checks++; if (shifts == 0 || captures == 0 || entry_used == 0 || exit_used == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
