// tb_scan_ff: self-checking test of the mux-D scan flip-flop.
//
// Applies the reset, then random combinations of scan_en, d and si for a
// few hundred cycles and checks after every clock edge that q took si in
// shift mode and d in capture mode. A reset pulse in the middle checks the
// asynchronous clear. A watchdog ends the run with a failure if it hangs.
module tb_scan_ff;
  logic clk = 1'b0, rst_n = 1'b0, scan_en = 1'b0, d = 1'b0, si = 1'b0;
  logic q;
  int checks = 0, failures = 0;

  scan_ff dut (.clk(clk), .rst_n(rst_n), .scan_en(scan_en), .d(d), .si(si), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, exp);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    repeat (2) @(posedge clk);
    #1 check(1'b0, "reset");
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      scan_en = 1'($urandom);
      d       = 1'($urandom);
      si      = 1'($urandom);
      exp     = scan_en ? si : d;
      @(posedge clk);
      #1 check(exp, scan_en ? "shift" : "capture");
      if (n == 200) begin
        // asynchronous clear between clock edges
        @(negedge clk);
        d = 1'b1; si = 1'b1; scan_en = 1'b1;
        @(posedge clk);
        #1 check(1'b1, "load one");
        #2 rst_n = 1'b0;
        #1 check(1'b0, "async reset");
        @(negedge clk) rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
