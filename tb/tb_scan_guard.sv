// tb_scan_guard -- self-checking test of the reset guard flip-flop: reset
// locks scan, scan clocks while locked are refused and keep it locked, the
// first normal clock unlocks it, and a later reset locks it again.
module tb_scan_guard;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, scan_en, shift, capture, locked;
  int   checks = 0, failures = 0;

  scan_guard dut (.clk, .rst_n, .scan_en, .shift, .capture, .locked);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Expected outputs for the present mode and lock state.
  task automatic expect_outputs(input bit lk);
    check(locked == lk, $sformatf("locked=%0d, expected %0d", locked, lk));
    check(shift == (scan_en && !lk), "shift wrong");
    check(capture == !scan_en, "capture wrong");
  endtask

  initial begin
    rst_n = 1; scan_en = 0;
    @(negedge clk); rst_n = 0; scan_en = 1;
    #1 expect_outputs(1);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); scan_en = 1;
      #1 expect_outputs(1);
    end
    @(negedge clk); scan_en = 0;
    #1 expect_outputs(1);
    @(negedge clk);
    #1 expect_outputs(0);
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); scan_en = 1'($urandom());
      #1 expect_outputs(0);
    end
    @(negedge clk); scan_en = 1; rst_n = 0;
    #1 expect_outputs(1);
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    #1 expect_outputs(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
