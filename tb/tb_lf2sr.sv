// tb_lf2sr -- self-checking test of the linear feed-forward scan register.
// Three registers run side by side: the default 3-stage one, a 6-stage one
// with denser taps and two dummy stages, and the same 6-stage taps without
// output manipulation, which must not behave as a plain shift register.
module tb_lf2sr;
  logic clk = 0;
  always #5 clk = ~clk;

  logic done0, done1, done2;
  int   c0, c1, c2, f0, f1, f2;
  int   checks, failures;

  localparam logic [35:0] TAPS6 = 36'b101011_010101_001110_000101_000001_000000;

  esr_harness #(.KIND(0), .K(3), .TAPS(9'b001_001_000), .DUMMY(3'b010), .SEED(11))
    h0 (.clk, .done(done0), .checks(c0), .failures(f0));
  esr_harness #(.KIND(0), .K(6), .TAPS(TAPS6), .DUMMY(6'b100100), .SEED(12))
    h1 (.clk, .done(done1), .checks(c1), .failures(f1));
  esr_harness #(.KIND(0), .K(6), .TAPS(TAPS6), .DUMMY(6'b000000), .MANIP(1'b0), .SEED(13))
    h2 (.clk, .done(done2), .checks(c2), .failures(f2));

  initial begin
    repeat (4) @(posedge clk);
    wait (done0 && done1 && done2);
    checks = c0 + c1 + c2; failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
