// tb_lfsr_esr -- self-checking test of the linear feedback scan register.
// Three registers run side by side: the default 3-stage one, a 6-stage one
// with self loops, backward taps and two dummy stages, and the same 6-stage
// taps without input manipulation, which must not behave as a plain shift
// register.
module tb_lfsr_esr;
  logic clk = 0;
  always #5 clk = ~clk;

  logic done0, done1, done2;
  int   c0, c1, c2, f0, f1, f2;
  int   checks, failures;

  localparam logic [35:0] TAPS6 = 36'b100000_110000_011000_101100_010011_100110;

  esr_harness #(.KIND(1), .K(3), .TAPS(9'b100_100_010), .DUMMY(3'b001), .SEED(21))
    h0 (.clk, .done(done0), .checks(c0), .failures(f0));
  esr_harness #(.KIND(1), .K(6), .TAPS(TAPS6), .DUMMY(6'b010001), .SEED(22))
    h1 (.clk, .done(done1), .checks(c1), .failures(f1));
  esr_harness #(.KIND(1), .K(6), .TAPS(TAPS6), .DUMMY(6'b000000), .MANIP(1'b0), .SEED(23))
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
