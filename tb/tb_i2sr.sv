// tb_i2sr -- self-checking test of the inversion-inserted scan register, at
// its default size and at six stages with four NOT gates. For each it checks
// that scan is refused after reset until a normal clock, that normal mode
// loads the kernel bits unchanged, that in scan mode each stage takes its
// predecessor inverted exactly where a NOT gate sits, and that the register
// as a whole is a pure K-clock delay from scan_in to scan_out.
module tb_i2sr;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int K0 = 3;
  localparam logic [K0-1:0] INV0 = 3'b101;
  localparam int K1 = 6;
  localparam logic [K1-1:0] INV1 = 6'b110110;

  logic          rst_n, scan_en;
  logic [1:0]    sin, sout, sok, cok, lck;
  logic [K0-1:0] d0, q0;
  logic [K1-1:0] d1, q1;
  int            checks = 0, failures = 0;

  i2sr u0 (.clk, .rst_n, .scan_en, .scan_in(sin[0]), .scan_out(sout[0]), .d(d0), .q(q0),
           .shift_ok(sok[0]), .capture_ok(cok[0]), .locked(lck[0]));
  i2sr #(.K(K1), .INV_MASK(INV1)) u1 (.clk, .rst_n, .scan_en, .scan_in(sin[1]),
           .scan_out(sout[1]), .d(d1), .q(q1), .shift_ok(sok[1]), .capture_ok(cok[1]),
           .locked(lck[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [K0-1:0] e0;
  logic [K1-1:0] e1;
  logic [63:0]   h0, h1;
  int            nk0 = K0, nk1 = K1;

  initial begin
    rst_n = 0; scan_en = 0; sin = '0; d0 = '0; d1 = '0;
    @(negedge clk);
    #1 check(q0 == '0 && q1 == '0 && lck == 2'b11, "reset state");
    rst_n = 1; scan_en = 1;
    // Scan right after reset is refused: nothing moves, output reads 0.
    for (int t = 0; t < 8; t++) begin
      @(negedge clk); scan_en = 1; sin = 2'($urandom());
      #1 check(q0 == '0 && q1 == '0 && lck == 2'b11 && sok == 2'b00 && sout == 2'b00,
               $sformatf("scan not refused after reset q=%b/%b lck=%b sok=%b sout=%b", q0, q1, lck, sok, sout));
    end
    // One normal clock loads the kernel bits and lifts the lock.
    @(negedge clk); scan_en = 0; d0 = K0'($urandom()); d1 = K1'($urandom());
    e0 = d0; e1 = d1;
    @(negedge clk);
    check(q0 == e0 && q1 == e1, "capture did not load kernel bits");
    check(lck == 2'b00, "normal clock did not unlock");
    // Shifting.
    h0 = '0; h1 = '0;
    for (int t = 0; t < 60; t++) begin
      if (t >= nk0) check(sout[0] == h0[nk0-1], "3-stage output is not input delayed by 3");
      if (t >= nk1) check(sout[1] == h1[nk1-1], "6-stage output is not input delayed by 6");
      scan_en = 1; sin = 2'($urandom());
      e0 = {e0[K0-2:0], sin[0]} ^ INV0;
      e1 = {e1[K1-2:0], sin[1]} ^ INV1;
      h0 = {h0[62:0], sin[0]}; h1 = {h1[62:0], sin[1]};
      @(negedge clk);
      check(q0 == e0 && q1 == e1, $sformatf("shift state %b/%b expected %b/%b", q0, q1, e0, e1));
      // Each stage holds the bit that entered i+1 clocks ago, inverted by
      // the parity of the NOT gates it passed.
      if (t >= nk1) begin
        logic [K1-1:0] par;
        par = '0;
        for (int i = 0; i < nk1; i++) begin
          logic p;
          p = 0;
          for (int j = 0; j <= i; j++) p ^= INV1[j];
          par[i] = h1[i] ^ p;
        end
        check(q1 == par, "stage does not hold delayed input with its NOT-gate parity");
      end
    end
    // Normal mode again: loads kernel bits unchanged.
    scan_en = 0; d0 = K0'($urandom()); d1 = K1'($urandom());
    @(negedge clk);
    check(q0 == d0 && q1 == d1, "second capture wrong");
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
