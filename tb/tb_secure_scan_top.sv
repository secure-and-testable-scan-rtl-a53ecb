// tb_secure_scan_top -- end-to-end test of the secure scan chain at its
// default sizes (LF2SR, LFSR and I2SR of three stages each).
//
// The test plays the tester, who knows the structure: from a model of the
// taps, NOT gates and dummy positions it works out the scan-in sequence that
// sets a chosen state, loads it, lets the kernel side capture new values, and
// decodes the captured state from the scan-out bits. It also plays the
// attacker who resets the chip and tries to scan, which must give nothing.
//
// The model is built here from the raw structure. The only part not written
// down is the LFSR's stage-0 correction; the test finds it by trying every
// row and keeping the one that makes that register a pure delay.
//
// Each mechanism is counted and must occur: refused scan after reset, unlock
// by a normal clock, shift, capture, dummy stages holding, a NOT gate changing
// a stage, the LF2SR's last stage differing from its corrected output, and the
// LFSR's input correction acting.
module tb_secure_scan_top;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 9;
  localparam logic [8:0] FF_TAPS  = 9'b001_001_000;
  localparam logic [2:0] FF_DUMMY = 3'b010;
  localparam logic [8:0] FB_TAPS  = 9'b100_100_010;
  localparam logic [2:0] FB_DUMMY = 3'b001;
  localparam logic [2:0] INV_MASK = 3'b101;
  localparam logic [N-1:0] DUMMY  = {3'b000, FB_DUMMY, FF_DUMMY};

  logic         rst_n, scan_en, scan_in, scan_out, scan_locked;
  logic [N-1:0] kernel_d, kernel_q;

  secure_scan_top dut (.clk, .rst_n, .scan_en, .scan_in, .scan_out, .scan_locked,
                       .kernel_d, .kernel_q);

  int checks = 0, failures = 0;
  int n_refused = 0, n_unlock = 0, n_shift = 0, n_capture = 0, n_dummy_hold = 0;
  int n_inverted = 0, n_out_manip = 0, n_in_manip = 0;
  int nk = 3, nn = N, nstates = 1 << N;

  logic [2:0] row0;   // full stage-0 feedback row of the LFSR

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [2:0] ff_step(input logic [2:0] y, input logic x);
    logic [3:0] src;
    logic [2:0] n;
    src = {y, x};
    for (int i = 0; i < nk; i++) begin
      n[i] = src[i];
      for (int j = 0; j < i; j++) n[i] ^= FF_TAPS[i*3 + j] & src[j];
    end
    return n;
  endfunction

  function automatic logic [2:0] fb_step(input logic [2:0] y, input logic x,
                                         input logic [2:0] r0);
    logic [3:0] pred;
    logic [2:0] n;
    pred = {y, x};
    n[0] = x ^ ^(r0 & y);
    for (int i = 1; i < nk; i++) begin
      n[i] = pred[i];
      for (int j = i; j < nk; j++) n[i] ^= FB_TAPS[i*3 + j] & y[j];
    end
    return n;
  endfunction

  function automatic bit fb_is_delay(input logic [2:0] r0);
    logic [2:0] y;
    logic [7:0] h;
    logic       x;
    for (int trial = 0; trial < 8; trial++) begin
      y = 3'($urandom()); h = '0;
      for (int t = 0; t < 16; t++) begin
        if (t >= 3 && y[2] != h[2]) return 1'b0;
        x = 1'($urandom());
        h = {h[6:0], x};
        y = fb_step(y, x, r0);
      end
    end
    return 1'b1;
  endfunction

  // Whole chain, N shift clocks from the zero state; bits[0] goes in first.
  // Every register is a pure 3-clock delay, so the input of the second one is
  // the scan input 3 clocks back and that of the third 6 clocks back.
  function automatic logic [N-1:0] chain_from_zero(input logic [N-1:0] bits);
    logic [2:0]  a, b, c;
    logic [17:0] h;
    a = '0; b = '0; c = '0; h = '0;
    for (int t = 0; t < nn; t++) begin
      h = {h[16:0], bits[t]};
      c = {c[1:0], h[6]} ^ INV_MASK;
      b = fb_step(b, h[3], row0);
      a = ff_step(a, h[0]);
    end
    return {c, b, a};
  endfunction

  logic [N-1:0] target, seq, captured, zseq, prior;
  logic [31:0]  hist;

  task automatic shift_bit(input logic b);
    @(negedge clk);
    scan_en = 1; scan_in = b;
    hist = {hist[30:0], b};
    n_shift++;
  endtask

  // Watch the internal effects that make the registers differ from plain
  // shift registers.
  always @(posedge clk) begin
    if (rst_n && dut.shift_ok) begin
      if (dut.u_lf2sr.y[2] != dut.u_lf2sr.scan_out) n_out_manip++;
      if (dut.u_lfsr.x0 != dut.u_lfsr.scan_in) n_in_manip++;
      if (dut.u_i2sr.shifted != {dut.u_i2sr.y[1:0], dut.u_i2sr.scan_in}) n_inverted++;
    end
  end

  initial begin
    rst_n = 0; scan_en = 1; scan_in = 0; kernel_d = '0; hist = '0;
    row0 = '0;
    for (int c = 7; c >= 0; c--) if (fb_is_delay(3'(c))) row0 = 3'(c);
    check(fb_is_delay(row0), "no LFSR correction row makes a pure delay");

    // Attacker: reset, then try to scan out the reset state.
    @(negedge clk);
    check(kernel_q == '0 && scan_locked, "reset did not clear and lock the chain");
    rst_n = 1;
    for (int t = 0; t < 2*N; t++) begin
      @(negedge clk); scan_en = 1; scan_in = 1'($urandom());
      #1;
      check(scan_out == 1'b0 && kernel_q == '0 && scan_locked, "scan after reset not refused");
      if (scan_locked) n_refused++;
    end

    // A normal clock loads the kernel's values and lifts the lock.
    @(negedge clk); scan_en = 0; kernel_d = N'($urandom());
    @(negedge clk);
    check(kernel_q == (kernel_d & ~DUMMY), "first capture wrong");
    check(!scan_locked, "normal clock did not unlock");
    if (!scan_locked) n_unlock++;
    n_capture++;

    for (int trial = 0; trial < 12; trial++) begin
      // Tester: set a chosen state through a sequence worked out from the
      // structure alone.
      target = N'($urandom());
      seq = '0;
      for (int c = 0; c < nstates; c++) if (chain_from_zero(N'(c)) == target) seq = N'(c);
      check(chain_from_zero(seq) == target, "no transfer sequence in the model");
      for (int t = 0; t < nn; t++) shift_bit(seq[t]);
      @(negedge clk);
      scan_en = 0; kernel_d = N'($urandom());
      check(kernel_q == target, $sformatf("scan-in set %b, wanted %b", kernel_q, target));
      prior = kernel_q;

      // Capture the kernel's next state; dummy stages keep theirs.
      @(negedge clk);
      captured = (prior & DUMMY) | (kernel_d & ~DUMMY);
      check(kernel_q == captured, $sformatf("capture gave %b, wanted %b", kernel_q, captured));
      n_capture++;
      if ((prior & DUMMY) != (kernel_d & DUMMY)) n_dummy_hold++;

      // Scan out and identify the captured state from N output bits.
      zseq = '0;
      for (int t = 0; t < nn; t++) begin
        scan_en = 1; #1 zseq[t] = scan_out;
        shift_bit(1'($urandom()));
      end
      check(chain_from_zero(zseq) == captured,
            $sformatf("scan-out %b does not decode to %b", zseq, captured));
    end

    // The chain as a whole is a pure N-clock delay.
    for (int t = 0; t < 4*N; t++) begin
      @(negedge clk); #1;
      if (t >= N) check(scan_out == hist[N-1], "chain is not a pure N-clock delay");
      scan_en = 1; scan_in = 1'($urandom()); hist = {hist[30:0], scan_in}; n_shift++;
    end

    // A second reset locks the chain again.
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1; scan_en = 1;
    @(negedge clk); #1;
    check(scan_locked && kernel_q == '0 && scan_out == 0, "second reset did not lock");
    if (scan_locked) n_refused++;

    check(n_refused > 0,    "no scan refused after reset");
    check(n_unlock > 0,     "never unlocked");
    check(n_shift > 0,      "never shifted");
    check(n_capture > 0,    "never captured");
    check(n_dummy_hold > 0, "no dummy stage ever held a differing value");
    check(n_inverted > 0,   "no NOT gate ever changed a stage");
    check(n_out_manip > 0,  "LF2SR output correction never acted");
    check(n_in_manip > 0,   "LFSR input correction never acted");
    $display("refused=%0d unlock=%0d shift=%0d capture=%0d dummy_hold=%0d inverted=%0d out_manip=%0d in_manip=%0d",
             n_refused, n_unlock, n_shift, n_capture, n_dummy_hold, n_inverted, n_out_manip, n_in_manip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
