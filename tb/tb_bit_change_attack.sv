// tb_bit_change_attack -- plays the single-bit change insertion attack against
// the extended scan registers and checks what the attacker can and cannot
// learn.
//
// The attacker runs the chip twice from the same state, with kernel values
// that differ in one bit j, captures, scans out K bits each time and XORs the
// two scan-outs. For a register equivalent to a shift register the result is
// a fixed function of the structure and of j, so it is all the attacker gets.
//
// I2SR: two registers with different (even) NOT positions give the same
//   responses, one-hot at the stage's depth: depth is visible, NOT gates are
//   not.
// LF2SR: the feed-forward tap sets 9'b001_001_000 and 9'b010_001_000 give
//   different responses when every stage is wired to the kernel, so they can
//   be told apart; with stage 1 made a dummy they give identical responses to
//   every bit change the attacker can insert, so they cannot.
module tb_bit_change_attack;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int K = 3;
  localparam logic [8:0] TAPS_A = 9'b001_001_000;
  localparam logic [8:0] TAPS_B = 9'b010_001_000;

  logic         rst_n, scan_en, shift, capture, scan_in;
  logic [K-1:0] d;
  logic [5:0]   z;            // scan_out of the six registers under attack
  logic [K-1:0] q [6];
  logic [1:0]   unused_sok, unused_cok, unused_lck;

  int checks = 0, failures = 0;

  // 0, 1: I2SRs with different NOT positions
  i2sr #(.K(K), .INV_MASK(3'b101)) i0 (.clk, .rst_n, .scan_en, .scan_in, .scan_out(z[0]),
        .d, .q(q[0]), .shift_ok(unused_sok[0]), .capture_ok(unused_cok[0]), .locked(unused_lck[0]));
  i2sr #(.K(K), .INV_MASK(3'b011)) i1 (.clk, .rst_n, .scan_en, .scan_in, .scan_out(z[1]),
        .d, .q(q[1]), .shift_ok(unused_sok[1]), .capture_ok(unused_cok[1]), .locked(unused_lck[1]));
  // 2, 3: LF2SRs A and B, every stage on the kernel
  lf2sr #(.K(K), .FF_TAPS(TAPS_A), .DUMMY_MASK(3'b000)) f0 (.clk, .rst_n, .shift, .capture,
        .scan_in, .scan_out(z[2]), .d, .q(q[2]));
  lf2sr #(.K(K), .FF_TAPS(TAPS_B), .DUMMY_MASK(3'b000)) f1 (.clk, .rst_n, .shift, .capture,
        .scan_in, .scan_out(z[3]), .d, .q(q[3]));
  // 4, 5: the same two with stage 1 a dummy
  lf2sr #(.K(K), .FF_TAPS(TAPS_A), .DUMMY_MASK(3'b010)) f2 (.clk, .rst_n, .shift, .capture,
        .scan_in, .scan_out(z[4]), .d, .q(q[4]));
  lf2sr #(.K(K), .FF_TAPS(TAPS_B), .DUMMY_MASK(3'b010)) f3 (.clk, .rst_n, .shift, .capture,
        .scan_in, .scan_out(z[5]), .d, .q(q[5]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  assign shift   = scan_en;
  assign capture = !scan_en;

  // One attack run: reset, load a fixed state, capture kernel value dv, scan
  // out K bits from every register.
  task automatic attack_run(input logic [K-1:0] pre, input logic [K-1:0] dv,
                            output logic [K-1:0] out [6]);
    rst_n = 0; scan_en = 0; d = '0; scan_in = 0;
    @(negedge clk); rst_n = 1;
    @(negedge clk);                       // normal clock: unlocks the I2SRs
    for (int t = 0; t < K; t++) begin     // same scan-in for all registers
      scan_en = 1; scan_in = pre[t];
      @(negedge clk);
    end
    scan_en = 0; d = dv;
    @(negedge clk);
    scan_en = 1; scan_in = 0;
    for (int t = 0; t < K; t++) begin
      for (int r = 0; r < 6; r++) out[r][t] = z[r];
      @(negedge clk);
    end
  endtask

  logic [K-1:0] oa [6], ob [6], resp [6][K];
  logic [K-1:0] pre, base;
  int n_distinguished_nodummy = 0, n_distinguished_dummy = 0;

  initial begin
    for (int trial = 0; trial < 4; trial++) begin
      pre = K'($urandom()); base = K'($urandom());
      for (int j = 0; j < K; j++) begin
        attack_run(pre, base, oa);
        attack_run(pre, base ^ (K'(1) << j), ob);
        for (int r = 0; r < 6; r++) resp[r][j] = oa[r] ^ ob[r];
        // I2SR: the change comes out after K-1-j clocks, whatever the NOT
        // gates, and the two registers answer alike.
        check(resp[0][j] == (K'(1) << (K - 1 - j)), "I2SR response is not the stage depth");
        check(resp[0][j] == resp[1][j], "I2SRs with different NOT gates told apart");
        if (resp[2][j] != resp[3][j]) n_distinguished_nodummy++;
        if (resp[4][j] != resp[5][j]) n_distinguished_dummy++;
        // A change inserted into a dummy stage does not arrive at all.
        if (j == 1) check(resp[4][j] == '0 && resp[5][j] == '0, "dummy stage took a kernel bit");
      end
    end
    check(n_distinguished_nodummy > 0, "LF2SRs without dummy not told apart");
    check(n_distinguished_dummy == 0, "LF2SRs with dummy told apart");
    $display("responses differing without dummy: %0d, with dummy: %0d",
             n_distinguished_nodummy, n_distinguished_dummy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
