// esr_harness -- drives one linear extended scan register (lf2sr when KIND = 0,
// lfsr_esr when KIND = 1) through reset, shifting, state setting, capture,
// hold and state read-back, and checks it against a model of its taps kept
// here.
//
// The model knows only the raw taps. For the feedback register the stage-0
// correction the RTL derives is not copied: the harness finds it by trying
// every candidate row in simulation and keeping the one that turns the
// register into a pure K-clock delay. The RTL's output is never compared with
// a model output; it is compared with the scan input K clocks earlier, which
// is what functional equivalence to a shift register means.
//
// With MANIP = 0 the raw register is built and the harness instead checks that
// its scan output does differ from a pure delay at least once.
//
// Interface: clk in; done rises when the sequence has finished; checks and
// failures count what was compared.
module esr_harness #(
  parameter int unsigned    KIND  = 0,
  parameter int unsigned    K     = 3,
  parameter logic [K*K-1:0] TAPS  = '0,
  parameter logic [K-1:0]   DUMMY = '0,
  parameter bit             MANIP = 1'b1,
  parameter int unsigned    SEED  = 1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  logic         rst_n, shift, capture, scan_in, scan_out;
  logic [K-1:0] d, q;

  if (KIND == 0) begin : g_ff
    lf2sr #(.K(K), .FF_TAPS(TAPS), .DUMMY_MASK(DUMMY), .OUT_MANIP(MANIP)) dut (
      .clk, .rst_n, .shift, .capture, .scan_in, .scan_out, .d, .q);
  end else begin : g_fb
    lfsr_esr #(.K(K), .FB_TAPS(TAPS), .DUMMY_MASK(DUMMY), .IN_MANIP(MANIP)) dut (
      .clk, .rst_n, .shift, .capture, .scan_in, .scan_out, .d, .q);
  end

  logic [K-1:0] row0;   // full stage-0 feedback row of the model (KIND 1)

  // Loop bounds held in variables keep the simulator from unrolling the
  // model loops into very long code.
  int nk = K;
  int nstates = 1 << K;

  function automatic logic [K-1:0] model(input logic [K-1:0] y, input logic x,
                                         input logic [K-1:0] r0);
    logic [K:0]   src;
    logic [K-1:0] n;
    src = {y, x};
    for (int i = 0; i < nk; i++) begin
      n[i] = src[i];
      if (KIND == 0) begin
        for (int j = 0; j < i; j++) n[i] ^= TAPS[i*K + j] & src[j];
      end else if (i == 0) begin
        n[i] ^= ^(r0 & y);
      end else begin
        for (int j = i; j < nk; j++) n[i] ^= TAPS[i*K + j] & y[j];
      end
    end
    return n;
  endfunction

  // Output of the model (only needed to search for row0): last stage, or for
  // the feed-forward kind not needed at all.
  function automatic bit is_delay(input logic [K-1:0] r0);
    logic [K-1:0] y;
    logic [63:0]  hist;
    logic         x;
    for (int trial = 0; trial < 8; trial++) begin
      y = K'($urandom());
      hist = '0;
      for (int t = 0; t < 4*nk; t++) begin
        if (t >= K && y[K-1] != hist[K-1]) return 1'b0;
        x = 1'($urandom());
        hist = {hist[62:0], x};
        y = model(y, x, r0);
      end
    end
    return 1'b1;
  endfunction

  function automatic logic [K-1:0] run_from_zero(input logic [K-1:0] bits);
    // bits[0] is shifted in first
    logic [K-1:0] y;
    y = '0;
    for (int t = 0; t < nk; t++) y = model(y, bits[t], row0);
    return y;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL kind=%0d K=%0d: %s", KIND, K, what);
    end
  endtask

  typedef enum logic [2:0] {
    PH_RESET, PH_SHIFT, PH_SET, PH_CAPTURE, PH_HOLD, PH_OBSERVE, PH_DONE
  } phase_e;

  phase_e       phase;
  int           cyc, cnt, trial, mismatches;
  logic [K-1:0] exp_q, target, seq, zseq, captured;
  logic [63:0]  hist;

  initial begin
    void'($urandom(SEED));
    done = 0; checks = 0; failures = 0;
    rst_n = 0; shift = 0; capture = 0; scan_in = 0; d = '0;
    phase = PH_RESET; cyc = 0; cnt = 0; trial = 0; mismatches = 0;
    exp_q = '0; hist = '0; target = '0; seq = '0; zseq = '0; captured = '0;
    row0 = TAPS[K-1:0];
    if (KIND == 1 && MANIP) begin
      int found;
      found = 0;
      for (int c = 0; c < nstates; c++)
        if (found == 0 && is_delay(K'(c))) begin row0 = K'(c); found = 1; end
      check(found == 1, "no delay-making stage-0 row exists");
    end
  end

  // Pick a random target and the transfer sequence that reaches it; the
  // sequence is found from the model alone, starting from the zero state.
  task automatic new_target();
    target = K'($urandom());
    seq = '0;
    for (int c = 0; c < nstates; c++)
      if (run_from_zero(K'(c)) == target) seq = K'(c);
    check(run_from_zero(seq) == target, "model found no transfer sequence");
  endtask

  // All stimulus changes and all checks happen on the falling edge; the
  // register changes on the rising edge.
  always @(negedge clk) begin
    cyc++;
    case (phase)
      PH_RESET: if (cyc == 3) begin
        check(q == '0, "reset state not zero");
        rst_n = 1;
        phase = PH_SHIFT; cnt = 0;
      end
      // Shifting: the state follows the model, the output is the input K
      // clocks back.
      PH_SHIFT: begin
        if (cnt > 0) check(q == exp_q, $sformatf("state %b, model %b", q, exp_q));
        if (cnt >= K) begin
          if (MANIP) check(scan_out == hist[K-1], "scan_out is not scan_in delayed by K");
          else if (scan_out != hist[K-1]) mismatches++;
        end
        if (cnt == 16*K) begin
          shift = 0;
          if (!MANIP) begin
            check(mismatches > 0, "raw register behaved like a plain shift register");
            phase = PH_DONE;
          end else begin
            new_target(); cnt = 0; phase = PH_SET;
          end
        end else begin
          scan_in = 1'($urandom()); shift = 1;
          exp_q = model(exp_q, scan_in, row0);
          hist  = {hist[62:0], scan_in};
          cnt++;
        end
      end
      // Controllability: the sequence reaches the target whatever the state
      // was before.
      PH_SET: begin
        if (cnt == K) begin
          check(q == target, $sformatf("transfer sequence reached %b, not %b", q, target));
          shift = 0; capture = 1; d = K'($urandom());
          captured = (target & DUMMY) | (d & ~DUMMY);
          phase = PH_CAPTURE;
        end else begin
          scan_in = seq[cnt]; shift = 1; cnt++;
        end
      end
      // Capture: non-dummy stages load d, dummy stages keep their value.
      PH_CAPTURE: begin
        check(q == captured, $sformatf("capture gave %b, expected %b", q, captured));
        capture = 0; d = ~d;
        phase = PH_HOLD;
      end
      PH_HOLD: begin
        check(q == captured, "hold changed the state");
        cnt = 0; zseq = '0; phase = PH_OBSERVE;
        zseq[0] = scan_out; scan_in = 1'($urandom()); shift = 1;
      end
      // Observability: the next K scan-out bits identify the state.
      PH_OBSERVE: begin
        cnt++;
        if (cnt == K) begin
          shift = 0;
          check(run_from_zero(zseq) == captured,
                $sformatf("scan-out %b does not identify state %b", zseq, captured));
          trial++;
          if (trial == 6) phase = PH_DONE;
          else begin new_target(); cnt = 0; phase = PH_SET; end
        end else begin
          zseq[cnt] = scan_out; scan_in = 1'($urandom());
        end
      end
      PH_DONE: done = 1;
      default: ;
    endcase
  end

endmodule
