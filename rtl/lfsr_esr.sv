// lfsr_esr -- linear feedback scan register (LFSR) with input manipulation and
// dummy flip-flops.
//
// K scan flip-flops y[0..K-1]. In scan mode stage i loads its predecessor
// (scan_in for stage 0, y[i-1] otherwise) XORed with every stage j >= i whose
// tap FB_TAPS[i*K + j] is set:
//
//     y[i] <= pred[i] ^ XOR_{j>=i} (FB_TAPS[i*K+j] & y[j])
//
// Taps only reach backward (or onto the stage itself), so the next K values
// of scan_out = y[K-1] depend on the present state alone: the register is
// output-equivalent to a K-stage shift register (its state can be read from K
// scan-out bits). It is not in general input-equivalent. The input
// manipulation fixes that: stage 0 additionally takes the XOR of the stages
// selected by IN_SEL, a mask derived from FB_TAPS at elaboration so that
//
//     scan_out(t) = scan_in(t-K)
//
// which makes the register functionally equivalent to a shift register and so
// scan-testable. With IN_MANIP = 0 the raw register is built.
//
// Stages with DUMMY_MASK[i] set are dummy flip-flops cut from the kernel: in
// normal mode they keep their value.
//
// Interface: shift and capture come from a scan_guard (both 0 = hold). One
// clock per shift or capture; scan_out is y[K-1].
//
// The feedback structure, the input manipulation and the dummy flip-flops
// follow the published model; the tap encoding, the way IN_SEL is computed,
// the reset value 0 and the default taps are this design's own choices.
module lfsr_esr #(
  parameter int unsigned    K          = 3,
  parameter logic [K*K-1:0] FB_TAPS    = 9'b100_100_010,
  parameter logic [K-1:0]   DUMMY_MASK = 3'b001,
  parameter bit             IN_MANIP   = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         capture,
  input  logic         scan_in,
  output logic         scan_out,
  input  logic [K-1:0] d,
  output logic [K-1:0] q
);

  // One scan clock of the raw feedback structure; stage 0 gets x0 plus its
  // feedback taps.
  function automatic logic [K-1:0] step(input logic [K-1:0] y, input logic x0);
    logic [K:0]   pred;
    logic [K-1:0] n;
    pred = {y, x0};
    for (int i = 0; i < K; i++) begin
      n[i] = pred[i];
      for (int j = i; j < K; j++)
        n[i] ^= FB_TAPS[i*K + j] & y[j];
    end
    return n;
  endfunction

  // The K scan-out bits that follow state y; obs[m] appears m clocks later.
  // Stage 0's input does not reach scan_out within K clocks, so it is held 0.
  function automatic logic [K-1:0] observe(input logic [K-1:0] y);
    logic [K-1:0] s, v;
    v = y;
    for (int m = 0; m < K; m++) begin
      s[m] = v[K-1];
      v = step(v, 1'b0);
      v[0] = 1'b0;
    end
    return s;
  endfunction

  // Full stage-0 feedback row that makes the register a pure K-clock delay.
  // A state whose next K outputs are s must, after a clock with input x, hold
  // a state whose next outputs are {x, s[K-1:1]}. Stages 1..K-1 of that state
  // are fixed by the taps; stage 0 is the one bit that makes it so, found for
  // each unit state (x = 0) by trying both values.
  function automatic logic [K-1:0] feedback_row();
    logic [K-1:0] row, e, nxt, want;
    row = '0;
    for (int j = 0; j < K; j++) begin
      e    = K'(1) << j;
      want = observe(e) >> 1;
      nxt  = step(e, 1'b0);
      nxt[0] = 1'b1;
      if (observe(nxt) == want) row[j] = 1'b1;
    end
    return row;
  endfunction

  localparam logic [K-1:0] RAW_ROW0 = FB_TAPS[K-1:0];
  localparam logic [K-1:0] IN_SEL   = IN_MANIP ? (feedback_row() ^ RAW_ROW0) : '0;

  logic [K-1:0] y;
  logic         x0;

  assign x0 = scan_in ^ (^(y & IN_SEL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       y <= '0;
    else if (shift)   y <= step(y, x0);
    else if (capture) y <= (y & DUMMY_MASK) | (d & ~DUMMY_MASK);
  end

  assign q        = y;
  assign scan_out = y[K-1];

endmodule
