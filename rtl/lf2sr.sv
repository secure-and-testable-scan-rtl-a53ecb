// lf2sr -- linear feed-forward scan register (LF2SR) with output manipulation
// and dummy flip-flops.
//
// K scan flip-flops y[0..K-1]. Call the scan input source 0 and y[j-1] source
// j. In scan mode stage i loads its predecessor (source i) XORed with every
// earlier source j < i whose tap FF_TAPS[i*K + j] is set:
//
//     y[i] <= src[i] ^ XOR_{j<i} (FF_TAPS[i*K+j] & src[j])
//
// Taps only reach forward, so after K shift clocks the state depends on the
// last K scan bits alone, whatever it was before: the register is
// input-equivalent to a K-stage shift register (any state can be set by a
// sequence worked out from the taps). Its last stage, however, does not in
// general show the bit that entered K clocks ago. The output manipulation
// fixes that: scan_out is the XOR of the stages selected by OUT_SEL, a mask
// the module derives from FF_TAPS at elaboration so that
//
//     scan_out(t) = scan_in(t-K)
//
// which makes the register functionally equivalent to a shift register and so
// scan-testable. With OUT_MANIP = 0 scan_out is plain y[K-1], the unmodified
// register.
//
// Stages with DUMMY_MASK[i] set are dummy flip-flops: they sit in the scan
// path but are cut from the kernel, so in normal mode they keep their value
// and an attacker cannot plant a bit change in them through the kernel. Their
// q bits are not meant to drive the kernel.
//
// Interface: shift and capture come from a scan_guard (both 0 = hold). One
// clock per shift or capture; scan_out is combinational from the flip-flops.
//
// The feed-forward structure, the output manipulation and dummy flip-flops
// follow the published model; the tap encoding, the way OUT_SEL is computed,
// the reset value 0 and the default taps are this design's own choices.
module lf2sr #(
  parameter int unsigned    K         = 3,
  parameter logic [K*K-1:0] FF_TAPS   = 9'b001_001_000,
  parameter logic [K-1:0]   DUMMY_MASK = 3'b010,
  parameter bit             OUT_MANIP = 1'b1
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

  // One scan clock of the raw feed-forward structure.
  function automatic logic [K-1:0] step(input logic [K-1:0] y, input logic x);
    logic [K:0]   src;
    logic [K-1:0] n;
    src = {y, x};
    for (int i = 0; i < K; i++) begin
      n[i] = src[i];
      for (int j = 0; j < i; j++)
        n[i] ^= FF_TAPS[i*K + j] & src[j];
    end
    return n;
  endfunction

  // Output selection mask. Column m (1..K) of the impulse response tells
  // which stages hold scan_in(t-m); stage i always holds scan_in(t-i-1) plus
  // more recent bits, so the mask is found by eliminating from the last
  // stage downwards.
  function automatic logic [K-1:0] out_select();
    logic [K:0][K-1:0] resp;   // resp[m] = state m clocks after a single 1
    logic [K-1:0][K:0] row;    // row[i][m] = 1: stage i holds scan_in(t-m)
    logic [K:0]   r;
    logic [K-1:0] sel;
    resp[0] = '0;
    resp[1] = step('0, 1'b1);
    for (int m = 2; m <= K; m++) resp[m] = step(resp[m-1], 1'b0);
    row = '0;
    for (int i = 0; i < K; i++)
      for (int m = 1; m <= K; m++) row[i][m] = resp[m][i];
    sel = '0;
    sel[K-1] = 1'b1;
    r = row[K-1];
    for (int m = K - 1; m >= 1; m--) begin
      if (r[m]) begin
        sel[m-1] = 1'b1;
        r ^= row[m-1];
      end
    end
    return sel;
  endfunction

  localparam logic [K-1:0] OUT_SEL = OUT_MANIP ? out_select() : (K'(1) << (K - 1));

  logic [K-1:0] y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       y <= '0;
    else if (shift)   y <= step(y, scan_in);
    else if (capture) y <= (y & DUMMY_MASK) | (d & ~DUMMY_MASK);
  end

  assign q        = y;
  assign scan_out = ^(y & OUT_SEL);

endmodule
