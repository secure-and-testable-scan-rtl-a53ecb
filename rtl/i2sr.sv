// i2sr -- inversion-inserted scan register (I2SR) with the reset guard.
//
// K scan flip-flops y[0..K-1] replace K ordinary scan flip-flops of the
// kernel. In normal mode each one loads its kernel value d[i] and drives q[i],
// exactly like a plain scan flip-flop, so normal operation is not slowed. In
// scan mode the chain shifts from scan_in through y[0] ... y[K-1] to scan_out,
// but a NOT gate sits in front of every stage i whose bit INV_MASK[i] is set:
//
//     y[0] <= scan_in ^ INV_MASK[0],   y[i] <= y[i-1] ^ INV_MASK[i]
//
// With an even number of inversions the register is functionally equivalent to
// a K-stage shift register: what goes in comes out K clocks later unchanged,
// so a tester who knows INV_MASK can set and read any state, while the state
// bits seen inside differ from the scanned bits at secret positions.
// The number of NOT gates must be even; an elaboration check enforces it.
//
// A scan_guard instance is included: after reset, scan is refused (the
// register holds and scan_out reads 0) until one normal-mode clock has loaded
// kernel data. shift_ok and capture_ok are exported so that registers
// cascaded with this one obey the same guard.
//
// Timing: one clock per shift or capture; scan_out = y[K-1] (masked while
// locked) is combinational from the flip-flops.
//
// The structure and the even-inversion rule follow the published model; the
// reset value 0, the masking of scan_out and the default size and NOT
// positions are this design's own choices.
module i2sr #(
  parameter int unsigned      K        = 3,
  parameter logic [K-1:0]     INV_MASK = 3'b101
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out,
  input  logic [K-1:0] d,
  output logic [K-1:0] q,
  output logic         shift_ok,
  output logic         capture_ok,
  output logic         locked
);

  if (($countones(INV_MASK) % 2) != 0) begin : g_odd_inversions
    $error("i2sr: INV_MASK must hold an even number of inversions");
  end

  logic [K-1:0] y;
  logic [K-1:0] shifted;

  scan_guard u_guard (
    .clk     (clk),
    .rst_n   (rst_n),
    .scan_en (scan_en),
    .shift   (shift_ok),
    .capture (capture_ok),
    .locked  (locked)
  );

  always_comb begin
    shifted = {y[K-2:0], scan_in} ^ INV_MASK;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          y <= '0;
    else if (shift_ok)   y <= shifted;
    else if (capture_ok) y <= d;
  end

  assign q        = y;
  assign scan_out = y[K-1] && !locked;

endmodule
