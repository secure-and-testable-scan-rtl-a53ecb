// secure_scan_top -- a secure, testable scan chain built only from extended
// scan registers.
//
// The kernel's state flip-flops are replaced by three extended scan registers
// cascaded into one chain:
//
//     scan_in -> LF2SR (K_FF stages) -> LFSR (K_FB) -> I2SR (K_INV) -> scan_out
//
// Each register is functionally equivalent to a shift register of its length,
// so the whole chain is a pure N = K_FF + K_FB + K_INV clock delay from scan_in
// to scan_out, and a tester who knows the taps, NOT positions and dummy
// positions can set any state and read any state (scan-testable). Someone who
// only sees the pins cannot tell which structure sits inside (scan-secure).
// In normal mode every non-dummy stage loads its kernel bit, exactly as a
// plain scan flip-flop would; the extra logic is on the scan path only.
//
// The control flip-flop inside the I2SR guards the whole chain: after reset no
// register shifts and scan_out reads 0 until one normal-mode clock has loaded
// kernel data.
//
// Kernel interface: kernel_q is the present state (stage outputs, LF2SR in bits
// [K_FF-1:0], then LFSR, then I2SR); kernel_d is the next state the kernel
// computes, captured on a clock with scan_en = 0. Bits at dummy positions of
// kernel_d are ignored and those of kernel_q are not meant for the kernel.
//
// The cascade of registers and the guard follow the published scheme; the
// order of the cascade, the sizes and the taps are this design's own choices.
module secure_scan_top #(
  parameter int unsigned       K_FF          = 3,
  parameter logic [K_FF*K_FF-1:0] FF_TAPS    = 9'b001_001_000,
  parameter logic [K_FF-1:0]   FF_DUMMY      = 3'b010,
  parameter int unsigned       K_FB          = 3,
  parameter logic [K_FB*K_FB-1:0] FB_TAPS    = 9'b100_100_010,
  parameter logic [K_FB-1:0]   FB_DUMMY      = 3'b001,
  parameter int unsigned       K_INV         = 3,
  parameter logic [K_INV-1:0]  INV_MASK      = 3'b101,
  localparam int unsigned      N             = K_FF + K_FB + K_INV
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out,
  output logic         scan_locked,
  input  logic [N-1:0] kernel_d,
  output logic [N-1:0] kernel_q
);

  logic shift_ok, capture_ok;
  logic ff_out, fb_out;

  lf2sr #(
    .K          (K_FF),
    .FF_TAPS    (FF_TAPS),
    .DUMMY_MASK (FF_DUMMY),
    .OUT_MANIP  (1'b1)
  ) u_lf2sr (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift    (shift_ok),
    .capture  (capture_ok),
    .scan_in  (scan_in),
    .scan_out (ff_out),
    .d        (kernel_d[K_FF-1:0]),
    .q        (kernel_q[K_FF-1:0])
  );

  lfsr_esr #(
    .K          (K_FB),
    .FB_TAPS    (FB_TAPS),
    .DUMMY_MASK (FB_DUMMY),
    .IN_MANIP   (1'b1)
  ) u_lfsr (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift    (shift_ok),
    .capture  (capture_ok),
    .scan_in  (ff_out),
    .scan_out (fb_out),
    .d        (kernel_d[K_FF +: K_FB]),
    .q        (kernel_q[K_FF +: K_FB])
  );

  i2sr #(
    .K        (K_INV),
    .INV_MASK (INV_MASK)
  ) u_i2sr (
    .clk        (clk),
    .rst_n      (rst_n),
    .scan_en    (scan_en),
    .scan_in    (fb_out),
    .scan_out   (scan_out),
    .d          (kernel_d[K_FF+K_FB +: K_INV]),
    .q          (kernel_q[K_FF+K_FB +: K_INV]),
    .shift_ok   (shift_ok),
    .capture_ok (capture_ok),
    .locked     (scan_locked)
  );

endmodule
