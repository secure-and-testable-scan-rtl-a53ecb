// scan_guard -- the control flip-flop that keeps a reset state from being
// scanned out.
//
// An inversion-inserted scan register gives its secret away if an attacker can
// reset the chip (all flip-flops go to 0) and then scan the register out: every
// 1 in the output marks a NOT gate. This block holds one extra flip-flop,
// `locked`, that reset sets. While it is set, scan mode is refused: the scan
// registers are told neither to shift nor to capture, so they hold, and the
// owner of the chain masks its scan output. The first clock in normal mode
// (scan_en = 0) overwrites the reset state with kernel data and clears the
// flip-flop; from then on scan works as usual.
//
// Interface: scan_en selects scan (1) or normal (0) mode for the clock edge.
// shift and capture are the per-edge commands for the scan registers;
// locked is the control flip-flop itself. All outputs are combinational from
// scan_en and the flip-flop; the flip-flop changes on the rising clock edge.
//
// The control flip-flop set by reset and preventing scan after reset is the
// published technique; that it is cleared by a normal-mode clock, and that a
// refused scan clock holds the registers, are this design's own choices.
module scan_guard (
  input  logic clk,
  input  logic rst_n,
  input  logic scan_en,
  output logic shift,
  output logic capture,
  output logic locked
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        locked <= 1'b1;
    else if (!scan_en) locked <= 1'b0;
  end

  always_comb begin
    shift   = scan_en && !locked;
    capture = !scan_en;
  end

endmodule
