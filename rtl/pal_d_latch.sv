// pal_d_latch: level-sensitive D latch modelled on the pass-transistor
// adiabatic (PAL) latch.
//
// The circuit has a dual-rail clocked front end that raises node X when the
// clock and the data are both high, and node Y when the clock is high and the
// data is low. X and Y drive a cross-coupled NOR set/reset latch: a pulse on X
// sets q, a pulse on Y resets it, and with the clock low neither node rises
// and the pair holds. This model keeps exactly that structure at logic level;
// the power clock, the charge recovery and the PMOS sense pair are analog and
// are not represented. X and Y can never be high together, so the set/reset
// pair never sees its forbidden input.
//
// Interface: clk is the latch enable (transparent while high), d the data,
// q/qn the stored value and its complement. Timing: q follows d while clk is
// high and keeps the last value when clk falls.
//
// The module is a latch by design (the table storage is built from these
// latches); a tool reporting an inferred latch here is expected. The latch
// assigns q with a nonblocking assignment on purpose: when two of these
// latches form an edge-triggered stage, q then changes after the clock edge,
// as a flip-flop output does, and flip-flops elsewhere that sample on the same
// edge see the old value instead of racing with it.
module pal_d_latch (
  input  logic clk,
  input  logic d,
  output logic q,
  output logic qn
);
  logic x, y;

  // Clocked dual-rail front end: exactly one of X/Y pulses while clk is high.
  assign x = clk & d;
  assign y = clk & ~d;

  // Set/reset behaviour of the cross-coupled NOR pair. The process is
  // written with its full sensitivity list (the only signals it reads) and a
  // nonblocking assignment rather than as always_latch, so that q updates in
  // the same scheduling region as a flip-flop's output.
  always @(x, y) begin
    if (x)      q <= 1'b1;
    else if (y) q <= 1'b0;
  end

  assign qn = ~q;
endmodule
