// pal_mux4: four-to-one multiplexer, W bits wide.
//
// Each output bit is the input selected by s: the circuit has one series
// branch per input (s1 or /s1, s0 or /s0, then the input), and the branch
// whose select literals are true connects the output to the power clock.
// Here it is the plain logic function: out = in[s].
//
// The select assignment (input {s1,s0}) and the bus width are this
// design's own; the circuit is drawn one bit wide.
//
// Interface: in0..in3 (W bits each), s[1:0], out (W bits). Combinational.
module pal_mux4 #(
  parameter int unsigned W = bstw_pkg::TUPLE_W
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic [W-1:0] in3,
  input  logic [1:0]   s,
  output logic [W-1:0] out
);
  always_comb begin
    unique case (s)
      2'd0: out = in0;
      2'd1: out = in1;
      2'd2: out = in2;
      default: out = in3;
    endcase
  end
endmodule
