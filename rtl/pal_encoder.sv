// pal_encoder: turns the table's match lines into the position code.
//
// At most one record matches (the table never holds a tuple twice), so the
// binary position of the matching record is formed bit by bit as an OR: code
// bit b is the OR of the match lines of all records whose index has bit b set.
// For the four-record table each code bit is the OR of two match lines, the
// two-input PAL encoder gate. hit is the OR of all match lines. With no match
// the code is 0.
//
// The match lines as the encoder's inputs follow the compressor's block
// diagram; the OR-per-bit structure is this design's reading of it.
//
// Interface: match[N] (record 0 = top of the list), code[CW], hit.
// Purely combinational.
module pal_encoder #(
  parameter int unsigned N  = bstw_pkg::N_ENTRIES,
  parameter int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  match,
  output logic [CW-1:0] code,
  output logic          hit
);
  always_comb begin
    code = '0;
    for (int i = 0; i < N; i++) begin
      for (int b = 0; b < CW; b++) begin
        if (((i >> b) & 1) == 1) code[b] = code[b] | match[i];
      end
    end
    hit = |match;
  end
endmodule
