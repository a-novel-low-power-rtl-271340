// shift_ctrl: the combinational block that decides which table records move.
//
// Move-to-front needs every record from the top of the list down to the
// matching one to take the record above it (the top takes the new tuple), and
// the records below the match to stay. With no match every record shifts and
// the bottom one drops out. Record j therefore shifts when a tuple is being
// processed and none of the records 0..j-1 above it matched:
//   shift_en[j] = in_valid & ~(match[0] | ... | match[j-1]).
// For the bottom record this is a NOR of all the other match lines, as in the
// compressor's block diagram.
//
// Interface: in_valid (a tuple is being compared), match[N] (record 0 is the
// top of the list), shift_en[N]. Purely combinational.
module shift_ctrl #(
  parameter int unsigned N = bstw_pkg::N_ENTRIES
) (
  input  logic         in_valid,
  input  logic [N-1:0] match,
  output logic [N-1:0] shift_en
);
  always_comb begin
    logic above;
    above = 1'b0;
    for (int j = 0; j < N; j++) begin
      shift_en[j] = in_valid & ~above;
      above       = above | match[j];
    end
  end
endmodule
