// cam_word: one record of the move-to-front table.
//
// A row of W cam_cell bits shares a match line. The match line is high when
// every stored bit equals the search word and the record holds a tuple (any
// cell mismatch pulls it low). A valid bit, stored in one more cell, keeps an
// empty record from matching after reset; the document does not say how the
// table starts, so the valid bit is this design's own.
//
// When shift_en is high the whole record takes d_in/v_in at the rising edge
// of clk: in the table d_in is the record above, or the incoming tuple for the
// top record. rst (synchronous, active high) clears the valid bit.
//
// Interface: clk, rst, shift_en, d_in[W], v_in, search[W]; q[W] and v give the
// stored record, match the compare result (combinational).
module cam_word #(
  parameter int unsigned W = bstw_pkg::TUPLE_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         shift_en,
  input  logic [W-1:0] d_in,
  input  logic         v_in,
  input  logic [W-1:0] search,
  output logic [W-1:0] q,
  output logic         v,
  output logic         match
);
  logic [W-1:0] mism;
  logic         v_mism;

  for (genvar b = 0; b < W; b++) begin : g_bit
    cam_cell u_cell (
      .clk(clk), .load(shift_en), .d_in(d_in[b]), .sd(search[b]),
      .q(q[b]), .mismatch(mism[b])
    );
  end

  // Valid bit: reset writes 0, a shift copies the valid bit from above.
  cam_cell u_valid (
    .clk(clk), .load(shift_en | rst), .d_in(v_in & ~rst), .sd(1'b1),
    .q(v), .mismatch(v_mism)
  );

  assign match = ~v_mism & ~(|mism);
endmodule
