// bstw_compressor: move-to-front (BSTW) data compressor on a content
// addressable table.
//
// The table holds N tuples of W bits, kept as a move-to-front list: record 0
// is the most recently seen tuple. Each incoming tuple is first latched, then
// compared with all records at once. On a hit the compressor sends the
// position of the matching record (a CW-bit code, CW < W), and the records
// above the match each move down one place, overwriting it, while the tuple
// is written into record 0. On a miss it sends the tuple itself, every record
// moves down one place (the oldest, at the bottom, is dropped) and the tuple
// is written into record 0. A receiver that keeps the same list
// (bstw_decompressor) can rebuild the stream.
//
// Datapath: input register -> cam_word match lines -> pal_encoder (code, hit)
// and shift_ctrl (which records shift) -> table update at the next clock
// edge. The record contents can also be read by address through a
// four-to-one mux tree.
//
// Interface and timing: a tuple offered with in_valid at a rising edge of
// clk is latched there; during the following cycle out_valid is high and
// out_hit/out_code/out_literal describe it (combinational from the latched
// tuple and the table); at the next rising edge the table is updated. One
// tuple per cycle, back to back, output one cycle after input. rst is
// synchronous and active high; it empties the table (clears every record's
// valid bit), which takes one clock edge.
//
// Own choices where the document is silent: the hit flag that tells a code
// from a literal, code 0 on a miss (the position the new tuple takes), the
// valid bits, the reset and the one-cycle timing.
module bstw_compressor #(
  parameter int unsigned N  = bstw_pkg::N_ENTRIES,
  parameter int unsigned W  = bstw_pkg::TUPLE_W,
  parameter int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst,
  // incoming tuples
  input  logic          in_valid,
  input  logic [W-1:0]  in_data,
  // compressed stream
  output logic          out_valid,
  output logic          out_hit,
  output logic [CW-1:0] out_code,
  output logic [W-1:0]  out_literal,
  // table read port
  input  logic [CW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  output logic          rd_valid
);
  logic          in_v_q;
  logic [W-1:0]  in_q;
  logic [W-1:0]  rec   [N];
  logic [N-1:0]  rec_v;
  logic [N-1:0]  match;
  logic [N-1:0]  shift_en;

  // Input latch.
  always_ff @(posedge clk) begin
    if (rst) begin
      in_v_q <= 1'b0;
    end else begin
      in_v_q <= in_valid;
    end
    in_q <= in_data;
  end

  // The table: record 0 takes the input tuple, record j the record above it.
  for (genvar j = 0; j < N; j++) begin : g_rec
    logic [W-1:0] d_src;
    logic         v_src;
    if (j == 0) begin : g_top
      assign d_src = in_q;
      assign v_src = 1'b1;
    end else begin : g_below
      assign d_src = rec[j-1];
      assign v_src = rec_v[j-1];
    end
    cam_word #(.W(W)) u_word (
      .clk(clk), .rst(rst), .shift_en(shift_en[j] & ~rst),
      .d_in(d_src), .v_in(v_src), .search(in_q),
      .q(rec[j]), .v(rec_v[j]), .match(match[j])
    );
  end

  shift_ctrl #(.N(N)) u_shift (
    .in_valid(in_v_q), .match(match), .shift_en(shift_en)
  );

  pal_encoder #(.N(N), .CW(CW)) u_enc (
    .match(match), .code(out_code), .hit(out_hit)
  );

  assign out_valid   = in_v_q;
  assign out_literal = in_q;

  // Read port.
  cam_read_mux #(.N(N), .W(W), .AW(CW)) u_rd (
    .rec(rec), .addr(rd_addr), .data(rd_data)
  );
  assign rd_valid = rec_v[rd_addr];

  // A tuple is never stored twice, so at most one record matches.
  a_onehot_match: assert property (@(posedge clk) disable iff (rst) $onehot0(match))
    else $error("more than one table record matches");
endmodule
