// bstw_decompressor: receiver for the move-to-front compressed stream.
//
// It keeps a table built like the compressor's (N records of W bits in
// cam_word rows, record 0 the most recent) and applies the same updates, so
// both lists stay equal. A code word (in_hit high) is turned back into the
// tuple by reading the record at position in_code through the four-to-one mux
// read port; a literal (in_hit low) is the tuple itself. The recovered tuple
// is then used as the search word of the table, and the match lines drive the
// same shift_ctrl logic as in the compressor: on a hit the records above the
// match move down and the tuple goes to the top, on a literal every record
// moves down and the bottom one is dropped.
//
// Interface and timing: a symbol offered with in_valid at a rising edge of
// clk is latched there; during the next cycle out_valid is high and out_data
// holds the recovered tuple; the table is updated at the following edge. One
// symbol per cycle. rst is synchronous, active high, and empties the table.
// The document states only that decoding keeps a table of the same structure;
// the rest of this receiver is this design's own.
module bstw_decompressor #(
  parameter int unsigned N  = bstw_pkg::N_ENTRIES,
  parameter int unsigned W  = bstw_pkg::TUPLE_W,
  parameter int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic          in_hit,
  input  logic [CW-1:0] in_code,
  input  logic [W-1:0]  in_literal,
  output logic          out_valid,
  output logic [W-1:0]  out_data
);
  logic          in_v_q, hit_q;
  logic [CW-1:0] code_q;
  logic [W-1:0]  lit_q;
  logic [W-1:0]  rec   [N];
  logic [N-1:0]  rec_v;
  logic [N-1:0]  match;
  logic [N-1:0]  shift_en;
  logic [W-1:0]  rd_data;
  logic [W-1:0]  tuple;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_v_q <= 1'b0;
    end else begin
      in_v_q <= in_valid;
    end
    hit_q  <= in_hit;
    code_q <= in_code;
    lit_q  <= in_literal;
  end

  cam_read_mux #(.N(N), .W(W), .AW(CW)) u_rd (
    .rec(rec), .addr(code_q), .data(rd_data)
  );

  assign tuple = hit_q ? rd_data : lit_q;

  for (genvar j = 0; j < N; j++) begin : g_rec
    logic [W-1:0] d_src;
    logic         v_src;
    if (j == 0) begin : g_top
      assign d_src = tuple;
      assign v_src = 1'b1;
    end else begin : g_below
      assign d_src = rec[j-1];
      assign v_src = rec_v[j-1];
    end
    cam_word #(.W(W)) u_word (
      .clk(clk), .rst(rst), .shift_en(shift_en[j] & ~rst),
      .d_in(d_src), .v_in(v_src), .search(tuple),
      .q(rec[j]), .v(rec_v[j]), .match(match[j])
    );
  end

  shift_ctrl #(.N(N)) u_shift (
    .in_valid(in_v_q), .match(match), .shift_en(shift_en)
  );

  assign out_valid = in_v_q;
  assign out_data  = tuple;

  // A code must name a record that holds a tuple.
  a_code_valid: assert property (@(posedge clk) disable iff (rst)
      (in_v_q && hit_q) |-> rec_v[code_q])
    else $error("code names an empty table record");
endmodule
