// bstw_codec_top: the move-to-front compressor and its receiver side by side.
//
// The transmitting end (bstw_compressor) turns a stream of W-bit tuples into
// position codes and literals using a content addressable move-to-front table;
// the receiving end (bstw_decompressor) keeps an identical table and restores
// the tuples. The two halves share only the clock and reset; their streams
// are brought out as ports so the compressed symbols can be carried over any
// channel (connect tx_* to rx_* for a loop-back). The power clock generator,
// bit-line precharge and read/write circuitry of the adiabatic circuit are
// analog and are not part of this logic model.
//
// Timing: each half accepts one symbol per cycle and answers one cycle later,
// so a tuple comes back out of rx_out_data two cycles after it enters when the
// halves are connected directly.
//
// The table storage is built from latch pairs (see cam_cell); the logic loops
// a synthesis check reports through those pairs are broken by the two
// opposite-phase latches and are expected.
module bstw_codec_top #(
  parameter int unsigned N  = bstw_pkg::N_ENTRIES,
  parameter int unsigned W  = bstw_pkg::TUPLE_W,
  parameter int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst,
  // transmitter: tuples in
  input  logic          tx_in_valid,
  input  logic [W-1:0]  tx_in_data,
  // transmitter: compressed symbols out
  output logic          tx_out_valid,
  output logic          tx_out_hit,
  output logic [CW-1:0] tx_out_code,
  output logic [W-1:0]  tx_out_literal,
  // transmitter table read port
  input  logic [CW-1:0] tx_rd_addr,
  output logic [W-1:0]  tx_rd_data,
  output logic          tx_rd_valid,
  // receiver: compressed symbols in
  input  logic          rx_in_valid,
  input  logic          rx_in_hit,
  input  logic [CW-1:0] rx_in_code,
  input  logic [W-1:0]  rx_in_literal,
  // receiver: tuples out
  output logic          rx_out_valid,
  output logic [W-1:0]  rx_out_data
);
  bstw_compressor #(.N(N), .W(W), .CW(CW)) u_tx (
    .clk(clk), .rst(rst),
    .in_valid(tx_in_valid), .in_data(tx_in_data),
    .out_valid(tx_out_valid), .out_hit(tx_out_hit),
    .out_code(tx_out_code), .out_literal(tx_out_literal),
    .rd_addr(tx_rd_addr), .rd_data(tx_rd_data), .rd_valid(tx_rd_valid)
  );

  bstw_decompressor #(.N(N), .W(W), .CW(CW)) u_rx (
    .clk(clk), .rst(rst),
    .in_valid(rx_in_valid), .in_hit(rx_in_hit),
    .in_code(rx_in_code), .in_literal(rx_in_literal),
    .out_valid(rx_out_valid), .out_data(rx_out_data)
  );
endmodule
