// cam_cell: one bit of the content addressable table.
//
// The cell stores one bit and compares it with the search bit on its own
// match-line pull-down: mismatch is high when the stored bit differs from the
// search bit, which in the circuit turns on the transistor that lets the match
// line follow the comparison power clock. Storage follows the compressor's
// column structure: two PAL D latches in series (the z and y latches of the
// table row), the first transparent while clk is low and the second while clk
// is high, so the stored bit changes only at the rising edge of clk. When
// load is high the cell takes d_in at that edge (a shift from the row above,
// or the new tuple for the top row); otherwise it keeps its value.
//
// The separate read and write data lines and the bit-line precharge of the
// circuit are analog details; here the stored bit is simply available on q.
//
// Interface: clk, load, d_in (value to store), sd (search bit), q (stored bit),
// mismatch (q != sd, combinational). Timing: q updates at the rising edge of
// clk; d_in and load must be stable before it.
//
// The two latches are intended. Tools that trace paths through latches report
// a loop from q through the hold multiplexer back into the first latch; the
// two latches on that loop are open on opposite clock phases, never together,
// so the loop is not a combinational cycle.
module cam_cell (
  input  logic clk,
  input  logic load,
  input  logic d_in,
  input  logic sd,
  output logic q,
  output logic mismatch
);
  logic nxt, z;

  assign nxt = load ? d_in : q;

  // Master latch: open while clk is low.
  pal_d_latch u_master (.clk(~clk), .d(nxt), .q(z), .qn());
  // Slave latch: open while clk is high.
  pal_d_latch u_slave  (.clk(clk),  .d(z),   .q(q), .qn());

  assign mismatch = q ^ sd;
endmodule
