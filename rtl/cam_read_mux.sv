// cam_read_mux: read port of the table, built from four-to-one multiplexers.
//
// The records are read like an ordinary memory: addr selects one record and
// its contents appear on data. The selection is a tree of pal_mux4 stages,
// each consuming two address bits, least significant pair first. With the
// default four records the tree is a single level of muxes. Positions beyond
// N (when N is not a power of four) read as zero.
//
// Interface: rec[N] (W-bit records, index 0 = top of the list), addr[AW],
// data[W]. Combinational.
module cam_read_mux #(
  parameter int unsigned N  = bstw_pkg::N_ENTRIES,
  parameter int unsigned W  = bstw_pkg::TUPLE_W,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [W-1:0]  rec [N],
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  data
);
  // Number of mux levels and the padded number of inputs (a power of four).
  localparam int unsigned L = (AW + 1) / 2;
  localparam int unsigned P = 1 << (2 * L);

  logic [2*L-1:0] a;
  logic [W-1:0]   padded [P];

  assign a = (2*L)'(addr);

  for (genvar i = 0; i < P; i++) begin : g_in
    if (i < N) begin : g_rec
      assign padded[i] = rec[i];
    end else begin : g_pad
      assign padded[i] = '0;
    end
  end

  // Level l reduces M_IN inputs to M_IN/4 outputs.
  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned M_IN = P >> (2 * l);
    logic [W-1:0] src [M_IN];
    logic [W-1:0] dst [M_IN/4];
    if (l == 0) begin : g_first
      assign src = padded;
    end else begin : g_next
      assign src = g_lvl[l-1].dst;
    end
    for (genvar m = 0; m < M_IN / 4; m++) begin : g_mux
      pal_mux4 #(.W(W)) u_mux (
        .in0(src[4*m]), .in1(src[4*m+1]), .in2(src[4*m+2]), .in3(src[4*m+3]),
        .s(a[2*l +: 2]), .out(dst[m])
      );
    end
  end

  assign data = g_lvl[L-1].dst[0];
endmodule
