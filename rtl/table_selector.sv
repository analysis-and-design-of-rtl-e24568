// table_selector: one table selector (TS) per histogram bin.
//
// Bin b of the quantised histogram stands for intensity b*SR (SR = 256/NB,
// 4 at 64 bins). For a target guidance pixel I_c, selector b forms the
// distance d = |I_c - b*SR| and picks table entry d, or 0 when d is beyond
// the truncated table. All NB selectors share the one weight table, which
// replaces NB private 256-entry range tables. Combinational.
module table_selector #(
  parameter int unsigned NB    = 64,
  parameter int unsigned TBL_N = 32,
  parameter int unsigned G_W   = 8,
  parameter int unsigned PIX_W = 8,
  localparam int unsigned SR   = (1 << PIX_W) / NB
) (
  input  logic [PIX_W-1:0]          ic,
  input  logic [TBL_N-1:0][G_W-1:0] table_i,
  output logic [NB-1:0][G_W-1:0]    g_o
);

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      logic [PIX_W-1:0] rep;    // intensity the bin stands for
      logic [PIX_W-1:0] d;
      rep = PIX_W'(b * SR);
      d   = (ic >= rep) ? ic - rep : rep - ic;
      g_o[b] = (32'(d) < TBL_N) ? table_i[d[$clog2(TBL_N)-1:0]] : '0;
    end
  end

endmodule
