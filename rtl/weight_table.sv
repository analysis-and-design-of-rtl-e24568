// weight_table: the single shared range-kernel table.
//
// A Gaussian range kernel g(d) = exp(-d^2 / (2 sigma_r^2)) is symmetric, so
// only d = |I_c - b*SR| >= 0 is stored, and its tail is truncated: entries
// beyond TBL_N-1 are taken as zero. The architecture sizes the table at 32
// entries for the usual range parameters (sigma_r below 32); a wide kernel
// is then cut off at distance 31. Entry d holds g(d) as an unsigned G_W-bit
// fraction of 1.0, i.e. round((2^G_W - 1) * g(d)).
//
// The architecture treats the table as constant for a chosen sigma_r. Here
// it is a small register file written through a configuration port, so one
// netlist serves any sigma_r: load it before starting a frame. All entries
// are read in parallel (`table_o`), one copy feeding every table selector.
// Reset clears the table. Write: one entry per cycle, visible next cycle.
module weight_table #(
  parameter int unsigned TBL_N = 32,
  parameter int unsigned G_W   = 8,
  localparam int unsigned TAW  = $clog2(TBL_N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [TAW-1:0]           waddr,
  input  logic [G_W-1:0]           wdata,
  output logic [TBL_N-1:0][G_W-1:0] table_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  table_o        <= '0;
    else if (we) table_o[waddr] <= wdata;
  end

endmodule
