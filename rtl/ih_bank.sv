// ih_bank: one bank of the on-chip integral-histogram memory.
//
// Each word holds a complete integral histogram (all bins side by side).
// The histogram engine keeps one row of its integral region split over two
// such banks by column parity (even columns in one, odd in the other), so
// that the two reads it needs per cycle, which always fall on columns of
// different parity, hit different banks. One bank therefore needs a single
// read port and a single write port (two-port SRAM).
//
// Timing: synchronous read, data valid the cycle after raddr is presented.
// Reading and writing the same address in one cycle returns the old word.
// Contents are not reset; the engine never uses a word before writing it.
module ih_bank #(
  parameter int unsigned DEPTH = 45,
  parameter int unsigned WIDTH = 768,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
