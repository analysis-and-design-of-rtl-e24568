// sba: selected-bin adder of the histogram calculation engine.
//
// Adds (or, with sub=1, subtracts) one value to the single bin of a histogram
// vector chosen by `bin`; every other bin passes through unchanged. As in the
// architecture, a selector picks the chosen bin ahead of one adder, and an
// array of selectors writes the sum back into that bin position, so only one
// adder is spent instead of one per bin. With en=0 the histogram passes
// unchanged (the pixel lies outside the frame). Purely combinational.
// Arithmetic is modulo 2^HW; the engine relies on that (differences of
// integral histograms are always in range).
module sba #(
  parameter int unsigned NB    = 64,   // bins
  parameter int unsigned HW    = 12,   // bin width
  parameter int unsigned VAL_W = 8,    // width of the value added
  localparam int unsigned BW   = $clog2(NB)
) (
  input  logic [NB-1:0][HW-1:0] hist_i,
  input  logic                  en,
  input  logic                  sub,
  input  logic [BW-1:0]         bin,
  input  logic [VAL_W-1:0]      val,
  output logic [NB-1:0][HW-1:0] hist_o
);

  logic [HW-1:0] sel_bin;   // bin picked by the input selector
  logic [HW-1:0] sum;

  always_comb begin
    sel_bin = hist_i[bin];
    if (sub) sum = sel_bin - HW'(val);
    else     sum = sel_bin + HW'(val);
  end

  // Output selector array: bin b takes the sum only when it is the selected bin.
  always_comb begin
    for (int b = 0; b < NB; b++) begin
      hist_o[b] = (en && bin == BW'(b)) ? sum : hist_i[b];
    end
  end

endmodule
