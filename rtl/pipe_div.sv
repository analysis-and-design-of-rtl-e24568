// pipe_div: pipelined restoring divider, one quotient bit per stage.
//
// Computes q = floor(num / den) for quotients known to fit in QW bits (the
// JBF result is a weighted mean of 8-bit pixels, so it never exceeds 255).
// Stage i (from the MSB down) subtracts den << i from the running remainder
// when that does not go negative and sets quotient bit i. A zero divisor
// gives q = 0. Throughput one division per cycle, latency QW cycles. A tag
// travels alongside. No reset: the data registers flow freely; `vld` is reset.
module pipe_div #(
  parameter int unsigned NUM_W = 34,
  parameter int unsigned DEN_W = 26,
  parameter int unsigned QW    = 8,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_vld,
  input  logic [NUM_W-1:0] in_num,
  input  logic [DEN_W-1:0] in_den,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_vld,
  output logic [QW-1:0]    out_q,
  output logic [TAG_W-1:0] out_tag
);

  localparam int unsigned RW = NUM_W + 1;

  logic [QW:0]            vld;
  logic [QW:0][RW-1:0]    rem;
  logic [QW:0][DEN_W-1:0] den;
  logic [QW:0][QW-1:0]    q;
  logic [QW:0][TAG_W-1:0] tag;

  always_comb begin
    vld[0] = in_vld;
    rem[0] = RW'(in_num);
    den[0] = in_den;
    q[0]   = '0;
    tag[0] = in_tag;
  end

  for (genvar s = 0; s < QW; s++) begin : g_stage
    localparam int unsigned BIT = QW - 1 - s;
    logic [RW+QW-1:0] trial;
    logic             take;
    always_comb begin
      trial = (RW+QW)'(den[s]) << BIT;
      take  = (den[s] != '0) && ((RW+QW)'(rem[s]) >= trial);
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld[s+1] <= 1'b0;
      else        vld[s+1] <= vld[s];
    end
    always_ff @(posedge clk) begin
      rem[s+1] <= take ? rem[s] - RW'(trial) : rem[s];
      den[s+1] <= den[s];
      q[s+1]   <= q[s] | (QW'(take) << BIT);
      tag[s+1] <= tag[s];
    end
  end

  assign out_vld = vld[QW];
  assign out_q   = q[QW];
  assign out_tag = tag[QW];

endmodule
