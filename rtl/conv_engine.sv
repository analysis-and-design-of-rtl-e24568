// conv_engine: kernel calculation and convolution of the JBF.
//
// For one target pixel per cycle it evaluates
//
//   result = sum_b G(b) * h'(b)  /  sum_b G(b) * h(b),   G(b) = g(|I_c - b*SR|)
//
// where h is the window's pixel-count histogram, h' its pixel-intensity
// histogram (sum of source pixels J per bin of guidance intensity) and g the
// range kernel. All NB bins are processed in parallel:
//   stage 1  table selectors pick G(b) from the shared weight table
//   stage 2  two arrays of NB multipliers form G*h and G*h'
//   stage 3  two adder trees reduce them to denominator and numerator
//   stage 4+ a pipelined divider (8 stages) forms the 8-bit quotient
// Registers sit on the pipeline cut-lines between these steps; the division
// truncates toward zero. Latency LAT = 3 + 8 = 11 cycles, throughput one
// pixel per cycle. The pipeline runs every cycle; in_vld and the tag just
// travel with the data. The weight table is loaded through tbl_*.
module conv_engine #(
  parameter int unsigned NB    = 64,
  parameter int unsigned HW    = 12,        // bin width of h
  parameter int unsigned HPW   = 20,        // bin width of h'
  parameter int unsigned TBL_N = 32,
  parameter int unsigned G_W   = 8,
  parameter int unsigned TAG_W = 1,
  localparam int unsigned PIX_W = 8,
  localparam int unsigned TAW  = $clog2(TBL_N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   tbl_we,
  input  logic [TAW-1:0]         tbl_waddr,
  input  logic [G_W-1:0]         tbl_wdata,
  input  logic                   in_vld,
  input  logic [PIX_W-1:0]       in_ic,
  input  logic [NB-1:0][HW-1:0]  in_h,
  input  logic [NB-1:0][HPW-1:0] in_hp,
  input  logic [TAG_W-1:0]       in_tag,
  output logic                   out_vld,
  output logic [PIX_W-1:0]       out_pix,
  output logic [TAG_W-1:0]       out_tag
);

  localparam int unsigned PC_W = G_W + HW;                 // one G*h product
  localparam int unsigned PP_W = G_W + HPW;                // one G*h' product
  localparam int unsigned DE_W = PC_W + $clog2(NB);
  localparam int unsigned NU_W = PP_W + $clog2(NB);

  // ---------------------------------------------------- kernel calculation
  logic [TBL_N-1:0][G_W-1:0] wtab;
  logic [NB-1:0][G_W-1:0]    g_sel;

  weight_table #(.TBL_N(TBL_N), .G_W(G_W)) u_table (
    .clk (clk), .rst_n (rst_n),
    .we (tbl_we), .waddr (tbl_waddr), .wdata (tbl_wdata),
    .table_o (wtab)
  );

  table_selector #(.NB(NB), .TBL_N(TBL_N), .G_W(G_W), .PIX_W(PIX_W)) u_ts (
    .ic (in_ic), .table_i (wtab), .g_o (g_sel)
  );

  logic [2:0]             vld;
  logic [2:0][TAG_W-1:0]  tag;
  logic [NB-1:0][G_W-1:0] s1_g;
  logic [NB-1:0][HW-1:0]  s1_h;
  logic [NB-1:0][HPW-1:0] s1_hp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[1:0], in_vld};
  end

  always_ff @(posedge clk) begin
    tag   <= {tag[1:0], in_tag};
    s1_g  <= g_sel;
    s1_h  <= in_h;
    s1_hp <= in_hp;
  end

  // ------------------------------------------------------ multiplier arrays
  logic [NB-1:0][PC_W-1:0] s2_pc;
  logic [NB-1:0][PP_W-1:0] s2_pp;

  always_ff @(posedge clk) begin
    for (int b = 0; b < NB; b++) begin
      s2_pc[b] <= PC_W'(s1_g[b]) * PC_W'(s1_h[b]);
      s2_pp[b] <= PP_W'(s1_g[b]) * PP_W'(s1_hp[b]);
    end
  end

  // ------------------------------------------------------------ adder trees
  logic [DE_W-1:0] de_sum, s3_de;
  logic [NU_W-1:0] nu_sum, s3_nu;

  always_comb begin
    de_sum = '0;
    nu_sum = '0;
    for (int b = 0; b < NB; b++) begin
      de_sum = de_sum + DE_W'(s2_pc[b]);
      nu_sum = nu_sum + NU_W'(s2_pp[b]);
    end
  end

  always_ff @(posedge clk) begin
    s3_de <= de_sum;
    s3_nu <= nu_sum;
  end

  // ---------------------------------------------------------------- divider
  pipe_div #(.NUM_W(NU_W), .DEN_W(DE_W), .QW(PIX_W), .TAG_W(TAG_W)) u_div (
    .clk (clk), .rst_n (rst_n),
    .in_vld (vld[2]), .in_num (s3_nu), .in_den (s3_de), .in_tag (tag[2]),
    .out_vld (out_vld), .out_q (out_pix), .out_tag (out_tag)
  );

endmodule
