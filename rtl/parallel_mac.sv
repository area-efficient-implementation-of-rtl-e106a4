// parallel_mac: parallel multiply-and-accumulate of one polyphase sub-filter.
//
// In the first pipeline stage all L real coefficients multiply the L complex
// taps at once (2*L multipliers). The products are then summed by a registered
// binary adder tree with ceil(log2(L)) stages, so the result appears
// 1 + ceil(log2(L)) cycles after in_valid (5 cycles for L = 10: one multiply
// stage and four adder stages, as in the document). A new operation can start
// every cycle. tag_in travels with each operation and leaves on tag_out, so
// a controller can keep row numbers and flags aligned with the pipeline.
// Widths are full precision (this design's choice): the result has
// DW + CW + ceil(log2(L)) bits with DFRAC + CFRAC fraction bits.
module parallel_mac
  import chan_pkg::*;
#(
  parameter int L    = 10,
  parameter int TAGW = 1,
  localparam int LV  = $clog2(L),       // adder-tree stages
  localparam int NP  = 1 << LV,         // tree leaves, padded
  localparam int AW  = DW + CW + LV     // result width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cdata_t               taps  [L],
  input  coef_t                coefs [L],
  input  logic [TAGW-1:0]      tag_in,
  output logic                 out_valid,
  output logic signed [AW-1:0] out_re,
  output logic signed [AW-1:0] out_im,
  output logic [TAGW-1:0]      tag_out
);

  // Tree node storage: level 0 holds the products, level LV the sum.
  logic signed [AW-1:0] node_re [LV+1][NP];
  logic signed [AW-1:0] node_im [LV+1][NP];
  logic                 vld     [LV+1];
  logic [TAGW-1:0]      tag     [LV+1];

  // Stage 1: all multiplications at once.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld[0] <= 1'b0;
      tag[0] <= '0;
      for (int i = 0; i < NP; i++) begin
        node_re[0][i] <= '0;
        node_im[0][i] <= '0;
      end
    end else begin
      vld[0] <= in_valid;
      tag[0] <= tag_in;
      for (int i = 0; i < NP; i++) begin
        if (i < L) begin
          node_re[0][i] <= AW'(taps[i].re * coefs[i]);
          node_im[0][i] <= AW'(taps[i].im * coefs[i]);
        end else begin
          node_re[0][i] <= '0;
          node_im[0][i] <= '0;
        end
      end
    end
  end

  // Stages 2..LV+1: pairwise additions.
  for (genvar lv = 1; lv <= LV; lv++) begin : g_lvl
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        vld[lv] <= 1'b0;
        tag[lv] <= '0;
        for (int i = 0; i < NP; i++) begin
          node_re[lv][i] <= '0;
          node_im[lv][i] <= '0;
        end
      end else begin
        vld[lv] <= vld[lv-1];
        tag[lv] <= tag[lv-1];
        for (int i = 0; i < NP; i++) begin
          if (i < (NP >> lv)) begin
            node_re[lv][i] <= node_re[lv-1][2*i] + node_re[lv-1][2*i+1];
            node_im[lv][i] <= node_im[lv-1][2*i] + node_im[lv-1][2*i+1];
          end else begin
            node_re[lv][i] <= '0;
            node_im[lv][i] <= '0;
          end
        end
      end
    end
  end

  assign out_valid = vld[LV];
  assign out_re    = node_re[LV][0];
  assign out_im    = node_im[LV][0];
  assign tag_out   = tag[LV];

endmodule
