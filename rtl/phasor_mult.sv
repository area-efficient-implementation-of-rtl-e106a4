// phasor_mult: complex multiplication of a MAC result by a Q1.14 phasor.
//
// Two pipeline stages: the four real products a_re*p_re, a_im*p_im,
// a_re*p_im and a_im*p_re are registered in the first cycle, and the
// subtraction (real part) and addition (imaginary part) are registered in
// the second, so a result leaves 2 cycles after in_valid and a new operation
// may start each cycle. The result keeps full precision: AW + PW + 1 bits
// with the input's fraction bits plus 14. tag_in travels alongside.
module phasor_mult
  import chan_pkg::*;
#(
  parameter int AW   = 32,
  parameter int TAGW = 1,
  localparam int YW  = AW + PW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [AW-1:0] a_re,
  input  logic signed [AW-1:0] a_im,
  input  phasor_t              p,
  input  logic [TAGW-1:0]      tag_in,
  output logic                 out_valid,
  output logic signed [YW-1:0] y_re,
  output logic signed [YW-1:0] y_im,
  output logic [TAGW-1:0]      tag_out
);

  logic signed [AW+PW-1:0] rr, ii, ri, ir;
  logic                    v1;
  logic [TAGW-1:0]         t1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr <= '0; ii <= '0; ri <= '0; ir <= '0;
      v1 <= 1'b0; t1 <= '0;
      y_re <= '0; y_im <= '0;
      out_valid <= 1'b0; tag_out <= '0;
    end else begin
      // cycle 1: four multiplications
      rr <= a_re * p.re;
      ii <= a_im * p.im;
      ri <= a_re * p.im;
      ir <= a_im * p.re;
      v1 <= in_valid;
      t1 <= tag_in;
      // cycle 2: one subtraction, one addition
      y_re <= YW'(rr) - YW'(ii);
      y_im <= YW'(ri) + YW'(ir);
      out_valid <= v1;
      tag_out   <= t1;
    end
  end

endmodule
