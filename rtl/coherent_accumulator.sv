// coherent_accumulator: phase-coherent summation of the polyphase paths.
//
// Sums the phasor-weighted outputs of the polyphase rows that form one output
// sample (3 for WLAN, 14 for UMTS). A term flagged first restarts the sum;
// on a term flagged last the complete sum is shifted right by SHIFT bits
// (arithmetic, i.e. truncation), saturated to OW bits and registered on dout
// with out_valid for one cycle, one cycle after that term. The restart on
// every output follows the document; the controller supplies the first/last
// flags, and the scaling is this design's choice.
module coherent_accumulator
  import chan_pkg::*;
#(
  parameter int IW    = 49,
  parameter int SHIFT = 15
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 first,
  input  logic                 last,
  input  logic signed [IW-1:0] din_re,
  input  logic signed [IW-1:0] din_im,
  output logic                 out_valid,
  output cout_t                dout
);

  localparam int SW = 64;

  logic signed [SW-1:0] acc_re, acc_im;
  logic signed [SW-1:0] sum_re, sum_im;

  always_comb begin
    sum_re = (first ? SW'(0) : acc_re) + SW'(din_re);
    sum_im = (first ? SW'(0) : acc_im) + SW'(din_im);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_re    <= '0;
      acc_im    <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= in_valid && last;
      if (in_valid) begin
        acc_re <= sum_re;
        acc_im <= sum_im;
        if (last) begin
          dout.re <= sat_out(sum_re >>> SHIFT);
          dout.im <= sat_out(sum_im >>> SHIFT);
        end
      end
    end
  end

endmodule
