// bandpass_filter: complex-coefficient FIR that selects one standard's band
// from the real bandpass-sampled ADC stream.
//
// Complex coefficients pass the band at positive frequency and reject its
// mirror image, so the following decimator can fold the band to a low rate
// without overlap. Structure: a NTAPS-deep delay line of real samples and
// 2*NTAPS multipliers; y = sum_i c[i] * x[n-i]. The full-precision sum is
// shifted right by 11 (Q0.11 coefficients) and saturated to 16 bits, giving
// a Q7.8 complex output registered one cycle after the sample. Coefficients
// are written at address 2*tap (real part) and 2*tap+1 (imaginary part).
// The document states only that these filters are complex; tap count,
// coefficient interface and scaling are this design's choices.
module bandpass_filter
  import chan_pkg::*;
#(
  parameter int NTAPS = 16,
  localparam int AW   = $clog2(2 * NTAPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  data_t         din,
  input  logic          coef_we,
  input  logic [AW-1:0] coef_addr,
  input  coef_t         coef_data,
  output logic          out_valid,
  output cdata_t        dout
);

  data_t x  [NTAPS];
  coef_t cr [NTAPS];
  coef_t ci [NTAPS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS; i++) begin
        cr[i] <= '0;
        ci[i] <= '0;
      end
    end else if (coef_we) begin
      if (coef_addr[0]) ci[coef_addr[AW-1:1]] <= coef_data;
      else              cr[coef_addr[AW-1:1]] <= coef_data;
    end
  end

  // Delay line: x[0] is the newest sample, including the one arriving now.
  data_t xn [NTAPS];
  always_comb begin
    xn[0] = din;
    for (int i = 1; i < NTAPS; i++) xn[i] = x[i-1];
  end

  logic signed [63:0] acc_re, acc_im;
  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int i = 0; i < NTAPS; i++) begin
      acc_re += 64'(xn[i] * cr[i]);
      acc_im += 64'(xn[i] * ci[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS; i++) x[i] <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < NTAPS; i++) x[i] <= xn[i];
        dout.re <= sat_data(acc_re >>> CFRAC);
        dout.im <= sat_data(acc_im >>> CFRAC);
      end
    end
  end

endmodule
