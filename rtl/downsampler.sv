// downsampler: re-sampler in front of a channelizer, decimation by M.
//
// The band in front of it has been made image-free by the complex bandpass
// filter, so decimation only aliases (translates) the band to a lower rate:
// the block passes every M-th valid sample (the first one after reset, then
// one in M) and drops the others. M = 7 takes the 630 MHz stream to 90 MHz
// for WLAN, M = 9 to 70 MHz for UMTS. Output is registered (1 cycle).
module downsampler
  import chan_pkg::*;
#(
  parameter int M = 7
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  cdata_t din,
  output logic   out_valid,
  output cdata_t dout
);

  logic [$clog2(M)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= in_valid && (cnt == '0);
      if (in_valid) begin
        if (cnt == '0) dout <= din;
        cnt <= (int'(cnt) == M - 1) ? '0 : cnt + 1'b1;
      end
    end
  end

endmodule
