// tb_bandpass_filter: loads random complex coefficients (16 taps), streams
// random real samples with random gaps and checks each output against the
// exact complex convolution, shifted right by 11 and saturated to 16 bits,
// one cycle after its sample.
module tb_bandpass_filter;
  import chan_pkg::*;
  import tb_util_pkg::*;
  localparam int NT = 16;
  logic clk = 0, rst_n = 0, in_valid = 0;
  data_t din = '0;
  logic coef_we = 0;
  logic [4:0] coef_addr = 0;
  coef_t coef_data = 0;
  logic out_valid;
  cdata_t dout;
  int checks = 0, failures = 0;

  bandpass_filter #(.NTAPS(NT)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #200_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  longint cr [NT], ci [NT], x [$];
  initial begin
    longint sr, si;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NT; i++) begin
      cr[i] = rnd(CW); ci[i] = rnd(CW);
      coef_we = 1; coef_addr = 5'(2*i); coef_data = coef_t'(cr[i]); @(negedge clk);
      coef_addr = 5'(2*i+1); coef_data = coef_t'(ci[i]); @(negedge clk);
    end
    coef_we = 0;
    for (int i = 0; i < NT; i++) x.push_front(0);
    for (int t = 0; t < 400; t++) begin
      in_valid = ($urandom % 4) !== 0;
      din = data_t'(rnd(DW));
      if (in_valid) begin x.push_front(longint'(din)); void'(x.pop_back()); end
      sr = 0; si = 0;
      for (int i = 0; i < NT; i++) begin sr += x[i] * cr[i]; si += x[i] * ci[i]; end
      @(negedge clk);
      checks++;
      if (out_valid !== in_valid || (in_valid && (dout.re !== sat(asr(sr, 11), DW) || dout.im !== sat(asr(si, 11), DW)))) begin
        failures++;
        if (failures < 5) $display("t=%0d got %0d,%0d exp %0d,%0d", t, dout.re, dout.im, sat(asr(sr, 11), DW), sat(asr(si, 11), DW));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
