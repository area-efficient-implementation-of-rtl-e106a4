// tb_spectrum_translator: checks the WLAN (+2/15 cycle per sample) and UMTS
// (+1/28) mixers: output n must be x[n] * exp(j*2*pi*K*n/P) with Q1.14
// phasors, shifted right by 14 and saturated, 2 cycles after the sample;
// the oscillator advances only on valid samples.
module tb_spectrum_translator;
  import chan_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  cdata_t din = '0;
  logic ov_w, ov_u;
  cdata_t dw, du;
  int checks = 0, failures = 0;

  spectrum_translator #(.K(2), .P(15)) dut_w (.clk, .rst_n, .in_valid, .din, .out_valid(ov_w), .dout(dw));
  spectrum_translator #(.K(1), .P(28)) dut_u (.clk, .rst_n, .in_valid, .din, .out_valid(ov_u), .dout(du));
  always #5 clk = ~clk;
  initial begin
    #200_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  longint ewr [$], ewi [$], eur [$], eui [$];
  int ecyc [$];
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (ov_w !== ov_u) failures++;
    if (ov_w) begin
      if (ewr.size() == 0 || dw.re !== ewr[0] || dw.im !== ewi[0] || du.re !== eur[0] || du.im !== eui[0] || cyc !== ecyc[0]) begin
        failures++;
        if (failures < 5 && ewr.size() > 0) $display("got %0d,%0d exp %0d,%0d", dw.re, dw.im, ewr[0], ewi[0]);
      end
      if (ewr.size() > 0) begin
        void'(ewr.pop_front()); void'(ewi.pop_front()); void'(eur.pop_front()); void'(eui.pop_front()); void'(ecyc.pop_front());
      end
    end
  end
  initial begin
    int n;
    longint xr, xi;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n = 0;
    for (int t = 0; t < 400; t++) begin
      in_valid = ($urandom % 3) !== 0;
      xr = rnd(DW); xi = rnd(DW);
      din.re = data_t'(xr); din.im = data_t'(xi);
      if (in_valid) begin
        ewr.push_back(sat(asr(xr * ph_re((2 * n) % 15, 15) - xi * ph_im((2 * n) % 15, 15), 14), DW));
        ewi.push_back(sat(asr(xr * ph_im((2 * n) % 15, 15) + xi * ph_re((2 * n) % 15, 15), 14), DW));
        eur.push_back(sat(asr(xr * ph_re(n % 28, 28) - xi * ph_im(n % 28, 28), 14), DW));
        eui.push_back(sat(asr(xr * ph_im(n % 28, 28) + xi * ph_re(n % 28, 28), 14), DW));
        ecyc.push_back(cyc + 2);
        n++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (ewr.size() !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
