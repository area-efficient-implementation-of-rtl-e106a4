// tb_wlan_channelizer: self-checking test of the WLAN channelizer.
//
// Loads a random 60-tap prototype h (set k = h[k+6i]), streams random complex
// samples x[1], x[2], ... one per clock and compares every output with a
// direct model of the 9/2 resampling channelizer: sample n sits at index 2n
// of the zero-packed 180 MHz stream, output p is taken at index m = 10+9p,
// y[p] = sum_j h[j] * x[(m-j)/2] * exp(j*2*pi*k*((m-j)/2+1)/3) over even m-j,
// computed exactly, shifted right by 15 and saturated to 28 bits. Each of the
// three channels is run after a reset. Also checks 2 outputs per 9 inputs and
// the 8-cycle latency from the third read of an output.
module tb_wlan_channelizer;
  import chan_pkg::*;
  import tb_util_pkg::*;

  localparam int L = 10, NS = 6, NT = NS * L;
  localparam int NIN = 9 * 12 + 3;

  logic clk = 0, rst_n = 0, in_valid = 0;
  cdata_t din = '0;
  logic [1:0] channel = 0;
  logic coef_we = 0;
  logic [5:0] coef_addr = 0;
  coef_t coef_data = 0;
  logic out_valid;
  cout_t dout;

  int checks = 0, failures = 0;

  wlan_channelizer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint h [NT];
  longint xr [NIN+1], xi [NIN+1];
  int nout;
  int in_cycle [NIN+1];
  int cyc = 0;
  always @(posedge clk) cyc++;

  // Collect outputs.
  longint got_re [64], got_im [64];
  int     got_cyc [64];
  always @(posedge clk) if (rst_n && out_valid) begin
    if (nout < 64) begin
      got_re[nout] = longint'(dout.re);
      got_im[nout] = longint'(dout.im);
      got_cyc[nout] = cyc;
    end
    nout++;
  end

  task automatic run(int k);
    longint er, ei, ar, ai;
    int m, n, row;
    int nexp;
    rst_n = 0; in_valid = 0; channel = 2'(k); nout = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int j = 0; j < NT; j++) begin
      h[j] = rnd(CW);
      @(negedge clk);
      coef_we = 1; coef_addr = 6'((j % NS) * L + j / NS); coef_data = coef_t'(h[j]);
    end
    @(negedge clk); coef_we = 0;
    xr[0] = 0; xi[0] = 0;
    for (int i = 1; i <= NIN; i++) begin
      xr[i] = rnd(12); xi[i] = rnd(12);
      if (i % 10 == 0) begin xr[i] = 32767; xi[i] = -32768; end  // large values
      in_valid = 1; din.re = data_t'(xr[i]); din.im = data_t'(xi[i]);
      in_cycle[i] = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (20) @(negedge clk);
    nexp = 2 * ((NIN - 3) / 9);
    checks++;
    if (nout !== nexp) begin
      failures++;
      $display("ch%0d: %0d outputs, expected %0d", k, nout, nexp);
    end
    for (int p = 0; p < nexp && p < nout; p++) begin
      m = 10 + 9 * p;
      ar = 0; ai = 0;
      for (int j = 0; j < NT; j++) begin
        if ((m - j) % 2 !== 0 || m - j < 2) continue;
        n = (m - j) / 2;
        row = (n + 1) % 3;
        er = h[j] * xr[n]; ei = h[j] * xi[n];
        ar += er * ph_re(row * k, 3) - ei * ph_im(row * k, 3);
        ai += er * ph_im(row * k, 3) + ei * ph_re(row * k, 3);
      end
      ar = sat(asr(ar, 15), OW); ai = sat(asr(ai, 15), OW);
      checks++;
      if (got_re[p] !== ar || got_im[p] !== ai) begin
        failures++;
        if (failures < 10) $display("ch%0d out %0d: got %0d,%0d exp %0d,%0d", k, p, got_re[p], got_im[p], ar, ai);
      end
      // latency: the third read happens with input 8+9(p/2) (even p) or 12+9(p/2)
      // (odd p); that input is sampled on edge in_cycle+1 and the output is
      // seen 8 edges later.
      checks++;
      if (got_cyc[p] !== in_cycle[(p % 2 == 0) ? 9 * (p / 2) + 8 : 9 * (p / 2) + 12] + 9) begin
        failures++;
        $display("ch%0d out %0d: latency wrong %0d", k, p, got_cyc[p] - in_cycle[(p % 2 == 0) ? 9 * (p / 2) + 8 : 9 * (p / 2) + 12]);
      end
    end
  endtask

  initial begin
    @(negedge clk);
    for (int k = 0; k < 3; k++) run(k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
