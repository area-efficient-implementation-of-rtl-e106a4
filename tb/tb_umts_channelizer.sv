// tb_umts_channelizer: self-checking test of the UMTS channelizer.
//
// Loads a random 154-tap prototype h (set r = h[r+14i]), streams random
// complex samples x[1], x[2], ... one per clock and compares each output with
// a direct model of the maximally decimated channelizer: output p is formed
// after sample 14(p+1), y[p] = sum_j h[j] * x[14(p+1)-j] *
// exp(j*2*pi*k*(j mod 14)/14), computed exactly, shifted right by 15 and
// saturated to 28 bits. Channels 0, 1, 5 and 13 are run, each after a reset.
// Also checks one output per 14 inputs and the 8-cycle latency after the
// 14th read of an output.
module tb_umts_channelizer;
  import chan_pkg::*;
  import tb_util_pkg::*;

  localparam int M = 14, L = 11, NT = M * L;
  localparam int NIN = 14 * 16;

  logic clk = 0, rst_n = 0, in_valid = 0;
  cdata_t din = '0;
  logic [3:0] channel = 0;
  logic coef_we = 0;
  logic [7:0] coef_addr = 0;
  coef_t coef_data = 0;
  logic out_valid;
  cout_t dout;

  int checks = 0, failures = 0;

  umts_channelizer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
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
    int n, row, nexp;
    rst_n = 0; in_valid = 0; channel = 4'(k); nout = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int j = 0; j < NT; j++) begin
      h[j] = rnd(CW);
      @(negedge clk);
      coef_we = 1; coef_addr = 8'((j % M) * L + j / M); coef_data = coef_t'(h[j]);
    end
    @(negedge clk); coef_we = 0;
    xr[0] = 0; xi[0] = 0;
    for (int i = 1; i <= NIN; i++) begin
      xr[i] = rnd(12); xi[i] = rnd(12);
      if (i % 17 == 0) begin xr[i] = -32768; xi[i] = 32767; end
      in_valid = 1; din.re = data_t'(xr[i]); din.im = data_t'(xi[i]);
      in_cycle[i] = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (20) @(negedge clk);
    nexp = NIN / M - 1;   // the last period's output needs one more period of reads
    checks++;
    if (nout !== nexp) begin
      failures++;
      $display("ch%0d: %0d outputs, expected %0d", k, nout, nexp);
    end
    for (int p = 0; p < nexp && p < nout; p++) begin
      ar = 0; ai = 0;
      for (int j = 0; j < NT; j++) begin
        n = M * (p + 1) - j;
        if (n < 1) continue;
        row = j % M;
        er = h[j] * xr[n]; ei = h[j] * xi[n];
        ar += er * ph_re(row * k, M) - ei * ph_im(row * k, M);
        ai += er * ph_im(row * k, M) + ei * ph_re(row * k, M);
      end
      ar = sat(asr(ar, 15), OW); ai = sat(asr(ai, 15), OW);
      checks++;
      if (got_re[p] !== ar || got_im[p] !== ai) begin
        failures++;
        if (failures < 10) $display("ch%0d out %0d: got %0d,%0d exp %0d,%0d", k, p, got_re[p], got_im[p], ar, ai);
      end
      // the last read of output p comes with input 14(p+2), sampled on edge
      // in_cycle+1; the output is seen 8 edges later.
      checks++;
      if (got_cyc[p] !== in_cycle[M * (p + 2)] + 9) begin
        failures++;
        $display("ch%0d out %0d: latency %0d", k, p, got_cyc[p] - in_cycle[M * (p + 2)]);
      end
    end
  endtask

  initial begin
    @(negedge clk);
    run(0); run(1); run(5); run(13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
