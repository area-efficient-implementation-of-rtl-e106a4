// tb_parallel_mac: drives random taps and coefficients with random valid
// every cycle and checks that each result equals the exact complex dot
// product, arrives exactly 5 cycles after its input (1 multiply stage and 4
// adder stages for L = 10) and carries its tag.
module tb_parallel_mac;
  import chan_pkg::*;
  import tb_util_pkg::*;
  localparam int L = 10, AW = DW + CW + 4, LAT = 5;
  logic clk = 0, rst_n = 0, in_valid = 0;
  cdata_t taps [L];
  coef_t  coefs [L];
  logic [7:0] tag_in = 0, tag_out;
  logic out_valid;
  logic signed [AW-1:0] out_re, out_im;
  int checks = 0, failures = 0;

  parallel_mac #(.L(L), .TAGW(8)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #200_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  longint er [$], ei [$];
  int     ecyc [$], etag [$];
  int cyc = 0, nin = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (er.size() == 0) begin failures++; end
    else begin
      if (out_re !== er[0] || out_im !== ei[0] || cyc !== ecyc[0] || tag_out !== 8'(etag[0])) begin
        failures++;
        if (failures < 5) $display("got %0d,%0d cyc %0d, exp %0d,%0d cyc %0d", out_re, out_im, cyc, er[0], ei[0], ecyc[0]);
      end
      void'(er.pop_front()); void'(ei.pop_front()); void'(ecyc.pop_front()); void'(etag.pop_front());
    end
  end

  initial begin
    longint sr, si;
    for (int i = 0; i < L; i++) begin taps[i] = '0; coefs[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      in_valid = ($urandom % 3) !== 0;
      tag_in = 8'($urandom);
      sr = 0; si = 0;
      for (int i = 0; i < L; i++) begin
        taps[i] = cdata_t'($urandom);
        coefs[i] = coef_t'($urandom);
        if (t % 50 == 0) begin taps[i].re = -16'sd32768; taps[i].im = 16'sd32767; coefs[i] = -12'sd2048; end
        sr += longint'(taps[i].re) * longint'(coefs[i]);
        si += longint'(taps[i].im) * longint'(coefs[i]);
      end
      if (in_valid) begin er.push_back(sr); ei.push_back(si); ecyc.push_back(cyc + LAT); etag.push_back(tag_in); nin++; end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (er.size() !== 0) begin failures++; $display("%0d results missing", er.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
