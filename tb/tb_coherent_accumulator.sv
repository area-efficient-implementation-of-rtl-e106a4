// tb_coherent_accumulator: feeds groups of 3 terms (first on the first, last
// on the third, random idle cycles between) and checks that each output is
// the group's sum shifted right by 15 and saturated to 28 bits, produced one
// cycle after the last term, with no carry-over from the previous group.
module tb_coherent_accumulator;
  import chan_pkg::*;
  import tb_util_pkg::*;
  localparam int IW = 49;
  logic clk = 0, rst_n = 0, in_valid = 0, first = 0, last = 0;
  logic signed [IW-1:0] din_re = 0, din_im = 0;
  logic out_valid;
  cout_t dout;
  int checks = 0, failures = 0;

  coherent_accumulator #(.IW(IW), .SHIFT(15)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #200_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint sr, si;
    int nout;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 100; g++) begin
      sr = 0; si = 0;
      for (int i = 0; i < 3; i++) begin
        in_valid = 1; first = (i == 0); last = (i == 2);
        din_re = IW'(rnd((g % 4 == 0) ? IW : 40)); din_im = IW'(rnd((g % 5 == 0) ? IW : 40));
        sr += longint'(din_re); si += longint'(din_im);
        @(negedge clk);
        in_valid = 0; first = 0; last = 0;
        checks++;
        if (out_valid !== (i == 2)) begin failures++; $display("g%0d i%0d out_valid %0b", g, i, out_valid); end
        if (i == 2 && (dout.re !== sat(asr(sr, 15), OW) || dout.im !== sat(asr(si, 15), OW))) begin
          failures++; if (failures < 5) $display("g%0d got %0d exp %0d", g, dout.re, sat(asr(sr, 15), OW));
        end
        repeat ($urandom % 2) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
