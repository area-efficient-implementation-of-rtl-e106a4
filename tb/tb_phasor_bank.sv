// tb_phasor_bank: for the 3-path and the 14-path bank, checks every
// (channel, row) phasor against exp(j*2*pi*row*channel/M) rounded to Q1.14,
// after the one-cycle load of a channel's phasor array.
module tb_phasor_bank;
  import chan_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] ch3 = 0, row3 = 0;
  logic [3:0] ch14 = 0, row14 = 0;
  phasor_t p3, p14;
  int checks = 0, failures = 0;

  phasor_bank #(.M(3))  dut3  (.clk, .rst_n, .channel(ch3),  .row(row3),  .phasor(p3));
  phasor_bank #(.M(14)) dut14 (.clk, .rst_n, .channel(ch14), .row(row14), .phasor(p14));
  always #5 clk = ~clk;
  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      ch3 = 2'(k); @(negedge clk);
      for (int r = 0; r < 3; r++) begin
        row3 = 2'(r); #1;
        checks++;
        if (p3.re !== ph_re(r * k, 3) || p3.im !== ph_im(r * k, 3)) begin
          failures++; $display("M3 k%0d r%0d got %0d,%0d", k, r, p3.re, p3.im);
        end
      end
    end
    for (int k = 0; k < 14; k++) begin
      ch14 = 4'(k); @(negedge clk);
      for (int r = 0; r < 14; r++) begin
        row14 = 4'(r); #1;
        checks++;
        if (p14.re !== ph_re(r * k, 14) || p14.im !== ph_im(r * k, 14)) begin
          failures++; $display("M14 k%0d r%0d got %0d,%0d", k, r, p14.re, p14.im);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
