// tb_downsampler: random valid pattern; checks that exactly the 1st, 8th,
// 15th, ... valid samples (M = 7) are passed, one cycle later, and in order.
module tb_downsampler;
  import chan_pkg::*;
  localparam int M = 7;
  logic clk = 0, rst_n = 0, in_valid = 0;
  cdata_t din = '0;
  logic out_valid;
  cdata_t dout;
  int checks = 0, failures = 0;

  downsampler #(.M(M)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n;
    logic expv;
    cdata_t expd;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n = 0;
    for (int t = 0; t < 500; t++) begin
      in_valid = ($urandom % 2) !== 0;
      din = cdata_t'($urandom);
      expv = in_valid && (n % M == 0);
      expd = din;
      @(negedge clk);
      if (in_valid) n++;
      checks++;
      if (out_valid !== expv || (expv && dout !== expd)) begin
        failures++;
        if (failures < 5) $display("t=%0d got %0b %h exp %0b %h", t, out_valid, dout, expv, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
