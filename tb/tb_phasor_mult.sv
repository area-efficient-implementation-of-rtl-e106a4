// tb_phasor_mult: random complex inputs and phasors with random valid; each
// result must equal the exact complex product and arrive 2 cycles after its
// input with its tag.
module tb_phasor_mult;
  import chan_pkg::*;
  import tb_util_pkg::*;
  localparam int AW = 32, YW = AW + PW + 1;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [AW-1:0] a_re = 0, a_im = 0;
  phasor_t p = '0;
  logic [3:0] tag_in = 0, tag_out;
  logic out_valid;
  logic signed [YW-1:0] y_re, y_im;
  int checks = 0, failures = 0;

  phasor_mult #(.AW(AW), .TAGW(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  longint er [$], ei [$];
  int ecyc [$], etag [$];
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (er.size() == 0) failures++;
    else begin
      if (y_re !== er[0] || y_im !== ei[0] || cyc !== ecyc[0] || tag_out !== 4'(etag[0])) begin
        failures++;
        if (failures < 5) $display("got %0d,%0d exp %0d,%0d", y_re, y_im, er[0], ei[0]);
      end
      void'(er.pop_front()); void'(ei.pop_front()); void'(ecyc.pop_front()); void'(etag.pop_front());
    end
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      in_valid = ($urandom % 4) !== 0;
      a_re = AW'(rnd(AW)); a_im = AW'(rnd(AW));
      p = phasor_t'($urandom);
      tag_in = 4'($urandom);
      if (in_valid) begin
        er.push_back(longint'(a_re) * p.re - longint'(a_im) * p.im);
        ei.push_back(longint'(a_re) * p.im + longint'(a_im) * p.re);
        ecyc.push_back(cyc + 2); etag.push_back(tag_in);
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (er.size() !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
