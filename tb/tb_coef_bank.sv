// tb_coef_bank: writes random coefficients to all 6 x 10 addresses in random
// order, then reads every set and compares with the written values; also
// checks that a write only touches its own address and that reset clears.
module tb_coef_bank;
  import chan_pkg::*;
  localparam int NSETS = 6, L = 10;
  logic clk = 0, rst_n = 0, coef_we = 0;
  logic [5:0] coef_addr = 0;
  coef_t coef_data = 0;
  logic [2:0] rd_set = 0;
  coef_t rd_coefs [L];
  int checks = 0, failures = 0;
  coef_t model [NSETS*L];

  coef_bank #(.NSETS(NSETS), .L(L)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check_all();
    for (int s = 0; s < NSETS; s++) begin
      rd_set = 3'(s); #1;
      for (int t = 0; t < L; t++) begin
        checks++;
        if (rd_coefs[t] !== model[s*L+t]) begin
          failures++;
          if (failures < 5) $display("set %0d tap %0d got %h exp %h", s, t, rd_coefs[t], model[s*L+t]);
        end
      end
    end
  endtask
  initial begin
    for (int i = 0; i < NSETS*L; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      coef_we = 1; coef_addr = 6'($urandom % (NSETS*L)); coef_data = coef_t'($urandom);
      model[coef_addr] = coef_data;
    end
    @(negedge clk); coef_we = 0;
    check_all();
    rst_n = 0; @(posedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < NSETS*L; i++) model[i] = '0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
