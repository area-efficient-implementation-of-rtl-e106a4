// tb_shift_reg_array: checks that a shift-register row holds the most recent
// L samples shifted into it, newest in taps[0], and holds them when not
// enabled. Random shift enables against a queue model.
module tb_shift_reg_array;
  import chan_pkg::*;
  localparam int L = 10;
  logic clk = 0, rst_n = 0, shift_en = 0;
  cdata_t din = '0;
  cdata_t taps [L];
  int checks = 0, failures = 0;
  cdata_t model [L];

  shift_reg_array #(.L(L)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < L; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      shift_en = ($urandom % 3) !== 0;
      din = cdata_t'($urandom);
      @(posedge clk);
      if (shift_en) begin
        for (int i = L - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = din;
      end
      @(negedge clk);
      for (int i = 0; i < L; i++) begin
        checks++;
        if (taps[i] !== model[i]) begin
          failures++;
          if (failures < 5) $display("t=%0d tap %0d got %h exp %h", t, i, taps[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
