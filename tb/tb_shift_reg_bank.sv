// tb_shift_reg_bank: checks that only the addressed row shifts on a load,
// and that the read multiplexers return the taps of rd_row as they were
// before the load of the same cycle. Random loads and reads, 3 rows of 10.
module tb_shift_reg_bank;
  import chan_pkg::*;
  localparam int M = 3, L = 10;
  logic clk = 0, rst_n = 0, load_en = 0;
  logic [1:0] load_row = 0, rd_row = 0;
  cdata_t din = '0;
  cdata_t rd_taps [L];
  int checks = 0, failures = 0;
  cdata_t model [M][L];

  shift_reg_bank #(.M(M), .L(L)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #200_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int r = 0; r < M; r++) for (int i = 0; i < L; i++) model[r][i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      load_en  = ($urandom % 4) !== 0;
      load_row = 2'($urandom % M);
      rd_row   = 2'($urandom % M);
      din      = cdata_t'($urandom);
      #1;
      for (int i = 0; i < L; i++) begin
        checks++;
        if (rd_taps[i] !== model[rd_row][i]) begin
          failures++;
          if (failures < 5) $display("t=%0d row %0d tap %0d got %h exp %h", t, rd_row, i, rd_taps[i], model[rd_row][i]);
        end
      end
      @(posedge clk);
      if (load_en) begin
        for (int i = L - 1; i > 0; i--) model[load_row][i] = model[load_row][i-1];
        model[load_row][0] = din;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
