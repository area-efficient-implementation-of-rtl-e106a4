// tb_umts_decoder: checks the UMTS controller: rows loaded R13 down to R0,
// coefficient set equal to the row, first flag on R13 and last on R0, reads
// only after the first 14 inputs, and no progress on cycles without in_valid.
module tb_umts_decoder;
  localparam int M = 14;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic load_en, rd_en, acc_first, acc_last;
  logic [3:0] load_row, rd_set;
  int checks = 0, failures = 0;

  umts_decoder #(.M(M)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n, pos;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n = 0;
    for (int t = 0; t < 300; t++) begin
      in_valid = ($urandom % 4) !== 0;
      #1;
      pos = n % M;
      checks++;
      if (load_en !== in_valid || int'(load_row) !== 13 - pos || rd_set !== load_row ||
          rd_en !== (in_valid && n >= M) || acc_first !== (pos == 0) || acc_last !== (pos == 13)) begin
        failures++;
        if (failures < 6) $display("n=%0d: row %0d set %0d rd %0b f %0b l %0b", n, load_row, rd_set, rd_en, acc_first, acc_last);
      end
      @(negedge clk);
      if (in_valid) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
