// tb_wlan_decoder: checks the WLAN controller sequence against its tables:
// load order R2,R0,R1,R2,R0 (state 0) then R1,R2,R0,R1 (state 1); output
// reads for state 0 on the 6th-8th inputs of a period with sets C4,C2,C0 for
// rows R1,R2,R0, for state 1 on the 1st-3rd inputs of the next period with
// sets C5,C3,C1 for rows R2,R0,R1; first/last flags; no read before the first
// state-1 output exists; and nothing changes on cycles without in_valid.
module tb_wlan_decoder;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic load_en, rd_en, acc_first, acc_last, state;
  logic [1:0] load_row;
  logic [2:0] rd_set;
  int checks = 0, failures = 0;

  wlan_decoder dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // independent tables, indexed by position 0..8 in the period
  int exp_row   [9] = '{2, 0, 1, 2, 0, 1, 2, 0, 1};
  int exp_state [9] = '{0, 0, 0, 0, 0, 1, 1, 1, 1};
  int exp_rd    [9] = '{1, 1, 1, 0, 0, 1, 1, 1, 0};
  int exp_set   [9] = '{5, 3, 1, 0, 0, 4, 2, 0, 0};
  int exp_first [9] = '{1, 0, 0, 0, 0, 1, 0, 0, 0};
  int exp_last  [9] = '{0, 0, 1, 0, 0, 0, 0, 1, 0};

  initial begin
    int n, pos, rdx;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n = 0;
    for (int t = 0; t < 300; t++) begin
      in_valid = ($urandom % 3) !== 0;
      #1;
      pos = n % 9;
      checks++;
      rdx = (exp_rd[pos] == 1 && (pos >= 5 || n >= 9)) ? 1 : 0;
      if (load_en !== in_valid || load_row !== 2'(exp_row[pos]) || state !== exp_state[pos] ||
          rd_en !== (in_valid && rdx == 1) ||
          (rdx == 1 && (rd_set !== 3'(exp_set[pos]) || acc_first !== exp_first[pos] || acc_last !== exp_last[pos]))) begin
        failures++;
        if (failures < 6) $display("n=%0d pos=%0d: row %0d st %0d rd %0b set %0d f %0b l %0b", n, pos, load_row, state, rd_en, rd_set, acc_first, acc_last);
      end
      @(negedge clk);
      if (in_valid) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
