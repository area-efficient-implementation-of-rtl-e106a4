// wlan_decoder: state-machine controller of the 3-path WLAN channelizer with
// embedded 9/2 resampling.
//
// Nine input samples form one period of two states: state 0 takes 5 samples
// and loads rows R2, R0, R1, R2, R0; state 1 takes 4 samples and loads R1,
// R2, R0, R1 (a constant step of -2 modulo 3). At the end of each state one
// output is due, using coefficient sets C0/C4/C2 (state 0) or C3/C1/C5
// (state 1) for rows R0/R1/R2. The three row reads of an output are issued
// during the first three loads of the following state, each on the row that
// is about to shift, so they see the contents at the end of the state.
// All outputs are combinational functions of a position counter and
// in_valid; the counter advances on in_valid. The load order and set tables
// follow the document; the read scheduling and the suppression of the first
// state-1 output after reset are this design's choices.
module wlan_decoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       load_en,
  output logic [1:0] load_row,
  output logic       rd_en,
  output logic [2:0] rd_set,
  output logic       acc_first,
  output logic       acc_last,
  output logic       state
);

  typedef logic [1:0] row_t;
  typedef logic [2:0] set_t;

  // Position in the 9-sample period -> row loaded (R2,R0,R1,R2,R0 | R1,R2,R0,R1).
  localparam row_t LOAD_SEQ [9] = '{2'd2, 2'd0, 2'd1, 2'd2, 2'd0, 2'd1, 2'd2, 2'd0, 2'd1};
  // [state][row] -> coefficient set.
  localparam set_t SET_TAB [2][3] = '{'{3'd0, 3'd4, 3'd2}, '{3'd3, 3'd1, 3'd5}};

  logic [3:0] pos;      // 0..8
  logic       primed;   // a full state-1 history exists

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos    <= '0;
      primed <= 1'b0;
    end else if (in_valid) begin
      pos <= (pos == 4'd8) ? 4'd0 : pos + 4'd1;
      if (pos == 4'd8) primed <= 1'b1;
    end
  end

  always_comb begin
    state     = (pos >= 4'd5);
    load_en   = in_valid;
    load_row  = LOAD_SEQ[pos];
    rd_en     = 1'b0;
    rd_set    = '0;
    acc_first = 1'b0;
    acc_last  = 1'b0;
    if (pos >= 4'd5 && pos <= 4'd7) begin
      // output of state 0, read during the first three loads of state 1
      rd_en     = in_valid;
      rd_set    = SET_TAB[0][load_row];
      acc_first = (pos == 4'd5);
      acc_last  = (pos == 4'd7);
    end else if (pos <= 4'd2) begin
      // output of state 1, read during the first three loads of state 0
      rd_en     = in_valid && primed;
      rd_set    = SET_TAB[1][load_row];
      acc_first = (pos == 4'd0);
      acc_last  = (pos == 4'd2);
    end
  end

endmodule
