// phasor_bank: phasors of the selected channel for the coherent summation.
//
// For channel k the phasor applied to polyphase row r is exp(j*r*k*2*pi/M),
// the form printed for the 3-path WLAN channelizer (exp(j*r*2*pi/3) for
// r = 0, 1, 2), stored as Q1.14. The M base phasors exp(j*n*2*pi/M) are
// computed at elaboration; every cycle the M phasors of the requested channel
// are (re)loaded into a register array, which the datapath reads by row
// without further latency. A channel change therefore takes effect one cycle
// later. Generating the table at elaboration and the register array are this
// design's choices.
module phasor_bank
  import chan_pkg::*;
#(
  parameter int M = 3,
  localparam int RW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] channel,
  input  logic [RW-1:0] row,
  output phasor_t       phasor
);

  typedef logic [2*PW-1:0] table_t [M];  // {re, im}

  function automatic table_t make_table();
    table_t t;
    real    ang;
    int     c, s;
    for (int n = 0; n < M; n++) begin
      ang = 2.0 * 3.14159265358979323846 * real'(n) / real'(M);
      c   = $rtoi($floor($cos(ang) * 16384.0 + 0.5));
      s   = $rtoi($floor($sin(ang) * 16384.0 + 0.5));
      if (c > 16383) c = 16383;
      if (s > 16383) s = 16383;
      t[n] = {PW'(c), PW'(s)};
    end
    return t;
  endfunction

  localparam table_t BASE = make_table();

  phasor_t chan_ph [M];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < M; r++) chan_ph[r] <= phasor_t'(BASE[0]);
    end else begin
      for (int r = 0; r < M; r++) chan_ph[r] <= phasor_t'(BASE[(r * int'(channel)) % M]);
    end
  end

  assign phasor = chan_ph[row];

endmodule
