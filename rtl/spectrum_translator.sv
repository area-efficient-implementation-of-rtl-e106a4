// spectrum_translator: digital down-conversion (mixer) that shifts the
// decimated band so that its channels sit on multiples of the channel
// spacing around zero.
//
// Sample n is multiplied by exp(j*2*pi*K*n/P). For WLAN (K=2, P=15) this
// is +12 MHz at 90 MHz, moving the channels from -42/-12/+18 MHz to
// -30/0/+30 MHz; for UMTS (K=1, P=28) it is +2.5 MHz at 70 MHz. The P
// local-oscillator phasors are Q1.14 values computed at elaboration and a
// modulo-P counter, advanced per valid sample, addresses them. The complex
// product comes from the two-stage phasor multiplier; it is shifted right by
// 14 and saturated back to 16-bit Q7.8, so out_valid follows in_valid by 2
// cycles. The frequency shifts follow from the channel plan of the document;
// the table-based oscillator and scaling are this design's own.
module spectrum_translator
  import chan_pkg::*;
#(
  parameter int K = 2,
  parameter int P = 15
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  cdata_t din,
  output logic   out_valid,
  output cdata_t dout
);

  typedef logic [2*PW-1:0] lo_t [P];  // {re, im}

  function automatic lo_t make_lo();
    lo_t t;
    real ang;
    int  c, s;
    for (int n = 0; n < P; n++) begin
      ang = 2.0 * 3.14159265358979323846 * real'((K * n) % P) / real'(P);
      c   = $rtoi($floor($cos(ang) * 16384.0 + 0.5));
      s   = $rtoi($floor($sin(ang) * 16384.0 + 0.5));
      if (c > 16383) c = 16383;
      if (s > 16383) s = 16383;
      t[n] = {PW'(c), PW'(s)};
    end
    return t;
  endfunction

  localparam lo_t LO = make_lo();
  localparam int  YW = DW + PW + 1;

  logic [$clog2(P)-1:0] phase;

  always_ff @(posedge clk) begin
    if (!rst_n)        phase <= '0;
    else if (in_valid) phase <= (int'(phase) == P - 1) ? '0 : phase + 1'b1;
  end

  logic                 pm_v;
  logic signed [YW-1:0] y_re, y_im;
  logic                 unused_tag;

  phasor_mult #(.AW(DW), .TAGW(1)) u_mul (
    .clk, .rst_n,
    .in_valid (in_valid),
    .a_re     (din.re),
    .a_im     (din.im),
    .p        (phasor_t'(LO[phase])),
    .tag_in   (1'b0),
    .out_valid(pm_v),
    .y_re     (y_re),
    .y_im     (y_im),
    .tag_out  (unused_tag)
  );

  assign out_valid = pm_v;
  assign dout.re   = sat_data(64'(y_re >>> PFRAC));
  assign dout.im   = sat_data(64'(y_im >>> PFRAC));

endmodule
