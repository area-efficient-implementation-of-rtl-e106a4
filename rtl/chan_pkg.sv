// chan_pkg: number formats and shared types of the dual-standard (WLAN/UMTS)
// polyphase channelizer.
//
// Fixed-point formats follow the channelizer's design parameters: complex
// input samples are 16 bits (Q7.8: sign, 7 integer, 8 fraction), filter
// coefficients are real 12 bits (Q0.11), phasors are complex 16 bits (Q1.14)
// and channel outputs are complex 28 bits (Q9.18). Intermediate widths are
// full precision; the rounding and saturation helpers below are this design's
// own choice.
package chan_pkg;

  localparam int DW    = 16;  // data width, Q7.8
  localparam int DFRAC = 8;
  localparam int CW    = 12;  // coefficient width, Q0.11
  localparam int CFRAC = 11;
  localparam int PW    = 16;  // phasor width, Q1.14
  localparam int PFRAC = 14;
  localparam int OW    = 28;  // channel output width, Q9.18
  localparam int OFRAC = 18;

  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [CW-1:0] coef_t;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cdata_t;

  typedef struct packed {
    logic signed [PW-1:0] re;
    logic signed [PW-1:0] im;
  } phasor_t;

  typedef struct packed {
    logic signed [OW-1:0] re;
    logic signed [OW-1:0] im;
  } cout_t;

  // Width of the parallel MAC result for L taps: full-precision product plus
  // one growth bit per adder-tree level.
  function automatic int mac_width(int l);
    return DW + CW + $clog2(l);
  endfunction

  // Saturate a 64-bit signed value to DW bits.
  function automatic data_t sat_data(logic signed [63:0] v);
    if (v > 64'sd32767)       return data_t'(16'sh7fff);
    else if (v < -64'sd32768) return data_t'(16'sh8000);
    else                      return data_t'(v[DW-1:0]);
  endfunction

  // Saturate a 64-bit signed value to OW bits.
  function automatic logic signed [OW-1:0] sat_out(logic signed [63:0] v);
    localparam logic signed [63:0] MAXV = (64'sd1 <<< (OW-1)) - 64'sd1;
    localparam logic signed [63:0] MINV = -(64'sd1 <<< (OW-1));
    if (v > MAXV)      return MAXV[OW-1:0];
    else if (v < MINV) return MINV[OW-1:0];
    else               return v[OW-1:0];
  endfunction

endpackage
