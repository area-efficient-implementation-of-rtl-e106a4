// arb_resampler: arbitrary polyphase interpolator that takes the 5 MHz UMTS
// channel to the 61.44 MHz target rate.
//
// The prototype filter is designed at 16 x 5 = 80 MHz and split into NPH = 16
// sub-filters of L = 11 taps (set p holds h[p+16i]). Because all sub-filters
// see the same input, one filter with a switchable coefficient set is used:
// for each output the set index advances by 16/12.288 = 1.302083 = 125/96
// modulo 16. The index is kept exactly in a phase accumulator counted in
// 1/96 of a sub-filter; its integer part selects the set. When the
// accumulator passes 16 the next input sample is needed, so every input
// produces 12 or 13 outputs (12.288 on average).
// Timing: in_ready is high while idle; an accepted sample is shifted into
// the 11-tap delay line and, from the next cycle on, one output operation per
// cycle is issued to the parallel MAC until the index wraps; each output
// appears on dout 6 cycles after its issue (5 MAC stages, 1 output register). The MAC sum (Q.19) is shifted right
// by 1 and saturated to 28-bit Q9.18. Sub-filter count, length and step
// follow the document; the handshake, exact 125/96 step and scaling are this
// design's own choices.
module arb_resampler
  import chan_pkg::*;
#(
  parameter int NPH  = 16,
  parameter int L    = 11,
  parameter int STEP = 125,
  parameter int DEN  = 96,
  localparam int CAW = $clog2(NPH * L),
  localparam int PHW = $clog2(NPH * DEN + STEP + 1),
  localparam int AW  = DW + CW + $clog2(L)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  cdata_t         din,
  input  logic           coef_we,
  input  logic [CAW-1:0] coef_addr,
  input  coef_t          coef_data,
  output logic           out_valid,
  output cout_t          dout
);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t         state;
  logic [PHW-1:0] phase;       // in units of 1/DEN sub-filter
  logic [PHW-1:0] phase_next;
  logic           wrap;

  assign phase_next = phase + PHW'(STEP);
  assign wrap       = (int'(phase_next) >= NPH * DEN);
  assign in_ready   = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      phase <= '0;
    end else begin
      case (state)
        S_IDLE: if (in_valid) state <= S_RUN;
        S_RUN: begin
          if (wrap) begin
            phase <= phase_next - PHW'(NPH * DEN);
            state <= S_IDLE;
          end else begin
            phase <= phase_next;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Input delay line (taps[0] newest).
  cdata_t taps [L];

  shift_reg_array #(.L(L)) u_line (
    .clk, .rst_n,
    .shift_en(in_valid && in_ready),
    .din     (din),
    .taps    (taps)
  );

  coef_t coefs [L];
  logic [$clog2(NPH)-1:0] set_idx;

  assign set_idx = $clog2(NPH)'(int'(phase) / DEN);

  coef_bank #(.NSETS(NPH), .L(L)) u_coef (
    .clk, .rst_n,
    .coef_we, .coef_addr, .coef_data,
    .rd_set  (set_idx),
    .rd_coefs(coefs)
  );

  logic                 mac_v;
  logic signed [AW-1:0] mac_re, mac_im;
  logic                 unused_tag;

  parallel_mac #(.L(L), .TAGW(1)) u_mac (
    .clk, .rst_n,
    .in_valid (state == S_RUN),
    .taps     (taps),
    .coefs    (coefs),
    .tag_in   (1'b0),
    .out_valid(mac_v),
    .out_re   (mac_re),
    .out_im   (mac_im),
    .tag_out  (unused_tag)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= mac_v;
      if (mac_v) begin
        dout.re <= sat_out(64'(mac_re >>> (DFRAC + CFRAC - OFRAC)));
        dout.im <= sat_out(64'(mac_im >>> (DFRAC + CFRAC - OFRAC)));
      end
    end
  end

endmodule
