// fshift_1m: 1-MHz frequency shifter fed by the delta-sigma bit streams.
//
// Multiplies the complex 1-bit stream (I + jQ, each bit meaning +1 or -1) by
// exp(-j*2*pi*n/8), i.e. shifts the spectrum down by Fs/8 = 1 MHz so that the
// desired band, which the modulator delivers around +1 MHz, is centred at 0 Hz
// and the image moves to about -2 MHz.  As in the published circuit there are
// no multipliers: a 3-bit phase counter addresses an 8-entry sine table and an
// 8-entry cosine table, each table word also exists negated, and four switches
// controlled by the I and Q bits pick the positive or negated word.  Two adders
// then form
//   I_out = I*cos + Q*sin,   Q_out = Q*cos - I*sin.
// The table/switch structure follows the published diagram; the sign
// assignment (which gives a downward shift), the table word width and the
// output register are this design's choices.
//
// Interface: one bit pair per clock on in_i/in_q (1 = +1, 0 = -1); out_i/out_q
// are SH_W-bit two's-complement values, registered: the result for the input
// of cycle n appears after clock edge n.  rst_n (synchronous, active low)
// restarts the phase at 0 and clears the outputs.
module fshift_1m
  import irf_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_i,
  input  logic                   in_q,
  output logic signed [SH_W-1:0] out_i,
  output logic signed [SH_W-1:0] out_q
);

  typedef logic signed [SH_W-1:0] sh_t;

  logic [2:0] phase;
  sh_t cos_w, sin_w;
  sh_t sw_ic, sw_qs, sw_qc, sw_is;  // the four switch outputs

  always_comb begin
    cos_w = sh_t'(COS_LUT[phase]);
    sin_w = sh_t'(SIN_LUT[phase]);
    sw_ic = in_i ? cos_w : -cos_w;   //  I*cos
    sw_qs = in_q ? sin_w : -sin_w;   //  Q*sin
    sw_qc = in_q ? cos_w : -cos_w;   //  Q*cos
    sw_is = in_i ? -sin_w : sin_w;   // -I*sin
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      out_i <= '0;
      out_q <= '0;
    end else begin
      phase <= phase + 3'd1;
      out_i <= sw_ic + sw_qs;
      out_q <= sw_qc + sw_is;
    end
  end

endmodule
