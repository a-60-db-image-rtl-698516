// lpf_fir: real low-pass filter of the decimation stage, one per rail.
//
// Direct-form FIR running at the full 8-MHz rate with the irf_pkg::LPF_COEF
// taps.  It removes the image band (near -2 MHz after the 1-MHz shift) and the
// modulator's out-of-band quantization noise, and doubles as the anti-alias
// filter for the following down sampler, so no separate decimation filter is
// needed.  That role is the published one; the FIR form, its length and its
// coefficients are this design's choice.
//
// dout[n+1] = floor( sum_k LPF_COEF[k] * x[n-k] / 2^(COEF_FRAC-FRAC_KEEP) )
// where x[n] is din at clock edge n: the delay line and the output are both
// registered, so an impulse on din reaches dout after 2 clocks (tap 0) and the
// group delay is 33.5 clocks.  FRAC_KEEP extra fraction bits keep the
// quantization of the filtered signal well below the rejected image.
// OUT_W must hold the largest |sum| of the taps times the largest |din|.
module lpf_fir
  import irf_pkg::*;
#(
  parameter int IN_W  = SH_W,
  parameter int OUT_W = LPF_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);

  localparam int ACC_W = IN_W + COEF_W + $clog2(NTAPS);

  logic signed [IN_W-1:0]  dly [NTAPS];
  logic signed [ACC_W-1:0] acc;

  always_comb begin
    acc = '0;
    for (int k = 0; k < NTAPS; k++)
      acc += ACC_W'(dly[k]) * ACC_W'(LPF_COEF[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) dly[k] <= '0;
      dout <= '0;
    end else begin
      dly[0] <= din;
      for (int k = 1; k < NTAPS; k++) dly[k] <= dly[k-1];
      dout <= OUT_W'(acc >>> (COEF_FRAC - FRAC_KEEP));
    end
  end

endmodule
