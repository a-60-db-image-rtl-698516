// dsm_cbp: behavioural model of the second-order complex band-pass
// delta-sigma modulator.
//
// The real modulator is a switched-capacitor circuit; this model reproduces its
// discrete-time loop in fixed point so that the digital back end can be
// simulated from sampled I/Q input.  It is written in synthesizable style but
// stands for an analog block (kind: behavioural model).
//
// Loop (all quantities complex, one update per 8-MHz clock):
//   u      = Vin - DA(Vout)                      input minus 1-bit D/A feedback
//   r1    <= u + POLE1*r1                         resonator 1 (adder, z^-1, POLE1 feedback)
//   r2    <= a*r1 + b*u + POLE2*r2                resonator 2, fed through gain a and the b path
//   Vout   = sign(Re r2) + j*sign(Im r2)          one 1-bit quantizer per rail
// which gives NTF = (1 - POLE1 z^-1)(1 - POLE2 z^-1) / D(z): the resonator poles
// are the NTF zeros.  The loop structure follows the published block diagram.
// The coefficient values are this design's choice: POLE1 = POLE2 =
// exp(j*pi/4) puts both zeros at +1 MHz (the desired band before the 1-MHz
// shift), and a = 0.25j, b = exp(j*pi/4) put both NTF poles at
// 0.5*exp(j*pi/4).  Coefficients are Q2.14 integers, the D/A level is
// +/-2^(IN_W-1), and arithmetic right shifts truncate toward minus infinity.
//
// Interface: vin_i/vin_q are two's-complement samples, taken every clock.
// vout_i/vout_q are 1 for +1 and 0 for -1; they depend only on the state
// registers, so a change of input shows at the output one clock later.
// rst_n (synchronous, active low) clears both resonators.
module dsm_cbp #(
  parameter int IN_W   = 12,
  parameter int ST_W   = 20,
  parameter int CF_W   = 16,
  parameter int CF_FRAC = 14,
  parameter int P1_RE  = 11585, parameter int P1_IM = 11585,
  parameter int P2_RE  = 11585, parameter int P2_IM = 11585,
  parameter int A_RE   = 0,     parameter int A_IM  = 4096,
  parameter int B_RE   = 11585, parameter int B_IM  = 11585
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] vin_i,
  input  logic signed [IN_W-1:0] vin_q,
  output logic                   vout_i,
  output logic                   vout_q
);

  typedef logic signed [ST_W-1:0] st_t;
  localparam int PW = ST_W + CF_W;
  localparam st_t DAC_FS = st_t'(1) <<< (IN_W - 1);

  st_t r1_re, r1_im, r2_re, r2_im;
  st_t u_re, u_im;
  st_t r1_re_n, r1_im_n, r2_re_n, r2_im_n;

  // Real and imaginary parts of (c_re + j c_im) * (x_re + j x_im), scaled by 2^-CF_FRAC.
  function automatic st_t cmul_re(input int c_re, input int c_im, input st_t x_re, input st_t x_im);
    logic signed [PW-1:0] p;
    p = PW'(c_re) * PW'(x_re) - PW'(c_im) * PW'(x_im);
    return st_t'(p >>> CF_FRAC);
  endfunction

  function automatic st_t cmul_im(input int c_re, input int c_im, input st_t x_re, input st_t x_im);
    logic signed [PW-1:0] p;
    p = PW'(c_re) * PW'(x_im) + PW'(c_im) * PW'(x_re);
    return st_t'(p >>> CF_FRAC);
  endfunction

  // 1-bit quantizers.
  assign vout_i = ~r2_re[ST_W-1];
  assign vout_q = ~r2_im[ST_W-1];

  always_comb begin
    // Input minus D/A feedback.
    u_re = st_t'(vin_i) - (vout_i ? DAC_FS : -DAC_FS);
    u_im = st_t'(vin_q) - (vout_q ? DAC_FS : -DAC_FS);
    r1_re_n = u_re + cmul_re(P1_RE, P1_IM, r1_re, r1_im);
    r1_im_n = u_im + cmul_im(P1_RE, P1_IM, r1_re, r1_im);
    r2_re_n = cmul_re(A_RE, A_IM, r1_re, r1_im) + cmul_re(B_RE, B_IM, u_re, u_im)
            + cmul_re(P2_RE, P2_IM, r2_re, r2_im);
    r2_im_n = cmul_im(A_RE, A_IM, r1_re, r1_im) + cmul_im(B_RE, B_IM, u_re, u_im)
            + cmul_im(P2_RE, P2_IM, r2_re, r2_im);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r1_re <= '0; r1_im <= '0;
      r2_re <= '0; r2_im <= '0;
    end else begin
      r1_re <= r1_re_n; r1_im <= r1_im_n;
      r2_re <= r2_re_n; r2_im <= r2_im_n;
    end
  end

endmodule
