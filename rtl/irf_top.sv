// irf_top: digital model of the low-IF receiver back end with image rejection.
//
// Sampled I/Q from the analog front end (mixers and anti-alias filters, not
// modelled) enter at the 8-MHz system rate.  The complex band-pass
// delta-sigma modulator model turns them into two 1-bit streams whose
// quantization noise is pushed away from the desired band at +1 MHz; the image
// rejection block then shifts, filters, decimates and shifts again, leaving
// the desired channel centred at +500 kHz at a 2-MHz sample rate with the image
// suppressed.
//
// Interface: i_in/q_in are ADC_W-bit two's-complement samples, full scale
// +/-2^(ADC_W-1) (keep the complex amplitude below about 0.7 of it for a
// stable modulator).  dsm_i/dsm_q expose the modulator bits.  out_i/out_q are
// 16-bit, with 4 fraction bits, valid for one clock every 4 clocks on
// out_valid.  Single clock, synchronous active-low reset.
module irf_top
  import irf_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] i_in,
  input  logic signed [ADC_W-1:0] q_in,
  output logic                    dsm_i,
  output logic                    dsm_q,
  output logic signed [LPF_W-1:0] out_i,
  output logic signed [LPF_W-1:0] out_q,
  output logic                    out_valid
);

  dsm_cbp #(.IN_W(ADC_W)) u_dsm (
    .clk, .rst_n, .vin_i(i_in), .vin_q(q_in), .vout_i(dsm_i), .vout_q(dsm_q)
  );

  image_rejection_block u_irb (
    .clk, .rst_n, .dsm_i, .dsm_q, .out_i, .out_q, .out_valid
  );

endmodule
