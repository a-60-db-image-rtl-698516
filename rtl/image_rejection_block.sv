// image_rejection_block: the all-digital image rejection path.
//
// 1-bit complex delta-sigma streams at 8 MHz go through the 1-MHz frequency
// shifter (desired band to 0 Hz, image to about -2 MHz), the decimation stage
// (real low-pass filters on I and Q, then 8 MHz -> 2 MHz) and the 500-kHz
// frequency shifter (desired band to about +500 kHz).  What is left is the
// desired channel; the image, the modulator's DC offset and its shaped
// quantization noise have been filtered out.  This chain is the published one.
//
// Interface: one bit pair per clock on dsm_i/dsm_q (1 = +1, 0 = -1).  One output
// pair every 4 clocks, flagged by a one-clock out_valid.
module image_rejection_block
  import irf_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    dsm_i,
  input  logic                    dsm_q,
  output logic signed [LPF_W-1:0] out_i,
  output logic signed [LPF_W-1:0] out_q,
  output logic                    out_valid
);

  logic signed [SH_W-1:0]  sh_i, sh_q;
  logic signed [LPF_W-1:0] dec_i, dec_q;
  logic                    dec_valid;

  fshift_1m u_fshift_1m (
    .clk, .rst_n, .in_i(dsm_i), .in_q(dsm_q), .out_i(sh_i), .out_q(sh_q)
  );

  decimator u_decimator (
    .clk, .rst_n, .in_i(sh_i), .in_q(sh_q),
    .out_i(dec_i), .out_q(dec_q), .out_valid(dec_valid)
  );

  fshift_500k #(.W(LPF_W)) u_fshift_500k (
    .clk, .rst_n, .in_valid(dec_valid), .in_i(dec_i), .in_q(dec_q),
    .out_valid, .out_i, .out_q
  );

endmodule
