// decimator: the decimation stage, two real low-pass filters (I and Q) at
// 8 MHz followed by the down sampler to 2 MHz.
//
// Because the desired band already sits at 0 Hz, identical real filters on the
// two rails suffice: they reject the image and the quantization noise and act
// as the anti-alias filter at the same time.  Output samples arrive with a
// one-clock out_valid strobe every DECIM clocks.  Latency: 2 clocks through a
// filter tap plus up to DECIM clocks to the next strobe.
module decimator
  import irf_pkg::*;
#(
  parameter int IN_W  = SH_W,
  parameter int OUT_W = LPF_W,
  parameter int RATIO = DECIM
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  in_i,
  input  logic signed [IN_W-1:0]  in_q,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q,
  output logic                    out_valid
);

  logic signed [OUT_W-1:0] f_i, f_q;

  lpf_fir #(.IN_W(IN_W), .OUT_W(OUT_W)) u_lpf_i (.clk, .rst_n, .din(in_i), .dout(f_i));
  lpf_fir #(.IN_W(IN_W), .OUT_W(OUT_W)) u_lpf_q (.clk, .rst_n, .din(in_q), .dout(f_q));

  down_sampler #(.W(OUT_W), .DECIM(RATIO)) u_ds (
    .clk, .rst_n,
    .in_i(f_i), .in_q(f_q),
    .out_i, .out_q, .out_valid
  );

endmodule
