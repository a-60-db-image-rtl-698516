// tb_dsm_cbp: spectral check of the complex band-pass delta-sigma model.
// A complex tone exp(+j 2 pi 1.125 MHz t) of amplitude 0.4 full scale is
// applied; over 8192 output samples (+/-1 per rail) a DFT shows:
//   - the tone passes with gain close to 1 (0.3 .. 0.5 measured amplitude),
//   - its mirror at -1.125 MHz is only shaped quantization noise, at least
//     20 dB below the tone (the complex modulator tells positive from
//     negative frequencies; the noise there is large because the NTF zeros
//     sit at +1 MHz only),
//   - noise near the NTF zeros (0.9 .. 1.1 MHz) is at least 20 dB below the
//     noise near -3 MHz (noise shaping),
//   - the bits stay bounded: both values occur on both rails.
module tb_dsm_cbp;
  logic clk = 0, rst_n = 0;
  logic signed [11:0] vin_i = 0, vin_q = 0;
  logic vout_i, vout_q;
  int checks = 0, failures = 0;
  localparam int N = 8192;
  localparam real PI = 3.14159265358979;
  localparam real FS = 8.0e6;
  real yi [N], yq [N];

  dsm_cbp dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // |DFT| / N of the complex sequence at bin b (b may be negative).
  function automatic real mag(int b);
    real re = 0.0, im = 0.0, w;
    for (int n = 0; n < N; n++) begin
      w = -2.0 * PI * b * n / N;
      re += yi[n] * $cos(w) - yq[n] * $sin(w);
      im += yi[n] * $sin(w) + yq[n] * $cos(w);
    end
    return $sqrt(re * re + im * im) / N;
  endfunction

  initial begin
    real a_tone, a_mirror, p_in, p_out, m;
    int b0, ones_i, ones_q;
    b0 = 1152;                       // 1.125 MHz * N / FS
    repeat (3) @(posedge clk);
    rst_n <= 1;
    ones_i = 0; ones_q = 0;
    for (int n = -500; n < N; n++) begin
      vin_i <= 12'($rtoi($floor(819.0 * $cos(2.0 * PI * b0 * n / N) + 0.5)));
      vin_q <= 12'($rtoi($floor(819.0 * $sin(2.0 * PI * b0 * n / N) + 0.5)));
      @(posedge clk);
      #1;
      if (n >= 0) begin
        yi[n] = vout_i ? 1.0 : -1.0;
        yq[n] = vout_q ? 1.0 : -1.0;
        ones_i += vout_i;
        ones_q += vout_q;
      end
    end
    a_tone   = mag(b0);
    a_mirror = mag(-b0);
    p_in = 0.0;
    for (int b = 1126; b <= 1178; b++) if (b < b0 - 2 || b > b0 + 2) begin m = mag(b); p_in += m * m; end
    p_out = 0.0;
    for (int b = -3098; b <= -3046; b++) begin m = mag(b); p_out += m * m; end
    $display("tone %0.3f mirror %0.5f (%0.1f dB) in-band noise %0.2e out-of-band %0.2e (%0.1f dB)",
             a_tone, a_mirror, 20.0 * $log10(a_mirror / a_tone), p_in, p_out, 10.0 * $log10(p_in / p_out));
    checks++; if (a_tone < 0.3 || a_tone > 0.5) failures++;
    checks++; if (a_mirror > a_tone / 10.0) failures++;
    checks++; if (p_in * 100.0 > p_out) failures++;
    checks++; if (ones_i == 0 || ones_i == N || ones_q == 0 || ones_q == N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
