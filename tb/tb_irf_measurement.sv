// tb_irf_measurement: the two-tone image rejection measurement, end to end.
// A desired tone at +900 kHz and an image tone at +100 kHz, each of amplitude
// 0.3 full scale, are applied together with a DC offset of 0.1 full scale on
// both rails.  The back end shifts everything by -1 MHz + 500 kHz = -500 kHz,
// so the desired tone should come out at +400 kHz and the image, if it were
// not removed, at -400 kHz; the DC offset would sit at -500 kHz.  From a
// 4000-point DFT of the 2-MHz output:
//   desired amplitude 0.3 * 127 * 16 = 610 LSB expected (520 .. 700 accepted)
//   image rejection   A(+400 kHz) / A(-400 kHz) >= 60 dB
//   DC suppression    0.1*sqrt(2)*127*16 / A(-500 kHz) >= 50 dB
module tb_irf_measurement;
  import irf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [ADC_W-1:0] i_in = 0, q_in = 0;
  logic dsm_i, dsm_q, out_valid;
  logic signed [LPF_W-1:0] out_i, out_q;
  int checks = 0, failures = 0;
  localparam int M = 4000;
  localparam int SETTLE = 100;
  localparam real PI = 3.14159265358979;
  real oi [M], oq [M];

  irf_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real mag(int b);
    real re = 0.0, im = 0.0, w;
    for (int n = 0; n < M; n++) begin
      w = -2.0 * PI * b * n / M;
      re += oi[n] * $cos(w) - oq[n] * $sin(w);
      im += oi[n] * $sin(w) + oq[n] * $cos(w);
    end
    return $sqrt(re * re + im * im) / M;
  endfunction

  initial begin
    int k;
    real pd, pm, a_des, a_img, a_dc, irr, dcs;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    k = 0;
    for (int n = 0; k < SETTLE + M; n++) begin
      pd = 2.0 * PI * 0.9 * n / 8.0;
      pm = 2.0 * PI * 0.1 * n / 8.0;
      i_in <= ADC_W'($rtoi($floor(614.0 * ($cos(pd) + $cos(pm)) + 205.0 + 0.5)));
      q_in <= ADC_W'($rtoi($floor(614.0 * ($sin(pd) + $sin(pm)) + 205.0 + 0.5)));
      @(posedge clk);
      #1;
      if (out_valid) begin
        if (k >= SETTLE) begin
          oi[k - SETTLE] = out_i;
          oq[k - SETTLE] = out_q;
        end
        k++;
      end
    end
    a_des = mag(800);          // +400 kHz
    a_img = mag(-800);         // -400 kHz
    a_dc  = mag(-1000);        // -500 kHz
    irr = 20.0 * $log10(a_des / a_img);
    dcs = 20.0 * $log10(0.1 * $sqrt(2.0) * 127.0 * 16.0 / a_dc);
    $display("desired %0.1f LSB, image residue %0.3f LSB (IRR %0.1f dB), DC residue %0.3f LSB (%0.1f dB)",
             a_des, a_img, irr, a_dc, dcs);
    checks++; if (a_des < 520.0 || a_des > 700.0) failures++;
    checks++; if (irr < 60.0) failures++;
    checks++; if (dcs < 50.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
