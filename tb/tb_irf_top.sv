// tb_irf_top: end-to-end image rejection test of the receiver back end at its
// default sizes.
// Three runs, each starting from reset, feed sampled I/Q into the modulator:
//   A  desired tone  exp(+j 2 pi 1.125 MHz t), amplitude 0.4 full scale
//   B  image tone    exp(-j 2 pi 1.125 MHz t), same amplitude
//   C  desired tone plus a DC offset of 0.2 full scale on both rails
// After 1-MHz shift, filtering, decimation to 2 MHz and +500-kHz shift the
// desired tone must appear at +625 kHz with the expected size
// (0.4 * 127 * 16 = 813 LSB, 700 .. 900 accepted), the image would land at
// +375 kHz and DC at -500 kHz.  Checked from 4096-point DFTs of the output:
//   image rejection ratio  = A(+625 kHz, run A) / A(+375 kHz, run B) >= 60 dB
//   DC offset suppression  = 0.2*sqrt(2)*127*16 / A(-500 kHz, run C) >= 50 dB
// It also checks the 2-MHz output rate (a strobe every 4th clock) and counts
// each mechanism: modulator bits of both values, decimation strobes, all four
// phases of the 500-kHz shifter, image suppression and DC removal.
module tb_irf_top;
  import irf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [ADC_W-1:0] i_in = 0, q_in = 0;
  logic dsm_i, dsm_q, out_valid;
  logic signed [LPF_W-1:0] out_i, out_q;
  int checks = 0, failures = 0;
  localparam int M = 4096;             // output samples per DFT
  localparam int SETTLE = 100;         // output samples skipped after reset
  localparam real PI = 3.14159265358979;
  real oi [M], oq [M];
  int n_strobe = 0, n_bits1 = 0, n_bits0 = 0, n_img = 0, n_dc = 0;
  int phase_seen [4];

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

  // One run: tone at sgn*1.125 MHz (8 MHz rate) plus DC, output captured.
  task automatic run(int sgn, int dc);
    int k, last;
    rst_n <= 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    k = 0; last = -1;
    for (int n = 0; k < SETTLE + M; n++) begin
      i_in <= ADC_W'($rtoi($floor(819.0 * $cos(2.0 * PI * 1.125 * n / 8.0) + 0.5)) + dc);
      q_in <= ADC_W'($rtoi($floor(sgn * 819.0 * $sin(2.0 * PI * 1.125 * n / 8.0) + 0.5)) + dc);
      @(posedge clk);
      #1;
      if (dsm_i) n_bits1++; else n_bits0++;
      if (out_valid) begin
        n_strobe++;
        phase_seen[(dut.u_irb.u_fshift_500k.phase + 2'd3)]++;  // phase used for this sample
        if (last >= 0) begin
          checks++;
          if (n - last != 4) failures++;
        end
        last = n;
        if (k >= SETTLE) begin
          oi[k - SETTLE] = out_i;
          oq[k - SETTLE] = out_q;
        end
        k++;
      end
    end
  endtask

  initial begin
    real a_des, a_img, a_dc, a_des_c, irr, dcs;
    // run A: desired
    run(1, 0);
    a_des = mag(1280);
    // run B: image
    run(-1, 0);
    a_img = mag(768);
    // run C: desired + DC offset
    run(1, 410);
    a_dc    = mag(-1024);
    a_des_c = mag(1280);
    irr = 20.0 * $log10(a_des / a_img);
    dcs = 20.0 * $log10(0.2 * $sqrt(2.0) * 127.0 * 16.0 / a_dc);
    $display("desired %0.1f LSB, image residue %0.3f LSB, IRR %0.1f dB", a_des, a_img, irr);
    $display("with DC: desired %0.1f LSB, DC residue %0.3f LSB, suppression %0.1f dB", a_des_c, a_dc, dcs);
    checks++; if (a_des < 700.0 || a_des > 900.0) failures++;
    checks++; if (a_des_c < 700.0 || a_des_c > 900.0) failures++;
    checks++; if (irr >= 60.0) n_img++; else failures++;
    checks++; if (dcs >= 50.0) n_dc++; else failures++;
    $display("mechanisms: strobes %0d, modulator +1 %0d / -1 %0d, 500k phases %0d %0d %0d %0d, image rejected %0d, DC removed %0d",
             n_strobe, n_bits1, n_bits0, phase_seen[0], phase_seen[1], phase_seen[2], phase_seen[3], n_img, n_dc);
    checks++; if (n_strobe == 0) failures++;
    checks++; if (n_bits1 == 0 || n_bits0 == 0) failures++;
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (phase_seen[p] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
