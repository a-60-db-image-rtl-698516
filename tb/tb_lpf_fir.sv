// tb_lpf_fir: checks the decimation low-pass filter.
// 1. Recomputes the Kaiser-windowed-sinc taps (beta 6, fc = Fs/16, 64 taps,
//    round(2^15 h)) in real arithmetic and compares them with the package.
// 2. Checks the impulse response, including its 2-clock latency.
// 3. Drives random full-scale input and compares every output with a
//    convolution computed here.
// 4. Checks the stopband: a 2-MHz full-scale tone (where the image lands) must
//    come out at least 60 dB below a DC input of the same amplitude.
module tb_lpf_fir;
  import irf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [SH_W-1:0]  din = 0;
  logic signed [LPF_W-1:0] dout;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  lpf_fir dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real bessel_i0(real x);
    real s = 1.0, t = 1.0;
    for (int k = 1; k < 40; k++) begin
      t = t * (x / (2.0 * k)) * (x / (2.0 * k));
      s += t;
    end
    return s;
  endfunction

  int hist [NTAPS];

  function automatic int conv();
    longint acc = 0;
    for (int k = 0; k < NTAPS; k++) acc += longint'(hist[k]) * longint'(LPF_COEF[k]);
    return int'(acc >>> (COEF_FRAC - FRAC_KEEP));
  endfunction

  task automatic push(int v);
    for (int k = NTAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
  endtask

  initial begin
    real h [NTAPS];
    real hs, x, r, amp_dc, amp_2m;
    int  q, exp_v;
    // 1. taps
    hs = 0.0;
    for (int n = 0; n < NTAPS; n++) begin
      x = n - (NTAPS - 1) / 2.0;
      r = 2.0 * n / (NTAPS - 1) - 1.0;
      h[n] = bessel_i0(6.0 * $sqrt(1.0 - r * r)) / bessel_i0(6.0);
      h[n] = h[n] * $sin(PI * x / 8.0) / (PI * x / 8.0);
      hs += h[n];
    end
    for (int n = 0; n < NTAPS; n++) begin
      q = $rtoi($floor(32768.0 * h[n] / hs + 0.5));
      checks++;
      if (q != LPF_COEF[n]) begin
        failures++;
        $display("tap %0d: package %0d, formula %0d", n, LPF_COEF[n], q);
      end
    end
    // 2. impulse response
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    din <= 100;
    @(posedge clk);
    din <= 0;                   // din=100 entered the delay line at this edge
    for (int n = 0; n < NTAPS + 4; n++) begin
      @(posedge clk);
      #1;
      exp_v = (n < NTAPS) ? ((100 * LPF_COEF[n]) >>> (COEF_FRAC - FRAC_KEEP)) : 0;
      checks++;
      if (dout != exp_v) begin
        failures++;
        if (failures < 10) $display("impulse n=%0d got %0d exp %0d", n, dout, exp_v);
      end
    end
    // 3. random input against a convolution: after the edge that loads v
    //    into the delay line, the next edge registers conv(line).
    for (int k = 0; k < NTAPS; k++) hist[k] = 0;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      int v;
      v = int'($urandom_range(360)) - 180;
      din <= SH_W'(v);
      @(posedge clk);
      #1;
      if (n > 0) begin
        checks++;
        if (dout != exp_v) begin
          failures++;
          if (failures < 10) $display("random n=%0d got %0d exp %0d", n, dout, exp_v);
        end
      end
      push(v);
      exp_v = conv();
    end
    // 4. stopband at 2 MHz versus DC
    amp_dc = 0.0; amp_2m = 0.0;
    for (int n = 0; n < 400; n++) begin
      din <= SH_W'(180);
      @(posedge clk);
      #1;
      if (n > 100) amp_dc = (dout > amp_dc) ? dout : amp_dc;
    end
    for (int n = 0; n < 400; n++) begin
      din <= SH_W'((n % 4 == 0) ? 180 : (n % 4 == 2) ? -180 : 0);
      @(posedge clk);
      #1;
      if (n > 100) amp_2m = (dout > amp_2m) ? dout : ((-dout > amp_2m) ? -dout : amp_2m);
    end
    checks++;
    $display("DC peak %0.1f, 2 MHz peak %0.1f (%0.1f dB)", amp_dc, amp_2m, 20.0 * $log10((amp_2m + 0.5) / amp_dc));
    if (amp_2m + 0.5 > amp_dc / 1000.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
