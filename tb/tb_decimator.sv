// tb_decimator: random 9-bit I/Q into the decimation stage; every strobed
// output is compared with a convolution of the input history with the filter
// taps, and the strobe must come on every 4th clock.  With x[n] the input
// sampled at clock edge n (n = 0 is the first edge out of reset), the output
// strobed at edge k (k = 3, 7, 11, ...) is the filter output for x[k-2].
module tb_decimator;
  import irf_pkg::*;
  logic clk = 0, rst_n = 0, out_valid;
  logic signed [SH_W-1:0]  in_i = 0, in_q = 0;
  logic signed [LPF_W-1:0] out_i, out_q;
  int checks = 0, failures = 0;
  localparam int N = 4000;
  int xi [N], xq [N];

  decimator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fir_at(ref int x [N], input int last);
    longint acc = 0;
    for (int k = 0; k < NTAPS; k++)
      if (last - k >= 0) acc += longint'(x[last - k]) * longint'(LPF_COEF[k]);
    return int'(acc >>> (COEF_FRAC - FRAC_KEEP));
  endfunction

  initial begin
    int nvalid;
    for (int n = 0; n < N; n++) begin
      xi[n] = int'($urandom_range(360)) - 180;
      xq[n] = int'($urandom_range(360)) - 180;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    nvalid = 0;
    for (int n = 0; n < N; n++) begin
      in_i <= SH_W'(xi[n]);
      in_q <= SH_W'(xq[n]);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != (n % 4 == 3)) failures++;
      if (out_valid) begin
        nvalid++;
        checks++;
        if (int'(out_i) != fir_at(xi, n - 2) || int'(out_q) != fir_at(xq, n - 2)) begin
          failures++;
          if (failures < 10) $display("n=%0d got %0d %0d exp %0d %0d", n, out_i, out_q, fir_at(xi, n-2), fir_at(xq, n-2));
        end
      end
    end
    checks++;
    if (nvalid != N / 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
