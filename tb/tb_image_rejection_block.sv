// tb_image_rejection_block: random 1-bit I/Q streams through the whole
// digital path, compared sample by sample with a reference computed here:
//   s[n]  = (I + jQ) * exp(-j 2 pi n / 8), the table words recomputed as
//           round(127 cos), round(127 sin)
//   y[k]  = FIR(s) for the sample entered 4 clocks before the strobe
//   out   = y * j^m for the m-th strobe (m = 0, 1, ...)
// With n = 0 the first clock edge out of reset, strobes come on edges 4, 8, ...
module tb_image_rejection_block;
  import irf_pkg::*;
  logic clk = 0, rst_n = 0, dsm_i = 0, dsm_q = 0, out_valid;
  logic signed [LPF_W-1:0] out_i, out_q;
  int checks = 0, failures = 0;
  localparam int N = 4000;
  localparam real PI = 3.14159265358979;
  int si [N], sq [N];
  logic bi [N], bq [N];

  image_rejection_block dut (.*);

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
    int c, s, ii, qq, yi, yq, ei, eq, m;
    int seen [4];
    for (int n = 0; n < N; n++) begin
      bi[n] = 1'($urandom);
      bq[n] = 1'($urandom);
      c = $rtoi($floor(127.0 * $cos(2.0 * PI * (n % 8) / 8.0) + 0.5));
      s = $rtoi($floor(127.0 * $sin(2.0 * PI * (n % 8) / 8.0) + 0.5));
      ii = bi[n] ? 1 : -1;
      qq = bq[n] ? 1 : -1;
      si[n] = ii * c + qq * s;
      sq[n] = qq * c - ii * s;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    m = 0;
    for (int n = 0; n < N; n++) begin
      dsm_i <= bi[n];
      dsm_q <= bq[n];
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != (n % 4 == 0 && n > 0)) failures++;
      if (out_valid) begin
        yi = fir_at(si, n - 4);
        yq = fir_at(sq, n - 4);
        case (m % 4)
          0: begin ei =  yi; eq =  yq; end
          1: begin ei = -yq; eq =  yi; end
          2: begin ei = -yi; eq = -yq; end
          default: begin ei = yq; eq = -yi; end
        endcase
        seen[m % 4]++;
        checks++;
        if (int'(out_i) != ei || int'(out_q) != eq) begin
          failures++;
          if (failures < 10) $display("n=%0d m=%0d got %0d %0d exp %0d %0d", n, m, out_i, out_q, ei, eq);
        end
        m++;
      end
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (seen[p] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
