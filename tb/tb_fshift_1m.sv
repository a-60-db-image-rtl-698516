// tb_fshift_1m: checks the 1-MHz frequency shifter against
//   I_out = I*c + Q*s,  Q_out = Q*c - I*s,  c = round(127 cos(2 pi k/8)), s = round(127 sin(2 pi k/8))
// with k the number of clocks since reset and I, Q = +/-1 from random bits.
// The table values are recomputed here from $cos/$sin.  The output for the
// input of cycle k is checked one clock later.
module tb_fshift_1m;
  import irf_pkg::*;
  logic clk = 0, rst_n = 0, in_i = 0, in_q = 0;
  logic signed [SH_W-1:0] out_i, out_q;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  fshift_1m dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, c, s, ei, eq, bi, bq;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (k = 0; k < 2000; k++) begin
      in_i <= 1'($urandom);
      in_q <= 1'($urandom);
      @(posedge clk);
      #1;
      c  = $rtoi($floor(127.0 * $cos(2.0 * PI * (k % 8) / 8.0) + 0.5));
      s  = $rtoi($floor(127.0 * $sin(2.0 * PI * (k % 8) / 8.0) + 0.5));
      bi = in_i ? 1 : -1;
      bq = in_q ? 1 : -1;
      ei = bi * c + bq * s;
      eq = bq * c - bi * s;
      checks++;
      if (out_i != ei || out_q != eq) begin
        failures++;
        if (failures < 10) $display("k=%0d I=%0d Q=%0d got %0d %0d exp %0d %0d", k, bi, bq, out_i, out_q, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
