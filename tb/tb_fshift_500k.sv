// tb_fshift_500k: drives random I/Q with a valid strobe that comes at random
// intervals and checks that the m-th accepted sample leaves multiplied by
// j^m (1, j, -1, -j, ...), one clock after it was accepted, and that nothing
// changes without a strobe.
module tb_fshift_500k;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [15:0] in_i = 0, in_q = 0, out_i, out_q;
  int checks = 0, failures = 0;
  int phase_seen [4];

  fshift_500k #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, xi, xq, ei, eq;
    logic v;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    m = 0;
    for (int n = 0; n < 3000; n++) begin
      v  = ($urandom_range(2) == 0);
      xi = int'($urandom_range(20000)) - 10000;
      xq = int'($urandom_range(20000)) - 10000;
      in_valid <= v;
      in_i <= 16'(xi);
      in_q <= 16'(xq);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != v) failures++;
      if (v) begin
        // (xi + j xq) * j^m
        case (m % 4)
          0: begin ei =  xi; eq =  xq; end
          1: begin ei = -xq; eq =  xi; end
          2: begin ei = -xi; eq = -xq; end
          default: begin ei = xq; eq = -xi; end
        endcase
        phase_seen[m % 4]++;
        checks++;
        if (int'(out_i) != ei || int'(out_q) != eq) begin
          failures++;
          if (failures < 10) $display("m=%0d in %0d %0d out %0d %0d exp %0d %0d", m, xi, xq, out_i, out_q, ei, eq);
        end
        m++;
      end
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (phase_seen[p] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
