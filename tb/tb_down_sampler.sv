// tb_down_sampler: drives a sample counter (I) and its negation (Q) into the
// down sampler and checks that out_valid is high on exactly every 4th clock,
// that the pair taken is the one present on the clock when the strobe is
// produced, and that the outputs hold between strobes.
module tb_down_sampler;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] in_i = 0, in_q = 0, out_i, out_q;
  logic out_valid;
  int checks = 0, failures = 0;

  down_sampler #(.W(16), .DECIM(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_valid, nvalid;
    logic signed [15:0] held_i, held_q;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    last_valid = -1;
    nvalid = 0;
    held_i = 0; held_q = 0;
    for (int n = 0; n < 2000; n++) begin
      in_i <= 16'(n);
      in_q <= -16'(n);
      @(posedge clk);
      #1;
      // Input n was sampled at this edge; the strobe marks edges 3, 7, 11, ...
      checks++;
      if (out_valid != (n % 4 == 3)) begin
        failures++;
        if (failures < 10) $display("n=%0d valid=%0b", n, out_valid);
      end
      if (out_valid) begin
        checks++;
        if (out_i != 16'(n) || out_q != -16'(n)) failures++;
        if (last_valid >= 0) begin
          checks++;
          if (n - last_valid != 4) failures++;
        end
        last_valid = n;
        nvalid++;
        held_i = out_i; held_q = out_q;
      end else if (n > 3) begin
        checks++;
        if (out_i != held_i || out_q != held_q) failures++;
      end
    end
    checks++;
    if (nvalid != 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
