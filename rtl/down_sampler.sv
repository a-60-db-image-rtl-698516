// down_sampler: keeps one sample in DECIM, taking the 8-MHz filtered I/Q
// stream down to 2 MHz.
//
// A modulo-DECIM counter, cleared by reset, counts clocks; when it wraps, the
// current input pair is registered to out_i/out_q and out_valid is raised for
// exactly one clock, so out_valid is high on every DECIM-th clock (the first
// one DECIM clocks after reset) and the outputs hold between strobes.  The
// ratio of 4 follows from the published rates; the sampling phase and the
// strobe are this design's choices.
module down_sampler #(
  parameter int W     = 16,
  parameter int DECIM = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  output logic signed [W-1:0] out_i,
  output logic signed [W-1:0] out_q,
  output logic                out_valid
);

  localparam int CW = (DECIM > 1) ? $clog2(DECIM) : 1;
  logic [CW-1:0] cnt;
  logic          take;

  assign take = (cnt == CW'(DECIM - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_i     <= '0;
      out_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      cnt       <= take ? '0 : cnt + CW'(1);
      out_valid <= take;
      if (take) begin
        out_i <= in_i;
        out_q <= in_q;
      end
    end
  end

endmodule
