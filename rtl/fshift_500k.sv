// fshift_500k: 500-kHz frequency shifter at the 2-MHz output rate.
//
// At 2 MHz a 500-kHz shift is a multiplication by 1, j, -1, -j on successive
// samples, so no table is needed: two routing switches and two sign switches
// do it, driven by the three period-4 control sequences of the published
// circuit, [1 0 1 0] for routing, [1 0 0 1] for the I sign and [1 1 0 0] for
// the Q sign (1 = pass straight / keep sign, 0 = swap I and Q / negate):
//   phase 0: ( I,  Q)   phase 1: (-Q,  I)   phase 2: (-I, -Q)   phase 3: ( Q, -I)
// This moves the desired band from around 0 Hz up to around +500 kHz.
//
// Interface: a sample is taken when in_valid is high; the phase counter
// (cleared by reset) advances once per taken sample.  Outputs are registered,
// with out_valid one clock after in_valid.  Negating the most negative W-bit
// value wraps; the upstream filter never produces it.
module fshift_500k #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  output logic                out_valid,
  output logic signed [W-1:0] out_i,
  output logic signed [W-1:0] out_q
);

  localparam logic [3:0] SEL_SEQ  = 4'b1010;  // routing switches
  localparam logic [3:0] SGNI_SEQ = 4'b1001;  // I sign switch
  localparam logic [3:0] SGNQ_SEQ = 4'b1100;  // Q sign switch

  logic [1:0]          phase;
  logic                sel, sgn_i, sgn_q;
  logic signed [W-1:0] rt_i, rt_q;

  // Sequences are listed first element leftmost: element p is bit 3-p.
  always_comb begin
    sel   = SEL_SEQ[3 - phase];
    sgn_i = SGNI_SEQ[3 - phase];
    sgn_q = SGNQ_SEQ[3 - phase];
    rt_i  = sel ? in_i : in_q;
    rt_q  = sel ? in_q : in_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        phase <= phase + 2'd1;
        out_i <= sgn_i ? rt_i : -rt_i;
        out_q <= sgn_q ? rt_q : -rt_q;
      end
    end
  end

endmodule
