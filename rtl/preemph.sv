// preemph: first-order pre-emphasis filter of the speech samples.
//
// Computes y[n] = s[n] - s[n-1] + s[n-1]/32, i.e. s[n] - (31/32) s[n-1], the
// multiplier-free approximation of the 0.97 pre-emphasis factor. Structure:
// two parallel registers hold s[n] and s[n-1]; the second stage forms the
// difference and the arithmetic right shift by five; the third stage adds them.
// The filtered sample leaves three clock cycles after its input sample was
// accepted (in_valid high at edge t -> out_valid high after edge t+3).
//
// The 31/32 approximation, the register/shift/subtract/add structure and the
// three-cycle latency follow the document. Saturation of the 17-bit result to
// 16 bits and the synchronous active-high reset (which clears s[n-1] to 0, so
// the first sample is filtered against zero) are this design's choices.
//
// Interface: one sample per cycle at most, qualified by in_valid; no
// back-pressure. In the complete front end this block runs on the slow
// sample-side clock (clk2).
module preemph
  import mfcc_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_sample,
  output logic                out_valid,
  output logic signed [W-1:0] out_sample
);

  localparam logic signed [W:0] SAT_MAX = (W+1)'((1 << (W-1)) - 1);
  localparam logic signed [W:0] SAT_MIN = -(W+1)'(1 << (W-1));

  logic signed [W-1:0] s_cur, s_prev;     // stage 1: s[n], s[n-1]
  logic signed [W:0]   diff;              // stage 2: s[n] - s[n-1]
  logic signed [W-1:0] prev_div32;        // stage 2: s[n-1] >>> 5
  logic [2:0]          vld;
  logic signed [W+1:0] sum;

  assign sum = {diff[W], diff} + (W+2)'(prev_div32);

  always_ff @(posedge clk) begin
    if (rst) begin
      s_cur      <= '0;
      s_prev     <= '0;
      diff       <= '0;
      prev_div32 <= '0;
      out_sample <= '0;
      vld        <= '0;
    end else begin
      vld <= {vld[1:0], in_valid};
      if (in_valid) begin
        s_cur  <= in_sample;
        s_prev <= s_cur;
      end
      if (vld[0]) begin
        diff       <= (W+1)'(s_cur) - (W+1)'(s_prev);
        prev_div32 <= s_prev >>> 5;
      end
      if (vld[1]) begin
        if (sum > (W+2)'(SAT_MAX))      out_sample <= SAT_MAX[W-1:0];
        else if (sum < (W+2)'(SAT_MIN)) out_sample <= SAT_MIN[W-1:0];
        else                            out_sample <= sum[W-1:0];
      end
    end
  end

  assign out_valid = vld[2];

endmodule
