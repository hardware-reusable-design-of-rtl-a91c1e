// natural_log: natural logarithm of an energy value via Mitchell's log2.
//
// ln is obtained from log2 as ln = (log2 * 11357) / 2^14 + OFFSET, since
// 11357 / 2^14 ~ ln(2). The multiplication by the constant 11357 is a sum of
// shifted copies, 11357 = 2^13 + 2^11 + 2^10 + 2^6 + 2^4 + 2^3 + 2^2 + 2^0,
// so no multiplier is used. Data flow (three pipeline stages):
//   1. log2_mitchell gives log2(x) with 10 fraction bits (16 bits);
//   2. upscale_32: sign extension to 32 bits, then shifter_log: the sum of
//      the eight shifted copies;
//   3. arithmetic right shift by 14 and addition of the correction OFFSET
//      (8617), which compensates the scalings applied earlier in the chain.
// The result is 16-bit two's complement with 10 fraction bits. in_valid at
// edge t -> out_valid at edge t+3; in_tag travels along with the value.
//
// Everything above, including the constants, follows the document; the
// pipeline registers, the tag and the output width are this design's.
module natural_log
  import mfcc_pkg::*;
#(
  parameter int XW     = 32,     // input width
  parameter int TAGW   = 5,      // width of the side-band tag
  parameter int OFFSET = 8617    // correction added after the shift
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [XW-1:0]     in_x,
  input  logic [TAGW-1:0]   in_tag,
  output logic              out_valid,
  output logic [TAGW-1:0]   out_tag,
  output logic signed [DATA_W-1:0] out_ln
);

  localparam int LW = $clog2(XW) + Q_SHIFT;

  logic [LW-1:0]       l2;
  logic [DATA_W-1:0]   l2_q;
  logic signed [31:0]  up32, shl_sum, shl_q;
  logic [TAGW-1:0]     tag1, tag2;
  logic                v1, v2;

  log2_mitchell #(.XW(XW), .FRAC(Q_SHIFT)) u_log2 (.z(in_x), .y(l2));

  // upscale_32 and shifter_log
  assign up32    = 32'(signed'(l2_q));
  assign shl_sum = (up32 <<< 13) + (up32 <<< 11) + (up32 <<< 10) + (up32 <<< 6)
                 + (up32 <<< 4)  + (up32 <<< 3)  + (up32 <<< 2)  + up32;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      l2_q <= '0; shl_q <= '0; out_ln <= '0;
      tag1 <= '0; tag2 <= '0; out_tag <= '0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      out_valid <= v2;
      if (in_valid) begin
        l2_q <= DATA_W'(l2);
        tag1 <= in_tag;
      end
      if (v1) begin
        shl_q <= shl_sum;
        tag2  <= tag1;
      end
      if (v2) begin
        out_ln  <= DATA_W'((shl_q >>> 14) + 32'(OFFSET));
        out_tag <= tag2;
      end
    end
  end

endmodule
