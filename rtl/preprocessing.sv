// preprocessing: prepares speech frames for the FFT.
//
// Chain: preemph (pre-emphasis, on the sample clock clk2) -> frame_overlap
// (two-clock frame memory, written on clk2, read on clk1) -> hamming_window
// (window multiplication and bit-reversed addressing, on clk1). The result is
// a stream of writes (wr_en, wr_addr, wr_data) that fills the FFT's working
// memory with one windowed frame in bit-reversed order, closed by a
// frame_done pulse that is meant to start the transform.
//
// A new frame is read only while fft_ready is high and no earlier frame is
// still travelling through the window pipeline; frames that cannot start
// wait in the frame memory (overrun flags the loss of one). Every N/2 input
// samples produce one frame of N windowed samples, written on N consecutive
// clk1 cycles.
//
// The sub-blocks and their order follow the document; the gating of frame
// reads by the FFT's readiness is this design's choice. clk2 is meant to run
// at half the frequency of clk1.
module preprocessing
  import mfcc_pkg::*;
#(
  parameter int N = 256,
  parameter int W = DATA_W
) (
  input  logic                  clk1,
  input  logic                  clk2,
  input  logic                  rst,
  // speech samples, clk2 domain
  input  logic                  in_valid,
  input  logic signed [W-1:0]   in_sample,
  // to the FFT, clk1 domain
  input  logic                  fft_ready,
  output logic                  wr_en,
  output logic [$clog2(N)-1:0]  wr_addr,
  output logic signed [W-1:0]   wr_data,
  output logic                  frame_done,
  output logic                  overrun
);

  localparam int L = $clog2(N);

  logic                pe_valid;
  logic signed [W-1:0] pe_sample;
  logic                fr_valid, fr_last, frame_active;
  logic signed [W-1:0] fr_sample;
  logic [L-1:0]        fr_idx;

  preemph #(.W(W)) u_preemph (
    .clk(clk2), .rst,
    .in_valid, .in_sample,
    .out_valid(pe_valid), .out_sample(pe_sample)
  );

  frame_overlap #(.N(N), .W(W)) u_overlap (
    .clk_wr(clk2), .rst,
    .in_valid(pe_valid), .in_sample(pe_sample),
    .clk_rd(clk1), .rd_ready(fft_ready && !frame_active),
    .out_valid(fr_valid), .out_sample(fr_sample), .out_idx(fr_idx),
    .out_last(fr_last), .overrun
  );

  hamming_window #(.N(N), .W(W)) u_window (
    .clk(clk1), .rst,
    .in_valid(fr_valid), .in_sample(fr_sample), .in_idx(fr_idx), .in_last(fr_last),
    .wr_en, .wr_addr, .wr_data, .frame_done
  );

  // a frame is in flight from its first read until its last windowed write
  always_ff @(posedge clk1) begin
    if (rst)                          frame_active <= 1'b0;
    else if (frame_done)              frame_active <= 1'b0;
    else if (fr_valid && fr_idx == 0) frame_active <= 1'b1;
  end

endmodule
