// mfcc_frontend: speech feature extraction core for the client side of an
// ETSI Aurora distributed speech recognition system.
//
// Speech samples (16-bit two's complement) go in; for every frame of N = 256
// samples, advanced by N/2 = 128 samples, one feature vector comes out: the
// natural log of the frame energy and NC = 13 mel cepstral coefficients
// C0 .. C12 computed from NB = 23 mel bands. Three blocks in a chain:
//   preprocessing       pre-emphasis, frame overlapping, Hamming window,
//                       bit-reversal reordering
//   fft_r2dit           radix-2 decimation-in-time FFT
//   feature_extraction  frame and band energies, natural log, cosine transform
// A dual-clock FIFO (bin_fifo) carries the FFT bins into the clock domain of
// the feature-extraction block.
//
// Clocks, as in the document: clk2 takes the input samples (at most one per
// clk2 cycle, and, for the frame memory's sake, never two in a row right
// after a half-frame has filled); clk1, meant to run at twice the frequency
// of clk2 and derived from the same source, clocks the frame read side, the
// window and the FFT; clk clocks feature extraction and may be unrelated to
// the other two. A new frame enters the FFT only when the FIFO has room for
// all N/2+1 of its bins, so a slow clk holds frames back rather than losing
// bins. Output: out_valid for one clk cycle per frame with log_e (10 fraction bits)
// and cep[0..NC-1] (32 bits, 10 fraction bits). overrun pulses when input
// samples arrive faster than frames can be processed and a frame is lost.
// Processing a frame takes about N + N/2*log2(N) + N/2 + 20 clk1 cycles
// (1430 at N = 256), so samples must arrive on average no faster than one
// per 11 clk1 cycles; clk must in that time take the N/2+1 bins of a frame
// (129 clk cycles plus a few for synchronization at N = 256).
module mfcc_frontend
  import mfcc_pkg::*;
#(
  parameter int  N     = 256,
  parameter int  NB    = 23,
  parameter int  NC    = 13,
  parameter int  W     = DATA_W,
  parameter int  FW    = W + $clog2(N) + 1,
  parameter int  SHIFT = $clog2(N),
  parameter real FS    = 8000.0,
  parameter real F_LO  = 64.0,
  parameter bit  TRIANG = 1'b0   // 1: triangular mel filters instead of plain band sums
) (
  input  logic                     clk1,
  input  logic                     clk2,
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [W-1:0]      in_sample,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] log_e,
  output logic signed [31:0]       cep [NC],
  output logic                     overrun
);

  localparam int L  = $clog2(N);
  localparam int DW = 2 * FW + 1;

  logic                 fft_idle, fifo_room;
  logic [L:0]           fifo_space;
  logic                 f_valid, f_last;
  logic signed [FW-1:0] f_re, f_im;

  logic                 fft_ready, ld_en, frame_done;
  logic [L-1:0]         ld_addr;
  logic signed [W-1:0]  ld_data;
  logic                 bin_valid, bin_last;
  logic [L-1:0]         bin_k;
  logic signed [FW-1:0] bin_re, bin_im;

  preprocessing #(.N(N), .W(W)) u_pre (
    .clk1, .clk2, .rst,
    .in_valid, .in_sample,
    .fft_ready(fft_ready),
    .wr_en(ld_en), .wr_addr(ld_addr), .wr_data(ld_data),
    .frame_done, .overrun
  );

  fft_r2dit #(.N(N), .W(W), .FW(FW)) u_fft (
    .clk(clk1), .rst,
    .ld_en, .ld_addr, .ld_data,
    .start(frame_done), .ready(fft_idle),
    .out_valid(bin_valid), .out_k(bin_k), .out_re(bin_re), .out_im(bin_im),
    .out_last(bin_last)
  );

  // a frame may start only if all of its bins will fit into the FIFO
  assign fifo_room = fifo_space >= (L+1)'(N/2 + 1);
  assign fft_ready = fft_idle && fifo_room;

  bin_fifo #(.DW(DW), .DEPTH(N)) u_fifo (
    .clk_wr(clk1), .rst,
    .wr_en(bin_valid), .wr_data({bin_last, bin_re, bin_im}), .wr_space(fifo_space),
    .clk_rd(clk), .rd_valid(f_valid), .rd_data({f_last, f_re, f_im})
  );

  feature_extraction #(.N(N), .FW(FW), .NB(NB), .NC(NC), .SHIFT(SHIFT),
                       .FS(FS), .F_LO(F_LO), .TRIANG(TRIANG)) u_feat (
    .clk, .rst,
    .in_valid(f_valid), .in_re(f_re), .in_im(f_im), .in_last(f_last),
    .out_valid, .log_e, .cep
  );

  logic unused;
  assign unused = ^bin_k;

endmodule
