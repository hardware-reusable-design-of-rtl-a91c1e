// feature_extraction: parameter extraction from the FFT bins of one frame.
//
// Three sub-blocks in a chain: band_energy sums |X[k]|^2 into the frame
// energy and into NB band energies; two natural_log units turn the band
// energies and the frame energy into natural logarithms (10 fraction bits);
// mel_cepstrum computes the NC cepstral coefficients from the log band
// energies. The log frame energy is held until the coefficients are ready,
// then one feature vector {log_e, cep[0..NC-1]} is presented for one cycle
// on out_valid.
//
// Timing: the bins k = 0 .. N/2 arrive one per in_valid cycle, in_last on the
// final bin. out_valid follows the last bin after 3 (band energy) + 3 (log) +
// 2 (cosine transform) + 1 (output register) = 9 cycles when the last band
// closes on the last bin, as it does when the bands reach FS/2.
//
// The division into bands of energy, natural logarithm and mel-cepstrum
// follows the document. Using a second logarithm unit for the frame energy,
// rather than sharing one, is this design's choice.
module feature_extraction
  import mfcc_pkg::*;
#(
  parameter int  N     = 256,
  parameter int  FW    = DATA_W + $clog2(N) + 1,
  parameter int  NB    = 23,
  parameter int  NC    = 13,
  parameter int  SHIFT = $clog2(N),
  parameter real FS    = 8000.0,
  parameter real F_LO  = 64.0,
  parameter bit  TRIANG = 1'b0   // 1: triangular mel filters instead of plain band sums
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [FW-1:0]     in_re,
  input  logic signed [FW-1:0]     in_im,
  input  logic                     in_last,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] log_e,
  output logic signed [31:0]       cep [NC]
);

  localparam int BI = $clog2(NB);

  logic              band_valid, band_last, frame_valid;
  logic [BI-1:0]     band_idx;
  logic [31:0]       band_e, frame_e;
  logic              bln_valid, fln_valid, cep_valid;
  logic [BI-1:0]     bln_tag;
  logic              fln_tag;
  logic signed [DATA_W-1:0] bln, fln;
  logic signed [31:0] cep_w [NC];
  logic              have_e, have_c;

  band_energy #(.N(N), .FW(FW), .NB(NB), .SHIFT(SHIFT), .FS(FS), .F_LO(F_LO),
                .TRIANG(TRIANG)) u_bands (
    .clk, .rst,
    .in_valid, .in_re, .in_im, .in_last,
    .band_valid, .band_idx, .band_e, .band_last,
    .frame_valid, .frame_e
  );

  natural_log #(.XW(32), .TAGW(BI)) u_ln_band (
    .clk, .rst,
    .in_valid(band_valid), .in_x(band_e), .in_tag(band_idx),
    .out_valid(bln_valid), .out_tag(bln_tag), .out_ln(bln)
  );

  natural_log #(.XW(32), .TAGW(1)) u_ln_frame (
    .clk, .rst,
    .in_valid(frame_valid), .in_x(frame_e), .in_tag(1'b0),
    .out_valid(fln_valid), .out_tag(fln_tag), .out_ln(fln)
  );

  mel_cepstrum #(.NB(NB), .NC(NC)) u_mel (
    .clk, .rst,
    .in_valid(bln_valid), .in_ln(bln),
    .out_valid(cep_valid), .cep(cep_w)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      have_e    <= 1'b0;
      have_c    <= 1'b0;
      out_valid <= 1'b0;
      log_e     <= '0;
      for (int i = 0; i < NC; i++) cep[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (fln_valid) begin
        log_e  <= fln;
        have_e <= 1'b1;
      end
      if (cep_valid) begin
        cep    <= cep_w;
        have_c <= 1'b1;
      end
      if ((have_e || fln_valid) && (have_c || cep_valid)) begin
        out_valid <= 1'b1;
        have_e    <= 1'b0;
        have_c    <= 1'b0;
      end
    end
  end

  // the band tag is only a debugging aid on this level
  logic unused;
  assign unused = ^{bln_tag, fln_tag, band_last};

endmodule
