// band_energy: frame energy and mel band energies from the FFT output.
//
// The FFT bins of one frame arrive in order k = 0 .. N/2, one per valid cycle.
// A right shifter scales each bin down by SHIFT bits to the 16-bit data format
// (saturating), a squarer forms |X[k]|^2 = re^2 + im^2, and two accumulators
// then run in parallel: one sums every bin into the frame energy, the other
// sums the bins of the current band. A bin counter is compared with a ROM that
// holds the accumulation limits: bins below the first limit belong to no band;
// band b ends at the bin held in ROM entry b+1, at which point its energy is
// output and the band accumulator restarts for band b+1. Band limits are the
// FFT bins nearest to NB+1 edges equally spaced on the mel scale between F_LO
// and FS/2, so the bands are narrow at low and wide at high frequencies.
//
// With TRIANG = 1 the bands are overlapping triangular filters instead: the
// limit ROM holds NB+2 edges (band b rises from edge b to b+1 and falls to
// b+2), a weight ROM gives each bin its rising-slope weight w (Q10), and a
// multiplier splits the bin's power into w*p for the rising band and p - w*p
// for the falling one, kept in two band accumulators. At the last bin before
// an edge the falling band is output and the rising one takes its place.
//
// Timing: shift and square take one cycle each; a band energy (band_valid)
// or the frame energy (frame_valid, with the last bin) appears three cycles
// after the bin that closes it. Accumulators saturate at 2^32-1.
//
// Shifter, squarer, counter, limit ROM and the two parallel accumulators
// follow the document. The document does not give the number of bands or the
// band limits: NB = 23 and the 64 Hz .. FS/2 mel spacing at FS = 8 kHz are
// taken from the ETSI Aurora front end this design targets. By default each
// band is a plain sum of its bins (non-overlapping, unweighted), which is what
// an accumulator with accumulation limits computes. The document also names
// overlapping triangular filters but shows no hardware for them; the TRIANG
// structure (weight ROM, multiplier, second accumulator) is this design's.
// The shift amount, saturation and output widths are this design's choices.
module band_energy
  import mfcc_pkg::*;
#(
  parameter int  N     = 256,
  parameter int  FW    = DATA_W + $clog2(N) + 1,  // FFT output word width
  parameter int  NB    = 23,                      // number of energy bands
  parameter int  SHIFT = $clog2(N),               // shifter_right amount
  parameter real FS    = 8000.0,                  // sample rate (Hz)
  parameter real F_LO  = 64.0,                    // lower edge of band 0 (Hz)
  parameter bit  TRIANG = 1'b0                    // 1: overlapping triangular filters
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [FW-1:0]    in_re,
  input  logic signed [FW-1:0]    in_im,
  input  logic                    in_last,
  output logic                    band_valid,
  output logic [$clog2(NB)-1:0]   band_idx,
  output logic [31:0]             band_e,
  output logic                    band_last,
  output logic                    frame_valid,
  output logic [31:0]             frame_e
);

  localparam int L  = $clog2(N);
  localparam int BI = $clog2(NB);
  localparam logic signed [FW-1:0] SMAX = FW'((1 << (DATA_W - 1)) - 1);
  localparam logic signed [FW-1:0] SMIN = -FW'(1 << (DATA_W - 1));

  function automatic sample_t sat16(logic signed [FW-1:0] v);
    logic signed [FW-1:0] s = v >>> SHIFT;
    if (s > SMAX) return SMAX[DATA_W-1:0];
    if (s < SMIN) return SMIN[DATA_W-1:0];
    return s[DATA_W-1:0];
  endfunction

  function automatic logic [31:0] sat_add(logic [31:0] a, logic [31:0] b);
    logic [32:0] s = {1'b0, a} + {1'b0, b};
    return s[32] ? '1 : s[31:0];
  endfunction

  // stage 1: shifter_right
  sample_t nr, ni;
  logic    v1, last1;
  // stage 2: squarer
  logic [31:0] pw;
  logic        v2, last2;
  logic signed [2*DATA_W-1:0] sq_r, sq_i;
  assign sq_r = nr * nr;
  assign sq_i = ni * ni;
  // stage 3: bin counter, frame accumulator and band accumulators
  logic [L:0]  bin;
  logic [31:0] facc;

  always_ff @(posedge clk) begin
    if (rst) begin
      nr <= '0; ni <= '0; v1 <= 1'b0; last1 <= 1'b0;
      pw <= '0; v2 <= 1'b0; last2 <= 1'b0;
      bin <= '0; facc <= '0;
      frame_valid <= 1'b0; frame_e <= '0;
    end else begin
      v1    <= in_valid;
      last1 <= in_valid && in_last;
      if (in_valid) begin
        nr <= sat16(in_re);
        ni <= sat16(in_im);
      end
      v2    <= v1;
      last2 <= v1 && last1;
      if (v1) pw <= 32'(unsigned'(sq_r)) + 32'(unsigned'(sq_i));

      frame_valid <= 1'b0;
      if (v2) begin
        bin <= bin + 1'b1;
        if (last2) begin
          frame_valid <= 1'b1;
          frame_e     <= sat_add(facc, pw);
          facc        <= '0;
          bin         <= '0;
        end else begin
          facc <= sat_add(facc, pw);
        end
      end
    end
  end

  if (!TRIANG) begin : g_rect
    // limit ROM: entry 0 = first bin of band 0, entry b+1 = last bin of band b
    logic [L-1:0] lim_rom [NB+1];
    initial begin
      for (int e = 0; e <= NB; e++) lim_rom[e] = L'(mel_edge_bin(e, NB, N, FS, F_LO));
      // an empty band would never close: N is too small for NB bands
      for (int e = 0; e < NB; e++)
        assert (lim_rom[e+1] > lim_rom[e])
          else $error("band %0d has no FFT bin; increase N or reduce NB", e);
    end

    logic [BI:0]  band;
    logic [31:0]  bacc;
    logic         in_band;
    logic [L-1:0] band_end;

    assign band_end = lim_rom[$clog2(NB+1)'(band + 1'b1)];
    assign in_band  = (int'(band) < NB) && (bin >= (L+1)'(lim_rom[0]));

    always_ff @(posedge clk) begin
      if (rst) begin
        band <= '0; bacc <= '0;
        band_valid <= 1'b0; band_idx <= '0; band_e <= '0; band_last <= 1'b0;
      end else begin
        band_valid <= 1'b0;
        band_last  <= 1'b0;
        if (v2) begin
          if (in_band) begin
            if (bin[L-1:0] == band_end) begin
              band_valid <= 1'b1;
              band_idx   <= BI'(band);
              band_e     <= sat_add(bacc, pw);
              band_last  <= (int'(band) == NB - 1);
              bacc       <= '0;
              band       <= band + 1'b1;
            end else begin
              bacc <= sat_add(bacc, pw);
            end
          end
          if (last2) begin
            band <= '0;
            bacc <= '0;
          end
        end
      end
    end
  end else begin : g_tri
    // edge ROM: NB+2 mel-spaced edges; band b rises from edge b to edge b+1
    // and falls from edge b+1 to edge b+2. Weight ROM: rising-slope weight
    // of every bin, Q_SHIFT fraction bits; the falling weight is its
    // complement, so each bin's power is split, not duplicated.
    localparam int EI = $clog2(NB + 2);
    logic [L-1:0]     edge_rom [NB+2];
    logic [Q_SHIFT:0] w_rom [N/2+1];
    initial begin
      for (int e = 0; e <= NB + 1; e++) edge_rom[e] = L'(mel_edge_bin(e, NB + 1, N, FS, F_LO));
      for (int k = 0; k <= N / 2; k++) w_rom[k] = (Q_SHIFT+1)'(tri_weight(k, NB, N, FS, F_LO));
      for (int e = 0; e <= NB; e++)
        assert (edge_rom[e+1] > edge_rom[e])
          else $error("filter edge %0d repeats; increase N or reduce NB", e);
    end

    logic [EI-1:0]       seg;       // edge segment of the current bin
    logic [31:0]         racc;      // rising half of band seg
    logic [31:0]         fall;      // band seg-1: rising half plus falling so far
    logic [31+Q_SHIFT:0] prod;      // weight < 1.0, so no overflow
    logic [31:0]         rp, fp;
    logic                in_seg;
    logic [L-1:0]        seg_end;

    assign prod    = (32+Q_SHIFT)'(pw * w_rom[L'(bin)]);
    assign rp      = 32'(prod >> Q_SHIFT);
    assign fp      = pw - rp;
    assign seg_end = edge_rom[EI'(seg + 1'b1)] - 1'b1;
    assign in_seg  = (int'(seg) <= NB) && (bin >= (L+1)'(edge_rom[0]));

    always_ff @(posedge clk) begin
      if (rst) begin
        seg <= '0; racc <= '0; fall <= '0;
        band_valid <= 1'b0; band_idx <= '0; band_e <= '0; band_last <= 1'b0;
      end else begin
        band_valid <= 1'b0;
        band_last  <= 1'b0;
        if (v2) begin
          if (in_seg) begin
            if (bin[L-1:0] == seg_end) begin
              if (seg != '0) begin
                band_valid <= 1'b1;
                band_idx   <= BI'(seg - 1'b1);
                band_e     <= sat_add(fall, fp);
                band_last  <= (int'(seg) == NB);
              end
              fall <= sat_add(racc, rp);
              racc <= '0;
              seg  <= seg + 1'b1;
            end else begin
              racc <= sat_add(racc, rp);
              fall <= sat_add(fall, fp);
            end
          end
          if (last2) begin
            seg  <= '0;
            racc <= '0;
            fall <= '0;
          end
        end
      end
    end
  end

endmodule
