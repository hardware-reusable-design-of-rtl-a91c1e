// hamming_window: Hamming windowing and bit-reversal reordering of a frame.
//
// Each incoming frame sample, numbered by its position n in the frame,
// addresses a ROM whose word holds two fields: the Hamming coefficient
// w[n] = 0.54 - 0.46 cos(2 pi n / (N-1)), scaled by 2^10, and the write
// address of the windowed result, which is n with its log2(N) bits reversed.
// The sample is multiplied by w[n] and shifted right by 10; the product is
// written into the FFT's working memory at the bit-reversed address, so the
// decimation-in-time FFT needs no later shuffling of the samples.
//
// Pipeline: ROM read and operand registers in the first cycle, multiply and
// shift in the second. in_valid at edge t -> wr_en at edge t+2. frame_done
// is high together with the write of the last sample of the frame.
//
// The ROM holding coefficient plus write address, the multiplier and the
// bit-reversal mapping follow the document. The ROM contents are generated at
// elaboration from N (the document computes them off line); the 2^10 scaling
// of the coefficients follows the document's normalisation of data by 1024;
// truncating rather than rounding the product is this design's choice.
module hamming_window
  import mfcc_pkg::*;
#(
  parameter int N = 256,
  parameter int W = DATA_W
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   in_sample,
  input  logic [$clog2(N)-1:0]  in_idx,
  input  logic                  in_last,
  output logic                  wr_en,
  output logic [$clog2(N)-1:0]  wr_addr,
  output logic signed [W-1:0]   wr_data,
  output logic                  frame_done
);

  localparam int L  = $clog2(N);
  localparam int CW = Q_SHIFT + 2;   // coefficient width: 0 .. 1024, unsigned

  typedef struct packed {
    logic [L-1:0]  addr;   // bit-reversed write address
    logic [CW-1:0] coef;   // Hamming coefficient * 2^10
  } rom_word_t;

  rom_word_t rom [N];

  initial begin
    for (int n = 0; n < N; n++) begin
      rom[n].addr = L'(bitrev(n, L));
      rom[n].coef = CW'(hamming_coef(n, N));
    end
  end

  rom_word_t           rw_q;
  logic signed [W-1:0] smp_q;
  logic                v_q, last_q;
  logic signed [W+CW:0] prod;

  assign prod = smp_q * $signed({1'b0, rw_q.coef});

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q        <= 1'b0;
      last_q     <= 1'b0;
      rw_q       <= '0;
      smp_q      <= '0;
      wr_en      <= 1'b0;
      wr_addr    <= '0;
      wr_data    <= '0;
      frame_done <= 1'b0;
    end else begin
      v_q    <= in_valid;
      last_q <= in_valid && in_last;
      if (in_valid) begin
        rw_q  <= rom[in_idx];
        smp_q <= in_sample;
      end
      wr_en      <= v_q;
      frame_done <= last_q;
      if (v_q) begin
        wr_addr <= rw_q.addr;
        wr_data <= W'(prod >>> Q_SHIFT);
      end
    end
  end

endmodule
