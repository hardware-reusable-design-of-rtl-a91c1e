// fft_r2dit: in-place radix-2 decimation-in-time FFT of a real frame.
//
// The frame is loaded through a write port into the working memory, already
// in bit-reversed order (the Hamming block writes it so). After `start`, one
// butterfly per clock cycle runs over log2(N) stages of N/2 butterflies:
//   t = W * b;  a' = a + t;  b' = a - t
// with W = exp(-j 2 pi k / N) from a twiddle ROM scaled by 2^14 (products
// rounded to nearest). The data path is FW = W + log2(N) + 1 bits wide and
// never scales, so no stage can overflow and the result equals the exact DFT
// up to twiddle rounding. The bins k = 0 .. N/2 (all that a real input needs)
// are then streamed out, one per cycle, in natural order.
//
// Timing: ld_* writes are accepted while ready is high. start (with ready)
// begins the transform; N/2*log2(N) cycles later the N/2+1 output bins follow
// on consecutive cycles (out_valid, out_k, out_last on bin N/2); ready returns
// on the cycle after out_last.
//
// The document reuses an existing radix-2 DIT FFT with parameterised length
// and word width and does not describe its insides; this single-butterfly,
// register-file implementation is this design's own, as are the word widths,
// the twiddle scaling and the load/start/stream interface.
module fft_r2dit
  import mfcc_pkg::*;
#(
  parameter int N  = 256,
  parameter int W  = DATA_W,              // input word width
  parameter int FW = W + $clog2(N) + 1    // internal and output word width
) (
  input  logic                  clk,
  input  logic                  rst,
  // load port (bit-reversed order is the caller's job)
  input  logic                  ld_en,
  input  logic [$clog2(N)-1:0]  ld_addr,
  input  logic signed [W-1:0]   ld_data,
  input  logic                  start,
  output logic                  ready,
  // result stream
  output logic                  out_valid,
  output logic [$clog2(N)-1:0]  out_k,
  output logic signed [FW-1:0]  out_re,
  output logic signed [FW-1:0]  out_im,
  output logic                  out_last
);

  localparam int L  = $clog2(N);
  localparam int TW = TW_SHIFT + 2;

  typedef enum logic [1:0] {S_IDLE, S_CALC, S_OUT} state_t;

  logic signed [FW-1:0] mem_re [N];
  logic signed [FW-1:0] mem_im [N];
  logic signed [TW-1:0] tw_re  [N/2];
  logic signed [TW-1:0] tw_im  [N/2];

  initial begin
    for (int k = 0; k < N / 2; k++) begin
      tw_re[k] = TW'(twiddle_re(k, N));
      tw_im[k] = TW'(twiddle_im(k, N));
    end
  end

  state_t             state;
  logic [$clog2(L)-1:0] stage;
  logic [L-2:0]       bfly;
  logic [L-1:0]       k_cnt;

  // butterfly addressing
  logic [L-1:0]   i0, i1, span_mask;
  logic [L-2:0]   tw_idx;
  always_comb begin
    span_mask = (L'(1) << stage) - 1'b1;
    i0        = ((L'(bfly) & ~span_mask) << 1) | (L'(bfly) & span_mask);
    i1        = i0 | (L'(1) << stage);
    tw_idx    = (L-1)'((L'(bfly) & span_mask) << (L - 1 - int'(stage)));
  end

  // butterfly arithmetic
  localparam int PW = FW + TW + 1;
  logic signed [FW-1:0] a_re, a_im, b_re, b_im, t_re, t_im;
  logic signed [PW-1:0] p_re, p_im, m_rr, m_ii, m_ri, m_ir;
  always_comb begin
    a_re = mem_re[i0];
    a_im = mem_im[i0];
    b_re = mem_re[i1];
    b_im = mem_im[i1];
    m_rr = PW'(b_re) * PW'(tw_re[tw_idx]);
    m_ii = PW'(b_im) * PW'(tw_im[tw_idx]);
    m_ri = PW'(b_re) * PW'(tw_im[tw_idx]);
    m_ir = PW'(b_im) * PW'(tw_re[tw_idx]);
    p_re = m_rr - m_ii + PW'(1 << (TW_SHIFT - 1));
    p_im = m_ri + m_ir + PW'(1 << (TW_SHIFT - 1));
    t_re = FW'(p_re >>> TW_SHIFT);
    t_im = FW'(p_im >>> TW_SHIFT);
  end

  always_ff @(posedge clk) begin
    if (state == S_IDLE && ld_en) begin
      mem_re[ld_addr] <= FW'(ld_data);
      mem_im[ld_addr] <= '0;
    end else if (state == S_CALC) begin
      mem_re[i0] <= a_re + t_re;
      mem_im[i0] <= a_im + t_im;
      mem_re[i1] <= a_re - t_re;
      mem_im[i1] <= a_im - t_im;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      stage     <= '0;
      bfly      <= '0;
      k_cnt     <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_k     <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_CALC;
          stage <= '0;
          bfly  <= '0;
        end
        S_CALC: begin
          bfly <= bfly + 1'b1;
          if (&bfly) begin
            if (int'(stage) == L - 1) begin
              state <= S_OUT;
              k_cnt <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        S_OUT: begin
          out_valid <= 1'b1;
          out_k     <= k_cnt;
          out_re    <= mem_re[k_cnt];
          out_im    <= mem_im[k_cnt];
          k_cnt     <= k_cnt + 1'b1;
          if (int'(k_cnt) == N / 2) begin
            out_last <= 1'b1;
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready = (state == S_IDLE);

  // loads are only accepted, and only meaningful, while the engine is idle
  a_load_when_ready: assert property (@(posedge clk) disable iff (rst) ld_en |-> ready)
    else $error("FFT memory written while a transform is running");
  a_start_when_ready: assert property (@(posedge clk) disable iff (rst) start |-> ready)
    else $error("FFT started while busy");

endmodule
