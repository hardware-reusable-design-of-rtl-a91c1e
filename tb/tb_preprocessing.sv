// tb_preprocessing: checks the pre-processing chain with 256-sample frames.
// Random speech-band samples enter on clk2; a stand-in for the FFT holds
// fft_ready low for a while after each frame. Each frame's 256 writes must
// come on consecutive clk1 cycles and hold, at address bitrev(n), the
// windowed n-th sample of that frame of the pre-emphasised stream, where
// frame f covers pre-emphasised samples 128f .. 128f+255.
module tb_preprocessing;
  import mfcc_ref_pkg::*;
  localparam int N = 256, H = 128, NFR = 5, NS = N + (NFR - 1) * H;

  logic clk1 = 1'b0, clk2 = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  logic signed [15:0] in_sample = '0;
  logic fft_ready = 1'b1;
  logic wr_en, frame_done, overrun;
  logic [7:0] wr_addr;
  logic signed [15:0] wr_data;
  int checks = 0, failures = 0;
  int pe [NS];
  int got [N];
  int n_wr = 0, frames = 0, busy_cnt = 0, gaps = 0;
  bit prev_wr = 1'b0;

  preprocessing dut (.*);

  always #5 clk1 = ~clk1;
  initial begin
    #5;
    forever begin clk2 = 1'b1; #10; clk2 = 1'b0; #10; end
  end

  // stand-in FFT: busy for 400 cycles after each frame
  always @(posedge clk1) begin
    if (rst) begin
      fft_ready <= 1'b1; busy_cnt <= 0;
    end else if (frame_done) begin
      fft_ready <= 1'b0; busy_cnt <= 400;
    end else if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt == 1) fft_ready <= 1'b1;
    end
  end

  always @(posedge clk1) begin
    if (!rst) begin
      if (wr_en) begin
        if (n_wr > 0 && !prev_wr) gaps++;
        got[wr_addr] = int'(wr_data);
        n_wr++;
      end
      prev_wr = wr_en;
      if (frame_done) begin
        checks++;
        if (n_wr != N || gaps != 0) begin
          failures++; $display("FAIL: frame %0d had %0d writes, %0d gaps", frames, n_wr, gaps);
        end
        for (int n = 0; n < N; n++) begin
          int e;
          e = window_ref(pe[frames * H + n], n, N);
          checks++;
          if (got[rev_bits(n, 8)] != e) begin
            failures++;
            $display("FAIL: frame %0d sample %0d: %0d expected %0d", frames, n, got[rev_bits(n, 8)], e);
          end
        end
        frames++; n_wr = 0; gaps = 0;
      end
    end
  end

  initial begin
    int s [NS];
    int prev = 0;
    for (int i = 0; i < NS; i++) begin
      s[i] = rnd(9000.0 * $sin(0.21 * i) + 4000.0 * $sin(1.7 * i)) + int'($urandom_range(0, 2000)) - 1000;
      pe[i] = preemph_ref(s[i], prev);
      prev = s[i];
    end
    repeat (4) @(negedge clk2);
    rst = 1'b0;
    for (int i = 0; i < NS; i++) begin
      @(negedge clk2);
      in_valid = 1'b1; in_sample = 16'(s[i]);
      @(negedge clk2);
      in_valid = 1'b0;
      repeat (2) @(negedge clk2);
    end
    repeat (400) @(negedge clk2);
    checks += 2;
    if (frames != NFR) begin failures++; $display("FAIL: %0d frames", frames); end
    if (overrun) failures++;
    $display("frames=%0d", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
