// tb_mfcc_frontend: end-to-end test of the feature-extraction core at its
// default size (256-sample frames advanced by 128, 23 bands, 13 cepstral
// coefficients). A speech-like signal (voiced bursts of harmonics, silence,
// noise, a full-scale click) is fed at a sample pace the core can sustain;
// every feature vector must match, bit for bit, a reference that applies
// pre-emphasis, framing, Hamming window, fixed-point FFT, band energies,
// logarithms and cosine transform to the same samples. Afterwards samples
// are fed at the full clk2 rate, faster than frames can be processed, and the
// overrun flag must be raised.
// The feature-extraction clock clk runs unrelated to clk1 (14 ns against
// 10 ns), and is slowed to 200 ns while frames 4 and 5 go through, so that
// the bin FIFO between the two clock domains fills up.
// Mechanisms counted (each must occur): frames read lower half first and
// upper half first, pre-emphasis saturation, a frame that completes while the
// FFT is busy and waits (stall, input paused meanwhile, features still
// exact), a frame held back because the bin FIFO lacks room for it, and
// overrun.
module tb_mfcc_frontend;
  import mfcc_ref_pkg::*;
  localparam int N = 256, H = 128, NB = 23, NC = 13;
  localparam int NFR = 8, NS = N + (NFR - 1) * H;

  logic clk1 = 1'b0, clk2 = 1'b0, clk = 1'b0, rst = 1'b1;
  int clk_half = 7;
  int fifo_holds = 0;
  logic hold_q = 1'b0;
  logic in_valid = 1'b0;
  logic signed [15:0] in_sample = '0;
  logic out_valid, overrun;
  logic signed [15:0] log_e;
  logic signed [31:0] cep [NC];
  int checks = 0, failures = 0;
  longint pe [NS];
  int frames = 0, overruns = 0, sat_pe = 0, even_frames = 0, odd_frames = 0;
  int cycle = 0, stalls = 0;
  logic pending_q = 1'b0;
  bit checking = 1'b1;

  mfcc_frontend dut (.*);

  always #5 clk1 = ~clk1;
  initial begin
    #5;
    forever begin clk2 = 1'b1; #10; clk2 = 1'b0; #10; end
  end
  always begin #(clk_half); clk = ~clk; end
  always @(posedge clk1) cycle <= cycle + 1;

  // FFT idle, but the FIFO into the clk domain cannot take another frame
  always @(posedge clk1) begin
    hold_q <= dut.fft_idle && !dut.fifo_room;
    if (!rst && dut.fft_idle && !dut.fifo_room && !hold_q) fifo_holds++;
  end

  // a completed frame waiting for the FFT (observed inside the frame memory)
  always @(posedge clk1) begin
    pending_q <= dut.u_pre.u_overlap.pending;
    if (!rst && checking && dut.u_pre.u_overlap.pending && !pending_q) stalls++;
  end

  always @(posedge clk1) if (!rst && overrun) overruns++;

  always @(posedge clk) begin
    if (!rst && out_valid && checking) begin
      longint frame [], c [];
      int le;
      frame = new[N];
      for (int n = 0; n < N; n++) frame[n] = pe[frames * H + n];
      feat_from_frame(N, NB, NC, frame, le, c);
      checks++;
      if (int'(log_e) != le) begin
        failures++; $display("FAIL: frame %0d log_e %0d expected %0d", frames, log_e, le);
      end
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (longint'(cep[i]) != c[i]) begin
          failures++; $display("FAIL: frame %0d C%0d %0d expected %0d", frames, i, cep[i], c[i]);
        end
      end
      $display("frame %0d: lnE=%0.3f C0=%0.3f C1=%0.3f C2=%0.3f", frames, real'(log_e) / 1024.0,
               real'(cep[0]) / 1024.0, real'(cep[1]) / 1024.0, real'(cep[2]) / 1024.0);
      if (frames % 2 == 0) even_frames++; else odd_frames++;
      frames++;
    end
  end

  initial begin
    int s [NS];
    int prev = 0;
    for (int i = 0; i < NS; i++) begin
      real env, v;
      env = (i % 400 < 250) ? 1.0 : 0.02;              // voiced bursts and pauses
      v = 0.0;
      for (int h = 1; h <= 6; h++) v += (6000.0 / h) * $sin(2.0 * RPI * 140.0 * h * i / 8000.0);
      s[i] = rnd(env * v) + int'($urandom_range(0, 200)) - 100;
      if (i == 300) s[i] = 32767;                        // click
      if (i == 301) s[i] = -32768;
      pe[i] = preemph_ref(s[i], prev);
      if (pe[i] == 32767 || pe[i] == -32768) sat_pe++;
      prev = s[i];
    end
    repeat (4) @(negedge clk2);
    rst = 1'b0;
    for (int i = 0; i < NS; i++) begin
      @(negedge clk2);
      in_valid = 1'b1; in_sample = 16'(s[i]);
      @(negedge clk2);
      in_valid = 1'b0;
      if (i == N + 3 * H) clk_half = 100;
      if (i == N + 6 * H) clk_half = 7;
      if (i >= N + 4 * H && i < N + 5 * H - 1) begin
        // frame 5 fills while frame 4 is still in the FFT: frame 5 must wait
        @(negedge clk2);
      end else if (i == N + 5 * H - 1) begin
        repeat (1200) @(negedge clk2);                 // no input while it waits
      end else begin
        repeat (6) @(negedge clk2);                    // one sample per 16 clk1 cycles
      end
    end
    repeat (1000) @(negedge clk2);
    checking = 1'b0;
    checks++;
    if (frames != NFR) begin failures++; $display("FAIL: %0d frames", frames); end
    checks++;
    if (overruns != 0) begin failures++; $display("FAIL: overrun at sustainable pace"); end
    // full clk2 rate: too fast for the FFT, frames get lost
    for (int i = 0; i < 3 * N; i++) begin
      @(negedge clk2);
      in_valid = 1'b1; in_sample = 16'($urandom_range(0, 4000));
    end
    @(negedge clk2) in_valid = 1'b0;
    repeat (2000) @(negedge clk2);
    $display("mechanisms: frames=%0d lower_first=%0d upper_first=%0d preemph_saturations=%0d stalls=%0d fifo_holds=%0d overruns=%0d",
             frames, even_frames, odd_frames, sat_pe, stalls, fifo_holds, overruns);
    checks += 6;
    if (fifo_holds == 0) failures++;
    if (stalls == 0) failures++;
    if (even_frames == 0) failures++;
    if (odd_frames == 0) failures++;
    if (sat_pe == 0) failures++;
    if (overruns == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
