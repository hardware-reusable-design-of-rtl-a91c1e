// tb_fft_r2dit: checks the 256-point FFT. Random real frames are loaded in
// bit-reversed order; bins 0..128 must match a floating-point DFT within a
// small tolerance and a bit-exact model of the fixed-point butterflies
// exactly. Also checked: ready low while busy, the first bin exactly
// N/2*log2(N)+1 cycles after start, N/2+1 bins in order with out_last on the
// final one, and a second frame through the same instance (a pure tone).
module tb_fft_r2dit;
  import mfcc_ref_pkg::*;
  localparam int N  = 256;
  localparam int L  = 8;
  localparam int FW = 16 + L + 1;

  logic clk = 1'b0, rst = 1'b1;
  logic ld_en = 1'b0, start = 1'b0;
  logic [L-1:0] ld_addr = '0;
  logic signed [15:0] ld_data = '0;
  logic ready, out_valid, out_last;
  logic [L-1:0] out_k;
  logic signed [FW-1:0] out_re, out_im;
  int checks = 0, failures = 0, cycle = 0;

  fft_r2dit #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic run_frame(input longint x []);
    longint er [], ei [];
    int t_start, k;
    real maxerr = 0.0;
    fft_ref(N, x, er, ei);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      ld_en = 1'b1; ld_addr = L'(rev_bits(n, L)); ld_data = 16'(x[n]);
    end
    @(negedge clk);
    ld_en = 1'b0; start = 1'b1;
    t_start = cycle;                 // start is taken at the next edge
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (ready) begin failures++; $display("FAIL: ready while busy"); end
    while (!out_valid) @(negedge clk);
    checks++;
    if (cycle - t_start - 1 != N / 2 * L + 1) begin
      failures++; $display("FAIL: first bin after %0d cycles", cycle - t_start);
    end
    k = 0;
    while (out_valid) begin
      real dr = 0.0, di = 0.0, err;
      for (int n = 0; n < N; n++) begin
        dr += real'(x[n]) * $cos(2.0 * RPI * real'(k * n) / real'(N));
        di -= real'(x[n]) * $sin(2.0 * RPI * real'(k * n) / real'(N));
      end
      err = $sqrt((real'(out_re) - dr) ** 2 + (real'(out_im) - di) ** 2);
      if (err > maxerr) maxerr = err;
      checks += 3;
      if (int'(out_k) != k || out_last != (k == N / 2)) begin
        failures++; $display("FAIL: bin numbering %0d/%0d", out_k, k);
      end
      if (err > 128.0) begin
        failures++; $display("FAIL: bin %0d error %f", k, err);
      end
      if (longint'(out_re) != er[k] || longint'(out_im) != ei[k]) begin
        failures++; $display("FAIL: bin %0d %0d,%0d expected %0d,%0d", k, out_re, out_im, er[k], ei[k]);
      end
      k++;
      @(negedge clk);
    end
    checks++;
    if (k != N / 2 + 1) begin failures++; $display("FAIL: %0d bins", k); end
    $display("frame done, max error vs DFT %f", maxerr);
    @(negedge clk);
    checks++;
    if (!ready) begin failures++; $display("FAIL: not ready after output"); end
  endtask

  initial begin
    longint x [];
    x = new[N];
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    checks++;
    if (!ready) failures++;
    for (int n = 0; n < N; n++) x[n] = longint'($urandom_range(0, 65535)) - 32768;
    run_frame(x);
    for (int n = 0; n < N; n++) x[n] = rnd(20000.0 * $cos(2.0 * RPI * 10.0 * real'(n) / real'(N)));
    run_frame(x);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
