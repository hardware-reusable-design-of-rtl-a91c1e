// tb_feature_extraction: checks the parameter extraction chain (band and
// frame energies, natural logarithm, cosine transform) on random and
// tone-like FFT frames of a 256-point transform. The feature vector must match
// a reference built from the arithmetic of each step and must appear 9 cycles
// after the last bin.
module tb_feature_extraction;
  import mfcc_ref_pkg::*;
  localparam int N = 256, NB = 23, NC = 13, FW = 25, NBIN = N / 2 + 1;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, in_last = 1'b0;
  logic signed [FW-1:0] in_re = '0, in_im = '0;
  logic out_valid;
  logic signed [15:0] log_e;
  logic signed [31:0] cep [NC];
  int checks = 0, failures = 0, cycle = 0, frames_out = 0;
  longint exp_q[$];     // per frame: log_e, then NC coefficients
  int due_q[$];

  feature_extraction dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      longint e;
      int d;
      frames_out++;
      e = exp_q.pop_front(); d = due_q.pop_front();
      checks += 2;
      if (longint'(log_e) != e) begin failures++; $display("FAIL: log_e %0d expected %0d", log_e, e); end
      if (cycle != d) begin failures++; $display("FAIL: output at %0d expected %0d", cycle, d); end
      for (int i = 0; i < NC; i++) begin
        e = exp_q.pop_front();
        checks++;
        if (longint'(cep[i]) != e) begin failures++; $display("FAIL: C%0d %0d expected %0d", i, cep[i], e); end
      end
    end
  end

  task automatic frame(int amp, int tone);
    longint re [], im [], c [];
    int le;
    re = new[NBIN]; im = new[NBIN];
    for (int k = 0; k < NBIN; k++) begin
      int a = (k == tone) ? amp * 8 : amp;
      re[k] = longint'($urandom_range(0, 2 * a)) - a;
      im[k] = longint'($urandom_range(0, 2 * a)) - a;
    end
    feat_from_bins(N, NB, NC, re, im, le, c);
    exp_q.push_back(le);
    for (int i = 0; i < NC; i++) exp_q.push_back(c[i]);
    for (int k = 0; k < NBIN; k++) begin
      @(negedge clk);
      in_valid = 1'b1; in_re = FW'(re[k]); in_im = FW'(im[k]); in_last = (k == NBIN - 1);
    end
    due_q.push_back(cycle + 9);
    @(negedge clk) in_valid = 1'b0; in_last = 1'b0;
    repeat (12) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    frame(1 << 18, 5);
    frame(1 << 12, 40);
    frame(1 << 20, 100);
    frame(1 << 9, 0);
    for (int f = 0; f < 6; f++) frame(1 << $urandom_range(8, 20), $urandom_range(0, 128));
    repeat (5) @(negedge clk);
    checks++;
    if (frames_out != 10) begin failures++; $display("FAIL: %0d frames", frames_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
