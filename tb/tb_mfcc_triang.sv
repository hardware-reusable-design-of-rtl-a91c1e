// tb_mfcc_triang: the two band layouts of the core side by side at 8 kHz.
// One instance sums the FFT power between band limits (the default), the
// other weights it with overlapping triangular mel filters (TRIANG = 1).
// Both are fed the same speech-like signal, every feature vector is compared
// bit-exactly with the reference for its layout, the frame energy must be the
// same in both, and the cepstral coefficients must differ somewhere. The
// feature-extraction clock is clk1 for the first instance and an unrelated
// 12 ns clock for the second.
module tb_mfcc_triang;
  import mfcc_ref_pkg::*;
  localparam int N = 256, H = 128, NB = 23, NC = 13;
  localparam int NFR = 4, NS = N + (NFR - 1) * H;

  logic clk1 = 1'b0, clk2 = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  logic signed [15:0] in_sample = '0;
  logic out_valid [2], overrun [2];
  logic signed [15:0] log_e [2];
  logic signed [31:0] cep [2][NC];
  int checks = 0, failures = 0, differ = 0;
  longint pe [NS];
  int frames [2] = '{0, 0};
  bit tri_of [2] = '{1'b0, 1'b1};
  logic clk = 1'b0;

  mfcc_frontend dut_sum (.clk1, .clk2, .clk(clk1), .rst, .in_valid, .in_sample,
    .out_valid(out_valid[0]), .log_e(log_e[0]), .cep(cep[0]), .overrun(overrun[0]));
  mfcc_frontend #(.TRIANG(1'b1)) dut_tri (.clk1, .clk2, .clk, .rst, .in_valid, .in_sample,
    .out_valid(out_valid[1]), .log_e(log_e[1]), .cep(cep[1]), .overrun(overrun[1]));

  always #5 clk1 = ~clk1;
  always #6 clk = ~clk;
  initial begin
    #5;
    forever begin clk2 = 1'b1; #10; clk2 = 1'b0; #10; end
  end

  longint cep_seen [2][NFR * NC];
  int le_seen [2][NFR];

  task automatic check(int d);
    longint frame [], c [];
    int le;
    frame = new[N];
    for (int n = 0; n < N; n++) frame[n] = pe[frames[d] * H + n];
    feat_from_frame(N, NB, NC, frame, le, c, 8000.0, tri_of[d]);
    checks++;
    if (int'(log_e[d]) != le) begin failures++; $display("FAIL: triangular %0d log_e", tri_of[d]); end
    for (int i = 0; i < NC; i++) begin
      checks++;
      if (longint'(cep[d][i]) != c[i]) begin
        failures++;
        $display("FAIL: triangular %0d frame %0d C%0d %0d expected %0d", tri_of[d], frames[d], i, cep[d][i], c[i]);
      end
      if (frames[d] < NFR) cep_seen[d][frames[d] * NC + i] = longint'(cep[d][i]);
    end
    if (frames[d] < NFR) le_seen[d][frames[d]] = int'(log_e[d]);
    frames[d]++;
  endtask

  always @(posedge clk1) begin
    if (!rst && (overrun[0] || overrun[1])) begin checks++; failures++; $display("FAIL: overrun"); end
    if (!rst && out_valid[0]) check(0);
  end
  always @(posedge clk) if (!rst && out_valid[1]) check(1);

  initial begin
    int s [NS];
    int prev;
    prev = 0;
    for (int i = 0; i < NS; i++) begin
      real v;
      v = 0.0;
      for (int h = 1; h <= 8; h++) v += (5000.0 / h) * $sin(2.0 * RPI * 190.0 * h * i / 16000.0);
      s[i] = rnd(v) + int'($urandom_range(0, 400)) - 200;
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
      repeat (6) @(negedge clk2);
    end
    repeat (1000) @(negedge clk2);
    checks += 3;
    if (frames[0] != NFR || frames[1] != NFR) begin failures++; $display("FAIL: frames %0d %0d", frames[0], frames[1]); end
    for (int f = 0; f < NFR; f++) begin
      if (le_seen[0][f] != le_seen[1][f]) begin failures++; $display("FAIL: frame %0d energy differs", f); end
      for (int i = 1; i < NC; i++) if (cep_seen[0][f * NC + i] != cep_seen[1][f * NC + i]) differ++;
    end
    if (differ == 0) begin failures++; $display("FAIL: triangular filters change nothing"); end
    $display("coefficients that differ between the layouts: %0d", differ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
