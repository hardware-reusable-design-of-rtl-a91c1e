// tb_mfcc_rates: runs the core at the other two Aurora sample rates, 11 kHz
// and 16 kHz, with the same 256-sample frames. Two instances differ only in
// FS, which moves the mel band limits; both are fed the same speech-like
// signal and every feature vector is compared bit-exactly with the reference
// for that rate. The two instances must also disagree somewhere, showing that
// the band layout really follows FS. Here the feature-extraction clock is
// simply clk1, the case where the core runs on two clocks only.
module tb_mfcc_rates;
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
  real fs_of [2] = '{11000.0, 16000.0};

  mfcc_frontend #(.FS(11000.0)) dut11 (.clk1, .clk2, .clk(clk1), .rst, .in_valid, .in_sample,
    .out_valid(out_valid[0]), .log_e(log_e[0]), .cep(cep[0]), .overrun(overrun[0]));
  mfcc_frontend #(.FS(16000.0)) dut16 (.clk1, .clk2, .clk(clk1), .rst, .in_valid, .in_sample,
    .out_valid(out_valid[1]), .log_e(log_e[1]), .cep(cep[1]), .overrun(overrun[1]));

  always #5 clk1 = ~clk1;
  initial begin
    #5;
    forever begin clk2 = 1'b1; #10; clk2 = 1'b0; #10; end
  end

  always @(posedge clk1) begin
    for (int d = 0; d < 2; d++) begin
      if (!rst && overrun[d]) begin checks++; failures++; $display("FAIL: overrun"); end
      if (!rst && out_valid[d]) begin
        longint frame [], c [];
        int le;
        frame = new[N];
        for (int n = 0; n < N; n++) frame[n] = pe[frames[d] * H + n];
        feat_from_frame(N, NB, NC, frame, le, c, fs_of[d]);
        checks++;
        if (int'(log_e[d]) != le) begin failures++; $display("FAIL: fs %f log_e", fs_of[d]); end
        for (int i = 0; i < NC; i++) begin
          checks++;
          if (longint'(cep[d][i]) != c[i]) begin
            failures++; $display("FAIL: fs %f frame %0d C%0d %0d expected %0d", fs_of[d], frames[d], i, cep[d][i], c[i]);
          end
        end
        frames[d]++;
      end
    end
    if (!rst && out_valid[0] && out_valid[1])
      for (int i = 1; i < NC; i++) if (cep[0][i] != cep[1][i]) differ++;
  end

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
    if (differ == 0) begin failures++; $display("FAIL: band layout does not depend on FS"); end
    if (log_e[0] != log_e[1]) begin failures++; $display("FAIL: frame energy depends on FS"); end
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
