// tb_mel_cepstrum: checks the cosine transform of 23 log band energies into
// 13 cepstral coefficients. Frames of random 16-bit values, streamed with
// gaps, must give C_i = (sum_j ln_j * round(1024 cos(pi i (j+0.5)/23))) >> 10
// exactly, two cycles after the last value; a constant frame must give a zero
// C1..C12 (within rounding) and C0 = 23 * value.
module tb_mel_cepstrum;
  import mfcc_ref_pkg::*;
  localparam int NB = 23, NC = 13;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  logic signed [15:0] in_ln = '0;
  logic out_valid;
  logic signed [31:0] cep [NC];
  int checks = 0, failures = 0, cycle = 0, frames_out = 0;
  longint expc[$];   // NC values per frame
  int due[$];

  mel_cepstrum dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      longint e [NC];
      int d;
      for (int i = 0; i < NC; i++) e[i] = expc.pop_front();
      d = due.pop_front();
      frames_out++;
      checks++;
      if (cycle != d) begin failures++; $display("FAIL: output at %0d, expected %0d", cycle, d); end
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (longint'(cep[i]) != e[i]) begin
          failures++; $display("FAIL: C%0d = %0d expected %0d", i, cep[i], e[i]);
        end
      end
    end
  end

  task automatic frame(bit constant, int value);
    longint acc [NC];
    for (int i = 0; i < NC; i++) acc[i] = 0;
    for (int j = 0; j < NB; j++) begin
      int v;
      @(negedge clk);
      while ($urandom_range(0, 2) == 0) begin in_valid = 1'b0; @(negedge clk); end
      v = constant ? value : int'($urandom_range(0, 65535)) - 32768;
      in_valid = 1'b1; in_ln = 16'(v);
      for (int i = 0; i < NC; i++) acc[i] += longint'(v) * dct_ref(i, j, NB);
    end
    for (int i = 0; i < NC; i++) acc[i] = acc[i] >>> 10;
    for (int i = 0; i < NC; i++) expc.push_back(acc[i]);
    due.push_back(cycle + 2);
    @(negedge clk) in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    frame(1'b1, 10000);
    repeat (4) @(negedge clk);
    checks++;
    if (cep[0] != 32'sd230000) failures++;
    for (int i = 1; i < NC; i++) begin
      checks++;
      if (cep[i] > 32'sd8 || cep[i] < -32'sd8) begin failures++; $display("FAIL: C%0d of constant = %0d", i, cep[i]); end
    end
    repeat (20) frame(1'b0, 0);
    repeat (5) @(negedge clk);
    checks++;
    if (frames_out != 21) begin failures++; $display("FAIL: %0d frames", frames_out); end
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
