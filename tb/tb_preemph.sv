// tb_preemph: checks the pre-emphasis filter against the reference formula
// y[n] = s[n] - s[n-1] + floor(s[n-1]/32) (saturated), including full-scale
// inputs, input gaps, and the three-cycle latency of every sample.
module tb_preemph;
  import mfcc_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  logic signed [15:0] in_sample = '0;
  logic out_valid;
  logic signed [15:0] out_sample;
  int checks = 0, failures = 0;
  int cycle = 0;

  preemph dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  int exp_q[$];
  int due_q[$];
  int prev = 0;

  // scoreboard
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output %0d", out_sample);
      end else begin
        int e, d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (int'(out_sample) != e || cycle != d) begin
          failures++;
          $display("FAIL: got %0d at %0d, expected %0d at %0d", out_sample, cycle, e, d);
        end
      end
    end
  end

  task automatic send(int s);
    @(negedge clk);
    in_valid  = 1'b1;
    in_sample = 16'(s);
    exp_q.push_back(preemph_ref(s, prev));
    due_q.push_back(cycle + 3);   // accepted at the next edge, output 3 edges later
    prev = s;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    send(100); send(200); send(-300);
    send(32767); send(-32768); send(32767); send(-32768); // saturation both ways
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        int s;
        s = int'($urandom_range(0, 65535)) - 32768;
        in_sample = 16'(s);
        exp_q.push_back(preemph_ref(s, prev));
        due_q.push_back(cycle + 3);
        prev = s;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_q.size()); end
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
